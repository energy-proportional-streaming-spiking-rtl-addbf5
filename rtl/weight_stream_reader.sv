// weight_stream_reader - joins the weight streams and unpacks them into lanes.
//
// Synaptic weights are not kept on chip: they arrive from external memory on
// N_PORTS AXI4-Stream inputs of PORT_W bits, one per high-performance port
// (4 x 64 bits = 256 bits per cycle). A beat is taken only when every stream
// has data, and then from all of them at once, so the four streams stay in step.
// The beat holds LANES = N_PORTS*PORT_W/W_BITS weights (32 for 8-bit weights):
// port p carries lanes p*PER_PORT .. p*PER_PORT+PER_PORT-1, lowest lane in the
// least significant bits. Within one neuron, beat b holds weights
// b*LANES .. b*LANES+LANES-1, so port 0 carries weights 0-7, 32-39, 64-71 ...,
// port 1 weights 8-15, 40-47 ..., as in the design's streaming layout. The
// placement of a weight inside a 64-bit word is this design's choice.
//
// The join is combinational (no buffering): tready of every port equals
// w_ready while all tvalid are high; tlast is not used.
module weight_stream_reader #(
  parameter int N_PORTS = 4,
  parameter int PORT_W  = 64,
  parameter int W_BITS  = 8,
  localparam int PER_PORT = PORT_W / W_BITS,
  localparam int LANES    = N_PORTS * PER_PORT
) (
  input  logic [PORT_W-1:0]  s_axis_tdata  [N_PORTS],
  input  logic [N_PORTS-1:0] s_axis_tvalid,
  output logic [N_PORTS-1:0] s_axis_tready,
  output logic               w_valid,
  input  logic               w_ready,
  output logic [W_BITS-1:0]  w_data [LANES]
);

  always_comb begin
    w_valid       = &s_axis_tvalid;
    s_axis_tready = {N_PORTS{w_valid && w_ready}};
    for (int p = 0; p < N_PORTS; p++)
      for (int i = 0; i < PER_PORT; i++)
        w_data[p*PER_PORT + i] = s_axis_tdata[p][i*W_BITS +: W_BITS];
  end

endmodule
