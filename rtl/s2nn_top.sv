// s2nn_top - S2NN streaming spiking neural network accelerator.
//
// The accelerated block of the programmable logic: a feed-forward network of
// L layers x N_LAYER Izhikevich neurons, fully connected layer to layer, whose
// synaptic weights are streamed from external memory instead of being held on
// chip. Its ports are the ones the block shows in the system:
//   s_axi_*          32-bit AXI4-Lite control slave (host general-purpose port),
//                    register map in s2nn_ctrl
//   s_axis_input_*   N_PORTS x 64-bit AXI4-Stream weight inputs, one per
//                    high-performance memory port (S_AXIS_INPUT0..3); 256 bits
//                    = 32 8-bit weights per cycle
//   m_axis_output_*  64-bit AXI4-Stream output of the firing bits of each step
//   irq              completion interrupt
// All on one clock (the fabric clock) with an active-low reset.
//
// Host sequence: write neuron types and (per step) external input spikes,
// set LAYERS and NEURONS, pulse INIT and wait for DONE, then for each 1 ms step
// pulse START, supply layers*neurons*ceil(neurons/32) beats of weights (layer
// by layer, neuron by neuron, see weight_stream_reader for the layout), take
// the firing bits from the output stream and wait for DONE.
//
// The composition (control slave, stream reader/converter, sequencer with the
// synaptic current and neuron units) follows the design; the parameter
// defaults are its main configuration: 170 x 170 neurons (the largest network
// for the smaller device evaluated), 8-bit weights, four 64-bit ports.
module s2nn_top
  import s2nn_pkg::*;
#(
  parameter int   L       = 170,
  parameter int   N_LAYER = 170,
  parameter int   N_PORTS = 4,
  parameter int   PORT_W  = 64,
  parameter int   W_BITS  = 8,
  parameter int   W_FRAC  = 13,
  parameter fix_t DECAY   = 32'sd58982,
  localparam int  LANES   = N_PORTS * PORT_W / W_BITS,
  localparam int  LW      = $clog2(L + 1),
  localparam int  NWID    = $clog2(N_LAYER + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // control (AXI4-Lite)
  input  logic [15:0]        s_axi_awaddr,
  input  logic               s_axi_awvalid,
  output logic               s_axi_awready,
  input  logic [31:0]        s_axi_wdata,
  input  logic [3:0]         s_axi_wstrb,
  input  logic               s_axi_wvalid,
  output logic               s_axi_wready,
  output logic [1:0]         s_axi_bresp,
  output logic               s_axi_bvalid,
  input  logic               s_axi_bready,
  input  logic [15:0]        s_axi_araddr,
  input  logic               s_axi_arvalid,
  output logic               s_axi_arready,
  output logic [31:0]        s_axi_rdata,
  output logic [1:0]         s_axi_rresp,
  output logic               s_axi_rvalid,
  input  logic               s_axi_rready,
  output logic               irq,
  // weight streams
  input  logic [PORT_W-1:0]  s_axis_input_tdata  [N_PORTS],
  input  logic [N_PORTS-1:0] s_axis_input_tvalid,
  output logic [N_PORTS-1:0] s_axis_input_tready,
  // output spikes
  output logic [63:0]        m_axis_output_tdata,
  output logic               m_axis_output_tvalid,
  input  logic               m_axis_output_tready,
  output logic               m_axis_output_tlast
);

  logic              start, init, busy, done;
  logic [LW-1:0]     layers_act;
  logic [NWID-1:0]   neurons_act;
  logic [31:0]       step_count, neu_cycles, spike_count;
  logic              cfg_we, cfg_sel;
  logic [15:0]       cfg_addr;
  logic [31:0]       cfg_wdata;
  logic              w_valid, w_ready;
  logic [W_BITS-1:0] w_data [LANES];

  s2nn_ctrl #(.LW(LW), .NWID(NWID)) u_ctrl (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .irq,
    .start, .init, .layers_act, .neurons_act, .busy, .done,
    .step_count, .neu_cycles, .spike_count,
    .cfg_we, .cfg_sel, .cfg_addr, .cfg_wdata
  );

  weight_stream_reader #(.N_PORTS(N_PORTS), .PORT_W(PORT_W), .W_BITS(W_BITS)) u_reader (
    .s_axis_tdata(s_axis_input_tdata), .s_axis_tvalid(s_axis_input_tvalid),
    .s_axis_tready(s_axis_input_tready),
    .w_valid, .w_ready, .w_data
  );

  s2nn_core #(
    .L(L), .N_LAYER(N_LAYER), .N_PORTS(N_PORTS), .PORT_W(PORT_W),
    .W_BITS(W_BITS), .W_FRAC(W_FRAC), .DECAY(DECAY)
  ) u_core (
    .clk, .rst_n,
    .start, .init, .layers_act, .neurons_act, .busy, .done,
    .step_count, .neu_cycles, .spike_count,
    .cfg_we, .cfg_sel, .cfg_addr, .cfg_wdata,
    .w_valid, .w_ready, .w_data,
    .m_axis_tdata(m_axis_output_tdata), .m_axis_tvalid(m_axis_output_tvalid),
    .m_axis_tready(m_axis_output_tready), .m_axis_tlast(m_axis_output_tlast)
  );

endmodule
