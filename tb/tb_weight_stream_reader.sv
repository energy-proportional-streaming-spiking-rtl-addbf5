// tb_weight_stream_reader - checks the join and unpacking of the weight streams.
//
// Drives the four 64-bit streams with random data and random per-port valid
// bits. Checks that a beat is offered only when all four ports are valid, that
// every port's tready equals the joined handshake, and that lane p*8+i carries
// byte i of port p (so one beat holds weights 0-7 on port 0, 8-15 on port 1,
// 16-23 on port 2 and 24-31 on port 3).
module tb_weight_stream_reader;
  localparam int N_PORTS = 4, PORT_W = 64, W_BITS = 8, LANES = 32;
  logic [PORT_W-1:0]  s_axis_tdata [N_PORTS];
  logic [N_PORTS-1:0] s_axis_tvalid, s_axis_tready;
  logic               w_valid, w_ready;
  logic [W_BITS-1:0]  w_data [LANES];
  int checks = 0, failures = 0, joined = 0;

  weight_stream_reader #(.N_PORTS(N_PORTS), .PORT_W(PORT_W), .W_BITS(W_BITS)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int p = 0; p < N_PORTS; p++) s_axis_tdata[p] = {$urandom, $urandom};
      s_axis_tvalid = (n % 2 == 0) ? 4'hf : 4'($urandom);
      w_ready = ($urandom % 4 != 0);
      #1;
      checks++;
      if (w_valid !== (s_axis_tvalid == 4'hf)) failures++;
      checks++;
      if (s_axis_tready !== {4{(s_axis_tvalid == 4'hf) && w_ready}}) failures++;
      if (w_valid && w_ready) joined++;
      for (int j = 0; j < LANES; j++) begin
        checks++;
        if (w_data[j] !== s_axis_tdata[j / 8][(j % 8) * 8 +: 8]) begin
          failures++;
          if (failures < 10) $display("lane %0d got %h", j, w_data[j]);
        end
      end
    end
    checks++;
    if (joined == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
