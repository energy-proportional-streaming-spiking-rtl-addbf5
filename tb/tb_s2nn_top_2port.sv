// tb_s2nn_top_2port - the two-port configuration: 8-bit weights on two 64-bit
// streams, 16 weights per cycle, so the pipeline interval per neuron doubles;
// 3 x 40 network, 24 steps with an area change, stream gaps and back-pressure.
//
// Connects s2nn_top to s2nn_host_model, which programs it, streams the
// weights, collects the firing bits and checks every time step against a
// reference model of the network (see s2nn_host_model for what is checked).
module tb_s2nn_top_2port;
  logic              clk, rst_n;
  logic [15:0]       awaddr, araddr;
  logic              awvalid, awready, wvalid, wready, bvalid, bready;
  logic              arvalid, arready, rvalid, rready, irq;
  logic [31:0]       wdata, rdata;
  logic [3:0]        wstrb;
  logic [1:0]        bresp, rresp;
  logic [63:0]       w_tdata [2];
  logic [1:0]        w_tvalid, w_tready;
  logic [63:0]       o_tdata;
  logic              o_tvalid, o_tready, o_tlast;

  s2nn_top #(.L(3), .N_LAYER(40), .N_PORTS(2)) dut (
    .clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .irq,
    .s_axis_input_tdata(w_tdata), .s_axis_input_tvalid(w_tvalid), .s_axis_input_tready(w_tready),
    .m_axis_output_tdata(o_tdata), .m_axis_output_tvalid(o_tvalid),
    .m_axis_output_tready(o_tready), .m_axis_output_tlast(o_tlast)
  );

  s2nn_host_model #(.L(3), .N_LAYER(40), .N_STEPS(24), .AREA_SW(1), .GAPS(1), .REQ_MECH(1), .WATCHDOG(300000), .N_PORTS(2)) host (
    .clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .irq,
    .w_tdata, .w_tvalid, .w_tready,
    .o_tdata, .o_tvalid, .o_tready, .o_tlast,
    .dut_w_ready(dut.u_core.w_ready)
  );

  // Second watchdog on simulated time, independent of the host model's cycle
  // counter (300,000 cycles): if the run ever gets past it, fail and stop.
  initial begin
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
