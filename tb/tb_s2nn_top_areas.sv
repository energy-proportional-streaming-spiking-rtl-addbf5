// tb_s2nn_top_areas - energy-proportional operation of the default 170 x 170
// build: six time steps with the active area set to 50x50, 100x100 and 150x150
// in turn (twice each). Besides checking every firing bit and the neuron-phase
// cycle count, it measures each whole step from START to the interrupt and
// checks that it fits in 1 ms at the clock that size needs for real time: 9
// MHz for 50x50, 60 MHz for 100x100 and 150 MHz for 150x150.
//
// Connects s2nn_top to s2nn_host_model, which programs it, streams the
// weights, collects the firing bits and checks every time step against a
// reference model of the network (see s2nn_host_model for what is checked).
module tb_s2nn_top_areas;
  logic              clk, rst_n;
  logic [15:0]       awaddr, araddr;
  logic              awvalid, awready, wvalid, wready, bvalid, bready;
  logic              arvalid, arready, rvalid, rready, irq;
  logic [31:0]       wdata, rdata;
  logic [3:0]        wstrb;
  logic [1:0]        bresp, rresp;
  logic [63:0]       w_tdata [4];
  logic [3:0]        w_tvalid, w_tready;
  logic [63:0]       o_tdata;
  logic              o_tvalid, o_tready, o_tlast;

  s2nn_top dut (
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

  s2nn_host_model #(.L(170), .N_LAYER(170), .N_STEPS(6), .AREA_SW(0), .GAPS(0), .REQ_MECH(0), .WATCHDOG(2000000), .AREA_SEQ(1)) host (
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
  // counter (2,000,000 cycles): if the run ever gets past it, fail and stop.
  initial begin
    repeat (2500000) @(posedge clk);
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
