// tb_s2nn_core - checks the time-step sequencer on a 3 x 70 network.
//
// Seventy neurons per layer need three weight beats per neuron (the last one
// partly empty) and two output beats per layer. The core is wired to the
// control slave and the stream reader as in the accelerator and driven by
// s2nn_host_model, which checks the firing bits of every step, the spike count,
// the step count and the neuron-phase cycle count (3*70*3 + 4 plus stalls)
// against its reference model, over twenty steps with random stream gaps,
// output back-pressure and a change of active area to 2 x 38.
module tb_s2nn_core;
  localparam int L = 3, N_LAYER = 70, LW = 2, NWID = 7, LANES = 32;
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

  logic              start, init, busy, done, cfg_we, cfg_sel, w_valid, w_ready;
  logic [LW-1:0]     layers_act;
  logic [NWID-1:0]   neurons_act;
  logic [31:0]       step_count, neu_cycles, spike_count, cfg_wdata;
  logic [15:0]       cfg_addr;
  logic [7:0]        w_data [LANES];

  s2nn_ctrl #(.LW(LW), .NWID(NWID)) u_ctrl (
    .clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .irq, .start, .init, .layers_act, .neurons_act, .busy, .done,
    .step_count, .neu_cycles, .spike_count, .cfg_we, .cfg_sel, .cfg_addr, .cfg_wdata
  );

  weight_stream_reader u_reader (
    .s_axis_tdata(w_tdata), .s_axis_tvalid(w_tvalid), .s_axis_tready(w_tready),
    .w_valid, .w_ready, .w_data
  );

  s2nn_core #(.L(L), .N_LAYER(N_LAYER)) dut (
    .clk, .rst_n, .start, .init, .layers_act, .neurons_act, .busy, .done,
    .step_count, .neu_cycles, .spike_count, .cfg_we, .cfg_sel, .cfg_addr, .cfg_wdata,
    .w_valid, .w_ready, .w_data,
    .m_axis_tdata(o_tdata), .m_axis_tvalid(o_tvalid), .m_axis_tready(o_tready), .m_axis_tlast(o_tlast)
  );

  s2nn_host_model #(.L(L), .N_LAYER(N_LAYER), .N_STEPS(20), .AREA_SW(1), .GAPS(1),
                    .REQ_MECH(1), .WATCHDOG(300000)) host (
    .clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .irq,
    .w_tdata, .w_tvalid, .w_tready,
    .o_tdata, .o_tvalid, .o_tready, .o_tlast,
    .dut_w_ready(w_ready)
  );
endmodule
