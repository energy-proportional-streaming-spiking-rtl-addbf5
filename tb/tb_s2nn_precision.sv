// tb_s2nn_precision - weight-precision study: the same 30 x 30 network of
// excitatory neurons run with 8-, 16- and 32-bit fixed-point weights.
//
// Three s2nn_top instances (W_BITS = 8, 16, 32 with W_FRAC = 13, 21, 29, so
// all three cover the same weight range) get the same network: every neuron
// excitatory, real weights drawn between 5e-4 and 2.5e-2 and rounded to each
// width from one 32-bit code, and the same external input spikes each step.
// They run N_STEPS time steps side by side. Each design has its own AXI4-Lite
// address and data (the word layouts differ with the lane count), while the
// valid/ready signals are shared because the three control slaves answer in
// lock step.
//
// Checked per step and design: NEUCYC = 900 * ceil(30 * W_BITS / 256) + 4
// (1, 2 and 4 beats per neuron) and SPIKES = the firing bits seen on the
// output stream. At the end the spike count of every neuron is compared with
// the 32-bit run: the sample correlation must be at least 0.95 and the mean
// rate within 10 %, for both the 8- and the 16-bit weights. With this
// design's model constants and an input firing half the time, activity
// reaches the first two layers and dies out deeper in the stack, so the
// comparison is taken over all neurons rather than the last layer alone.
module tb_s2nn_precision;
  import s2nn_ref_pkg::*;

  localparam int L       = 30;
  localparam int N       = 30;
  localparam int N_STEPS = 300;
  localparam int ND      = 3;          // designs: 8, 16, 32-bit weights

  logic        clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] awaddr [ND];
  logic [31:0] wdata  [ND];
  logic [15:0] araddr;
  logic        awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [3:0]  wstrb = 4'hf;
  logic [ND-1:0] awready, wready, bvalid, arready, rvalid, irq;
  logic [31:0] rdata [ND];
  logic [1:0]  bresp [ND], rresp [ND];

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // 32-bit weight code (29 fraction bits): 5e-4 .. 2.5e-2
  function automatic int unsigned c32(input int l, input int k, input int j);
    return 268435 + hash3(l + 1000, k, j) % 13153339;
  endfunction

  // the same weight rounded to design d (shift 16, 8, 0)
  function automatic int unsigned code_of(input int d, input int l, input int k, input int j);
    int sh;
    sh = 16 - 8 * d;
    return (sh == 0) ? c32(l, k, j) : (c32(l, k, j) + (1 << (sh - 1))) >> sh;
  endfunction

  bit          ext [N];
  event        go;
  int          n_fin;
  int          out_cnt  [ND][L*N];     // spike count of every neuron
  int          step_spk [ND];

  for (genvar d = 0; d < ND; d++) begin : g_dut
    localparam int WB    = 8 << d;
    localparam int LANES = 256 / WB;
    localparam int PER   = 64 / WB;
    localparam int NWA   = (N + LANES - 1) / LANES;

    logic [63:0] w_tdata [4];
    logic [3:0]  w_tvalid, w_tready;
    logic [63:0] o_tdata;
    logic        o_tvalid, o_tready, o_tlast;

    s2nn_top #(.L(L), .N_LAYER(N), .W_BITS(WB), .W_FRAC(13 + 8 * d)) dut (
      .clk, .rst_n,
      .s_axi_awaddr(awaddr[d]), .s_axi_awvalid(awvalid), .s_axi_awready(awready[d]),
      .s_axi_wdata(wdata[d]), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready[d]),
      .s_axi_bresp(bresp[d]), .s_axi_bvalid(bvalid[d]), .s_axi_bready(bready),
      .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready[d]),
      .s_axi_rdata(rdata[d]), .s_axi_rresp(rresp[d]), .s_axi_rvalid(rvalid[d]), .s_axi_rready(rready),
      .irq(irq[d]),
      .s_axis_input_tdata(w_tdata), .s_axis_input_tvalid(w_tvalid), .s_axis_input_tready(w_tready),
      .m_axis_output_tdata(o_tdata), .m_axis_output_tvalid(o_tvalid),
      .m_axis_output_tready(o_tready), .m_axis_output_tlast(o_tlast)
    );

    initial begin
      w_tvalid = '0;
      o_tready = 0;
      for (int p = 0; p < 4; p++) w_tdata[p] = '0;
    end

    // weights of one step, full rate
    initial forever begin
      @(go);
      for (int l = 0; l < L; l++)
        for (int k = 0; k < N; k++)
          for (int b = 0; b < NWA; b++) begin
            for (int p = 0; p < 4; p++)
              for (int i = 0; i < PER; i++) begin
                int j;
                j = b * LANES + p * PER + i;
                w_tdata[p][i*WB +: WB] <= (j < N) ? WB'(code_of(d, l, k, j)) : '0;
              end
            w_tvalid <= '1;
            @(posedge clk);
            while (!w_tready[0]) @(posedge clk);
          end
      w_tvalid <= '0;
      n_fin++;
    end

    // firing bits of one step: one beat per layer, the last is the output layer
    initial forever begin
      @(go);
      step_spk[d] = 0;
      for (int l = 0; l < L; l++) begin
        o_tready <= 1;
        @(posedge clk);
        while (!o_tvalid) @(posedge clk);
        chk(o_tlast == (l == L - 1), $sformatf("design %0d tlast at layer %0d", d, l));
        step_spk[d] += $countones(o_tdata);
        for (int k = 0; k < N; k++) out_cnt[d][l*N+k] += int'(o_tdata[k]);
      end
      o_tready <= 0;
      n_fin++;
    end
  end

  // ------------------------------------------------------------ AXI4-Lite
  task automatic axi_write_each(input logic [15:0] a [ND], input logic [31:0] v [ND]);
    for (int d = 0; d < ND; d++) begin awaddr[d] <= a[d]; wdata[d] <= v[d]; end
    awvalid <= 1; wvalid <= 1;
    do @(posedge clk); while (!(awready[0] && wready[0]));
    chk(&awready, "control slaves out of step");
    awvalid <= 0; wvalid <= 0; bready <= 1;
    do @(posedge clk); while (!bvalid[0]);
    bready <= 0;
  endtask

  task automatic axi_write_all(input logic [15:0] a, input logic [31:0] v);
    logic [15:0] aa [ND];
    logic [31:0] vv [ND];
    for (int d = 0; d < ND; d++) begin aa[d] = a; vv[d] = v; end
    axi_write_each(aa, vv);
  endtask

  task automatic axi_read_all(input logic [15:0] a, output logic [31:0] v [ND]);
    araddr <= a; arvalid <= 1;
    do @(posedge clk); while (!arready[0]);
    arvalid <= 0; rready <= 1;
    do @(posedge clk); while (!rvalid[0]);
    v = rdata;
    rready <= 0;
  endtask

  task automatic wait_irq_all();
    while (irq != '1) @(posedge clk);
    axi_write_all(16'h0000, 32'h4);
  endtask

  // sample correlation and mean-rate ratio of two count vectors, in per mille
  task automatic compare(input int d, output int corr_pm, output int rate_pm);
    real ma, mb, sab, saa, sbb;
    ma = 0; mb = 0; sab = 0; saa = 0; sbb = 0;
    for (int k = 0; k < L * N; k++) begin ma += out_cnt[d][k]; mb += out_cnt[2][k]; end
    ma /= L * N; mb /= L * N;
    for (int k = 0; k < L * N; k++) begin
      sab += (out_cnt[d][k] - ma) * (out_cnt[2][k] - mb);
      saa += (out_cnt[d][k] - ma) * (out_cnt[d][k] - ma);
      sbb += (out_cnt[2][k] - mb) * (out_cnt[2][k] - mb);
    end
    corr_pm = (saa > 0 && sbb > 0) ? int'(1000.0 * sab / $sqrt(saa * sbb))
              : ((saa == sbb) ? 1000 : 0);
    rate_pm = (mb > 0) ? int'(1000.0 * ma / mb) : 0;
  endtask

  initial begin
    logic [15:0] aa [ND];
    logic [31:0] vv [ND];
    logic [31:0] rd [ND];
    int corr_pm, rate_pm;
    for (int d = 0; d < ND; d++) begin
      awaddr[d] = 0; wdata[d] = 0;
      for (int k = 0; k < L * N; k++) out_cnt[d][k] = 0;
    end
    araddr = 0;
    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);

    // every neuron and input excitatory: clear all type words of every design
    for (int i = 0; i < (L + 1) * 4; i++) axi_write_all(16'h4000 + 16'(i * 4), 0);
    axi_write_all(16'h0004, 1);
    axi_write_all(16'h0008, L);
    axi_write_all(16'h000C, N);
    axi_write_all(16'h0000, 2);
    wait_irq_all();

    for (int t = 0; t < N_STEPS; t++) begin
      for (int j = 0; j < N; j++) ext[j] = ($urandom % 2 == 0);
      // external inputs, packed by each design's lane count (32, 16, 8)
      for (int w = 0; w < 4; w++) begin
        for (int d = 0; d < ND; d++) begin
          int lanes;
          lanes = 32 >> d;
          aa[d] = 16'h1000 + 16'(w * 4);
          vv[d] = '0;
          for (int i = 0; i < lanes; i++)
            if (w * lanes + i < N) vv[d][i] = ext[w * lanes + i];
        end
        axi_write_each(aa, vv);
      end
      n_fin = 0;
      axi_write_all(16'h0000, 1);
      ->go;
      wait (n_fin == 2 * ND);
      wait_irq_all();
      axi_read_all(16'h0014, rd);
      for (int d = 0; d < ND; d++)
        chk(rd[d] == 32'(L * N * (1 << d) + 4), $sformatf("step %0d design %0d NEUCYC %0d", t, d, rd[d]));
      axi_read_all(16'h0018, rd);
      for (int d = 0; d < ND; d++)
        chk(rd[d] == 32'(step_spk[d]), $sformatf("step %0d design %0d SPIKES %0d, stream %0d",
                                                 t, d, rd[d], step_spk[d]));
    end

    for (int d = 0; d < ND; d++) begin
      $write("%2d-bit weights, spikes per layer:", 8 << d);
      for (int l = 0; l < L; l++) begin
        int tot;
        tot = 0;
        for (int k = 0; k < N; k++) tot += out_cnt[d][l*N+k];
        $write(" %0d", tot);
      end
      $write("\n");
    end
    chk(out_cnt[2].sum() > 0, "network never fired");
    for (int d = 0; d < 2; d++) begin
      compare(d, corr_pm, rate_pm);
      $display("%0d-bit against 32-bit: correlation %0d.%03d, mean rate ratio %0d.%03d",
               8 << d, corr_pm / 1000, corr_pm % 1000, rate_pm / 1000, rate_pm % 1000);
      chk(corr_pm >= 950, $sformatf("%0d-bit correlation too low", 8 << d));
      chk(rate_pm >= 900 && rate_pm <= 1100, $sformatf("%0d-bit mean rate off", 8 << d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
