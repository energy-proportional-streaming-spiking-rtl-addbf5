// s2nn_host_model - host, weight memory and checker around one s2nn_top.
//
// Plays the parts of the system around the accelerator: the processor that
// programs it over AXI4-Lite, the memory that streams the weights on the
// N_PORTS weight ports (in the order layer, neuron, beat; W_BITS-bit weights
// from s2nn_ref_pkg::wcode, with random bytes in the unused lanes of a neuron's
// last beat), and the sink of the spike output stream. Alongside it keeps a
// reference model of the whole network (neuron states, synapse potentials,
// firings) and after every time step compares the streamed firing bits, the
// SPIKES, STEPS and NEUCYC registers and the interrupt with it. NEUCYC must
// equal layers*neurons*ceil(neurons/LANES) + 4 plus the cycles the core waited on
// the weight streams.
//
// Parameters: network size (must match the DUT), number of steps, whether to
// change the active area between steps, whether the streams and the output
// sink insert random gaps, and whether every mechanism must have been seen.
// AREA_SEQ runs the square active areas 50x50, 100x100, 150x150 in turn and
// checks that each whole step, START to interrupt, fits in 1 ms at the clock
// quoted for that size: 9 MHz, 60 MHz and 150 MHz (at most 9,000, 60,000
// and 150,000 cycles).
// The parent passes the DUT's w_ready so stall cycles can be counted.
module s2nn_host_model #(
  parameter int L         = 4,
  parameter int N_LAYER   = 40,
  parameter int N_STEPS   = 8,
  parameter bit AREA_SW   = 1,
  parameter bit GAPS      = 1,
  parameter bit REQ_MECH  = 1,
  parameter int WATCHDOG  = 2000000,
  parameter int N_PORTS   = 4,
  parameter int PORT_W    = 64,
  parameter int W_BITS    = 8,
  parameter bit AREA_SEQ  = 0
) (
  output logic               clk,
  output logic               rst_n,
  output logic [15:0]        s_axi_awaddr,
  output logic               s_axi_awvalid,
  input  logic               s_axi_awready,
  output logic [31:0]        s_axi_wdata,
  output logic [3:0]         s_axi_wstrb,
  output logic               s_axi_wvalid,
  input  logic               s_axi_wready,
  input  logic [1:0]         s_axi_bresp,
  input  logic               s_axi_bvalid,
  output logic               s_axi_bready,
  output logic [15:0]        s_axi_araddr,
  output logic               s_axi_arvalid,
  input  logic               s_axi_arready,
  input  logic [31:0]        s_axi_rdata,
  input  logic [1:0]         s_axi_rresp,
  input  logic               s_axi_rvalid,
  output logic               s_axi_rready,
  input  logic               irq,
  output logic [PORT_W-1:0]  w_tdata  [N_PORTS],
  output logic [N_PORTS-1:0] w_tvalid,
  input  logic [N_PORTS-1:0] w_tready,
  input  logic [63:0]        o_tdata,
  input  logic               o_tvalid,
  output logic               o_tready,
  input  logic               o_tlast,
  input  logic               dut_w_ready
);
  import s2nn_ref_pkg::*;

  localparam int LANES = N_PORTS * PORT_W / W_BITS;
  localparam int NW    = (N_LAYER + LANES - 1) / LANES;
  localparam int NP    = NW * LANES;          // padded layer size
  localparam int PER   = PORT_W / W_BITS;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  // reference state
  int v_r [L][N_LAYER];
  int u_r [L][N_LAYER];
  int s_r [L+1][NP];
  bit f_r [L][NP];
  bit t_r [L+1][NP];
  bit e_r [NP];

  // mechanism counters
  int m_stall = 0, m_bp = 0, m_area = 0, m_partial = 0, m_spk_exc = 0, m_spk_inh = 0;
  int m_ext = 0, m_irq = 0, m_inh_in = 0, m_rt = 0;
  int unsigned cyc0, step_cyc;

  initial clk = 0;
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut_w_ready && !(&w_tvalid)) m_stall <= m_stall + 1;
    if (o_tvalid && !o_tready) m_bp <= m_bp + 1;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ------------------------------------------------------------ AXI4-Lite
  task automatic axi_write(input logic [15:0] a, input logic [31:0] d);
    s_axi_awaddr <= a; s_axi_awvalid <= 1; s_axi_wdata <= d; s_axi_wvalid <= 1;
    s_axi_wstrb <= 4'hf;
    do @(posedge clk); while (!(s_axi_awready && s_axi_wready));
    s_axi_awvalid <= 0; s_axi_wvalid <= 0; s_axi_bready <= 1;
    do @(posedge clk); while (!s_axi_bvalid);
    s_axi_bready <= 0;
  endtask

  task automatic axi_read(input logic [15:0] a, output logic [31:0] d);
    s_axi_araddr <= a; s_axi_arvalid <= 1;
    do @(posedge clk); while (!s_axi_arready);
    s_axi_arvalid <= 0; s_axi_rready <= 1;
    do @(posedge clk); while (!s_axi_rvalid);
    d = s_axi_rdata;
    s_axi_rready <= 0;
  endtask

  task automatic wait_irq();
    while (!irq) @(posedge clk);
    m_irq++;
    axi_write(16'h0000, 32'h4);   // clear DONE
  endtask

  // ------------------------------------------------------------ reference step
  task automatic ref_step(input int la, input int na, output int spikes);
    int nwa;
    logic signed [127:0] g, ge;
    int vn, un; bit fn;
    nwa = (na + LANES - 1) / LANES;
    spikes = 0;
    for (int gi = 0; gi <= la; gi++)
      for (int j = 0; j < nwa * LANES; j++)
        s_r[gi][j] = (j < na) ? syn_ref(s_r[gi][j], gi == 0 ? e_r[j] : f_r[gi-1][j]) : 0;
    for (int l = 0; l < la; l++)
      for (int k = 0; k < na; k++) begin
        g = 0; ge = 0;
        for (int j = 0; j < na; j++) begin
          logic signed [127:0] p;
          p = 128'(signed'(s_r[l][j])) * 128'(wcode(l, k, j));
          g += p;
          if (!t_r[l][j]) ge += p;
        end
        izh_ref(v_r[l][k], u_r[l][k], cur_ref(g, ge, v_r[l][k]), t_r[l+1][k], vn, un, fn);
        v_r[l][k] = vn; u_r[l][k] = un; f_r[l][k] = fn;
        if (fn) begin
          spikes++;
          if (t_r[l+1][k]) m_spk_inh++; else m_spk_exc++;
        end
      end
  endtask

  // ------------------------------------------------------------ weight streams
  task automatic drive_weights(input int la, input int na);
    int nwa;
    nwa = (na + LANES - 1) / LANES;
    for (int l = 0; l < la; l++)
      for (int k = 0; k < na; k++)
        for (int b = 0; b < nwa; b++) begin
          for (int p = 0; p < N_PORTS; p++)
            for (int i = 0; i < PER; i++) begin
              int j;
              j = b * LANES + p * PER + i;
              w_tdata[p][i*W_BITS +: W_BITS] <= (j < na) ? W_BITS'(wcode(l, k, j)) : W_BITS'($urandom);
            end
          // each port raises its valid on its own and holds it until the beat is taken
          begin
            logic [N_PORTS-1:0] vv;
            vv = '0;
            for (int p = 0; p < N_PORTS; p++) vv[p] = !GAPS || ($urandom % 8 != 0);
            w_tvalid <= vv;
            @(posedge clk);
            while (!(w_tready[0])) begin
              for (int p = 0; p < N_PORTS; p++)
                if (!vv[p] && (!GAPS || $urandom % 2 == 0)) vv[p] = 1;
              w_tvalid <= vv;
              @(posedge clk);
            end
          end
        end
    w_tvalid <= '0;
  endtask

  // ------------------------------------------------------------ output sink
  task automatic collect(input int la, input int na);
    int nob, beat_i;
    logic [63:0] exp;
    nob = (na + 63) / 64;
    beat_i = 0;
    for (int l = 0; l < la; l++)
      for (int m = 0; m < nob; m++) begin
        o_tready <= !GAPS || ($urandom % 4 != 0);
        @(posedge clk);
        while (!(o_tvalid && o_tready)) begin
          o_tready <= !GAPS || ($urandom % 4 != 0);
          @(posedge clk);
        end
        exp = '0;
        for (int i = 0; i < 64; i++)
          if (m * 64 + i < na) exp[i] = f_r[l][m*64+i];
        chk(o_tdata == exp, $sformatf("spikes layer %0d beat %0d: got %h exp %h", l, m, o_tdata, exp));
        beat_i++;
        chk(o_tlast == (beat_i == la * nob), $sformatf("tlast at beat %0d", beat_i));
      end
    o_tready <= 0;
  endtask

  // ------------------------------------------------------------ main
  initial begin
    logic [31:0] rd;
    int la, na, spikes, stall0, ii, prev_la, prev_na;
    rst_n = 0;
    s_axi_awvalid = 0; s_axi_wvalid = 0; s_axi_bready = 0; s_axi_arvalid = 0; s_axi_rready = 0;
    s_axi_awaddr = 0; s_axi_wdata = 0; s_axi_wstrb = 0; s_axi_araddr = 0;
    w_tvalid = '0; o_tready = 0;
    for (int p = 0; p < N_PORTS; p++) w_tdata[p] = '0;
    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);

    // neuron types: about one in four inhibitory; one external input in twenty inhibitory
    for (int gi = 0; gi <= L; gi++)
      for (int w = 0; w < NW; w++) begin
        logic [31:0] word;
        for (int i = 0; i < LANES; i++) begin
          word[i] = (gi == 0) ? ((w * LANES + i) % 20 == 7) : (hash3(gi, w * LANES + i, 777) % 4 == 0);
          t_r[gi][w*LANES+i] = word[i];
          if (gi == 0 && word[i] && w * LANES + i < N_LAYER) m_inh_in++;
        end
        axi_write(16'h4000 + 16'((gi * NW + w) * 4), word);
      end
    axi_write(16'h0004, 1);                    // interrupt enable
    axi_write(16'h0000, 2);                    // INIT
    wait_irq();
    for (int l = 0; l < L; l++)
      for (int k = 0; k < N_LAYER; k++) begin v_r[l][k] = -(65 <<< 16); u_r[l][k] = -(13 <<< 16); end
    for (int gi = 0; gi <= L; gi++) for (int j = 0; j < NP; j++) s_r[gi][j] = 0;
    for (int l = 0; l < L; l++) for (int j = 0; j < NP; j++) f_r[l][j] = 0;

    prev_la = -1; prev_na = -1;
    for (int t = 0; t < N_STEPS; t++) begin
      // active area: full, then a smaller area in the middle steps
      la = L; na = N_LAYER;
      if (AREA_SW && t >= N_STEPS / 3 && t < 2 * N_STEPS / 3) begin
        la = (L > 1) ? L - 1 : 1;
        na = (N_LAYER > 8) ? N_LAYER / 2 + 3 : N_LAYER;
      end
      if (AREA_SEQ) begin
        la = (50 * (t % 3 + 1) < L) ? 50 * (t % 3 + 1) : L;
        na = (50 * (t % 3 + 1) < N_LAYER) ? 50 * (t % 3 + 1) : N_LAYER;
      end
      if (prev_la >= 0 && (la != prev_la || na != prev_na)) m_area++;
      prev_la = la; prev_na = na;
      if (na % LANES != 0) m_partial++;
      ii = (na + LANES - 1) / LANES;

      // external input spikes for this step, about one in two
      for (int w = 0; w < NW; w++) begin
        logic [31:0] word;
        for (int i = 0; i < LANES; i++) begin
          word[i] = ($urandom % 2 == 0);
          e_r[w*LANES+i] = word[i];
          if (word[i] && w * LANES + i < na) m_ext++;
        end
        axi_write(16'h1000 + 16'(w * 4), word);
      end
      axi_write(16'h0008, la);
      axi_write(16'h000C, na);
      ref_step(la, na, spikes);
      stall0 = m_stall;
      cyc0 = cyc;
      axi_write(16'h0000, 1);                  // START
      fork
        drive_weights(la, na);
        collect(la, na);
        wait_irq();
      join
      step_cyc = cyc - cyc0;
      if (AREA_SEQ && la == na && (na == 50 || na == 100 || na == 150)) begin
        int unsigned budget;
        budget = (na == 50) ? 9000 : (na == 100) ? 60000 : 150000;
        m_rt++;
        chk(step_cyc <= budget, $sformatf("step %0d: %0dx%0d took %0d cycles, over the 1 ms budget of %0d",
                                          t, la, na, step_cyc, budget));
        $display("step %0d area %0dx%0d: %0d cycles START to interrupt = %0d us at %0d MHz",
                 t, la, na, step_cyc, step_cyc * 1000 / budget, budget / 1000);
      end
      axi_read(16'h0014, rd);
      chk(rd == 32'(la * na * ii + 4 + (m_stall - stall0)),
          $sformatf("step %0d NEUCYC %0d, expected %0d + %0d stalls", t, rd, la * na * ii + 4, m_stall - stall0));
      axi_read(16'h0018, rd);
      chk(rd == 32'(spikes), $sformatf("step %0d SPIKES %0d exp %0d", t, rd, spikes));
      axi_read(16'h0010, rd);
      chk(rd == 32'(t + 1), $sformatf("STEPS %0d", rd));
      axi_read(16'h0000, rd);
      chk(rd[2:0] == 3'b100, $sformatf("CTRL after step %h", rd));
      $display("step %0d area %0dx%0d spikes %0d neu_cycles %0d", t, la, na, spikes, la * na * ii + 4);
    end

    $display("mechanisms: stalls=%0d backpressure=%0d area_switches=%0d partial_beats=%0d exc_spikes=%0d inh_spikes=%0d ext_spikes=%0d inh_inputs=%0d irqs=%0d",
             m_stall, m_bp, m_area, m_partial, m_spk_exc, m_spk_inh, m_ext, m_inh_in, m_irq);
    chk(m_spk_exc > 0, "no excitatory neuron fired");
    chk(m_ext > 0, "no external input spike");
    chk(m_irq == N_STEPS + 1, "interrupt count");
    if (AREA_SEQ) chk(m_rt == N_STEPS, "real-time check not made on every step");
    if (REQ_MECH) begin
      chk(m_stall > 0, "weight stream never stalled");
      chk(m_bp > 0, "output never back-pressured");
      chk(m_area > 0, "active area never changed");
      chk(m_partial > 0, "no partial last beat");
      chk(m_spk_inh > 0, "no inhibitory neuron fired");
      chk(m_inh_in > 0, "no inhibitory input");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == WATCHDOG);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
