// tb_s2nn_ctrl - checks the AXI4-Lite control slave on its own.
//
// A small model of the core answers START/INIT with busy for a few cycles and
// a done pulse. The test checks: START and INIT become one-cycle pulses and are
// refused while busy; CTRL reads BUSY/DONE/IDLE; DONE is sticky, cleared by
// bit 2 and by a new START; irq = DONE & IER; LAYERS and NEURONS read back;
// STEPS, NEUCYC and SPIKES read the core's counters; writes to 0x1000.. and
// 0x4000.. reach the core as external-input and type words with the right word
// index; responses are held until the master takes them.
module tb_s2nn_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] s_axi_awaddr, s_axi_araddr, cfg_addr;
  logic s_axi_awvalid, s_axi_awready, s_axi_wvalid, s_axi_wready, s_axi_bvalid, s_axi_bready;
  logic s_axi_arvalid, s_axi_arready, s_axi_rvalid, s_axi_rready, irq;
  logic [31:0] s_axi_wdata, s_axi_rdata, cfg_wdata;
  logic [3:0] s_axi_wstrb;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic start, init, busy, done, cfg_we, cfg_sel;
  logic [7:0] layers_act, neurons_act;
  logic [31:0] step_count, neu_cycles, spike_count;

  s2nn_ctrl #(.LW(8), .NWID(8)) dut (.*);

  int checks = 0, failures = 0, n_start = 0, n_init = 0, busy_left = 0;
  int cfg_log_sel[$], cfg_log_addr[$], cfg_log_data[$];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // core model
  always @(posedge clk) begin
    done <= 0;
    if (!rst_n) begin
      busy <= 0;
    end else if (start || init) begin
      if (busy) begin failures++; $display("FAIL: pulse while busy"); end
      busy <= 1; busy_left <= 6;
      if (start) n_start++;
      if (init)  n_init++;
    end else if (busy) begin
      busy_left <= busy_left - 1;
      if (busy_left == 1) begin busy <= 0; done <= 1; step_count <= step_count + 1; end
    end
    if (rst_n && cfg_we) begin cfg_log_sel.push_back(cfg_sel); cfg_log_addr.push_back(cfg_addr); cfg_log_data.push_back(cfg_wdata); end
  end

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    s_axi_awaddr <= a; s_axi_awvalid <= 1; s_axi_wdata <= d; s_axi_wvalid <= 1; s_axi_wstrb <= 4'hf;
    do @(posedge clk); while (!(s_axi_awready && s_axi_wready));
    s_axi_awvalid <= 0; s_axi_wvalid <= 0;
    repeat ($urandom % 3) @(posedge clk);          // late BREADY: response must wait
    s_axi_bready <= 1;
    do @(posedge clk); while (!s_axi_bvalid);
    chk(s_axi_bresp == 2'b00, "bresp");
    s_axi_bready <= 0;
  endtask

  task automatic rd(input logic [15:0] a, output logic [31:0] d);
    s_axi_araddr <= a; s_axi_arvalid <= 1;
    do @(posedge clk); while (!s_axi_arready);
    s_axi_arvalid <= 0;
    repeat ($urandom % 3) @(posedge clk);
    s_axi_rready <= 1;
    do @(posedge clk); while (!s_axi_rvalid);
    d = s_axi_rdata;
    s_axi_rready <= 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    s_axi_awvalid = 0; s_axi_wvalid = 0; s_axi_bready = 0; s_axi_arvalid = 0; s_axi_rready = 0;
    s_axi_awaddr = 0; s_axi_araddr = 0; s_axi_wdata = 0; s_axi_wstrb = 0;
    busy = 0; done = 0; step_count = 0; neu_cycles = 32'd1234; spike_count = 32'd77;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    rd(16'h0000, d); chk(d[2:0] == 3'b100, $sformatf("idle after reset %h", d));
    wr(16'h0008, 5);  rd(16'h0008, d); chk(d == 5, "LAYERS readback");
    wr(16'h000C, 37); rd(16'h000C, d); chk(d == 37, "NEURONS readback");
    chk(layers_act == 5 && neurons_act == 37, "active area outputs");
    wr(16'h0004, 1);
    wr(16'h0000, 1);                                  // START
    rd(16'h0000, d); chk(d[0] == 1, "busy after start");
    wr(16'h0000, 1);                                  // refused while busy
    while (busy) @(posedge clk);
    @(posedge clk);
    chk(n_start == 1, $sformatf("one start pulse %0d", n_start));
    rd(16'h0000, d); chk(d[2:0] == 3'b110, "done and idle");
    chk(irq == 1, "irq with IER");
    wr(16'h0004, 0); @(posedge clk); chk(irq == 0, "irq masked");
    wr(16'h0004, 1); @(posedge clk); chk(irq == 1, "irq unmasked");
    wr(16'h0000, 4); @(posedge clk); chk(irq == 0, "done cleared");
    rd(16'h0000, d); chk(d[1] == 0, "DONE reads 0");
    wr(16'h0000, 2);                                  // INIT
    while (!busy) @(posedge clk);
    while (busy) @(posedge clk);
    @(posedge clk);
    chk(n_init == 1, "one init pulse");
    chk(irq == 1, "irq after init");
    wr(16'h0000, 1);                                  // START clears DONE
    @(posedge clk);
    chk(irq == 0, "start clears done");
    while (busy) @(posedge clk);
    rd(16'h0010, d); chk(d == 32'(step_count) && d == 3, "STEPS");
    rd(16'h0014, d); chk(d == 1234, "NEUCYC");
    rd(16'h0018, d); chk(d == 77, "SPIKES");
    wr(16'h1000 + 4*3, 32'hA5A5_0001);
    wr(16'h4000 + 4*700, 32'h1234_5678);
    wr(16'h4000, 32'hFFFF_0000);
    repeat (2) @(posedge clk);
    chk(cfg_log_sel.size() == 3, "three cfg writes");
    if (cfg_log_sel.size() == 3) begin
      chk(cfg_log_sel[0] == 0 && cfg_log_addr[0] == 3   && cfg_log_data[0] == 32'hA5A5_0001, "ext word 3");
      chk(cfg_log_sel[1] == 1 && cfg_log_addr[1] == 700 && cfg_log_data[1] == 32'h1234_5678, "type word 700");
      chk(cfg_log_sel[2] == 1 && cfg_log_addr[2] == 0   && cfg_log_data[2] == 32'hFFFF_0000, "type word 0");
    end
    chk(n_start == 2 && n_init == 1, $sformatf("pulse counts %0d %0d", n_start, n_init));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
