// tb_izh_neuron - checks the Izhikevich step unit against the reference step.
//
// Feeds one neuron per cycle (random potentials around the resting range and
// above the 30 mV peak, random recovery, current and type) and compares each
// result, which must appear exactly one cycle later with its tag, with
// s2nn_ref_pkg::izh_ref. Also checks that the spike/reset branch and both
// neuron types were exercised.
module tb_izh_neuron;
  import s2nn_pkg::*;
  import s2nn_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid, fired;
  fix_t v_in, u_in, i_syn, v_out, u_out;
  ntype_e ntype;
  logic [15:0] tag_in, tag_out;

  izh_neuron #(.TAG_W(16)) dut (.*);

  int checks = 0, failures = 0, n_spike = 0, n_inh = 0;
  int ev[$], eu[$]; bit ef[$]; int et[$];

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: every output must match the reference queued one cycle earlier
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (ev.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        int v, u, t; bit f;
        v = ev.pop_front(); u = eu.pop_front(); f = ef.pop_front(); t = et.pop_front();
        if (v_out !== v || u_out !== u || fired !== f || int'(tag_out) != t) begin
          failures++;
          if (failures < 10) $display("tag %0d: got v=%0d u=%0d f=%0d exp v=%0d u=%0d f=%0d",
                                      tag_out, v_out, u_out, fired, v, u, f);
        end
      end
    end
  end

  initial begin
    in_valid = 0; v_in = 0; u_in = 0; i_syn = 0; ntype = NT_EXC; tag_in = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 1000; n++) begin
      int v, u, i, vn, un; bit f, t;
      case (n % 4)
        0: v = (30 <<< 16) + int'($urandom % (40 <<< 16));          // at or above the peak
        1: v = -(80 <<< 16) + int'($urandom % (100 <<< 16));         // -80 .. 20 mV
        2: v = -(70 <<< 16) + int'($urandom % (20 <<< 16));          // near rest
        default: v = -(200 <<< 16) + int'($urandom % (240 <<< 16));  // wide
      endcase
      u = -(30 <<< 16) + int'($urandom % (40 <<< 16));
      i = -(50 <<< 16) + int'($urandom % (150 <<< 16));
      t = $urandom % 2;
      izh_ref(v, u, i, t, vn, un, f);
      if (f) n_spike++;
      if (t) n_inh++;
      in_valid <= ($urandom % 5 != 0);
      v_in <= v; u_in <= u; i_syn <= i; ntype <= ntype_e'(t); tag_in <= 16'(n);
      @(posedge clk);
      if (in_valid) begin ev.push_back(vn); eu.push_back(un); ef.push_back(f); et.push_back(n); end
      // (the values just sampled by the DUT were those of iteration n)
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (ev.size() != 0) begin failures++; $display("%0d results missing", ev.size()); end
    checks++;
    if (n_spike == 0 || n_inh == 0) failures++;
    $display("spike branch %0d, inhibitory %0d", n_spike, n_inh);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
