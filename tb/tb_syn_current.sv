// tb_syn_current - checks the synaptic current accumulator.
//
// Sends neurons of one to four beats of 32 random 8-bit weights, synapse
// potentials and presynaptic types, with random idle cycles between beats and
// random disabled lanes. The neuron's potential is presented the cycle after
// its last beat, as the unit requires. Each current must equal
// s2nn_ref_pkg::cur_ref of sum(w*s) and sum over excitatory inputs of w*s,
// must come out exactly two cycles after the last beat and carry its tag.
module tb_syn_current;
  import s2nn_pkg::*;
  import s2nn_ref_pkg::*;

  localparam int LANES = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic beat_valid, first, last, g_valid, i_valid;
  logic [7:0] w [LANES];
  fix_t s [LANES];
  logic [LANES-1:0] pre_type, lane_en;
  logic [15:0] tag_in, i_tag;
  fix_t v_in, i_syn;

  syn_current #(.LANES(LANES), .W_BITS(8), .W_FRAC(13), .TAG_W(16)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int q_i[$], q_t[$], q_c[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && i_valid) begin
      checks++;
      if (q_i.size() == 0) begin failures++; $display("unexpected current"); end
      else begin
        int ei, et, ec;
        ei = q_i.pop_front(); et = q_t.pop_front(); ec = q_c.pop_front();
        if (i_syn !== ei || int'(i_tag) != et || cyc != ec) begin
          failures++;
          if (failures < 10) $display("tag %0d: got %0d at %0d, exp %0d at %0d", i_tag, i_syn, cyc, ei, ec);
        end
      end
    end
  end

  initial begin
    beat_valid = 0; first = 0; last = 0; pre_type = 0; lane_en = 0; tag_in = 0; v_in = 0;
    for (int i = 0; i < LANES; i++) begin w[i] = 0; s[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      int nb, v;
      logic signed [127:0] g, ge;
      nb = 1 + $urandom % 4;
      v  = -(90 <<< 16) + int'($urandom % (130 <<< 16));
      g = 0; ge = 0;
      for (int b = 0; b < nb; b++) begin
        // optional idle cycles between beats
        while ($urandom % 3 == 0) begin
          beat_valid <= 0;
          for (int i = 0; i < LANES; i++) w[i] <= 8'($urandom);   // garbage while idle
          @(posedge clk);
        end
        begin
          logic [LANES-1:0] en, ty;
          en = (b == nb - 1 && n % 2 == 1) ? LANES'((64'd1 << (1 + $urandom % 31)) - 1) : '1;
          ty = $urandom;
          for (int i = 0; i < LANES; i++) begin
            logic [7:0] wi; int si;
            wi = 8'($urandom);
            si = int'($urandom % (12 <<< 16));
            w[i] <= wi; s[i] <= si;
            if (en[i]) begin
              g += 128'(si) * 128'(wi);
              if (!ty[i]) ge += 128'(si) * 128'(wi);
            end
          end
          beat_valid <= 1; first <= (b == 0); last <= (b == nb - 1);
          lane_en <= en; pre_type <= ty; tag_in <= 16'(n);
        end
        @(posedge clk);
        if (b == nb - 1) begin
          v_in <= v;                        // needed in the cycle after the last beat
          q_i.push_back(cur_ref(g, ge, v)); q_t.push_back(n); q_c.push_back(cyc + 2);
        end
      end
      if ($urandom % 2 == 0) begin
        beat_valid <= 0;
        @(posedge clk);
      end
    end
    beat_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q_i.size() != 0) begin failures++; $display("%0d currents missing", q_i.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
