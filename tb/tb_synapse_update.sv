// tb_synapse_update - checks the word-wide synapse decay-and-spike unit.
//
// Applies random words of 32 synapse potentials with random spike and lane
// enable bits and compares every lane with s2nn_ref_pkg::syn_ref (decay by 0.9,
// plus one on a spike); disabled lanes must read zero. A chained run also
// checks the steady state of a neuron that spikes every step, s -> 1/(1-0.9).
module tb_synapse_update;
  import s2nn_pkg::*;
  import s2nn_ref_pkg::*;

  localparam int LANES = 32;
  fix_t s_in [LANES], s_out [LANES];
  logic [LANES-1:0] spike, lane_en;
  int checks = 0, failures = 0;

  synapse_update #(.LANES(LANES)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < LANES; i++) s_in[i] = int'($urandom % (20 <<< 16)) - (2 <<< 16);
      spike   = {$urandom, $urandom};
      lane_en = (n % 3 == 0) ? '1 : {$urandom, $urandom};
      #1;
      for (int i = 0; i < LANES; i++) begin
        checks++;
        if (s_out[i] !== (lane_en[i] ? syn_ref(s_in[i], spike[i]) : 0)) begin
          failures++;
          if (failures < 10) $display("lane %0d: s=%0d spike=%0d en=%0d got %0d", i, s_in[i], spike[i], lane_en[i], s_out[i]);
        end
      end
    end
    // a neuron spiking every step: s converges to 10
    s = 0;
    lane_en = '1; spike = '1;
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < LANES; i++) s_in[i] = s;
      #1;
      s = s_out[0];
    end
    checks++;
    if (s < (9 <<< 16) + 60000 || s > (10 <<< 16)) begin
      failures++; $display("steady state %0d", s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
