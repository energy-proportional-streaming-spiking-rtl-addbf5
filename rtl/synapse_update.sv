// synapse_update - the "update synapses" step for one word of LANES neurons.
//
// Each neuron's synapse potential s decays in proportion to itself and rises by
// one when the neuron fired in the previous time step (the design's
// tau_s ds/dt = -s with s -> s + 1 on a spike, one multiply and one add per
// neuron). With a 1 ms step the decay is a multiply by DECAY = 1 - 1/tau_s:
//     s <- s * DECAY + spike
// Lanes whose lane_en bit is low (neurons outside the active area) are
// cleared, so they contribute nothing to any synaptic current.
//
// Purely combinational: the sequencer reads one word of synapse potentials
// from its memory, passes it through this unit and writes the result back in
// the same cycle. s and DECAY are Q16.16; tau_s = 10 ms (DECAY = 0.9) is this
// design's choice, the design gives no value.
module synapse_update
  import s2nn_pkg::*;
#(
  parameter int   LANES = 32,
  parameter fix_t DECAY = 32'sd58982   // 0.9 in Q16.16 (tau_s = 10 ms)
) (
  input  fix_t             s_in  [LANES],
  input  logic [LANES-1:0] spike,
  input  logic [LANES-1:0] lane_en,
  output fix_t             s_out [LANES]
);

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      if (!lane_en[i])
        s_out[i] = '0;
      else
        s_out[i] = sat32(fmul(64'(s_in[i]), 64'(DECAY)) + (spike[i] ? 64'(FIX_ONE) : 64'sd0),
                         32'sh8000_0001, 32'sh7fff_ffff);
    end
  end

endmodule
