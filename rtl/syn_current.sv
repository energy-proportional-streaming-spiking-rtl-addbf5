// syn_current - total synaptic current of one neuron, LANES synapses per cycle.
//
// The current into neuron k is the sum over the neurons j of the previous layer
//     I_k = sum_j w_jk * s_j * (v_k - E_j)
// with E_j = -75 mV for an excitatory and 0 mV for an inhibitory presynaptic
// neuron (the design's equations (2) and (3)). Because E_j takes only those two
// values the sum is split into two conductances accumulated beat by beat,
//     G   = sum_j w_jk s_j          G_e = sum_{j excitatory} w_jk s_j
// and the current is formed once, when the neuron's potential is known:
//     I_k = G * v_k + 75 * G_e
// which is the same sum with one multiply by v_k instead of one per synapse.
//
// Timing: one beat carries LANES weights with the matching synapse potentials
// and presynaptic types; beat_valid marks a consumed beat, first/last the first
// and last beat of the neuron (both high for a one-beat neuron). Stage 1
// multiplies the lanes, adds them with an adder tree and accumulates; the cycle
// after the last beat g_valid is high and the caller must present the neuron's
// v_in in that cycle. Stage 2 registers i_syn with i_valid one cycle later. A
// new neuron may start the cycle after a last beat, so the unit sustains one
// beat per cycle. Lanes with lane_en low (padding past the active layer size,
// "don't care" bytes in the stream) are ignored.
//
// Weights are unsigned codes worth code * 2^-W_FRAC; W_FRAC = 13 places the
// design's weight range 5e-4 .. 2.5e-2 inside an 8-bit code, a choice of this
// design. s and v are Q16.16; i_syn is Q16.16, saturated to 32 bits.
module syn_current
  import s2nn_pkg::*;
#(
  parameter int LANES  = 32,
  parameter int W_BITS = 8,
  parameter int W_FRAC = 13,
  parameter int TAG_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              beat_valid,
  input  logic              first,
  input  logic              last,
  input  logic [W_BITS-1:0] w        [LANES],
  input  fix_t              s        [LANES],
  input  logic [LANES-1:0]  pre_type,          // 1 = inhibitory presynaptic neuron
  input  logic [LANES-1:0]  lane_en,
  input  logic [TAG_W-1:0]  tag_in,
  output logic              g_valid,           // stage 1 done: present v_in now
  input  fix_t              v_in,
  output logic              i_valid,
  output fix_t              i_syn,
  output logic [TAG_W-1:0]  i_tag
);

  localparam int ACC_W = W_BITS + 48;          // products plus growth over the layer
  localparam int GF    = W_FRAC + FRAC;        // fractional bits of G and G_e

  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t beat_all, beat_exc;
  acc_t acc_all, acc_exc;
  acc_t sum_all, sum_exc;
  acc_t g_all, g_exc;
  logic [TAG_W-1:0] g_tag;

  // Lane products and the adder tree of one beat.
  always_comb begin
    acc_t prod;
    beat_all = '0;
    beat_exc = '0;
    for (int i = 0; i < LANES; i++) begin
      prod = lane_en[i] ? acc_t'($signed({1'b0, w[i]})) * acc_t'(s[i]) : '0;
      beat_all += prod;
      if (!pre_type[i]) beat_exc += prod;
    end
    sum_all = (first ? acc_t'(0) : acc_all) + beat_all;
    sum_exc = (first ? acc_t'(0) : acc_exc) + beat_exc;
  end

  // Stage 1: accumulate over the beats of one neuron.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_all <= '0;
      acc_exc <= '0;
      g_all   <= '0;
      g_exc   <= '0;
      g_tag   <= '0;
      g_valid <= 1'b0;
    end else begin
      g_valid <= beat_valid && last;
      if (beat_valid) begin
        acc_all <= sum_all;
        acc_exc <= sum_exc;
        if (last) begin
          g_all <= sum_all;
          g_exc <= sum_exc;
          g_tag <= tag_in;
        end
      end
    end
  end

  // Stage 2: I = G*v + 75*G_e, back to Q16.16.
  logic signed [ACC_W+31:0] gv;
  logic signed [ACC_W+7:0]  ge75;
  logic signed [ACC_W+31:0] i_wide;

  always_comb begin
    gv     = (ACC_W+32)'(g_all) * (ACC_W+32)'(v_in);
    ge75   = (ACC_W+8)'(g_exc) * (ACC_W+8)'(E_EXC_MAG);
    i_wide = (gv >>> GF) + (ACC_W+32)'(ge75 >>> W_FRAC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_valid <= 1'b0;
      i_syn   <= '0;
      i_tag   <= '0;
    end else begin
      i_valid <= g_valid;
      if (g_valid) begin
        i_tag <= g_tag;
        if (i_wide > (ACC_W+32)'(32'sh7fff_ffff))      i_syn <= 32'sh7fff_ffff;
        else if (i_wide < (ACC_W+32)'(32'sh8000_0001)) i_syn <= 32'sh8000_0001;
        else                                           i_syn <= fix_t'(i_wide);
      end
    end
  end

endmodule
