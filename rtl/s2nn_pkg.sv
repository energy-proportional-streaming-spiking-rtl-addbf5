// s2nn_pkg - types, constants and fixed-point helpers shared by the streaming
// spiking neural network (S2NN).
//
// All neuron and synapse state is 32-bit signed fixed point with 16 fractional
// bits (Q16.16): membrane potential v and recovery u in mV, synapse potential s
// and synaptic current I in model units. The 32-bit width of these variables
// follows the design; the split into 16 integer and 16 fractional bits is this
// design's own choice. Synaptic weights are unsigned W_BITS-bit codes whose
// value is code * 2^-W_FRAC (set in the modules that use them).
//
// Neuron types are one bit: 0 = excitatory, 1 = inhibitory. A presynaptic
// excitatory neuron uses the reversal potential E = -75 mV and an inhibitory
// one E = 0 mV, in I = g * (v - E), as the design specifies. The Izhikevich
// parameters per type are the classic regular-spiking (excitatory) and
// fast-spiking (inhibitory) sets; the design does not list them.
package s2nn_pkg;

  localparam int FRAC = 16;                       // fractional bits of fix_t
  typedef logic signed [31:0] fix_t;              // Q16.16

  localparam fix_t FIX_ONE = 32'sd65536;          // 1.0
  localparam fix_t V_PEAK  = 32'sd30 <<< FRAC;    // spike threshold, 30 mV
  localparam fix_t V_MIN   = -(32'sd32767 <<< FRAC); // lower saturation of v
  localparam fix_t K_004   = 32'sd2621;           // 0.04
  localparam fix_t K_5     = 32'sd5 <<< FRAC;     // 5
  localparam fix_t K_140   = 32'sd140 <<< FRAC;   // 140
  localparam int   E_EXC_MAG = 75;                // |E| of excitatory synapses (E = -75 mV)

  typedef enum logic {NT_EXC = 1'b0, NT_INH = 1'b1} ntype_e;

  typedef struct packed {
    fix_t a;
    fix_t b;
    fix_t c;
    fix_t d;
  } izh_param_t;

  // Regular spiking (excitatory): a=0.02 b=0.2 c=-65 d=8
  localparam izh_param_t P_EXC = '{a: 32'sd1311, b: 32'sd13107,
                                   c: -(32'sd65 <<< FRAC), d: 32'sd8 <<< FRAC};
  // Fast spiking (inhibitory): a=0.1 b=0.2 c=-65 d=2
  localparam izh_param_t P_INH = '{a: 32'sd6554, b: 32'sd13107,
                                   c: -(32'sd65 <<< FRAC), d: 32'sd2 <<< FRAC};

  // State a neuron starts from after an initialisation: v = c, u = b*c (-13 mV).
  localparam fix_t V_INIT = -(32'sd65 <<< FRAC);
  localparam fix_t U_INIT = -(32'sd13 <<< FRAC);

  // Saturate a wide signed value to the 32-bit range [lo, hi].
  function automatic fix_t sat32(input logic signed [63:0] x, input fix_t lo, input fix_t hi);
    if (x > 64'(hi))      return hi;
    else if (x < 64'(lo)) return lo;
    else                  return fix_t'(x);
  endfunction

  // Q16.16 multiply, result kept at 64 bits (arithmetic shift, rounds toward -inf).
  function automatic logic signed [63:0] fmul(input logic signed [63:0] x, input logic signed [63:0] y);
    return (x * y) >>> FRAC;
  endfunction

  function automatic izh_param_t izh_params(input ntype_e t);
    return (t == NT_INH) ? P_INH : P_EXC;
  endfunction

endpackage
