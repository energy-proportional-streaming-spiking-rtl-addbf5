// s2nn_ref_pkg - reference arithmetic of the S2NN for the testbenches.
//
// Written apart from the RTL, with plain 64/128-bit integer arithmetic on the
// raw Q16.16 values, it states what each unit must produce:
//   syn_ref   s' = floor(s * 58982 / 2^16) + 2^16 * spike       (DECAY = 0.9)
//   cur_ref   I  = floor(G * v / 2^29) + floor(75 * Ge / 2^13)
//             with G = sum w*s and Ge the same over excitatory inputs
//   izh_ref   the Izhikevich step with spike/reset at 30 mV and saturation
//             of v to [-32767, 30] mV
// plus a small hash used to generate weights, types and inputs.
package s2nn_ref_pkg;

  function automatic longint fl16(input longint x);   // floor(x / 2^16)
    return x >>> 16;
  endfunction

  function automatic int syn_ref(input int s, input bit spike);
    return int'(fl16(longint'(s) * 58982) + (spike ? 65536 : 0));
  endfunction

  function automatic int clamp32(input longint x, input longint lo, input longint hi);
    if (x > hi) return int'(hi);
    if (x < lo) return int'(lo);
    return int'(x);
  endfunction

  // Izhikevich step. ty: 0 = excitatory (a=0.02,d=8), 1 = inhibitory (a=0.1,d=2).
  task automatic izh_ref(input int v, input int u, input int i, input bit ty,
                         output int v_n, output int u_n, output bit fired);
    longint a, d, vv, dv, bv;
    a = ty ? 6554 : 1311;
    d = ty ? (2 <<< 16) : (8 <<< 16);
    if (v >= (30 <<< 16)) begin
      fired = 1;
      v_n   = -(65 <<< 16);
      u_n   = clamp32(longint'(u) + d, -2147483647, 2147483647);
    end else begin
      fired = 0;
      vv  = fl16(longint'(v) * longint'(v));
      dv  = fl16(2621 * vv) + 5 * longint'(v) + (140 <<< 16) - longint'(u) + longint'(i);
      v_n = clamp32(longint'(v) + dv, -(longint'(32767) <<< 16), 30 <<< 16);
      bv  = fl16(13107 * longint'(v));
      u_n = clamp32(longint'(u) + fl16(a * (bv - longint'(u))), -2147483647, 2147483647);
    end
  endtask

  // Synaptic current from the two conductances (G, Ge with 29 fraction bits).
  function automatic int cur_ref(input logic signed [127:0] g, input logic signed [127:0] ge,
                                 input int v);
    logic signed [127:0] x;
    x = ((g * 128'(signed'(v))) >>> 29) + ((ge * 75) >>> 13);
    if (x > 128'sd2147483647)  return 2147483647;
    if (x < -128'sd2147483647) return -2147483647;
    return int'(x);
  endfunction

  function automatic int unsigned hash3(input int unsigned a, input int unsigned b,
                                        input int unsigned c);
    int unsigned h;
    h = a * 32'h9E3779B1 ^ (b + 32'h7F4A7C15) * 32'h85EBCA77 ^ (c + 32'h165667B1) * 32'hC2B2AE3D;
    h ^= h >> 15;
    h *= 32'h2C1B3C6D;
    h ^= h >> 12;
    h *= 32'h297A2D39;
    h ^= h >> 15;
    return h;
  endfunction

  // Weight code of synapse j of neuron k in layer l: 4..204 (5e-4 .. 2.5e-2).
  function automatic int unsigned wcode(input int l, input int k, input int j);
    return 4 + hash3(l, k, j) % 201;
  endfunction

endpackage
