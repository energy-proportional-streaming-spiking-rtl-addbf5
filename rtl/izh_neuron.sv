// izh_neuron - one 1 ms time step of the Izhikevich neuron model.
//
// For a neuron whose potential has reached the 30 mV peak, the step is the
// spike-and-reset rule: fired = 1, v <- c, u <- u + d. Otherwise the neuron
// integrates one forward-Euler step of 1 ms:
//     v <- v + 0.04 v^2 + 5 v + 140 - u + I
//     u <- u + a (b v - u)
// with (a, b, c, d) chosen by the neuron type (excitatory: regular spiking,
// inhibitory: fast spiking). The equations, the 30 mV peak and the reset rule
// follow the design; the Euler step of a whole time step, the parameter sets
// and the saturation of v to [V_MIN, 30 mV] (a neuron that crosses the peak
// fires on the next step) are this design's choices.
//
// All values are Q16.16 (see s2nn_pkg). The unit is fully pipelined with one
// register stage: inputs presented with in_valid appear as a result with
// out_valid on the next clock; a new neuron may enter every cycle. TAG_W bits
// of tag (the neuron's index) travel with the data.
module izh_neuron
  import s2nn_pkg::*;
#(
  parameter int TAG_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fix_t             v_in,
  input  fix_t             u_in,
  input  fix_t             i_syn,
  input  ntype_e           ntype,
  input  logic [TAG_W-1:0] tag_in,
  output logic             out_valid,
  output fix_t             v_out,
  output fix_t             u_out,
  output logic             fired,
  output logic [TAG_W-1:0] tag_out
);

  izh_param_t p;
  logic signed [63:0] v64, u64, dv, du, bv;
  fix_t v_nxt, u_nxt;
  logic spike;

  always_comb begin
    p     = izh_params(ntype);
    v64   = 64'(v_in);
    u64   = 64'(u_in);
    spike = (v_in >= V_PEAK);
    dv    = fmul(64'(K_004), fmul(v64, v64)) + fmul(64'(K_5), v64)
          + 64'(K_140) - u64 + 64'(i_syn);
    bv    = fmul(64'(p.b), v64);
    du    = fmul(64'(p.a), bv - u64);
    if (spike) begin
      v_nxt = p.c;
      u_nxt = sat32(u64 + 64'(p.d), 32'sh8000_0001, 32'sh7fff_ffff);
    end else begin
      v_nxt = sat32(v64 + dv, V_MIN, V_PEAK);
      u_nxt = sat32(u64 + du, 32'sh8000_0001, 32'sh7fff_ffff);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      v_out     <= '0;
      u_out     <= '0;
      fired     <= 1'b0;
      tag_out   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        v_out   <= v_nxt;
        u_out   <= u_nxt;
        fired   <= spike;
        tag_out <= tag_in;
      end
    end
  end

endmodule
