// s2nn_core - time-step sequencer and neuron state of the streaming spiking
// neural network.
//
// The network is a feed-forward stack of up to L layers of up to N_LAYER
// Izhikevich neurons; every neuron of layer l has one synapse from each neuron
// of layer l-1, and the neurons of layer 0 have one synapse from each of
// N_LAYER external inputs. The active area (layers_act x neurons_act) is set
// per time step; neurons outside it are not computed and cost no cycles.
// One start pulse runs one 1 ms simulation step in three phases:
//
//  SYN  update synapses: for every group (the external inputs, then each
//       active layer) and every word of LANES neurons, s <- s*DECAY + spike,
//       where spike is the external input bit or the neuron's firing in the
//       previous step (synapse_update). One word per cycle.
//  NEU  for every active neuron, layer by layer: consume ceil(neurons_act /
//       LANES) beats of weights from the weight streams, accumulate the total
//       synaptic current against the presynaptic group's synapse potentials
//       and types (syn_current), then run the Izhikevich step (izh_neuron) and
//       write v, u and the firing bit back. The phase is pipelined: one beat
//       per cycle whatever the neuron boundaries, so it takes
//           layers_act * neurons_act * ceil(neurons_act / LANES) + 4
//       cycles when the weight streams never run dry (stalls add cycles);
//       the 4 are three pipeline stages and the check that they are empty.
//  OUT  stream the firing bits of every active layer on m_axis, 64 neurons
//       per beat (bit i of beat m of a layer = neuron 64m+i, zero past the
//       active size), tlast on the last beat of the step.
//
// A neuron therefore sees the firings of the previous layer from the previous
// time step. An init pulse sets every neuron to v = -65 mV, u = -13 mV and
// clears all synapse potentials and firing bits. done pulses for one cycle at
// the end of a step or an init; busy is high from the pulse until then.
// Neuron types (1 bit, 1 = inhibitory) and external input spikes are written
// through the cfg port in words of LANES bits: type word g*NW+w holds neurons
// w*LANES.. of group g (group 0 = external inputs, group l+1 = layer l), ext
// word w holds inputs w*LANES... Write them only while busy is low.
//
// Following the design: the three processing blocks and their loops, weight
// streaming with 32 weights per cycle and the pipeline interval of eq. (6),
// the run-time active area, 32-bit state. This design's choices: the word-wide
// synapse update (one word rather than one neuron per cycle), the feed-forward
// use of the previous step's firings, the output format, the init command.
module s2nn_core
  import s2nn_pkg::*;
#(
  parameter int   L       = 170,       // layers
  parameter int   N_LAYER = 170,       // neurons per layer (= synapses per neuron)
  parameter int   N_PORTS = 4,
  parameter int   PORT_W  = 64,
  parameter int   W_BITS  = 8,
  parameter int   W_FRAC  = 13,
  parameter fix_t DECAY   = 32'sd58982,
  localparam int  LANES   = N_PORTS * PORT_W / W_BITS,
  localparam int  NW      = (N_LAYER + LANES - 1) / LANES,  // words per layer
  localparam int  NG      = L + 1,                          // groups incl. external inputs
  localparam int  LW      = $clog2(L + 1),
  localparam int  NWID    = $clog2(N_LAYER + 1),
  localparam int  KW      = (N_LAYER > 1) ? $clog2(N_LAYER) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              start,
  input  logic              init,
  input  logic [LW-1:0]     layers_act,
  input  logic [NWID-1:0]   neurons_act,
  output logic              busy,
  output logic              done,
  output logic [31:0]       step_count,
  output logic [31:0]       neu_cycles,     // cycles of the last NEU phase
  output logic [31:0]       spike_count,    // firings in the last step
  // neuron type / external input words
  input  logic              cfg_we,
  input  logic              cfg_sel,        // 0 = external inputs, 1 = neuron types
  input  logic [15:0]       cfg_addr,       // word index
  input  logic [31:0]       cfg_wdata,
  // weights, LANES per beat
  input  logic              w_valid,
  output logic              w_ready,
  input  logic [W_BITS-1:0] w_data [LANES],
  // output spikes
  output logic [63:0]       m_axis_tdata,
  output logic              m_axis_tvalid,
  input  logic              m_axis_tready,
  output logic              m_axis_tlast
);

  localparam int N_TOTAL  = L * N_LAYER;
  localparam int IDX_W    = $clog2(N_TOTAL + 1);
  localparam int MW       = (NG * NW > 1) ? $clog2(NG * NW) : 1;
  localparam int EW       = (NW > 1) ? $clog2(NW) : 1;
  localparam int VW       = (N_TOTAL > 1) ? $clog2(N_TOTAL) : 1;
  localparam int TAG_W    = LW + KW;
  localparam int INIT_N   = (N_TOTAL > NG * NW) ? N_TOTAL : NG * NW;

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_SYN, S_NEU, S_DRAIN, S_OUT} state_e;
  state_e state;

  // ---------------------------------------------------------------- memories
  fix_t             v_mem     [N_TOTAL];
  fix_t             u_mem     [N_TOTAL];
  fix_t             s_mem     [NG*NW][LANES];
  logic [LANES-1:0] fired_mem [NG*NW];
  logic [LANES-1:0] type_mem  [NG*NW];
  logic [LANES-1:0] ext_mem   [NW];

  // ---------------------------------------------------------------- counters
  logic [LW-1:0]    la;          // active layers of this step
  logic [NWID-1:0]  na;          // active neurons per layer
  logic [KW:0]      nwa;         // active words per layer = beats per neuron
  logic [LW-1:0]    c_grp;       // SYN group, NEU layer, OUT layer
  logic [KW:0]      c_word;      // SYN word, NEU beat, OUT beat
  logic [KW-1:0]    c_neu;       // NEU neuron within the layer
  logic [IDX_W-1:0] c_init;

  logic [NWID-1:0]  na_clamped;
  logic [LW-1:0]    la_clamped;

  always_comb begin
    la_clamped   = (layers_act == 0) ? LW'(1) : (layers_act > LW'(L) ? LW'(L) : layers_act);
    na_clamped = (neurons_act == 0) ? NWID'(1)
                 : (neurons_act > NWID'(N_LAYER) ? NWID'(N_LAYER) : neurons_act);
  end

  function automatic logic [LANES-1:0] lane_mask(input logic [KW:0] word, input logic [NWID-1:0] n);
    logic [LANES-1:0] m;
    for (int i = 0; i < LANES; i++)
      m[i] = (int'(word) * LANES + i) < int'(n);
    return m;
  endfunction

  // ---------------------------------------------------------------- SYN phase
  logic [MW-1:0]    syn_addr;
  fix_t             syn_s_in  [LANES];
  fix_t             syn_s_out [LANES];
  logic [LANES-1:0] syn_spike, syn_en;

  always_comb begin
    syn_addr  = MW'(int'(c_grp) * NW + int'(c_word));
    syn_s_in  = s_mem[syn_addr];
    syn_spike = (c_grp == 0) ? ext_mem[EW'(c_word)] : fired_mem[syn_addr];
    syn_en    = lane_mask(c_word, na);
  end

  synapse_update #(.LANES(LANES), .DECAY(DECAY)) u_syn (
    .s_in(syn_s_in), .spike(syn_spike), .lane_en(syn_en), .s_out(syn_s_out)
  );

  // ---------------------------------------------------------------- NEU phase
  logic             beat;        // a weight beat is consumed this cycle
  logic             b_first, b_last;
  logic [MW-1:0]    pre_addr;
  logic [TAG_W-1:0] cur_tag;
  logic [VW-1:0]    cur_idx;
  logic             g_valid, i_valid;
  fix_t             i_syn;
  logic [TAG_W-1:0] i_tag;

  assign w_ready = (state == S_NEU);
  assign beat    = w_ready && w_valid;
  assign b_first = (c_word == 0);
  assign b_last  = (c_word == nwa - 1'b1);
  assign pre_addr = MW'(int'(c_grp) * NW + int'(c_word));
  assign cur_tag  = {c_grp, c_neu};
  assign cur_idx  = VW'(int'(c_grp) * N_LAYER + int'(c_neu));

  // State of the neuron, read at its last beat, kept in step with syn_current.
  fix_t   p1_v, p1_u, p2_v, p2_u;
  ntype_e p1_t, p2_t;

  syn_current #(.LANES(LANES), .W_BITS(W_BITS), .W_FRAC(W_FRAC), .TAG_W(TAG_W)) u_cur (
    .clk, .rst_n,
    .beat_valid(beat), .first(b_first), .last(b_last),
    .w(w_data), .s(s_mem[pre_addr]), .pre_type(type_mem[pre_addr]),
    .lane_en(lane_mask(c_word, na)), .tag_in(cur_tag),
    .g_valid, .v_in(p1_v), .i_valid, .i_syn, .i_tag
  );


  always_ff @(posedge clk) begin
    if (beat && b_last) begin
      p1_v <= v_mem[cur_idx];
      p1_u <= u_mem[cur_idx];
      p1_t <= ntype_e'(type_mem[MW'((int'(c_grp) + 1) * NW + int'(c_neu) / LANES)][int'(c_neu) % LANES]);
    end
    if (g_valid) begin
      p2_v <= p1_v;
      p2_u <= p1_u;
      p2_t <= p1_t;
    end
  end

  logic             z_valid, z_fired;
  fix_t             z_v, z_u;
  logic [TAG_W-1:0] z_tag;
  logic [LW-1:0]    z_layer;
  logic [KW-1:0]    z_neu;
  logic [VW-1:0]    z_idx;
  logic [MW-1:0]    z_faddr;

  izh_neuron #(.TAG_W(TAG_W)) u_izh (
    .clk, .rst_n,
    .in_valid(i_valid), .v_in(p2_v), .u_in(p2_u), .i_syn, .ntype(p2_t), .tag_in(i_tag),
    .out_valid(z_valid), .v_out(z_v), .u_out(z_u), .fired(z_fired), .tag_out(z_tag)
  );

  always_comb begin
    {z_layer, z_neu} = z_tag;
    z_idx   = VW'(int'(z_layer) * N_LAYER + int'(z_neu));
    z_faddr = MW'((int'(z_layer) + 1) * NW + int'(z_neu) / LANES);
  end

  // ---------------------------------------------------------------- OUT phase
  logic [KW:0] nob;   // output beats per layer

  always_comb begin
    m_axis_tdata = '0;
    for (int i = 0; i < 64; i++) begin
      int n;
      n = int'(c_word) * 64 + i;
      if (n < int'(na))
        m_axis_tdata[i] = fired_mem[MW'((int'(c_grp) + 1) * NW + n / LANES)][n % LANES];
    end
    m_axis_tvalid = (state == S_OUT);
    m_axis_tlast  = (c_grp == la - 1'b1) && (c_word == nob - 1'b1);
  end

  // ---------------------------------------------------------------- memories write
  always_ff @(posedge clk) begin
    if (state == S_INIT) begin
      if (int'(c_init) < N_TOTAL) begin
        v_mem[VW'(c_init)] <= V_INIT;
        u_mem[VW'(c_init)] <= U_INIT;
      end
      if (int'(c_init) < NG * NW) begin
        for (int i = 0; i < LANES; i++) s_mem[MW'(c_init)][i] <= '0;
        fired_mem[MW'(c_init)] <= '0;
      end
    end
    if (state == S_SYN)
      s_mem[syn_addr] <= syn_s_out;
    if (z_valid) begin
      v_mem[z_idx] <= z_v;
      u_mem[z_idx] <= z_u;
      fired_mem[z_faddr][int'(z_neu) % LANES] <= z_fired;
    end
    if (cfg_we && !busy) begin
      if (cfg_sel && int'(cfg_addr) < NG * NW) type_mem[MW'(cfg_addr)] <= cfg_wdata[LANES-1:0];
      if (!cfg_sel && int'(cfg_addr) < NW)     ext_mem[EW'(cfg_addr)]  <= cfg_wdata[LANES-1:0];
    end
  end

  // ---------------------------------------------------------------- sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      la          <= LW'(1);
      na          <= NWID'(1);
      nwa         <= '0;
      nob         <= '0;
      c_grp       <= '0;
      c_word      <= '0;
      c_neu       <= '0;
      c_init      <= '0;
      done        <= 1'b0;
      step_count  <= '0;
      neu_cycles  <= '0;
      spike_count <= '0;
    end else begin
      done <= 1'b0;
      if (z_valid && z_fired) spike_count <= spike_count + 1;
      unique case (state)
        S_IDLE: begin
          c_grp  <= '0;
          c_word <= '0;
          c_neu  <= '0;
          c_init <= '0;
          if (init) begin
            state <= S_INIT;
          end else if (start) begin
            la          <= la_clamped;
            na          <= na_clamped;
            nwa         <= (KW+1)'((int'(na_clamped) + LANES - 1) / LANES);
            nob         <= (KW+1)'((int'(na_clamped) + 63) / 64);
            spike_count <= '0;
            neu_cycles  <= '0;
            state       <= S_SYN;
          end
        end
        S_INIT: begin
          c_init <= c_init + 1'b1;
          if (int'(c_init) == INIT_N - 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        S_SYN: begin
          if (c_word == nwa - 1'b1) begin
            c_word <= '0;
            if (c_grp == la) begin
              c_grp <= '0;
              state <= S_NEU;
            end else begin
              c_grp <= c_grp + 1'b1;
            end
          end else begin
            c_word <= c_word + 1'b1;
          end
        end
        S_NEU: begin
          neu_cycles <= neu_cycles + 1;
          if (beat) begin
            if (b_last) begin
              c_word <= '0;
              if (int'(c_neu) == int'(na) - 1) begin
                c_neu <= '0;
                if (c_grp == la - 1'b1) begin
                  c_grp <= '0;
                  state <= S_DRAIN;
                end else begin
                  c_grp <= c_grp + 1'b1;
                end
              end else begin
                c_neu <= c_neu + 1'b1;
              end
            end else begin
              c_word <= c_word + 1'b1;
            end
          end
        end
        S_DRAIN: begin
          neu_cycles <= neu_cycles + 1;
          if (!g_valid && !i_valid && !z_valid) state <= S_OUT;
        end
        S_OUT: begin
          if (m_axis_tready) begin
            if (c_word == nob - 1'b1) begin
              c_word <= '0;
              if (c_grp == la - 1'b1) begin
                c_grp      <= '0;
                state      <= S_IDLE;
                done       <= 1'b1;
                step_count <= step_count + 1;
              end else begin
                c_grp <= c_grp + 1'b1;
              end
            end else begin
              c_word <= c_word + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // The output stream holds its beat until it is taken.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata) && $stable(m_axis_tlast));

endmodule
