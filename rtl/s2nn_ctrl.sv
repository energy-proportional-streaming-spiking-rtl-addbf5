// s2nn_ctrl - AXI4-Lite control slave of the S2NN accelerator.
//
// The host processor drives the accelerator through one 32-bit general-purpose
// AXI port: it sets the active area of the network, loads neuron types and
// external input spikes, starts a time step and waits for the completion
// interrupt (the design's host sleeps until that interrupt). The register map
// is this design's own:
//
//   0x0000 CTRL     W: bit0 START one time step, bit1 INIT neuron state,
//                      bit2 clear DONE
//                   R: bit0 BUSY, bit1 DONE (sticky), bit2 IDLE
//   0x0004 IER      bit0 interrupt enable; irq = DONE & IER[0]
//   0x0008 LAYERS   active layers (1..L, clamped by the core)
//   0x000C NEURONS  active neurons per layer (1..N_LAYER, clamped by the core)
//   0x0010 STEPS    R: time steps completed
//   0x0014 NEUCYC   R: cycles of the last neuron phase
//   0x0018 SPIKES   R: firings in the last time step
//   0x1000 + 4w     W: external input spike word w (ignored while busy)
//   0x4000 + 4w     W: neuron type word w (ignored while busy)
//
// Handshake: a write is taken when AWVALID and WVALID are both high (both
// ready in that cycle), answered with BVALID/OKAY one cycle later and held
// until BREADY; a read is taken on ARVALID and answered with RVALID the next
// cycle, held until RREADY. One transaction of each kind at a time. START,
// INIT and the memory writes are single-cycle pulses to the core.
module s2nn_ctrl #(
  parameter int LW   = 8,
  parameter int NWID = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  // AXI4-Lite slave
  input  logic [15:0]     s_axi_awaddr,
  input  logic            s_axi_awvalid,
  output logic            s_axi_awready,
  input  logic [31:0]     s_axi_wdata,
  input  logic [3:0]      s_axi_wstrb,
  input  logic            s_axi_wvalid,
  output logic            s_axi_wready,
  output logic [1:0]      s_axi_bresp,
  output logic            s_axi_bvalid,
  input  logic            s_axi_bready,
  input  logic [15:0]     s_axi_araddr,
  input  logic            s_axi_arvalid,
  output logic            s_axi_arready,
  output logic [31:0]     s_axi_rdata,
  output logic [1:0]      s_axi_rresp,
  output logic            s_axi_rvalid,
  input  logic            s_axi_rready,
  output logic            irq,
  // to / from the core
  output logic            start,
  output logic            init,
  output logic [LW-1:0]   layers_act,
  output logic [NWID-1:0] neurons_act,
  input  logic            busy,
  input  logic            done,
  input  logic [31:0]     step_count,
  input  logic [31:0]     neu_cycles,
  input  logic [31:0]     spike_count,
  output logic            cfg_we,
  output logic            cfg_sel,
  output logic [15:0]     cfg_addr,
  output logic [31:0]     cfg_wdata
);

  localparam logic [15:0] A_CTRL    = 16'h0000;
  localparam logic [15:0] A_IER     = 16'h0004;
  localparam logic [15:0] A_LAYERS  = 16'h0008;
  localparam logic [15:0] A_NEURONS = 16'h000C;
  localparam logic [15:0] A_STEPS   = 16'h0010;
  localparam logic [15:0] A_NEUCYC  = 16'h0014;
  localparam logic [15:0] A_SPIKES  = 16'h0018;

  logic done_q, ier;
  logic wr_take, rd_take;

  assign wr_take       = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_awready = wr_take;
  assign s_axi_wready  = wr_take;
  assign s_axi_bresp   = 2'b00;
  assign rd_take       = s_axi_arvalid && !s_axi_rvalid;
  assign s_axi_arready = rd_take;
  assign s_axi_rresp   = 2'b00;
  assign irq           = done_q && ier;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axi_bvalid <= 1'b0;
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
      done_q       <= 1'b0;
      ier          <= 1'b0;
      layers_act   <= LW'(1);
      neurons_act  <= NWID'(1);
      start        <= 1'b0;
      init         <= 1'b0;
      cfg_we       <= 1'b0;
      cfg_sel      <= 1'b0;
      cfg_addr     <= '0;
      cfg_wdata    <= '0;
    end else begin
      start  <= 1'b0;
      init   <= 1'b0;
      cfg_we <= 1'b0;
      if (done) done_q <= 1'b1;
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;

      if (wr_take) begin
        s_axi_bvalid <= 1'b1;
        if (s_axi_awaddr[15:12] == 4'h1 || s_axi_awaddr[15:14] == 2'b01) begin
          cfg_we    <= 1'b1;
          cfg_sel   <= s_axi_awaddr[14];
          cfg_addr  <= (16'(s_axi_awaddr[13:2]) & (s_axi_awaddr[14] ? 16'h0fff : 16'h03ff));
          cfg_wdata <= s_axi_wdata;
        end else begin
          unique case (s_axi_awaddr)
            A_CTRL: begin
              if (s_axi_wstrb[0]) begin
                if (s_axi_wdata[0] && !busy) begin start <= 1'b1; done_q <= 1'b0; end
                if (s_axi_wdata[1] && !busy) begin init  <= 1'b1; done_q <= 1'b0; end
                if (s_axi_wdata[2]) done_q <= 1'b0;
              end
            end
            A_IER:     if (s_axi_wstrb[0]) ier <= s_axi_wdata[0];
            A_LAYERS:  layers_act  <= LW'(s_axi_wdata);
            A_NEURONS: neurons_act <= NWID'(s_axi_wdata);
            default: ;
          endcase
        end
      end

      if (rd_take) begin
        s_axi_rvalid <= 1'b1;
        unique case (s_axi_araddr)
          A_CTRL:    s_axi_rdata <= {29'd0, !busy, done_q, busy};
          A_IER:     s_axi_rdata <= {31'd0, ier};
          A_LAYERS:  s_axi_rdata <= 32'(layers_act);
          A_NEURONS: s_axi_rdata <= 32'(neurons_act);
          A_STEPS:   s_axi_rdata <= step_count;
          A_NEUCYC:  s_axi_rdata <= neu_cycles;
          A_SPIKES:  s_axi_rdata <= spike_count;
          default:   s_axi_rdata <= '0;
        endcase
      end
    end
  end

  // A response is held until it is taken.
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));

endmodule
