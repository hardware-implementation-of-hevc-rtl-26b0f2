// bae_controller: sequencing and state storage of the binary arithmetic
// encoder.
//
// A syntax element arrives as one strobe (i_bi_syn_valid) with its index
// (i_bi_syn_idx), its bin string (i_bi_bin, bin k in bit k) and its bin
// count (i_bi_bin_num).  The controller takes it when idle, spends one load
// cycle, then presents one bin per cycle to the three engines: the bin value,
// the stored ivlLow/ivlRange/outstanding count and the context state
// (i_bae_pstate/i_bae_mps, supplied for the current bin by the context
// modeler).  It decides each bin's mode from the syntax element and bin
// index (bae_pkg::bin_mode), enables only that engine, and at the end of the
// cycle stores the multiplexer's result (i_mux_low/range/outstd) as the
// interval for the next bin.
//
// States, numbered as in the architecture's timing chart: 0 idle, 1 load,
// 3 first bin, 2 following bins.  o_bae_period is high in every bin cycle;
// o_bae_finish pulses for one cycle after the last bin.  A syntax element of
// N bins accepted in cycle t is encoded in cycles t+2 .. t+1+N, finish is in
// cycle t+2+N, and the next element can be accepted in that same cycle.
// i_bae_init, taken when idle, and reset (rst_m_n, active low, synchronous)
// set ivlLow = 0, ivlRange = 510 and the outstanding count to 0.
// o_bae_ready (idle) and o_bae_bin_idx are this design's additions.
module bae_controller
  import bae_pkg::*;
(
  input  logic                clk,
  input  logic                rst_m_n,
  // from the binarizer
  input  logic                i_bi_syn_valid,
  input  logic [BIN_W-1:0]    i_bi_bin,
  input  logic [BINNUM_W-1:0] i_bi_bin_num,
  input  logic [SYN_W-1:0]    i_bi_syn_idx,
  // from the context modeler
  input  logic [PSTATE_W-1:0] i_bae_pstate,
  input  logic                i_bae_mps,
  input  logic                i_bae_init,
  // from the output multiplexer
  input  logic [LOW_W-1:0]    i_mux_low,
  input  logic [RANGE_W-1:0]  i_mux_range,
  input  logic [OUTSTD_W-1:0] i_mux_outstd,
  // to the engines
  output logic [LOW_W-1:0]    o_eng_low,
  output logic [RANGE_W-1:0]  o_eng_range,
  output logic [OUTSTD_W-1:0] o_eng_outstd,
  output logic                o_eng_bin,
  output logic [PSTATE_W-1:0] o_eng_pstate,
  output logic                o_eng_valmps,
  output logic                o_en_regular,
  output logic                o_en_bypass,
  output logic                o_en_term,
  output bae_mode_e           o_mode,
  // status
  output logic                o_bae_period,
  output logic                o_bae_finish,
  output logic                o_bae_ready,
  output logic [BINNUM_W-1:0] o_bae_bin_idx,
  output bae_state_e          o_state
);

  bae_state_e          state_q;
  logic [LOW_W-1:0]    low_q;
  logic [RANGE_W-1:0]  range_q;
  logic [OUTSTD_W-1:0] outstd_q;
  logic [SYN_W-1:0]    syn_q;
  logic [BIN_W-1:0]    bins_q;
  logic [BINNUM_W-1:0] num_q;
  logic [BINNUM_W-1:0] idx_q;
  logic                finish_q;
  logic                encoding;
  logic                last_bin;

  assign encoding = (state_q == ST_FIRST) || (state_q == ST_NEXT);
  assign last_bin = (idx_q + 1'b1 >= num_q);

  always_ff @(posedge clk) begin
    if (!rst_m_n) begin
      state_q  <= ST_IDLE;
      low_q    <= '0;
      range_q  <= RANGE_INIT;
      outstd_q <= '0;
      syn_q    <= '0;
      bins_q   <= '0;
      num_q    <= '0;
      idx_q    <= '0;
      finish_q <= 1'b0;
    end else begin
      finish_q <= 1'b0;
      unique case (state_q)
        ST_IDLE: begin
          if (i_bi_syn_valid) begin
            syn_q   <= i_bi_syn_idx;
            bins_q  <= i_bi_bin;
            num_q   <= i_bi_bin_num;
            idx_q   <= '0;
            state_q <= ST_LOAD;
          end else if (i_bae_init) begin
            low_q    <= '0;
            range_q  <= RANGE_INIT;
            outstd_q <= '0;
          end
        end
        ST_LOAD: begin
          if (num_q == '0) begin
            state_q  <= ST_IDLE;
            finish_q <= 1'b1;
          end else begin
            state_q <= ST_FIRST;
          end
        end
        ST_FIRST, ST_NEXT: begin
          low_q    <= i_mux_low;
          range_q  <= i_mux_range;
          outstd_q <= i_mux_outstd;
          if (last_bin) begin
            state_q  <= ST_IDLE;
            finish_q <= 1'b1;
          end else begin
            idx_q   <= idx_q + 1'b1;
            state_q <= ST_NEXT;
          end
        end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    o_mode       = bin_mode(syn_q, idx_q);
    o_en_regular = encoding && (o_mode == MODE_REGULAR);
    o_en_bypass  = encoding && (o_mode == MODE_BYPASS);
    o_en_term    = encoding && (o_mode == MODE_TERM);
  end

  assign o_eng_low     = low_q;
  assign o_eng_range   = range_q;
  assign o_eng_outstd  = outstd_q;
  assign o_eng_bin     = bins_q[idx_q[$clog2(BIN_W)-1:0]];
  assign o_eng_pstate  = i_bae_pstate;
  assign o_eng_valmps  = i_bae_mps;
  assign o_bae_period  = encoding;
  assign o_bae_finish  = finish_q;
  assign o_bae_ready   = (state_q == ST_IDLE);
  assign o_bae_bin_idx = idx_q;
  assign o_state       = state_q;

  // A new syntax element may only be offered while the encoder is idle, and
  // it must carry 1 .. BIN_W bins.
  a_valid_when_idle: assert property (@(posedge clk) disable iff (!rst_m_n)
    i_bi_syn_valid |-> state_q == ST_IDLE);
  a_bin_num_range: assert property (@(posedge clk) disable iff (!rst_m_n)
    i_bi_syn_valid |-> (i_bi_bin_num >= 1 && int'(i_bi_bin_num) <= BIN_W));

endmodule
