// fifo_conv: FIFO-based recursive convolution that builds a pool's loss
// distribution one instrument at a time.
//
// The current distribution is a list of (loss, probability) points in
// increasing loss order, ended by an END_MARK entry. Two identical copies are
// kept in FIFO 0 and FIFO N, because each point is used twice: once with the
// instrument's no-default point (loss 0, probability 1-pi) held in register 0
// and once with its default point (loss N_k, probability pi) held in
// register N. Every cycle the two head losses are offset by 0 and N_k and
// compared (the "switch"). The smaller sum is the next output loss: its FIFO
// is dequeued and its probability multiplied by the register's probability
// (case A: FIFO 0 only, case C: FIFO N only). Equal sums dequeue both FIFOs
// and add the two products (case B). The output point is appended to the back
// of both FIFOs, unless its probability has rounded to zero, in which case it
// is dropped (dynamic point dropping). When both heads are END_MARK the
// iteration ends and END_MARK is appended behind the new distribution. Only
// points that can occur are ever stored or computed.
//
// Pipeline: head compare and dequeue (cycle 0), operand register (1),
// multiply register (2), final add, zero test and FIFO write (end of 2). The
// lookahead double buffers in la_fifo keep one decision per cycle. Between
// iterations the pipeline drains before the next instrument is taken.
//
// Interface: instr_valid/instr_ready take one instrument (notional, pi,
// last). A new pool starts from the single point (0, 1.0). During the
// iteration of the instrument marked last, every kept point is also sent out
// on dist_valid/dist_point (in loss order), and dist_end pulses once after
// the last of them; the FIFOs are then cleared for the next pool. The output
// stream has no back-pressure. ev_* are one-cycle event pulses.
//
// The algorithm, the double buffers, the end marker and the zero-drop rule
// follow the document. The pipeline split, the drain between iterations,
// rounding of products to nearest and the interface are this design's
// choices.
module fifo_conv
  import cdo_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4096
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      instr_valid,
  output logic      instr_ready,
  input  instr_t    instr,
  output logic      dist_valid,
  output point_t    dist_point,
  output logic      dist_end,
  output logic      busy,
  output logic      ev_starved,
  output logic      ev_case_a,
  output logic      ev_case_b,
  output logic      ev_case_c,
  output logic      ev_dropped,
  output logic      overflow,
  output logic [$clog2(FIFO_DEPTH+2):0] entries
);
  typedef enum logic [2:0] {S_CLEAR, S_SEED, S_SEED_END, S_WAIT, S_RUN, S_DRAIN} state_t;
  typedef enum logic [1:0] {SW_A, SW_B, SW_C} switch_t;

  state_t    state;
  notional_t reg_n;          // N_k of register N (register 0 is always loss 0)
  prob_t     reg_p0, reg_pn; // 1 - pi_k and pi_k
  logic      last_iter;

  // FIFO ports
  logic   f_clear, f_wr;
  point_t f_wdata;
  point_t h0, hn;
  logic   v0, vn, pop0, popn, full0, fulln, ovf0, ovfn;
  logic [$clog2(FIFO_DEPTH+2):0] level0, leveln;

  la_fifo #(.WIDTH($bits(point_t)), .DEPTH(FIFO_DEPTH)) u_fifo0 (
    .clk, .rst_n, .clear(f_clear), .wr_en(f_wr), .wr_data(f_wdata),
    .rd_en(pop0), .rd_data(h0), .rd_valid(v0), .full(full0), .overflow(ovf0), .level(level0));
  la_fifo #(.WIDTH($bits(point_t)), .DEPTH(FIFO_DEPTH)) u_fifon (
    .clk, .rst_n, .clear(f_clear), .wr_en(f_wr), .wr_data(f_wdata),
    .rd_en(popn), .rd_data(hn), .rd_valid(vn), .full(fulln), .overflow(ovfn), .level(leveln));

  // ---- cycle 0: add, compare, dequeue ----
  logic [NOTIONAL_W:0] sum0, sumn;
  logic    end0, endn, decide, both_end;
  switch_t sw;

  assign end0     = (h0.notional == END_MARK);
  assign endn     = (hn.notional == END_MARK);
  assign sum0     = {1'b0, h0.notional};
  assign sumn     = {1'b0, hn.notional} + {1'b0, reg_n};
  assign decide   = (state == S_RUN) && v0 && vn;
  assign both_end = end0 && endn;

  always_comb begin
    if (endn || (!end0 && (sum0 < sumn)))      sw = SW_A;
    else if (end0 || (sumn < sum0))            sw = SW_C;
    else                                       sw = SW_B;
  end

  assign pop0 = decide && (both_end || sw != SW_C);
  assign popn = decide && (both_end || sw != SW_A);

  // ---- cycle 1: operands ----
  logic      s1_v, s1_end;
  switch_t   s1_sw;
  notional_t s1_n;
  prob_t     s1_pa, s1_pb;
  // ---- cycle 2: products ----
  logic      s2_v, s2_end;
  notional_t s2_n;
  prob_t     s2_ma, s2_mb;
  logic [2*PROB_W-1:0] mul_a, mul_b;

  // Products are rounded to nearest. Truncation would bias every point low,
  // losing about half an LSB of probability mass per point per iteration,
  // which over a 100-instrument pool costs more than 0.5 % of a tranche loss.
  localparam logic [2*PROB_W-1:0] HALF_LSB = (2*PROB_W)'(1) << (FRAC_W - 1);
  assign mul_a = s1_pa * reg_p0 + HALF_LSB;
  assign mul_b = s1_pb * reg_pn + HALF_LSB;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_end <= 1'b0; s1_sw <= SW_A; s1_n <= '0; s1_pa <= '0; s1_pb <= '0;
      s2_v <= 1'b0; s2_end <= 1'b0; s2_n <= '0; s2_ma <= '0; s2_mb <= '0;
    end else begin
      s1_v   <= decide;
      s1_end <= both_end;
      s1_sw  <= sw;
      s1_n   <= (sw == SW_C) ? sumn[NOTIONAL_W-1:0] : sum0[NOTIONAL_W-1:0];
      s1_pa  <= h0.prob;
      s1_pb  <= hn.prob;
      s2_v   <= s1_v;
      s2_end <= s1_end;
      s2_n   <= s1_end ? END_MARK : s1_n;
      s2_ma  <= (s1_sw == SW_C) ? '0 : mul_a[FRAC_W +: PROB_W];
      s2_mb  <= (s1_sw == SW_A) ? '0 : mul_b[FRAC_W +: PROB_W];
    end
  end

  // ---- end of cycle 2: combine, zero test, write back ----
  prob_t out_p;
  logic  keep;
  assign out_p = s2_ma + s2_mb;
  assign keep  = s2_v && !s2_end && (out_p != '0);

  // ---- control ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_CLEAR;
      reg_n     <= '0;
      reg_p0    <= '0;
      reg_pn    <= '0;
      last_iter <= 1'b0;
    end else begin
      unique case (state)
        S_CLEAR:    state <= S_SEED;
        S_SEED:     state <= S_SEED_END;
        S_SEED_END: state <= S_WAIT;
        S_WAIT: if (instr_valid) begin
          reg_n     <= instr.notional;
          reg_pn    <= instr.pd;
          reg_p0    <= PROB_ONE - instr.pd;
          last_iter <= instr.last;
          state     <= S_RUN;
        end
        S_RUN:   if (decide && both_end) state <= S_DRAIN;
        S_DRAIN: if (!s1_v && !s2_v) state <= last_iter ? S_CLEAR : S_WAIT;
        default: state <= S_CLEAR;
      endcase
    end
  end

  always_comb begin
    f_clear = (state == S_CLEAR);
    f_wr    = 1'b0;
    f_wdata = '0;
    unique case (state)
      S_SEED:     begin f_wr = 1'b1; f_wdata = '{notional: '0,       prob: PROB_ONE}; end
      S_SEED_END: begin f_wr = 1'b1; f_wdata = '{notional: END_MARK, prob: '0}; end
      default: begin
        f_wr    = keep || (s2_v && s2_end);
        f_wdata = '{notional: s2_n, prob: s2_end ? prob_t'(0) : out_p};
      end
    endcase
  end

  assign instr_ready = (state == S_WAIT);
  assign busy        = (state != S_WAIT);
  assign dist_valid  = last_iter && keep;
  assign dist_point  = '{notional: s2_n, prob: out_p};
  assign dist_end    = last_iter && s2_v && s2_end;
  assign ev_starved  = (state == S_WAIT) && !instr_valid;
  assign ev_case_a   = decide && !both_end && (sw == SW_A);
  assign ev_case_b   = decide && !both_end && (sw == SW_B);
  assign ev_case_c   = decide && !both_end && (sw == SW_C);
  assign ev_dropped  = s2_v && !s2_end && (out_p == '0);
  assign overflow    = ovf0 || ovfn;
  assign entries     = leveln;

  a_notional_range: assert property (@(posedge clk) disable iff (!rst_n)
      decide && !both_end |-> (sw == SW_C ? sumn : sum0) < {1'b0, END_MARK})
    else $error("fifo_conv: pool loss reaches the end marker");

endmodule
