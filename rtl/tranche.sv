// tranche: expected loss of one tranche for one scenario.
//
// For each point (l, P) of the final pool loss distribution the tranche loses
// min(S, max(l - A, 0)), where A is the attachment point and S the tranche
// size (detachment minus attachment). The module sums that loss weighted by
// P over the whole distribution, which is the expected tranche loss.
//
// Pipeline, one register after each step: subtract A, clamp at 0 (max),
// clamp at S (min), multiply by P, accumulate. The probability travels beside
// the first three steps in a three-stage shift register so that it meets its
// own clamped loss at the multiplier. The loss operand comes from the point's
// own notional, because the FIFO-based convolution delivers only the points
// that exist; the stream replaces the block RAM and loss counter of a dense
// table.
//
// Interface: in_valid/in_point deliver points (no back-pressure, any gap);
// in_end marks the end of the distribution. Five cycles after in_end,
// out_valid pulses for one cycle with out_loss, Q(NOTIONAL_W).FRAC_W, and
// the accumulator restarts at zero. attach and size are sampled with each
// point (size is carried along to the min step), so they may change as soon
// as the last point and in_end have been presented. Following the document: the datapath steps and
// their order. This design's choices: widths, the streaming input and the
// end-of-stream handshake.
module tranche
  import cdo_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  notional_t attach,
  input  notional_t size,
  input  logic      in_valid,
  input  point_t    in_point,
  input  logic      in_end,
  output logic      out_valid,
  output loss_t     out_loss
);
  logic signed [NOTIONAL_W:0] d1;
  notional_t                  m2, c3;
  notional_t                  size1, size2; // S travels with its point
  logic [NOTIONAL_W+PROB_W-1:0] prod4;
  prob_t                      sr [3];   // shift register for P
  logic [3:0]                 v, e;     // valid / end flags of stages 1..4
  loss_t                      acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1 <= '0; m2 <= '0; size1 <= '0; size2 <= '0; c3 <= '0; prod4 <= '0;
      sr <= '{default: '0};
      v <= '0; e <= '0;
      acc <= '0; out_valid <= 1'b0; out_loss <= '0;
    end else begin
      // stage 1: l - A
      d1    <= $signed({1'b0, in_point.notional}) - $signed({1'b0, attach});
      sr[0] <= in_point.prob;
      size1 <= size;
      // stage 2: max(., 0)
      m2    <= d1[NOTIONAL_W] ? '0 : d1[NOTIONAL_W-1:0];
      sr[1] <= sr[0];
      size2 <= size1;
      // stage 3: min(., S)
      c3    <= (m2 > size2) ? size2 : m2;
      sr[2] <= sr[1];
      // stage 4: x P
      prod4 <= c3 * sr[2];
      // stage 5: accumulate
      v <= {v[2:0], in_valid};
      e <= {e[2:0], in_end};
      out_valid <= e[3];
      if (e[3]) begin
        out_loss <= acc + (v[3] ? loss_t'(prod4) : '0);
        acc      <= '0;
      end else if (v[3]) begin
        acc      <= acc + loss_t'(prod4);
      end
    end
  end

endmodule
