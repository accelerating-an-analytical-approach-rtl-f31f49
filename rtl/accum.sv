// accum: scenario weighting and accumulation of tranche losses.
//
// A time step is priced over several scenarios (market conditions), each with
// its own weight. For every scenario the core delivers the expected loss of
// each of its NUM_TRANCHES tranches; accum multiplies each loss by the
// scenario weight and adds it to that tranche's running total. After the
// scenario flagged last, the totals are written out as two 32-bit words per
// tranche (high word first, tranche 0 first) and cleared for the next step.
//
// One multiplier is shared by the tranches: the multiply-accumulate takes one
// cycle per tranche. Interface: loss_valid (with losses, weight, last_scen)
// is accepted only while ready is high; done pulses when the scenario has
// been fully absorbed, which for a last scenario is after the final word was
// taken on out_valid/out_ready. Totals are Q(64-FRAC_W).FRAC_W.
// Following the document: weighting by scenario and accumulation over
// scenarios into the Out FIFO. This design's choices: the serial
// multiply-accumulate, the widths, the word order and the handshake.
module accum
  import cdo_pkg::*;
#(
  parameter int unsigned NUM_TRANCHES = 6
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   loss_valid,
  output logic   ready,
  input  loss_t  losses [NUM_TRANCHES],
  input  prob_t  weight,
  input  logic   last_scen,
  output logic   out_valid,
  input  logic   out_ready,
  output word_t  out_data,
  output logic   done
);
  localparam int unsigned IW = (NUM_TRANCHES > 1) ? $clog2(NUM_TRANCHES) : 1;

  typedef enum logic [1:0] {A_IDLE, A_MAC, A_EMIT} astate_t;

  astate_t state;
  loss_t   loss_q [NUM_TRANCHES];
  total_t  total  [NUM_TRANCHES];
  prob_t   w_q;
  logic    last_q;
  logic [IW-1:0] idx;
  logic          half;   // 0: high word, 1: low word
  logic [LOSS_W+PROB_W-1:0] prod;

  assign prod      = loss_q[idx] * w_q;
  assign ready     = (state == A_IDLE);
  assign out_valid = (state == A_EMIT);
  assign out_data  = half ? total[idx][WORD_W-1:0] : total[idx][TOTAL_W-1:WORD_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= A_IDLE;
      loss_q <= '{default: '0};
      total  <= '{default: '0};
      w_q    <= '0;
      last_q <= 1'b0;
      idx    <= '0;
      half   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        A_IDLE: if (loss_valid) begin
          loss_q <= losses;
          w_q    <= weight;
          last_q <= last_scen;
          idx    <= '0;
          state  <= A_MAC;
        end
        A_MAC: begin
          total[idx] <= total[idx] + total_t'(prod >> FRAC_W);
          if (idx == IW'(NUM_TRANCHES - 1)) begin
            idx <= '0;
            half <= 1'b0;
            if (last_q) state <= A_EMIT;
            else begin
              state <= A_IDLE;
              done  <= 1'b1;
            end
          end else begin
            idx <= idx + 1'b1;
          end
        end
        A_EMIT: if (out_ready) begin
          half <= ~half;
          if (half) begin
            total[idx] <= '0;
            if (idx == IW'(NUM_TRANCHES - 1)) begin
              idx   <= '0;
              state <= A_IDLE;
              done  <= 1'b1;
            end else begin
              idx <= idx + 1'b1;
            end
          end
        end
        default: state <= A_IDLE;
      endcase
    end
  end

endmodule
