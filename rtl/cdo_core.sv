// cdo_core: one CDO pricing core. It prices one time step of a CDO over a
// set of scenarios and returns the weighted expected loss of every tranche.
//
// Data path: In FIFO -> word decoder -> fifo_conv -> NUM_TRANCHES tranche
// units in parallel -> accum -> Out FIFO. For each scenario the host sends
// the tranche points (OP_ATTACH, OP_SIZE, needed once, kept until changed),
// the scenario weight (OP_WEIGHT, flag = last scenario of the step), then the
// pool instrument by instrument (OP_NOTIONAL, then OP_PROB with flag = last
// instrument). Instruments are handed to the convolution as soon as they
// arrive, so the core computes while the rest of the pool is still in
// transit; when the next instrument has not arrived, the convolution idles.
// After the last instrument the final loss distribution streams once through
// all tranche units at the same time; their losses go to accum, which weights
// them and, after the last scenario, writes 2 x NUM_TRANCHES words (tranche 0
// first, high word first) to the Out FIFO.
//
// The decoder holds the next scenario's words back until accum has absorbed
// the current scenario, so the attachment points and the weight in use never
// change under a running scenario. The word format and that hold are this
// design's choices; the block structure (Conv, Tranche modules, Accum, In
// and Out FIFO) follows the document. Single clock, active-low async reset.
module cdo_core
  import cdo_pkg::*;
#(
  parameter int unsigned NUM_TRANCHES = 6,
  parameter int unsigned FIFO_DEPTH   = 4096,
  parameter int unsigned IN_DEPTH     = 16,
  parameter int unsigned OUT_DEPTH    = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  word_t        in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output word_t        out_data,
  output core_events_t events,
  output logic [$clog2(FIFO_DEPTH+2):0] entries
);
  // ---- In FIFO ----
  logic  q_valid, q_ready;
  word_t q_data;
  sync_fifo #(.WIDTH(WORD_W), .DEPTH(IN_DEPTH)) u_in_fifo (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(q_valid), .out_ready(q_ready), .out_data(q_data));

  // ---- word decoder ----
  notional_t attach [NUM_TRANCHES];
  notional_t size   [NUM_TRANCHES];
  prob_t     weight;
  logic      last_scen;
  notional_t notional_hold;
  logic      hold;          // waiting for accum to absorb the scenario
  opcode_t   op;
  logic [4:0] tidx;
  logic      instr_valid, instr_ready;
  instr_t    instr;
  logic      acc_done;

  assign op          = opcode_t'(q_data[31:29]);
  assign tidx        = q_data[28:24];
  assign instr_valid = q_valid && !hold && (op == OP_PROB);
  assign instr       = '{notional: notional_hold, pd: q_data[PROB_W-1:0], last: q_data[28]};
  assign q_ready     = !hold && ((op == OP_PROB) ? instr_ready : 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      attach        <= '{default: '0};
      size          <= '{default: '0};
      weight        <= '0;
      last_scen     <= 1'b0;
      notional_hold <= '0;
      hold          <= 1'b0;
    end else begin
      if (hold) begin
        if (acc_done) hold <= 1'b0;
      end else if (q_valid) begin
        unique case (op)
          OP_ATTACH:   if (32'(tidx) < NUM_TRANCHES) attach[tidx] <= q_data[NOTIONAL_W-1:0];
          OP_SIZE:     if (32'(tidx) < NUM_TRANCHES) size[tidx]   <= q_data[NOTIONAL_W-1:0];
          OP_WEIGHT:   begin weight <= q_data[PROB_W-1:0]; last_scen <= q_data[28]; end
          OP_NOTIONAL: notional_hold <= q_data[NOTIONAL_W-1:0];
          OP_PROB:     if (instr_ready && q_data[28]) hold <= 1'b1;
          default: ;
        endcase
      end
    end
  end

  // ---- convolution ----
  logic   dist_valid, dist_end, conv_busy, ovf;
  point_t dist_point;
  logic   ev_starved, ev_a, ev_b, ev_c, ev_drop;

  fifo_conv #(.FIFO_DEPTH(FIFO_DEPTH)) u_conv (
    .clk, .rst_n, .instr_valid, .instr_ready, .instr,
    .dist_valid, .dist_point, .dist_end, .busy(conv_busy),
    .ev_starved, .ev_case_a(ev_a), .ev_case_b(ev_b), .ev_case_c(ev_c),
    .ev_dropped(ev_drop), .overflow(ovf), .entries);

  // ---- tranches ----
  logic [NUM_TRANCHES-1:0] tr_valid;
  loss_t                   tr_loss [NUM_TRANCHES];

  for (genvar t = 0; t < NUM_TRANCHES; t++) begin : g_tr
    tranche u_tr (
      .clk, .rst_n, .attach(attach[t]), .size(size[t]),
      .in_valid(dist_valid), .in_point(dist_point), .in_end(dist_end),
      .out_valid(tr_valid[t]), .out_loss(tr_loss[t]));
  end

  // ---- accum and Out FIFO ----
  logic  a_valid, a_ready;
  word_t a_data;
  logic  acc_ready;

  accum #(.NUM_TRANCHES(NUM_TRANCHES)) u_accum (
    .clk, .rst_n, .loss_valid(tr_valid[0]), .ready(acc_ready), .losses(tr_loss),
    .weight, .last_scen, .out_valid(a_valid), .out_ready(a_ready), .out_data(a_data),
    .done(acc_done));

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(OUT_DEPTH)) u_out_fifo (
    .clk, .rst_n, .in_valid(a_valid), .in_ready(a_ready), .in_data(a_data),
    .out_valid, .out_ready, .out_data);

  logic step_pending;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) step_pending <= 1'b0;
    else if (tr_valid[0]) step_pending <= last_scen;
  end

  assign events = '{starved:   ev_starved && !conv_busy,
                    case_a:    ev_a,
                    case_b:    ev_b,
                    case_c:    ev_c,
                    dropped:   ev_drop,
                    scen_done: acc_done,
                    step_done: acc_done && step_pending,
                    overflow:  ovf};

  a_accum_free: assert property (@(posedge clk) disable iff (!rst_n) tr_valid[0] |-> acc_ready)
    else $error("cdo_core: tranche losses arrived while accum was busy");

endmodule
