// tb_workload_sweep: the notional-size and pool-size sweeps on the full-size
// accelerator.
//
// Phase 1 gives each of the ten cores one scenario: five cores price pools of
// 100 instruments with maximum notionals 20, 50, 75, 100 and 150; five price
// pools with notionals up to 50 and 50, 25, 125, 150 and 250 instruments.
// Phase 2 reuses six cores for pools of 75, 100, 175, 200, 225 and 250
// instruments (100 and 250 repeat with other data). A maximum notional of
// 200 needs more points than the default FIFO depth holds and is left out.
// Every result is checked against the reference model, and a FIFO overflow
// is a failure. Each pool's tranche losses must also be within 0.5 % of an
// unrounded double-precision result (tranches priced near zero are measured
// against 0.1 % of the pool's largest). For each pool the test prints the
// cycles the core took, the largest number of points its convolution FIFO
// held and the largest relative error.
module tb_workload_sweep;
  import cdo_pkg::*;
  import cdo_ref_pkg::*;

  localparam int NC = 10, NT = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  in_valid [NC], in_ready [NC], out_valid [NC], out_ready [NC];
  word_t in_data [NC], out_data [NC];
  core_events_t ev [NC];
  logic [$clog2(4096+2):0] entries [NC];

  cdo_top dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready,
               .out_data, .events(ev), .entries);

  int checks = 0, failures = 0;
  real ex [];  // double-precision tranche totals from the model
  int unsigned seed = 32'h5EE9_0042;
  word_t prog [NC][$];
  word_t expect_w [NC][$];
  longint unsigned cand = 0;
  longint cycles = 0, t_start [NC], t_done [NC];
  int peak [NC];
  int n_step = 0, n_ovf = 0;

  int p1_instr [NC] = '{100, 100, 100, 100, 100, 50, 25, 125, 150, 250};
  int p1_maxn  [NC] = '{ 20,  50,  75, 100, 150, 50, 50,  50,  50,  50};
  int p2_instr [6]  = '{75, 100, 175, 200, 225, 250};
  real exact [NC][NT];
  longint unsigned got [NC][NT];
  int n_got [NC];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cycles++;
    for (int c = 0; c < NC; c++) begin
      if (int'(entries[c]) > peak[c]) peak[c] = int'(entries[c]);
      if (ev[c].overflow) n_ovf++;
      if (ev[c].step_done) begin n_step++; t_done[c] = cycles; end
      if (out_valid[c]) begin
        check(expect_w[c].size() > 0 && out_data[c] == expect_w[c][0],
              $sformatf("core %0d result %h expected %h", c, out_data[c],
                        expect_w[c].size() ? expect_w[c][0] : 0));
        if (expect_w[c].size()) void'(expect_w[c].pop_front());
        if (n_got[c] < 2 * NT) begin
          got[c][n_got[c] / 2] = {got[c][n_got[c] / 2][31:0], out_data[c]};
          n_got[c]++;
        end
      end
    end
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Round-robin host on the falling edge (see tb_cdo_full).
  task automatic feed();
    int rr;
    bit pending;
    rr = 0;
    forever begin
      @(negedge clk);
      for (int c = 0; c < NC; c++) in_valid[c] = 1'b0;
      pending = 1'b0;
      for (int c = 0; c < NC; c++) pending |= (prog[c].size() != 0);
      if (!pending) break;
      for (int k = 0; k < NC && prog[rr].size() == 0; k++) rr = (rr + 1) % NC;
      if (in_ready[rr]) begin
        word_t w;
        w = prog[rr].pop_front();
        in_valid[rr] = 1'b1;
        in_data[rr]  = w;
        if (opcode_t'(w[31:29]) == OP_PROB) rr = (rr + 1) % NC;
      end else begin
        rr = (rr + 1) % NC;
      end
    end
  endtask

  task automatic report(int c, int ninstr, int maxn);
    real top, max_err;
    top = 0.0;
    max_err = 0.0;
    for (int t = 0; t < NT; t++) if (exact[c][t] > top) top = exact[c][t];
    for (int t = 0; t < NT; t++) begin
      real hw, err, ref_v;
      hw    = real'(got[c][t]) / real'(PROB_ONE);
      ref_v = (exact[c][t] > 1.0e-3 * top) ? exact[c][t] : 1.0e-3 * top;
      err   = (hw > exact[c][t] ? hw - exact[c][t] : exact[c][t] - hw) / ref_v;
      if (err > max_err) max_err = err;
    end
    check(max_err < 0.005, $sformatf("pool %0d/%0d: error %f", ninstr, maxn, max_err));
    $display("pool %3d instruments, notionals 1..%3d: %7d cycles, peak FIFO points %4d, max error %0.4f %%",
             ninstr, maxn, t_done[c] - t_start[c], peak[c], 100.0 * max_err);
  endtask

  initial begin
    for (int c = 0; c < NC; c++) begin
      in_valid[c] = 1'b0; in_data[c] = '0; out_ready[c] = 1'b1; peak[c] = 0; n_got[c] = 0;
      make_step(seed, NT, 1, p1_instr[c], p1_maxn[c], prog[c], expect_w[c], cand, ex);
      foreach (ex[t]) exact[c][t] = ex[t];
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int c = 0; c < NC; c++) t_start[c] = cycles;
    feed();
    while (n_step < NC) @(posedge clk);
    repeat (20) @(posedge clk);
    for (int c = 0; c < NC; c++) report(c, p1_instr[c], p1_maxn[c]);
    // phase 2
    for (int c = 0; c < 6; c++) begin
      peak[c] = 0;
      n_got[c] = 0;
      t_start[c] = cycles;
      make_step(seed, NT, 1, p2_instr[c], 50, prog[c], expect_w[c], cand, ex);
      foreach (ex[t]) exact[c][t] = ex[t];
    end
    feed();
    while (n_step < NC + 6) @(posedge clk);
    repeat (20) @(posedge clk);
    for (int c = 0; c < 6; c++) report(c, p2_instr[c], 50);
    for (int c = 0; c < NC; c++)
      check(expect_w[c].size() == 0, $sformatf("core %0d: results missing", c));
    check(n_ovf == 0, "no convolution FIFO overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
