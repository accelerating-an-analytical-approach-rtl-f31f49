// tb_cdo_full: the accelerator at full size on the default pricing problem.
//
// All ten cores, default parameters. Each core prices one time step of
// NSCEN scenarios; every scenario is a pool of NINSTR instruments with
// notionals uniform in [1, MAXN] and default probabilities uniform in [0, 1],
// priced for six tranches. The host feeds the cores round-robin, one
// instrument per turn. Every result word is compared with the reference
// model. The test reports the cycles taken, the time at a 200 MHz core
// clock, the largest convolution FIFO occupancy and the points dropped. It
// also measures the relative error of every tranche total against an
// unrounded double-precision computation; it must stay below 0.5 %
// (tranches priced near zero are measured against 0.1 % of the largest).
module tb_cdo_full;
  import cdo_pkg::*;
  import cdo_ref_pkg::*;

  localparam int NC = 10, NT = 6, NSCEN = 64, NINSTR = 100, MAXN = 50;

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
  int unsigned seed = 32'hF011_5123;
  word_t prog [NC][$];
  word_t expect_w [NC][$];
  longint unsigned cand = 0;
  longint cycles = 0;
  int n_step = 0, n_ovf = 0, n_words = 0, max_entries = 0;
  longint n_drop = 0, n_dec = 0;

  real exact [NC][NT];
  real max_err = 0.0;
  longint unsigned got [NC][NT];
  int n_got [NC];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cycles++;
    for (int c = 0; c < NC; c++) begin
      if (ev[c].dropped) n_drop++;
      if (ev[c].case_a || ev[c].case_b || ev[c].case_c) n_dec++;
      if (ev[c].step_done) n_step++;
      if (ev[c].overflow) n_ovf++;
      if (int'(entries[c]) > max_entries) max_entries = int'(entries[c]);
      if (out_valid[c]) begin
        n_words++;
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
    repeat (40000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rr;
    bit pending;
    for (int c = 0; c < NC; c++) begin
      in_valid[c] = 1'b0; in_data[c] = '0; out_ready[c] = 1'b1; n_got[c] = 0;
      make_step(seed, NT, NSCEN, NINSTR, MAXN, prog[c], expect_w[c], cand, ex);
      foreach (ex[t]) exact[c][t] = ex[t];
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // Host side works on the falling edge, where in_ready is settled for the
    // next rising edge: a word offered then is taken at that edge.
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
    while (n_step < NC) @(posedge clk);
    repeat (20) @(posedge clk);
    for (int c = 0; c < NC; c++)
      check(expect_w[c].size() == 0, $sformatf("core %0d: %0d result words missing", c, expect_w[c].size()));
    check(n_words == NC * 2 * NT, $sformatf("%0d result words", n_words));
    check(n_ovf == 0, "no convolution FIFO overflow");
    check(n_dec == longint'(cand), "one output decision per candidate loss");
    // Precision: error of each weighted tranche total against the unrounded
    // double-precision result, relative to the exact value; the target is
    // below 0.5 %. A tranche priced near zero (far above the mean pool loss)
    // is judged against 0.1 % of the core's largest tranche total instead.
    for (int c = 0; c < NC; c++) begin
      real top;
      top = 0.0;
      for (int t = 0; t < NT; t++) if (exact[c][t] > top) top = exact[c][t];
      for (int t = 0; t < NT; t++) begin
        real hw, err, ref_v;
        hw    = real'(got[c][t]) / real'(PROB_ONE);
        ref_v = (exact[c][t] > 1.0e-3 * top) ? exact[c][t] : 1.0e-3 * top;
        err   = (hw > exact[c][t] ? hw - exact[c][t] : exact[c][t] - hw) / ref_v;
        if (err > max_err) max_err = err;
        check(err < 0.005, $sformatf("core %0d tranche %0d: %f vs exact %f", c, t, hw, exact[c][t]));
      end
    end
    $display("max relative error against double precision: %0.5f %%", 100.0 * max_err);
    $display("cycles=%0d (%0.2f ms at 200 MHz) decisions=%0d dropped=%0d max_fifo_entries=%0d",
             cycles, real'(cycles) / 200.0e3, n_dec, n_drop, max_entries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
