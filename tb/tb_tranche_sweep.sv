// tb_tranche_sweep: a core built for the largest tranche count, 20.
//
// One cdo_core with NUM_TRANCHES = 20 prices two time steps: two scenarios
// of 100 instruments with notionals up to 50, then one scenario of 40
// instruments with notionals up to 20. All twenty tranche units share the
// one loss distribution stream, so the tranche count does not change the
// convolution's cycles; the test checks that every one of the 40 result
// words per step equals the reference model, and that each tranche total is
// within 0.5 % of an unrounded double-precision result (tranches priced near
// zero are measured against 0.1 % of the step's largest). The host sends
// without gaps and reads without stalls.
module tb_tranche_sweep;
  import cdo_pkg::*;
  import cdo_ref_pkg::*;

  localparam int NT = 20;
  localparam int NSTEP = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  in_valid, in_ready, out_valid, out_ready;
  word_t in_data, out_data;
  core_events_t ev;
  logic [$clog2(4096+2):0] entries;

  cdo_core #(.NUM_TRANCHES(NT)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data, .events(ev), .entries);

  int checks = 0, failures = 0;
  real ex [];
  real exact [NSTEP][NT];
  longint unsigned got [NSTEP][NT];
  int unsigned seed = 32'h2020_0014;
  word_t prog[$], expect_w[$];
  longint unsigned cand = 0;
  int n_words = 0, n_step = 0, n_ovf = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (ev.step_done) n_step++;
    if (ev.overflow) n_ovf++;
    if (out_valid) begin
      int s, t;
      s = n_words / (2 * NT);
      t = (n_words % (2 * NT)) / 2;
      check(expect_w.size() > 0 && out_data == expect_w[0],
            $sformatf("result word %0d: %h expected %h", n_words, out_data,
                      expect_w.size() ? expect_w[0] : 0));
      if (expect_w.size()) void'(expect_w.pop_front());
      if (s < NSTEP) got[s][t] = {got[s][t][31:0], out_data};
      n_words++;
    end
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_data = '0; out_ready = 1'b1;
    make_step(seed, NT, 2, 100, 50, prog, expect_w, cand, ex);
    foreach (ex[t]) exact[0][t] = ex[t];
    make_step(seed, NT, 1, 40, 20, prog, expect_w, cand, ex);
    foreach (ex[t]) exact[1][t] = ex[t];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    while (prog.size()) begin
      in_valid <= 1'b1;
      in_data  <= prog.pop_front();
      do @(posedge clk); while (!in_ready);
    end
    in_valid <= 1'b0;
    while (n_step < NSTEP) @(posedge clk);
    repeat (80) @(posedge clk);
    check(expect_w.size() == 0, $sformatf("%0d result words missing", expect_w.size()));
    check(n_words == NSTEP * 2 * NT, $sformatf("%0d result words", n_words));
    check(n_ovf == 0, "no FIFO overflow");
    for (int s = 0; s < NSTEP; s++) begin
      real top;
      top = 0.0;
      for (int t = 0; t < NT; t++) if (exact[s][t] > top) top = exact[s][t];
      for (int t = 0; t < NT; t++) begin
        real hw, err, ref_v;
        hw    = real'(got[s][t]) / real'(PROB_ONE);
        ref_v = (exact[s][t] > 1.0e-3 * top) ? exact[s][t] : 1.0e-3 * top;
        err   = (hw > exact[s][t] ? hw - exact[s][t] : exact[s][t] - hw) / ref_v;
        check(err < 0.005, $sformatf("step %0d tranche %0d: %f vs exact %f", s, t, hw, exact[s][t]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
