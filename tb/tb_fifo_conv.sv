// tb_fifo_conv: self-checking test of the FIFO-based convolution.
//
// 1. The three-instrument sample pool (notionals 2, 3, 2; default
//    probabilities 0.4, 0.7, 0.5) must give losses 0,2,3,4,5,7 with
//    probabilities 0.09, 0.15, 0.21, 0.06, 0.35, 0.14 and no point at 1 or 6.
//    With the third notional 1000 instead, only eight points may appear.
// 2. Random pools are compared point by point, exactly, against the dense
//    reference model; pools with tiny default probabilities force dynamic
//    point dropping.
// 3. Throughput: each iteration must take exactly one cycle per output
//    decision plus a fixed overhead, i.e. one output point per cycle.
// Instruments are sometimes withheld to make the convolution wait.
module tb_fifo_conv;
  import cdo_pkg::*;
  import cdo_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   instr_valid, instr_ready;
  instr_t instr;
  logic   dist_valid, dist_end, busy, ev_starved, ev_a, ev_b, ev_c, ev_drop, overflow;
  point_t dist_point;
  logic [$clog2(4096+2):0] entries;

  fifo_conv dut (
    .clk, .rst_n, .instr_valid, .instr_ready, .instr,
    .dist_valid, .dist_point, .dist_end, .busy, .ev_starved,
    .ev_case_a(ev_a), .ev_case_b(ev_b), .ev_case_c(ev_c), .ev_dropped(ev_drop),
    .overflow, .entries);

  int checks = 0, failures = 0;
  int unsigned seed = 32'h1234_5678;
  int n_a = 0, n_b = 0, n_c = 0, n_drop = 0, n_starve = 0;
  longint cycle = 0;
  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
    if (ev_a) n_a++;
    if (ev_b) n_b++;
    if (ev_c) n_c++;
    if (ev_drop) n_drop++;
    if (ev_starved) n_starve++;
    end
  end

  // collected output
  point_t got[$];
  bit     got_end;
  always @(posedge clk) begin
    if (dist_valid) got.push_back(dist_point);
    if (dist_end) got_end = 1'b1;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int overhead = -1;

  // Send one instrument, wait for its iteration to end, check its length.
  task automatic send(int unsigned n, longint unsigned pd, bit last, int unsigned cand, int gap);
    longint t0;
    repeat (gap) @(posedge clk);
    instr_valid <= 1'b1;
    instr <= '{notional: notional_t'(n), pd: prob_t'(pd), last: last};
    do @(posedge clk); while (!instr_ready);
    t0 = cycle;
    instr_valid <= 1'b0;
    do @(posedge clk); while (!instr_ready && !(last && got_end));
    if (!last) begin
      if (overhead < 0) overhead = int'(cycle - t0) - int'(cand);
      else check(int'(cycle - t0) - int'(cand) == overhead,
                 $sformatf("iteration of %0d decisions took %0d cycles", cand, cycle - t0));
    end
  endtask

  task automatic run_pool(int unsigned nots[], longint unsigned pds[]);
    dist_t d;
    int k;
    got.delete();
    got_end = 1'b0;
    d = empty_pool();
    foreach (nots[i]) begin
      send(nots[i], pds[i], i == nots.size() - 1, candidates(d, nots[i]), (i % 7 == 3) ? 3 : 0);
      d = add_instr(d, nots[i], pds[i]);
    end
    while (!got_end) @(posedge clk);
    @(posedge clk);
    check(got.size() == nonzero(d), $sformatf("point count %0d, expected %0d", got.size(), nonzero(d)));
    k = 0;
    foreach (d[l]) if (d[l] != 0) begin
      if (k < got.size())
        check(got[k].notional == notional_t'(l) && got[k].prob == prob_t'(d[l]),
              $sformatf("point %0d: got (%0d,%0d) expected (%0d,%0d)", k,
                        got[k].notional, got[k].prob, l, d[l]));
      k++;
    end
  endtask

  function automatic longint unsigned q24(real x);
    return longint'(x * (2.0 ** FRAC_W) + 0.5);
  endfunction

  initial begin
    // watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned nots[];
    longint unsigned pds[];
    real expect_p[8];
    int  expect_l[6];
    instr_valid = 1'b0;
    instr = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // 1. sample pool
    nots = '{2, 3, 2};
    pds  = '{q24(0.4), q24(0.7), q24(0.5)};
    run_pool(nots, pds);
    expect_l = '{0, 2, 3, 4, 5, 7};
    expect_p = '{0.09, 0.0, 0.15, 0.21, 0.06, 0.35, 0.0, 0.14};
    check(got.size() == 6, "sample pool has six points");
    foreach (expect_l[i]) if (i < got.size()) begin
      real p;
      p = real'(got[i].prob) / (2.0 ** FRAC_W);
      check(got[i].notional == notional_t'(expect_l[i]) &&
            p > expect_p[expect_l[i]] - 1e-6 && p < expect_p[expect_l[i]] + 1e-6,
            $sformatf("sample point %0d: loss %0d prob %f", i, got[i].notional, p));
    end

    // 1b. non-uniform pool: notionals 2, 3, 1000; the losses 6..999 never
    //     occur and must take neither storage nor cycles
    nots = '{2, 3, 1000};
    pds  = '{q24(0.4), q24(0.7), q24(0.5)};
    run_pool(nots, pds);
    begin
      int  nu_l[8] = '{0, 2, 3, 5, 1000, 1002, 1003, 1005};
      real nu_p[8] = '{0.09, 0.06, 0.21, 0.14, 0.09, 0.06, 0.21, 0.14};
      check(got.size() == 8, "non-uniform pool has eight points");
      foreach (nu_l[i]) if (i < got.size()) begin
        real p;
        p = real'(got[i].prob) / (2.0 ** FRAC_W);
        check(got[i].notional == notional_t'(nu_l[i]) && p > nu_p[i] - 1e-6 && p < nu_p[i] + 1e-6,
              $sformatf("non-uniform point %0d: loss %0d prob %f", i, got[i].notional, p));
      end
    end

    // 2. random pools
    for (int t = 0; t < 6; t++) begin
      int n;
      n = 8 + (rng(seed) % 20);
      nots = new[n];
      pds  = new[n];
      foreach (nots[i]) begin
        nots[i] = 1 + rng(seed) % ((t < 3) ? 8 : 50);
        if (t == 5) pds[i] = 1 + rng(seed) % 64;         // tiny: forces drops
        else        pds[i] = rng(seed) % (longint'(PROB_ONE) + 1);
      end
      run_pool(nots, pds);
    end
    check(n_a > 0 && n_b > 0 && n_c > 0, $sformatf("cases A/B/C seen %0d/%0d/%0d", n_a, n_b, n_c));
    check(n_drop > 0, $sformatf("points dropped: %0d", n_drop));
    check(n_starve > 0, "convolution waited for an instrument");
    check(!overflow, "no FIFO overflow");
    check(overhead >= 0 && overhead <= 8, $sformatf("per-iteration overhead %0d cycles", overhead));
    $display("cases A=%0d B=%0d C=%0d dropped=%0d starved=%0d overhead=%0d",
             n_a, n_b, n_c, n_drop, n_starve, overhead);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
