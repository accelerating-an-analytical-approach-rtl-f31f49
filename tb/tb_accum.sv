// tb_accum: self-checking test of the scenario accumulator.
//
// Runs several time steps of random length. Each scenario presents random
// tranche losses with a random weight; after the last scenario of a step the
// module must emit, for every tranche, the weighted sum as a high and a low
// 32-bit word, tranche 0 first, while the reader stalls at random. Totals
// must restart from zero at each step, done must pulse once per scenario,
// and the multiply-accumulate must take one cycle per tranche after a
// one-cycle load.
module tb_accum;
  import cdo_pkg::*;
  import cdo_ref_pkg::*;

  localparam int NT = 6;

  logic  clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  loss_valid, ready, last_scen, out_valid, out_ready, done;
  loss_t losses [NT];
  prob_t weight;
  word_t out_data;

  accum #(.NUM_TRANCHES(NT)) dut (.clk, .rst_n, .loss_valid, .ready, .losses, .weight,
                                  .last_scen, .out_valid, .out_ready, .out_data, .done);

  int checks = 0, failures = 0;
  int unsigned seed = 32'h0BAD_BEEF;
  word_t exp_words[$];
  int n_done = 0, n_words = 0, n_stall = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (rst_n && done) n_done++;
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      n_words++;
      check(exp_words.size() > 0 && out_data == exp_words[0],
            $sformatf("word %h expected %h", out_data, exp_words.size() ? exp_words[0] : 0));
      if (exp_words.size()) void'(exp_words.pop_front());
    end
    out_ready <= (rng(seed) % 3) != 0;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned tot [NT];
    int scen_total = 0;
    loss_valid = 0; last_scen = 0; weight = 0; out_ready = 0;
    foreach (losses[i]) losses[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int step = 0; step < 5; step++) begin
      int ns;
      ns = 1 + rng(seed) % 6;
      foreach (tot[i]) tot[i] = 0;
      for (int s = 0; s < ns; s++) begin
        longint t0;
        while (!ready) @(posedge clk);
        weight <= prob_t'((step == 0) ? longint'(PROB_ONE) : rng(seed) % (longint'(PROB_ONE) + 1));
        last_scen <= (s == ns - 1);
        foreach (losses[i]) begin
          losses[i] <= loss_t'({rng(seed), rng(seed)} % (64'd1 << 40));
        end
        loss_valid <= 1'b1;
        @(posedge clk);
        loss_valid <= 1'b0;
        foreach (tot[i]) tot[i] += weigh(losses[i], weight);
        if (s == ns - 1) foreach (tot[i]) begin
          exp_words.push_back(tot[i][63:32]);
          exp_words.push_back(tot[i][31:0]);
        end
        // one cycle per tranche, then ready again
        t0 = 0;
        @(posedge clk);
        while (!ready) begin t0++; @(posedge clk); end
        if (s != ns - 1) check(t0 == NT, $sformatf("load and MAC took %0d cycles", t0 + 1));
        scen_total++;
      end
    end
    repeat (4) @(posedge clk);
    check(exp_words.size() == 0, "all words emitted");
    check(n_done == scen_total, $sformatf("done pulses %0d of %0d", n_done, scen_total));
    check(n_stall > 0, "reader stalled at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
