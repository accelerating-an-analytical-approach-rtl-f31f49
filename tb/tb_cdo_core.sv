// tb_cdo_core: end-to-end test of one CDO core.
//
// A host model sends time steps word by word (tranche points, scenario
// weights, instruments) with random gaps, so the core sometimes runs out of
// instruments, and reads the results with random stalls. Every returned word
// must equal the reference model's weighted tranche loss. Also checked: one
// scen_done per scenario, one step_done per step, dropped points and all
// three convolution cases occur, no FIFO overflow, and the convolution's
// busy cycles stay within the one-point-per-cycle budget.
module tb_cdo_core;
  import cdo_pkg::*;
  import cdo_ref_pkg::*;

  localparam int NT = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  in_valid, in_ready, out_valid, out_ready;
  word_t in_data, out_data;
  core_events_t ev;
  logic [$clog2(4096+2):0] entries;

  cdo_core #(.NUM_TRANCHES(NT)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data, .events(ev), .entries);

  int checks = 0, failures = 0;
  real ex [];  // double-precision tranche totals from the model
  int unsigned seed = 32'h00C0_FFEE;
  word_t prog[$], expect_w[$];
  longint unsigned cand = 0;
  int n_starved = 0, n_a = 0, n_b = 0, n_c = 0, n_drop = 0, n_scen = 0, n_step = 0, n_ovf = 0;
  int n_words = 0, n_stall = 0, max_entries = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (ev.starved) n_starved++;
    if (ev.case_a) n_a++;
    if (ev.case_b) n_b++;
    if (ev.case_c) n_c++;
    if (ev.dropped) n_drop++;
    if (ev.scen_done) n_scen++;
    if (ev.step_done) n_step++;
    if (ev.overflow) n_ovf++;
    if (int'(entries) > max_entries) max_entries = int'(entries);
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      n_words++;
      check(expect_w.size() > 0 && out_data == expect_w[0],
            $sformatf("result word %0d: %h expected %h", n_words, out_data,
                      expect_w.size() ? expect_w[0] : 0));
      if (expect_w.size()) void'(expect_w.pop_front());
    end
    out_ready <= (rng(seed) % 4) != 0;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nscen_total;
    in_valid = 0; in_data = '0; out_ready = 0;
    make_step(seed, NT, 3, 12, 10, prog, expect_w, cand, ex);
    make_step(seed, NT, 2, 30, 50, prog, expect_w, cand, ex);
    make_step(seed, NT, 1, 1, 5, prog, expect_w, cand, ex);
    nscen_total = 6;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    while (prog.size()) begin
      if (rng(seed) % 8 == 0) begin
        in_valid <= 1'b0;
        repeat (rng(seed) % 40) @(posedge clk);
      end
      in_valid <= 1'b1;
      in_data  <= prog.pop_front();
      do @(posedge clk); while (!in_ready);
    end
    in_valid <= 1'b0;
    while (n_step < 3) @(posedge clk);
    repeat (50) @(posedge clk);
    check(expect_w.size() == 0, $sformatf("%0d result words missing", expect_w.size()));
    check(n_scen == nscen_total, $sformatf("scen_done %0d", n_scen));
    check(n_step == 3, $sformatf("step_done %0d", n_step));
    check(n_starved > 0, "convolution waited for an instrument");
    check(n_a > 0 && n_b > 0 && n_c > 0, "all three convolution cases");
    check(n_drop > 0, "dynamic point dropping");
    check(n_ovf == 0, "no FIFO overflow");
    check(n_stall > 0, "host read back-pressure");
    check(longint'(n_a + n_b + n_c) == cand, $sformatf("%0d output decisions, expected %0d", n_a + n_b + n_c, cand));
    $display("starved=%0d A=%0d B=%0d C=%0d dropped=%0d max_entries=%0d",
             n_starved, n_a, n_b, n_c, n_drop, max_entries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
