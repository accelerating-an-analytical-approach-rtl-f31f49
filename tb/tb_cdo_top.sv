// tb_cdo_top: end-to-end test of the whole accelerator at its default size.
//
// A host model feeds every core round-robin, one instrument (two words) per
// turn, skipping a core whose In FIFO is full, and pauses now and then, so
// cores run out of instruments and wait. Each core prices STEPS time steps
// of small pools; results are read from every Out FIFO with random stalls
// and compared word for word with the reference model. The test counts, over
// all cores, each mechanism of the design and fails if one never happened:
// convolution waiting for an instrument, the three convolution cases,
// dynamic point dropping, scenario and step completion, a full In FIFO and
// a stalled Out FIFO. A FIFO overflow is a failure.
module tb_cdo_top;
  import cdo_pkg::*;
  import cdo_ref_pkg::*;

  localparam int NC = 10, NT = 6, STEPS = 2, DEPTH = 4096;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  in_valid [NC], in_ready [NC], out_valid [NC], out_ready [NC];
  word_t in_data [NC], out_data [NC];
  core_events_t ev [NC];
  logic [$clog2(DEPTH+2):0] entries [NC];

  cdo_top dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready,
               .out_data, .events(ev), .entries);

  int checks = 0, failures = 0;
  real ex [];  // double-precision tranche totals from the model
  int unsigned seed = 32'h7070_0001;
  word_t prog [NC][$];
  word_t expect_w [NC][$];
  longint unsigned cand = 0;
  int n_starved = 0, n_a = 0, n_b = 0, n_c = 0, n_drop = 0, n_scen = 0, n_step = 0, n_ovf = 0;
  int n_in_full = 0, n_out_stall = 0, n_words = 0, nscen_total = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NC; c++) begin
      if (ev[c].starved) n_starved++;
      if (ev[c].case_a) n_a++;
      if (ev[c].case_b) n_b++;
      if (ev[c].case_c) n_c++;
      if (ev[c].dropped) n_drop++;
      if (ev[c].scen_done) n_scen++;
      if (ev[c].step_done) n_step++;
      if (ev[c].overflow) n_ovf++;
      if (in_valid[c] && !in_ready[c]) n_in_full++;
      if (out_valid[c] && !out_ready[c]) n_out_stall++;
      if (out_valid[c] && out_ready[c]) begin
        n_words++;
        check(expect_w[c].size() > 0 && out_data[c] == expect_w[c][0],
              $sformatf("core %0d result %h expected %h", c, out_data[c],
                        expect_w[c].size() ? expect_w[c][0] : 0));
        if (expect_w[c].size()) void'(expect_w[c].pop_front());
      end
    end
    for (int c = 0; c < NC; c++) out_ready[c] <= (rng(seed) % 3) != 0;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Round-robin host: one word per cycle, to the core whose turn it is; the
  // turn passes on after an instrument's probability word or when the core
  // cannot take a word.
  initial begin
    int rr;
    bit pending;
    for (int c = 0; c < NC; c++) begin
      in_valid[c] = 1'b0; in_data[c] = '0; out_ready[c] = 1'b0;
      for (int s = 0; s < STEPS; s++) begin
        make_step(seed, NT, 1 + s, 8 + 4 * c, (c % 2) ? 50 : 6, prog[c], expect_w[c], cand, ex);
        nscen_total += 1 + s;
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    rr = 0;
    forever begin
      pending = 1'b0;
      for (int c = 0; c < NC; c++) pending |= (prog[c].size() != 0);
      if (!pending) break;
      if (rng(seed) % 64 == 0) repeat (200) @(posedge clk);   // host busy elsewhere
      if (prog[rr].size() != 0) begin
        word_t w;
        w = prog[rr][0];
        in_valid[rr] <= 1'b1;
        in_data[rr]  <= w;
        do @(posedge clk); while (!in_ready[rr]);
        in_valid[rr] <= 1'b0;
        void'(prog[rr].pop_front());
        if (opcode_t'(w[31:29]) == OP_PROB) rr = (rr + 1) % NC;
        // flood core 0 so that its In FIFO fills up
        if (rr == 0 && prog[0].size() > 40) begin
          for (int k = 0; k < 30 && prog[0].size() != 0; k++) begin
            in_valid[0] <= 1'b1;
            in_data[0]  <= prog[0][0];
            do @(posedge clk); while (!in_ready[0]);
            void'(prog[0].pop_front());
          end
          in_valid[0] <= 1'b0;
        end
      end else begin
        rr = (rr + 1) % NC;
      end
    end
    while (n_step < NC * STEPS) @(posedge clk);
    repeat (100) @(posedge clk);
    for (int c = 0; c < NC; c++)
      check(expect_w[c].size() == 0, $sformatf("core %0d: %0d result words missing", c, expect_w[c].size()));
    check(n_words == NC * STEPS * 2 * NT, $sformatf("%0d result words", n_words));
    check(n_starved > 0,   $sformatf("waits for an instrument: %0d", n_starved));
    check(n_a > 0,         $sformatf("case A points: %0d", n_a));
    check(n_b > 0,         $sformatf("case B points: %0d", n_b));
    check(n_c > 0,         $sformatf("case C points: %0d", n_c));
    check(n_drop > 0,      $sformatf("dropped points: %0d", n_drop));
    check(n_scen == nscen_total, $sformatf("scenarios done: %0d of %0d", n_scen, nscen_total));
    check(n_step == NC * STEPS, $sformatf("time steps done: %0d", n_step));
    check(n_in_full > 0,   $sformatf("In FIFO full cycles: %0d", n_in_full));
    check(n_out_stall > 0, $sformatf("Out FIFO stall cycles: %0d", n_out_stall));
    check(n_ovf == 0, "no convolution FIFO overflow");
    check(longint'(n_a + n_b + n_c) == cand, "one output decision per candidate loss");
    $display("starved=%0d A=%0d B=%0d C=%0d dropped=%0d scen=%0d steps=%0d in_full=%0d out_stall=%0d",
             n_starved, n_a, n_b, n_c, n_drop, n_scen, n_step, n_in_full, n_out_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
