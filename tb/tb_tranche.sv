// tb_tranche: self-checking test of the tranche loss unit.
//
// Streams random loss distributions (sparse points, random gaps, some losses
// below, inside and above the tranche) and compares the result with
// sum(min(S, max(l-A, 0)) * P) computed here. Checks that out_valid comes
// exactly five cycles after in_end, once per distribution, and that the
// accumulator restarts between distributions (back-to-back streams).
module tb_tranche;
  import cdo_pkg::*;
  import cdo_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  notional_t attach, size;
  logic      in_valid, in_end, out_valid;
  point_t    in_point;
  loss_t     out_loss;

  tranche dut (.clk, .rst_n, .attach, .size, .in_valid, .in_point, .in_end, .out_valid, .out_loss);

  int checks = 0, failures = 0;
  int unsigned seed = 32'hCAFE_F00D;
  longint cycle = 0;
  longint t_end[$];
  longint unsigned expected[$];
  int n_out = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    cycle++;
    if (in_end) t_end.push_back(cycle);
    if (out_valid) begin
      n_out++;
      check(t_end.size() > 0 && cycle - t_end[0] == 5, "latency of five cycles");
      if (t_end.size()) void'(t_end.pop_front());
      check(expected.size() > 0 && out_loss == loss_t'(expected[0]),
            $sformatf("loss %0d expected %0d", out_loss, expected.size() ? expected[0] : 0));
      if (expected.size()) void'(expected.pop_front());
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_end = 0; in_point = '0; attach = 0; size = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 40; t++) begin
      dist_t d;
      int np, l;
      d = new[400];
      foreach (d[i]) d[i] = 0;
      attach <= notional_t'(rng(seed) % 120);
      size   <= notional_t'(1 + rng(seed) % 100);
      @(posedge clk);
      np = 1 + rng(seed) % 60;
      l = rng(seed) % 5;
      for (int k = 0; k < np && l < 400; k++) begin
        d[l] = (t == 0) ? longint'(PROB_ONE) : rng(seed) % (longint'(PROB_ONE) + 1);
        if (t == 0) break;
        l += 1 + rng(seed) % 9;
      end
      expected.push_back(tranche_loss(d, attach, size));
      foreach (d[i]) if (d[i] != 0) begin
        if (rng(seed) % 4 == 0) begin in_valid <= 0; @(posedge clk); end
        in_valid <= 1'b1;
        in_point <= '{notional: notional_t'(i), prob: prob_t'(d[i])};
        @(posedge clk);
      end
      in_valid <= 1'b0;
      in_end   <= 1'b1;
      @(posedge clk);
      in_end <= 1'b0;
      // back-to-back streams half of the time, otherwise let it drain
      if (t % 2 == 0) repeat (6) @(posedge clk);
    end
    repeat (8) @(posedge clk);
    check(n_out == 40, $sformatf("%0d results", n_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
