// tb_la_fifo: self-checking test of the FIFO with lookahead double buffer.
//
// Random pushes and pops are compared with a queue model (order, data,
// level, full). A burst phase fills the FIFO, then pops on every cycle: the
// head must stay valid on each of those cycles (one dequeue per cycle with
// no stall), and an entry pushed into an empty FIFO must reach the head
// at the head one edge after the
// edge that wrote it. clear must empty it.
module tb_la_fifo;
  import cdo_ref_pkg::rng;

  localparam int W = 20, D = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic clear, wr_en, rd_en, rd_valid, full, overflow;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D+2):0] level;

  la_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .clear, .wr_en, .wr_data, .rd_en,
                                       .rd_data, .rd_valid, .full, .overflow, .level);

  int checks = 0, failures = 0;
  int unsigned seed = 32'h600D_5EED;
  logic [W-1:0] model[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Model update at each edge, from the values the DUT sampled.
  always @(posedge clk) if (rst_n) begin
    if (clear) model.delete();
    else begin
      if (rd_en && rd_valid) begin
        check(model.size() > 0 && rd_data == model[0], "head data in order");
        if (model.size()) void'(model.pop_front());
      end
      if (wr_en && !full) model.push_back(wr_data);
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int stalls;
    clear = 0; wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // latency from push into empty FIFO to valid head
    wr_en <= 1; wr_data <= 20'h12345;
    @(posedge clk);
    wr_en <= 0;
    #1 check(!rd_valid, "not at head right after the write edge");
    @(posedge clk); #1 check(rd_valid && rd_data == 20'h12345, "at head one edge later");
    check(level == 1, "level 1");
    rd_en <= 1; @(posedge clk); rd_en <= 0;
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      wr_en   <= (rng(seed) % 3) != 0 && !full;
      wr_data <= W'(rng(seed));
      rd_en   <= (rng(seed) % 2) != 0;
      @(posedge clk);
      #1 check(int'(level) == model.size(), $sformatf("level %0d model %0d", level, model.size()));
    end
    wr_en <= 0; rd_en <= 0;
    // fill completely
    while (!full) begin
      wr_en <= 1; wr_data <= W'(rng(seed)); @(posedge clk); wr_en <= 0; #1;
    end
    check(int'(level) == D + 2, "full holds DEPTH entries plus two buffers");
    // pop every cycle: no bubble allowed
    stalls = 0;
    rd_en <= 1;
    for (int i = 0; i < D + 2; i++) begin
      @(posedge clk);
      if (i < D + 1) begin #1; if (!rd_valid) stalls++; end
    end
    rd_en <= 0;
    check(stalls == 0, $sformatf("%0d bubbles during back-to-back reads", stalls));
    @(posedge clk); #1 check(!rd_valid && level == 0, "empty after draining");
    // clear
    wr_en <= 1; wr_data <= 1; @(posedge clk); wr_data <= 2; @(posedge clk); wr_en <= 0;
    clear <= 1; @(posedge clk); clear <= 0;
    @(posedge clk); #1 check(!rd_valid && level == 0, "empty after clear");
    check(!overflow, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
