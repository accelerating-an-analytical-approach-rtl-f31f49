// tb_sync_fifo: self-checking test of the In/Out FIFO.
//
// Random writes and reads (valid and ready toggled at random) are compared
// with a queue model. The FIFO must refuse a write when full and no read is
// taken, must accept one when a read frees a slot in the same cycle, and a
// word written into an empty FIFO must be readable on the next cycle.
module tb_sync_fifo;
  import cdo_ref_pkg::rng;

  localparam int W = 32, D = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
                                         .out_valid, .out_ready, .out_data);

  int checks = 0, failures = 0, n_full = 0, n_full_rw = 0;
  int unsigned seed = 32'h5151_0001;
  logic [W-1:0] model[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    check(out_valid == (model.size() > 0), "valid matches occupancy");
    check(in_ready == (model.size() < D || out_ready), "ready matches occupancy");
    if (model.size() == D) begin
      n_full++;
      if (in_valid && out_ready) n_full_rw++;
    end
    if (out_valid && out_ready) begin
      check(out_data == model[0], "data in order");
      void'(model.pop_front());
    end
    if (in_valid && in_ready) model.push_back(in_data);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    in_valid <= 1; in_data <= 32'hA5A5_0001; @(posedge clk); in_valid <= 0;
    #1 check(out_valid && out_data == 32'hA5A5_0001, "visible one cycle after the write");
    for (int i = 0; i < 4000; i++) begin
      in_valid  <= (rng(seed) % 4) != 0;
      in_data   <= rng(seed);
      out_ready <= (i / 500) % 2 ? (rng(seed) % 4 == 0) : (rng(seed) % 4 != 0);
      @(posedge clk);
    end
    check(n_full > 0 && n_full_rw > 0, $sformatf("full seen %0d times, read+write when full %0d", n_full, n_full_rw));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
