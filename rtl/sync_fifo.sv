// sync_fifo: the In FIFO and Out FIFO between the host links and a CDO core.
//
// A first-word-fall-through FIFO with valid/ready handshakes on both sides:
// a word is written when in_valid and in_ready are both high, and the head
// word is shown on out_data while out_valid is high and leaves when out_ready
// is also high. A word written into an empty FIFO is visible on the next
// cycle. Reading and writing in the same cycle is allowed when full (the
// read frees the slot). The document names these FIFOs and their place in
// the system; their depth, handshake and single clock are this design's
// choices. DEPTH must be a power of two.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      count;
  logic             wr, rd;

  assign out_valid = (count != '0);
  assign in_ready  = (count != (AW+1)'(DEPTH)) || out_ready;
  assign out_data  = mem[rptr];
  assign rd        = out_valid && out_ready;
  assign wr        = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (wr) mem[wptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (wr) wptr <= wptr + 1'b1;
      if (rd) rptr <= rptr + 1'b1;
      count <= count + (AW+1)'(wr) - (AW+1)'(rd);
    end
  end

endmodule
