// la_fifo: one loss-distribution FIFO of the FIFO-based convolution, with the
// lookahead double buffer at its read side.
//
// The storage is a memory with a registered read, as a block RAM would be.
// A registered read alone would need a cycle between a dequeue and the next
// valid head; the two output registers, buf a and buf b, hide that cycle.
// Reads are served alternately from the two buffers: when rd_en pops the
// buffer in use, the read side flips to the other buffer and the emptied one
// is refilled from memory in the same clock edge. With both buffers full the
// FIFO delivers one entry per cycle without a stall, as the convolution
// pipeline needs. The two-buffer scheme follows the document; the memory
// organisation, the flags and the clear input are this design's choices.
//
// Interface: wr_en/wr_data push (ignored when full, which sets overflow);
// rd_valid/rd_data show the head, rd_en pops it in the same cycle. clear
// empties the FIFO synchronously. level counts the entries held, buffers
// included. An entry written into an empty FIFO reaches the head one clock
// edge after the edge that wrote it (memory write, then buffer load).
module la_fifo #(
  parameter int unsigned WIDTH = 41,
  parameter int unsigned DEPTH = 4096
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,
  output logic             full,
  output logic             overflow,
  output logic [$clog2(DEPTH+2):0] level
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      mcount;
  logic [WIDTH-1:0] buf_q [2];
  logic [1:0]       buf_v;
  logic             sel;    // buffer that serves the next read
  logic             fill;   // buffer that receives the next memory read
  logic             push, pop, load;

  assign rd_data  = buf_q[sel];
  assign rd_valid = buf_v[sel];
  assign full     = (mcount == (AW+1)'(DEPTH));
  assign push     = wr_en && !full;
  assign pop      = rd_en && buf_v[sel];
  // Refill the next buffer in line when it is empty or is being read now.
  assign load     = (mcount != '0) && (!buf_v[fill] || (pop && (fill == sel)));
  assign level    = ($clog2(DEPTH+2)+1)'(mcount) + ($clog2(DEPTH+2)+1)'(buf_v[0])
                  + ($clog2(DEPTH+2)+1)'(buf_v[1]);

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= wr_data;
    if (load) buf_q[fill] <= mem[rptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      mcount   <= '0;
      buf_v    <= '0;
      sel      <= 1'b0;
      fill     <= 1'b0;
      overflow <= 1'b0;
    end else if (clear) begin
      wptr     <= '0;
      rptr     <= '0;
      mcount   <= '0;
      buf_v    <= '0;
      sel      <= 1'b0;
      fill     <= 1'b0;
      overflow <= 1'b0;
    end else begin
      if (push) wptr <= wptr + 1'b1;
      if (load) begin
        rptr <= rptr + 1'b1;
        fill <= ~fill;
      end
      mcount <= mcount + (AW+1)'(push) - (AW+1)'(load);
      if (pop) sel <= ~sel;
      if (pop)  buf_v[sel]  <= 1'b0;
      if (load) buf_v[fill] <= 1'b1;
      if (wr_en && full) overflow <= 1'b1;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full))
    else $error("la_fifo: write while full");

endmodule
