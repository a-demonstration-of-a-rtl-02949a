// sync_fifo: single-clock first-in first-out buffer (helper).
//
// Show-ahead: dout is the oldest entry whenever empty is low; pop removes it.
// A push when full is ignored (the caller counts it). Push and pop may happen
// in the same cycle. DEPTH must be a power of two. Pointers reset to empty;
// the storage itself is not reset.
module sync_fifo #(
  parameter int unsigned W     = 17,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic [AW:0]  count
);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wr, rd;

  assign count = wr - rd;
  assign empty = (wr == rd);
  assign full  = (count == (AW+1)'(DEPTH));
  assign dout  = mem[rd[AW-1:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      wr <= '0;
      rd <= '0;
    end else begin
      if (push && !full) begin
        mem[wr[AW-1:0]] <= din;
        wr <= wr + 1'b1;
      end
      if (pop && !empty) rd <= rd + 1'b1;
    end
  end
endmodule
