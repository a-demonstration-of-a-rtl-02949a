// link_delay: latency of one serial link (SerDes pair plus fibre).
//
// The multi-gigabit transceivers and the optics are vendor parts; what the
// trigger logic sees of them is a fixed delay of the parallel words, about
// 100 ns for a SerDes pair, plus whatever the fibre adds. This block delays a
// link word by LATENCY cycles (a shift register; LATENCY = 0 is a wire) and
// resets to idle words. It stands in for the link so that the Main
// Processor's alignment has real skew to remove.
module link_delay
  import tmt_pkg::*;
#(
  parameter int unsigned LATENCY = 24
) (
  input  logic       clk,
  input  logic       rst,
  input  link_word_t din,
  output link_word_t dout
);
  if (LATENCY == 0) begin : g_wire
    assign dout = din;
  end else begin : g_sr
    link_word_t sr [LATENCY];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < LATENCY; i++) sr[i] <= LINK_IDLE;
      end else begin
        sr[0] <= din;
        for (int i = 1; i < LATENCY; i++) sr[i] <= sr[i-1];
      end
    end
    assign dout = sr[LATENCY-1];
  end
endmodule
