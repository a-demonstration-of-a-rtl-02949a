// bx_timing: bunch-crossing timing for every card of the trigger.
//
// The LHC clock is distributed to all cards and multiplied to the link rate,
// WORDS_PER_BX cycles per bunch crossing. This block counts those cycles and
// gives the cycle within the bx (sub), a strobe on its first cycle, the bx
// number within the orbit (0..ORBIT_BX-1) and the round-robin time-multiplex
// slot (0..TM_PERIOD-1) that decides which Main Processor node owns the bx.
// The slot counter runs freely across orbit boundaries, because an orbit of
// 3564 bx is not a multiple of the 10-bx period (this design's choice).
// All outputs are registered; after rst every counter is 0.
module bx_timing #(
  parameter int unsigned WORDS_PER_BX = tmt_pkg::WORDS_PER_BX,
  parameter int unsigned TM_PERIOD    = tmt_pkg::TM_PERIOD,
  parameter int unsigned ORBIT_BX     = tmt_pkg::ORBIT_BX
) (
  input  logic        clk,
  input  logic        rst,
  output logic        bx_strobe,
  output logic [2:0]  sub,
  output logic [11:0] bx,
  output logic [3:0]  tm_slot
);
  always_ff @(posedge clk) begin
    if (rst) begin
      sub     <= '0;
      bx      <= '0;
      tm_slot <= '0;
    end else if (sub == 3'(WORDS_PER_BX - 1)) begin
      sub     <= '0;
      bx      <= (bx == 12'(ORBIT_BX - 1)) ? '0 : bx + 1'b1;
      tm_slot <= (tm_slot == 4'(TM_PERIOD - 1)) ? '0 : tm_slot + 1'b1;
    end else begin
      sub <= sub + 1'b1;
    end
  end

  assign bx_strobe = (sub == '0);
endmodule
