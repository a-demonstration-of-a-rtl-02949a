// pre_processor: one Pre Processor of the demonstrator.
//
// Without detector links, the detector is simulated: N_TOWERS pattern BRAMs
// (one per tower of this Pre Processor's phi column, 56 along eta) are read
// out together once per bunch crossing and the towers are handed to the time
// multiplexer, which sends each bx to the Main Processor node that owns it.
// Pattern entry b AND pattern_mask is played back at bx b, so a pattern of
// 2^k events repeats through the orbit (this design's choice of addressing).
// Control side: pat_we/pat_tower/pat_addr/pat_wdata write one tower word;
// pat_rdata returns the word at (pat_tower, pat_addr) two cycles later.
// Timing: the BRAMs are addressed on bx_strobe and the towers are captured
// one cycle later; the frame header appears on link_out three cycles after
// bx_strobe. No event is captured while run is low.
module pre_processor
  import tmt_pkg::*;
#(
  parameter int unsigned N_TOWERS = tmt_pkg::N_ETA,
  parameter int unsigned DEPTH    = 2048,
  parameter int unsigned N_OUT    = tmt_pkg::N_TM_OUT,
  localparam int unsigned AW      = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               run,
  input  logic               bx_strobe,
  input  logic [BX_W-1:0]    bx,
  input  logic [3:0]         tm_slot,
  input  logic [AW-1:0]      pattern_mask,
  input  logic [3:0]         out_map [N_OUT],
  input  logic [N_OUT-1:0]   out_en,
  input  logic               pat_we,
  input  logic [5:0]         pat_tower,
  input  logic [AW-1:0]      pat_addr,
  input  logic [TOWER_W-1:0] pat_wdata,
  output logic [TOWER_W-1:0] pat_rdata,
  output link_word_t         link_out [N_OUT]
);
  logic [TOWER_W-1:0] tower    [N_TOWERS];
  logic [TOWER_W-1:0] rd_a     [N_TOWERS];
  logic [AW-1:0]      play_addr;
  logic               cap_q;
  logic [BX_W-1:0]    bx_q;
  logic [3:0]         slot_q;
  logic [5:0]         rd_sel_q;

  assign play_addr = AW'(bx) & pattern_mask;

  for (genvar t = 0; t < N_TOWERS; t++) begin : g_ram
    pattern_ram #(.DEPTH(DEPTH), .WIDTH(TOWER_W)) u_ram (
      .clk     (clk),
      .we_a    (pat_we && pat_tower == 6'(t)),
      .addr_a  (pat_addr),
      .wdata_a (pat_wdata),
      .rdata_a (rd_a[t]),
      .addr_b  (play_addr),
      .rdata_b (tower[t])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cap_q  <= 1'b0;
      bx_q   <= '0;
      slot_q <= '0;
    end else begin
      cap_q  <= bx_strobe && run;
      bx_q   <= bx;
      slot_q <= tm_slot;
    end
    rd_sel_q  <= pat_tower;
    pat_rdata <= (rd_sel_q < 6'(N_TOWERS)) ? rd_a[rd_sel_q] : '0;
  end

  time_multiplexer #(.N_TOWERS(N_TOWERS), .N_OUT(N_OUT)) u_tm (
    .clk      (clk),
    .rst      (rst),
    .capture  (cap_q),
    .bx_in    (bx_q),
    .slot_in  (slot_q),
    .tower_in (tower),
    .out_map  (out_map),
    .out_en   (out_en),
    .link_out (link_out)
  );
endmodule
