// tmt_demonstrator: the time-multiplexed trigger demonstrator, top level.
//
// Four processing cards each simulate six Pre Processors (24 in all, one phi
// column of 56 eta towers each, played back from pattern BRAMs). Every bx the
// Pre Processors time-multiplex their towers towards the Main Processor node
// that owns the bx. Of the twelve node outputs of each Pre Processor (ten
// round-robin nodes and two spares) the first N_MP go through a patch panel to
// the N_MP Main Processors that are built; the others are brought out as
// ports. Each Main Processor thus receives 24 links, one per Pre Processor,
// aligns them, finds e/gamma candidates over 24 x 56 towers and sends them to
// the Global Trigger on two links, with DAQ capture before and after the
// algorithm. Every card has its own IPbus packet port. A shared bx counter
// stands for the LHC clock and fast control distributed to all cards.
//
// Link latency: every patch-panel link is delayed by SERDES_LAT cycles
// (~100 ns at 240 MHz) plus a per-link fibre skew of (5*p mod (MAX_SKEW+1))
// cycles for Pre Processor p; the skew pattern is this design's choice.
// Port arrays are indexed [card] for IPbus, [node][link] for the GT outputs
// and [pre processor][node - N_MP] for the unused node outputs.
module tmt_demonstrator
  import tmt_pkg::*;
#(
  parameter int unsigned N_PP_CARDS = 4,
  parameter int unsigned N_PP_CARD  = 6,
  parameter int unsigned N_MP       = 2,
  parameter int unsigned N_ETA      = tmt_pkg::N_ETA,
  parameter int unsigned DEPTH      = 2048,
  parameter int unsigned SERDES_LAT = 24,
  parameter int unsigned MAX_SKEW   = 12,
  localparam int unsigned N_PP      = N_PP_CARDS * N_PP_CARD
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            l1a,
  output logic [BX_W-1:0] bx,
  output logic [3:0]      tm_slot,
  // IPbus of the Pre Processor cards
  input  logic [31:0]     pp_ipb_in_data   [N_PP_CARDS],
  input  logic            pp_ipb_in_valid  [N_PP_CARDS],
  input  logic            pp_ipb_in_last   [N_PP_CARDS],
  output logic            pp_ipb_in_ready  [N_PP_CARDS],
  output logic [31:0]     pp_ipb_out_data  [N_PP_CARDS],
  output logic            pp_ipb_out_valid [N_PP_CARDS],
  output logic            pp_ipb_out_last  [N_PP_CARDS],
  input  logic            pp_ipb_out_ready [N_PP_CARDS],
  // IPbus of the Main Processors
  input  logic [31:0]     mp_ipb_in_data   [N_MP],
  input  logic            mp_ipb_in_valid  [N_MP],
  input  logic            mp_ipb_in_last   [N_MP],
  output logic            mp_ipb_in_ready  [N_MP],
  output logic [31:0]     mp_ipb_out_data  [N_MP],
  output logic            mp_ipb_out_valid [N_MP],
  output logic            mp_ipb_out_last  [N_MP],
  input  logic            mp_ipb_out_ready [N_MP],
  // to the Global Trigger
  output gt_word_t        gt_out [N_MP][2],
  // node outputs of the Pre Processors that have no Main Processor here
  output link_word_t      spare_link [N_PP][N_TM_OUT - N_MP]
);
  logic       bx_strobe;
  logic [2:0] sub;

  bx_timing u_timing (.clk, .rst, .bx_strobe, .sub, .bx, .tm_slot);

  link_word_t pp_link [N_PP][N_TM_OUT];

  for (genvar c = 0; c < N_PP_CARDS; c++) begin : g_ppc
    link_word_t card_link [N_PP_CARD][N_TM_OUT];
    pp_card #(.N_PP(N_PP_CARD), .N_TOWERS(N_ETA), .DEPTH(DEPTH)) u_card (
      .clk, .rst, .bx_strobe, .bx, .tm_slot,
      .ipb_in_data  (pp_ipb_in_data[c]),  .ipb_in_valid (pp_ipb_in_valid[c]),
      .ipb_in_last  (pp_ipb_in_last[c]),  .ipb_in_ready (pp_ipb_in_ready[c]),
      .ipb_out_data (pp_ipb_out_data[c]), .ipb_out_valid(pp_ipb_out_valid[c]),
      .ipb_out_last (pp_ipb_out_last[c]), .ipb_out_ready(pp_ipb_out_ready[c]),
      .link_out     (card_link)
    );
    for (genvar k = 0; k < N_PP_CARD; k++) begin : g_pp
      assign pp_link[c*N_PP_CARD + k] = card_link[k];
    end
  end

  for (genvar p = 0; p < N_PP; p++) begin : g_spare
    for (genvar o = N_MP; o < N_TM_OUT; o++) begin : g_o
      assign spare_link[p][o - N_MP] = pp_link[p][o];
    end
  end

  // Patch panel: node m, input link p <- Pre Processor p, output m.
  for (genvar m = 0; m < N_MP; m++) begin : g_mp
    link_word_t mp_in [N_PP];
    for (genvar p = 0; p < N_PP; p++) begin : g_fibre
      link_delay #(.LATENCY(SERDES_LAT + (5 * p) % (MAX_SKEW + 1))) u_link (
        .clk, .rst, .din(pp_link[p][m]), .dout(mp_in[p])
      );
    end
    main_processor #(.N_LINKS(N_PP), .N_ETA(N_ETA)) u_mp (
      .clk, .rst, .bx, .l1a,
      .link_in (mp_in),
      .gt_out  (gt_out[m]),
      .ipb_in_data  (mp_ipb_in_data[m]),  .ipb_in_valid (mp_ipb_in_valid[m]),
      .ipb_in_last  (mp_ipb_in_last[m]),  .ipb_in_ready (mp_ipb_in_ready[m]),
      .ipb_out_data (mp_ipb_out_data[m]), .ipb_out_valid(mp_ipb_out_valid[m]),
      .ipb_out_last (mp_ipb_out_last[m]), .ipb_out_ready(mp_ipb_out_ready[m])
    );
  end
endmodule
