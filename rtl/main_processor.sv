// main_processor: firmware of one Main Processor node.
//
// The node receives, from every Pre Processor, the complete event of each bx
// it owns (one bx in TM_PERIOD). The link receivers frame the links and check
// their CRCs; the aligner lines the N_LINKS links up so that the algorithm
// gets one eta column of N_LINKS phi towers per cycle; the e/gamma finder
// sends candidates to the Global Trigger links as it steps along eta and the
// event's total energy at its end. Two DAQ capture blocks keep the recent
// events before the algorithm (aligned towers) and after it (output words) and
// capture the event of a Level-1 accept. Everything is controlled and read
// through the IPbus endpoint.
//
// Register map (32-bit word addresses; this design's own):
//   0x0000_0000 W [0] re-arm both DAQ captures
//   0x0000_0001 e/gamma ECAL threshold [7:0] (reset 4)
//   0x0000_0002 Level-1 accept latency in bx [11:0] (reset 0)
//   0x0000_0003 R status: [0] aligned, [1] pre-algorithm capture held, [2] post
//   0x0000_0004 R alignments acquired [15:0], alignment errors [31:16]
//   0x0000_0005 R GT queue overflows
//   0x0000_0006 R candidates sent
//   0x0000_0007 R pre capture: found [15:0], missed [31:16]
//   0x0000_0008 R post capture: found [15:0], missed [31:16]
//   0x0000_0009 R pre capture: bx [11:0], words [31:16]
//   0x0000_000A R post capture: bx [11:0], words [31:16]
//   0x0000_0100+i R CRC/framing errors of link i
//   0x0000_0200+i R good frames of link i
//   0x0001_0000 + 16*word + k  R pre capture, bits 32k+31..32k of the word
//                              (tower of link 2k in [15:0], link 2k+1 in [31:16])
//   0x0002_0000 + 4*word + k   R post capture: k=0 link 0 data, k=1 link 1 data,
//                              k=2 {link1 K, link0 K}
// Bus reads ack three cycles after the strobe, four for capture buffers.
module main_processor
  import tmt_pkg::*;
#(
  parameter int unsigned N_LINKS     = 24,
  parameter int unsigned N_ETA       = tmt_pkg::N_ETA,
  parameter int unsigned N_OUT_LINKS = 2,
  parameter int unsigned FIFO_DEPTH  = 64,
  parameter int unsigned RING_DEPTH  = 1024,
  parameter int unsigned N_EV        = 32,
  parameter int unsigned CAP_DEPTH   = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [BX_W-1:0] bx,
  input  logic        l1a,
  input  link_word_t  link_in [N_LINKS],
  output gt_word_t    gt_out  [N_OUT_LINKS],
  input  logic [31:0] ipb_in_data,
  input  logic        ipb_in_valid,
  input  logic        ipb_in_last,
  output logic        ipb_in_ready,
  output logic [31:0] ipb_out_data,
  output logic        ipb_out_valid,
  output logic        ipb_out_last,
  input  logic        ipb_out_ready
);
  localparam int unsigned CAW = $clog2(CAP_DEPTH);
  localparam int unsigned PW  = N_LINKS * 16;
  localparam int unsigned QW  = N_OUT_LINKS * $bits(gt_word_t);

  // ---- link receivers
  logic [N_LINKS-1:0] rx_valid, rx_sof;
  logic [15:0]        rx_data   [N_LINKS];
  logic [31:0]        rx_err    [N_LINKS];
  logic [31:0]        rx_frames [N_LINKS];

  for (genvar i = 0; i < N_LINKS; i++) begin : g_rx
    link_rx #(.N_TOWERS(N_ETA)) u_rx (
      .clk, .rst, .rx(link_in[i]),
      .out_valid(rx_valid[i]), .out_sof(rx_sof[i]), .out_data(rx_data[i]),
      .err_cnt(rx_err[i]), .frames(rx_frames[i])
    );
  end

  // ---- alignment
  logic            al_valid, al_sof, aligned;
  logic [BX_W-1:0] al_bx;
  logic [15:0]     al_towers [N_LINKS];
  logic [15:0]     align_cnt, align_err;

  link_aligner #(.N_LINKS(N_LINKS), .FIFO_DEPTH(FIFO_DEPTH)) u_align (
    .clk, .rst, .in_valid(rx_valid), .in_sof(rx_sof), .in_data(rx_data),
    .out_valid(al_valid), .out_sof(al_sof), .out_bx(al_bx), .out_towers(al_towers),
    .aligned, .align_cnt, .err_cnt(align_err)
  );

  // ---- control registers
  logic [7:0]      threshold;
  logic [BX_W-1:0] l1a_latency;
  logic            rearm;

  // ---- DAQ capture before the algorithm
  logic [PW-1:0]   al_flat, pre_rd;
  logic            pre_cap;
  logic [BX_W-1:0] pre_bx;
  logic [CAW:0]    pre_len;
  logic [15:0]     pre_found, pre_miss;
  always_comb for (int i = 0; i < N_LINKS; i++) al_flat[16*i +: 16] = al_towers[i];

  ipb_wbus_t wbus;
  ipb_rbus_t rbus;

  daq_capture #(.W(PW), .RING_DEPTH(RING_DEPTH), .N_EV(N_EV), .CAP_DEPTH(CAP_DEPTH)) u_daq_pre (
    .clk, .rst, .in_valid(al_valid), .in_sof(al_sof), .in_bx(al_bx), .in_data(al_flat),
    .l1a, .bx_now(bx), .l1a_latency, .rearm,
    .rd_addr(wbus.addr[CAW+3:4]), .rd_data(pre_rd),
    .captured(pre_cap), .cap_bx(pre_bx), .cap_len(pre_len), .found_cnt(pre_found), .miss_cnt(pre_miss)
  );

  // ---- algorithm
  logic             eg_hdr, eg_col, eg_eoe;
  logic [BX_W-1:0]  eg_hdr_bx, eg_eoe_bx;
  logic [5:0]       eg_eta;
  logic [N_LINKS-1:0] eg_mask;
  eg_cand_t         eg_cands [N_LINKS];
  logic [23:0]      eg_et;

  egamma_alg #(.N_PHI(N_LINKS), .N_ETA(N_ETA)) u_eg (
    .clk, .rst, .threshold,
    .in_valid(al_valid), .in_sof(al_sof), .in_bx(al_bx), .in_towers(al_towers),
    .hdr_valid(eg_hdr), .hdr_bx(eg_hdr_bx),
    .col_valid(eg_col), .col_eta(eg_eta), .cand_mask(eg_mask), .cands(eg_cands),
    .eoe_valid(eg_eoe), .eoe_bx(eg_eoe_bx), .total_et(eg_et)
  );

  // ---- output to the Global Trigger
  logic [15:0] gt_ovf;
  logic [31:0] gt_cands;
  gt_tx #(.N_PHI(N_LINKS), .N_OUT_LINKS(N_OUT_LINKS)) u_gt (
    .clk, .rst,
    .hdr_valid(eg_hdr), .hdr_bx(eg_hdr_bx),
    .col_valid(eg_col), .cand_mask(eg_mask), .cands(eg_cands),
    .eoe_valid(eg_eoe), .total_et(eg_et),
    .gt_out, .ovf_cnt(gt_ovf), .cand_cnt(gt_cands)
  );

  // ---- DAQ capture after the algorithm: every non-idle output word
  logic [QW-1:0]   gt_flat, post_rd;
  logic            post_valid, post_sof, post_cap;
  logic [BX_W-1:0] post_bx;
  logic [CAW:0]    post_len;
  logic [15:0]     post_found, post_miss;
  always_comb begin
    post_valid = 1'b0;
    for (int j = 0; j < N_OUT_LINKS; j++) begin
      gt_flat[j*$bits(gt_word_t) +: $bits(gt_word_t)] = gt_out[j];
      if (gt_out[j].k || gt_out[j].d != '0) post_valid = 1'b1;
    end
    post_sof = gt_out[0].k;
  end

  daq_capture #(.W(QW), .RING_DEPTH(RING_DEPTH), .N_EV(N_EV), .CAP_DEPTH(CAP_DEPTH)) u_daq_post (
    .clk, .rst, .in_valid(post_valid), .in_sof(post_sof), .in_bx(gt_out[0].d[BX_W-1:0]), .in_data(gt_flat),
    .l1a, .bx_now(bx), .l1a_latency, .rearm,
    .rd_addr(wbus.addr[CAW+1:2]), .rd_data(post_rd),
    .captured(post_cap), .cap_bx(post_bx), .cap_len(post_len), .found_cnt(post_found), .miss_cnt(post_miss)
  );

  // ---- IPbus endpoint and register slave
  ipbus_ctrl u_ipb (
    .clk, .rst,
    .in_data (ipb_in_data),  .in_valid (ipb_in_valid), .in_last (ipb_in_last), .in_ready (ipb_in_ready),
    .out_data(ipb_out_data), .out_valid(ipb_out_valid), .out_last(ipb_out_last), .out_ready(ipb_out_ready),
    .wbus, .rbus
  );

  logic        pend, first;
  logic [1:0]  dly;
  logic [31:0] rmux;
  logic [7:0]  li;
  assign first = wbus.strobe && !pend && !rbus.ack;
  assign li    = wbus.addr[7:0];

  always_comb begin
    rmux = '0;
    case (wbus.addr[31:16])
      16'h0001: for (int k = 0; k < PW / 32; k++)
                  if (wbus.addr[3:0] == 4'(k)) rmux = pre_rd[32*k +: 32];
      16'h0002: case (wbus.addr[1:0])
                  2'd0: rmux = post_rd[31:0];
                  2'd1: rmux = (N_OUT_LINKS > 1) ? post_rd[$bits(gt_word_t) +: 32] : '0;
                  2'd2: for (int j = 0; j < N_OUT_LINKS; j++) rmux[j] = post_rd[j*$bits(gt_word_t) + 32];
                  default: ;
                endcase
      16'h0000: begin
        for (int i = 0; i < N_LINKS; i++) begin
          if (wbus.addr[15:8] == 8'h01 && li == 8'(i)) rmux = rx_err[i];
          if (wbus.addr[15:8] == 8'h02 && li == 8'(i)) rmux = rx_frames[i];
        end
        if (wbus.addr[15:8] == 8'h00)
          case (li)
            8'h01: rmux = 32'(threshold);
            8'h02: rmux = 32'(l1a_latency);
            8'h03: rmux = {29'b0, post_cap, pre_cap, aligned};
            8'h04: rmux = {align_err, align_cnt};
            8'h05: rmux = 32'(gt_ovf);
            8'h06: rmux = gt_cands;
            8'h07: rmux = {pre_miss, pre_found};
            8'h08: rmux = {post_miss, post_found};
            8'h09: rmux = {16'(pre_len), 4'b0, pre_bx};
            8'h0A: rmux = {16'(post_len), 4'b0, post_bx};
            default: ;
          endcase
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      threshold   <= 8'd4;
      l1a_latency <= '0;
      rearm       <= 1'b0;
      pend        <= 1'b0;
      dly         <= '0;
      rbus        <= IPB_RBUS_NULL;
    end else begin
      rearm    <= 1'b0;
      rbus.ack <= 1'b0;
      rbus.err <= 1'b0;
      if (first) begin
        pend <= 1'b1;
        dly  <= (wbus.addr[31:16] != 16'h0000) ? 2'd2 : 2'd1;
        if (wbus.write && wbus.addr[31:8] == 24'h0)
          case (li)
            8'h00: rearm       <= wbus.wdata[0];
            8'h01: threshold   <= wbus.wdata[7:0];
            8'h02: l1a_latency <= wbus.wdata[BX_W-1:0];
            default: ;
          endcase
      end else if (pend) begin
        if (dly == 0) begin
          pend       <= 1'b0;
          rbus.ack   <= 1'b1;
          rbus.rdata <= rmux;
        end else begin
          dly <= dly - 1'b1;
        end
      end
    end
  end
endmodule
