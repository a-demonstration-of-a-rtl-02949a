// pp_card: firmware of one processing card acting as N_PP Pre Processors.
//
// In the demonstrator four cards each simulate six Pre Processors; each card
// has an IPbus endpoint through which its pattern BRAMs are filled and its
// time multiplexers are configured. All Pre Processors of a card share the
// run bit, the pattern mask and the output map, and take timing from the
// shared bx counter (bx_strobe, bx, tm_slot).
//
// Register map (32-bit word addresses; this design's own):
//   0x0000_0000 control    [0] run (capture and send events)
//   0x0000_0001 pattern mask [10:0], playback entry = bx & mask
//   0x0000_0002 output map, outputs 0..7, 4 bits each (slot sent on output o)
//   0x0000_0003 output map, outputs 8..11
//   0x0000_0004 output enable [11:0]
//   0x0100_0000 | pp<<17 | tower<<11 | entry : pattern BRAM word (read/write)
// Reset: run 0, mask 0, output o carries slot o, outputs 0..TM_PERIOD-1 on.
// Bus timing: registers ack two cycles after the strobe, pattern reads five.
// Unmapped addresses read 0 and ignore writes.
module pp_card
  import tmt_pkg::*;
#(
  parameter int unsigned N_PP     = 6,
  parameter int unsigned N_TOWERS = tmt_pkg::N_ETA,
  parameter int unsigned DEPTH    = 2048,
  parameter int unsigned N_OUT    = tmt_pkg::N_TM_OUT,
  localparam int unsigned AW      = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        bx_strobe,
  input  logic [BX_W-1:0] bx,
  input  logic [3:0]  tm_slot,
  // IPbus packet streams
  input  logic [31:0] ipb_in_data,
  input  logic        ipb_in_valid,
  input  logic        ipb_in_last,
  output logic        ipb_in_ready,
  output logic [31:0] ipb_out_data,
  output logic        ipb_out_valid,
  output logic        ipb_out_last,
  input  logic        ipb_out_ready,
  // time-multiplexed links, [pre processor][output]
  output link_word_t  link_out [N_PP][N_OUT]
);
  ipb_wbus_t wbus;
  ipb_rbus_t rbus;

  ipbus_ctrl u_ipb (
    .clk, .rst,
    .in_data (ipb_in_data),  .in_valid (ipb_in_valid), .in_last (ipb_in_last), .in_ready (ipb_in_ready),
    .out_data(ipb_out_data), .out_valid(ipb_out_valid), .out_last(ipb_out_last), .out_ready(ipb_out_ready),
    .wbus, .rbus
  );

  logic              run;
  logic [AW-1:0]     mask;
  logic [3:0]        out_map [N_OUT];
  logic [N_OUT-1:0]  out_en;
  logic [TOWER_W-1:0] pat_rdata [N_PP];

  logic       pend;
  logic [2:0] dly;
  logic       is_pat, first;
  logic [2:0] pp_sel;
  assign is_pat = (wbus.addr[31:24] == 8'h01);
  assign pp_sel = wbus.addr[19:17];
  assign first  = wbus.strobe && !pend && !rbus.ack;

  for (genvar p = 0; p < N_PP; p++) begin : g_pp
    pre_processor #(.N_TOWERS(N_TOWERS), .DEPTH(DEPTH), .N_OUT(N_OUT)) u_pp (
      .clk, .rst, .run, .bx_strobe, .bx, .tm_slot,
      .pattern_mask (mask),
      .out_map      (out_map),
      .out_en       (out_en),
      .pat_we       (first && wbus.write && is_pat && pp_sel == 3'(p)),
      .pat_tower    (wbus.addr[16:11]),
      .pat_addr     (wbus.addr[AW-1:0]),
      .pat_wdata    (wbus.wdata[TOWER_W-1:0]),
      .pat_rdata    (pat_rdata[p]),
      .link_out     (link_out[p])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      run  <= 1'b0;
      mask <= '0;
      for (int o = 0; o < N_OUT; o++) out_map[o] <= 4'(o);
      out_en <= N_OUT'((1 << TM_PERIOD) - 1);
      pend <= 1'b0;
      dly  <= '0;
      rbus <= IPB_RBUS_NULL;
    end else begin
      rbus.ack <= 1'b0;
      rbus.err <= 1'b0;
      if (first) begin
        pend <= 1'b1;
        dly  <= (is_pat && !wbus.write) ? 3'd3 : 3'd0;
        if (wbus.write && wbus.addr[31:24] == 8'h00) begin
          case (wbus.addr[23:0])
            24'h0: run  <= wbus.wdata[0];
            24'h1: mask <= wbus.wdata[AW-1:0];
            24'h2: for (int o = 0; o < 8 && o < N_OUT; o++) out_map[o] <= wbus.wdata[4*o +: 4];
            24'h3: for (int o = 8; o < N_OUT; o++) out_map[o] <= wbus.wdata[4*(o-8) +: 4];
            24'h4: out_en <= wbus.wdata[N_OUT-1:0];
            default: ;
          endcase
        end
      end else if (pend) begin
        if (dly == 0) begin
          pend       <= 1'b0;
          rbus.ack   <= 1'b1;
          rbus.rdata <= '0;
          if (is_pat) begin
            if (pp_sel < 3'(N_PP)) rbus.rdata <= 32'(pat_rdata[pp_sel]);
          end else if (wbus.addr[31:24] == 8'h00) begin
            case (wbus.addr[23:0])
              24'h0: rbus.rdata <= 32'(run);
              24'h1: rbus.rdata <= 32'(mask);
              24'h2: for (int o = 0; o < 8 && o < N_OUT; o++) rbus.rdata[4*o +: 4] <= out_map[o];
              24'h3: for (int o = 8; o < N_OUT; o++) rbus.rdata[4*(o-8) +: 4] <= out_map[o];
              24'h4: rbus.rdata <= 32'(out_en);
              default: ;
            endcase
          end
        end else begin
          dly <= dly - 1'b1;
        end
      end
    end
  end
endmodule
