// link_aligner: lines up the events arriving on all links of a Main Processor.
//
// The links from the Pre Processors reach a Main Processor with different
// delays (fibre lengths, SerDes). Each link writes its header and tower words
// into its own FIFO. Until aligned, words ahead of a header are discarded on
// each link; once every FIFO shows a header at its head, and all headers carry
// the same bx, all FIFOs are read in lockstep, so the algorithm gets one tower
// from every link per cycle: the eta column of all N_LINKS phi columns.
// If the heads later disagree (one shows a header, another does not, or the
// bx numbers differ) or a FIFO overflows, an alignment error is counted and
// the block aligns again on the next header. While not aligned, a full FIFO
// (a header whose partners were lost, or a backlog) empties all FIFOs, and
// when the headers at the heads disagree only the older ones are dropped.
// The skew between links must stay below one frame and FIFO_DEPTH words.
// Output (registered): out_valid/out_sof with out_bx for the header, then
// out_valid with out_towers for each eta step. aligned shows the state and
// align_cnt counts the times alignment was acquired.
module link_aligner
  import tmt_pkg::*;
#(
  parameter int unsigned N_LINKS    = 24,
  parameter int unsigned FIFO_DEPTH = 64
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [N_LINKS-1:0] in_valid,
  input  logic [N_LINKS-1:0] in_sof,
  input  logic [15:0]        in_data [N_LINKS],
  output logic               out_valid,
  output logic               out_sof,
  output logic [BX_W-1:0]    out_bx,
  output logic [15:0]        out_towers [N_LINKS],
  output logic               aligned,
  output logic [15:0]        align_cnt,
  output logic [15:0]        err_cnt
);
  logic [16:0]        head  [N_LINKS];
  logic [N_LINKS-1:0] empty, full, pop, hsof;
  logic               all_ready, all_sof, bx_same, ovf, flush;

  // not aligned and a FIFO is full: its backlog would never drain, start over
  assign flush = !aligned && (full != '0);

  for (genvar i = 0; i < N_LINKS; i++) begin : g_fifo
    logic [$clog2(FIFO_DEPTH):0] unused_count;
    sync_fifo #(.W(17), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk,
      .rst   (rst || flush),
      .push  (in_valid[i]),
      .din   ({in_sof[i], in_data[i]}),
      .pop   (pop[i]),
      .dout  (head[i]),
      .empty (empty[i]),
      .full  (full[i]),
      .count (unused_count)
    );
    assign hsof[i] = head[i][16];
  end

  // quiet counts the cycles since the last lockstep read; a new event is only
  // started after GAP of them, so the algorithm can close the previous one.
  localparam int unsigned GAP = 2;
  logic [1:0] quiet;
  logic       gap_ok;
  assign gap_ok = (quiet >= 2'(GAP));
  always_ff @(posedge clk)
    if (rst)                         quiet <= 2'(GAP);
    else if (pop == '1)              quiet <= '0;
    else if (quiet != 2'(GAP))       quiet <= quiet + 1'b1;

  // Heads that show older bx numbers than others (modulo the orbit). If some
  // link is ahead of link 0, the links level with link 0 are the older ones;
  // otherwise those not level with link 0 are. Repeated, this keeps the newest.
  logic [N_LINKS-1:0] same0, ahead0, older;
  always_comb begin
    for (int i = 0; i < N_LINKS; i++) begin
      logic signed [BX_W+1:0] d;
      d = $signed({2'b00, head[i][BX_W-1:0]}) - $signed({2'b00, head[0][BX_W-1:0]});
      if (d < 0) d = d + (BX_W+2)'(ORBIT_BX);
      same0[i]  = (d == 0);
      ahead0[i] = (d != 0) && (d < (BX_W+2)'(ORBIT_BX / 2));
    end
    older = (ahead0 != '0) ? same0 : ~same0;
  end

  always_comb begin
    all_ready = (empty == '0);
    all_sof   = all_ready && (hsof == '1);
    bx_same   = 1'b1;
    for (int i = 1; i < N_LINKS; i++)
      if (head[i][BX_W-1:0] != head[0][BX_W-1:0]) bx_same = 1'b0;
    ovf = |(in_valid & full);
    pop = '0;
    if (!aligned) begin
      if (all_sof && !bx_same) pop = older;    // drop the headers of the older frames
      else if (all_sof)        pop = gap_ok ? '1 : '0;  // start
      else                     pop = ~empty & ~hsof;  // drop words ahead of a header
    end else if (all_ready) begin
      if (hsof == '0)        pop = '1;         // in step
      else if (!bx_same)     pop = older;      // headers disagree: keep the newest
      else if (gap_ok)       pop = '1;         // next event after a gap
      else pop = ~empty & ~hsof;               // out of step: keep the headers
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      aligned   <= 1'b0;
      align_cnt <= '0;
      err_cnt   <= '0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_bx    <= '0;
    end else begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      if (ovf && aligned) begin
        aligned <= 1'b0;
        err_cnt <= err_cnt + 1'b1;
      end else if (!aligned) begin
        if (all_sof && bx_same && gap_ok) begin
          aligned   <= 1'b1;
          align_cnt <= align_cnt + 1'b1;
          out_valid <= 1'b1;
          out_sof   <= 1'b1;
          out_bx    <= head[0][BX_W-1:0];
        end
      end else if (all_ready) begin
        if ((hsof != '0 && hsof != '1) || (all_sof && !bx_same)) begin
          aligned <= 1'b0;
          err_cnt <= err_cnt + 1'b1;
        end else if (hsof == '0 || gap_ok) begin
          out_valid <= 1'b1;
          out_sof   <= all_sof;
          if (all_sof) out_bx <= head[0][BX_W-1:0];
        end
      end
    end
  end

  always_ff @(posedge clk)
    for (int i = 0; i < N_LINKS; i++) out_towers[i] <= head[i][15:0];

  // All links are read together only when every FIFO holds a word.
  a_lockstep: assert property (@(posedge clk) disable iff (rst)
    (pop == '1) |-> all_ready);
endmodule
