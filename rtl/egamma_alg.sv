// egamma_alg: e/gamma candidate finder of a Main Processor.
//
// The aligned event arrives one eta column per cycle, each column holding the
// towers of the N_PHI phi columns of this node (24 in the demonstrator, a
// third of the detector). The finder keeps the last two columns and, when a
// column arrives, judges the one before it: a tower is a candidate when its
// ECAL energy reaches the threshold and it is the local maximum of its 3x3
// neighbourhood (strictly above the neighbours at lower eta and the lower phi
// neighbour, at least equal to the others, so that a plateau gives one
// candidate). The candidate energy is the tower's ECAL energy plus the largest
// ECAL energy of its four edge neighbours. Towers outside the grid count as 0.
// Candidates of a column leave as soon as the column is judged, while the
// algorithm steps along eta; the last column is judged one cycle after it
// arrives. The event's total energy (ECAL + HCAL over all towers) leaves one
// cycle later, at the end of the event.
// The demonstrator's own e/gamma algorithm is not given; this simple finder is
// this design's own choice.
// Output (one kind per cycle, registered): hdr_valid+hdr_bx at the header,
// col_valid+col_eta+cand_mask+cands per judged column, eoe_valid+eoe_bx+
// total_et at the end.
module egamma_alg
  import tmt_pkg::*;
#(
  parameter int unsigned N_PHI = 24,
  parameter int unsigned N_ETA = tmt_pkg::N_ETA
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [7:0]         threshold,
  input  logic               in_valid,
  input  logic               in_sof,
  input  logic [BX_W-1:0]    in_bx,
  input  logic [15:0]        in_towers [N_PHI],
  output logic               hdr_valid,
  output logic [BX_W-1:0]    hdr_bx,
  output logic               col_valid,
  output logic [5:0]         col_eta,
  output logic [N_PHI-1:0]   cand_mask,
  output eg_cand_t           cands [N_PHI],
  output logic               eoe_valid,
  output logic [BX_W-1:0]    eoe_bx,
  output logic [23:0]        total_et
);
  tower_t     cur [N_PHI];
  tower_t     prv [N_PHI];
  tower_t     nxt [N_PHI];
  logic [6:0] eta_cnt;        // columns received in this event
  logic       in_event, flush;
  logic       eoe_pend;
  logic [BX_W-1:0] bx_q;
  logic [23:0]     sum_q, col_sum;

  logic             eval;
  logic [5:0]       eval_eta;
  logic [N_PHI-1:0] m;
  eg_cand_t         c [N_PHI];

  // The column to the right of the judged one: the new column, or zeros at flush.
  always_comb begin
    for (int p = 0; p < N_PHI; p++) nxt[p] = flush ? tower_t'('0) : tower_t'(in_towers[p]);
    eval     = flush || (in_valid && !in_sof && in_event && eta_cnt != 0);
    eval_eta = 6'(eta_cnt - 1);
    col_sum  = '0;
    for (int p = 0; p < N_PHI; p++)
      col_sum += 24'(in_towers[p][7:0]) + 24'(in_towers[p][15:9]);
  end

  // Judge the centre column cur[], with prv[] at eta-1 and nxt[] at eta+1.
  always_comb begin
    for (int p = 0; p < N_PHI; p++) begin
      logic [7:0] e, l, r, u, d, lu, ld, ru, rd, mx;
      e  = cur[p].ecal;
      l  = prv[p].ecal;
      r  = nxt[p].ecal;
      u  = (p + 1 < N_PHI) ? cur[p+1].ecal : 8'd0;
      d  = (p > 0)         ? cur[p-1].ecal : 8'd0;
      lu = (p + 1 < N_PHI) ? prv[p+1].ecal : 8'd0;
      ld = (p > 0)         ? prv[p-1].ecal : 8'd0;
      ru = (p + 1 < N_PHI) ? nxt[p+1].ecal : 8'd0;
      rd = (p > 0)         ? nxt[p-1].ecal : 8'd0;
      m[p] = (e >= threshold) && (e != 0) &&
             (e > l) && (e > lu) && (e > ld) && (e > d) &&
             (e >= r) && (e >= ru) && (e >= rd) && (e >= u);
      mx = l;
      if (r > mx) mx = r;
      if (u > mx) mx = u;
      if (d > mx) mx = d;
      c[p].et  = 9'(e) + 9'(mx);
      c[p].eta = eval_eta;
      c[p].phi = 7'(p);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      in_event  <= 1'b0;
      flush     <= 1'b0;
      eoe_pend  <= 1'b0;
      eta_cnt   <= '0;
      bx_q      <= '0;
      sum_q     <= '0;
      hdr_valid <= 1'b0;
      hdr_bx    <= '0;
      col_valid <= 1'b0;
      col_eta   <= '0;
      cand_mask <= '0;
      eoe_valid <= 1'b0;
      eoe_bx    <= '0;
      total_et  <= '0;
      for (int p = 0; p < N_PHI; p++) begin
        cur[p] <= '0;
        prv[p] <= '0;
      end
    end else begin
      hdr_valid <= 1'b0;
      col_valid <= 1'b0;
      eoe_valid <= 1'b0;
      flush     <= 1'b0;
      eoe_pend  <= 1'b0;
      if (eval) begin
        col_valid <= 1'b1;
        col_eta   <= eval_eta;
        cand_mask <= m;
        cands     <= c;
      end
      if (flush) eoe_pend <= 1'b1;
      if (eoe_pend) begin
        eoe_valid <= 1'b1;
        eoe_bx    <= bx_q;
        total_et  <= sum_q;
      end
      if (in_valid && in_sof) begin
        in_event  <= 1'b1;
        eta_cnt   <= '0;
        bx_q      <= in_bx;
        sum_q     <= '0;
        hdr_valid <= 1'b1;
        hdr_bx    <= in_bx;
        for (int p = 0; p < N_PHI; p++) begin
          cur[p] <= '0;
          prv[p] <= '0;
        end
      end else if (in_valid && in_event) begin
        for (int p = 0; p < N_PHI; p++) begin
          prv[p] <= cur[p];
          cur[p] <= tower_t'(in_towers[p]);
        end
        sum_q   <= sum_q + col_sum;
        eta_cnt <= eta_cnt + 1'b1;
        if (eta_cnt == 7'(N_ETA - 1)) begin
          flush    <= 1'b1;
          in_event <= 1'b0;
        end
      end
    end
  end

  // A new event must not start while the previous one is being closed.
  a_gap: assert property (@(posedge clk) disable iff (rst)
    (flush || eoe_pend) |-> !(in_valid && in_sof));
endmodule
