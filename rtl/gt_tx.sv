// gt_tx: output of a Main Processor towards the Global Trigger.
//
// To keep latency low, candidates are sent as soon as the algorithm finds
// them, column by column while it steps along eta; quantities formed from the
// whole event (here the total energy) can only be sent at the end of the
// event. Every event therefore leaves as: a header word on every output link
// (K flag, 8'hBC, bx), candidate words spread over the N_OUT_LINKS links
// (up to N_OUT_LINKS per cycle, lowest phi first), and a sums word on link 0.
// Words: header k=1 d={8'hBC,12'b0,bx}; candidate k=0 d={2'b01,8'b0,et,eta,phi};
// sums k=0 d={2'b10,6'b0,total_et}; idle k=0 d=0.
// Header, candidate columns and sums wait in a queue of QDEPTH entries; an
// entry that arrives while the queue is full is dropped and counted in
// ovf_cnt (the link bandwidth of 2 candidates per cycle can be exceeded by a
// very busy event). The queue, the word format and the drop policy are this
// design's choices. Latency: a column's first candidates leave two cycles
// after it arrives when the queue is empty.
module gt_tx
  import tmt_pkg::*;
#(
  parameter int unsigned N_PHI       = 24,
  parameter int unsigned N_OUT_LINKS = 2,
  parameter int unsigned QDEPTH      = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             hdr_valid,
  input  logic [BX_W-1:0]  hdr_bx,
  input  logic             col_valid,
  input  logic [N_PHI-1:0] cand_mask,
  input  eg_cand_t         cands [N_PHI],
  input  logic             eoe_valid,
  input  logic [23:0]      total_et,
  output gt_word_t         gt_out [N_OUT_LINKS],
  output logic [15:0]      ovf_cnt,
  output logic [31:0]      cand_cnt
);
  typedef enum logic [1:0] { E_HDR, E_COL, E_SUM } ekind_t;
  typedef struct packed {
    ekind_t                   kind;
    logic [BX_W-1:0]          bx;
    logic [23:0]              et;
    logic [N_PHI-1:0]         mask;
    logic [N_PHI*$bits(eg_cand_t)-1:0] c;
  } entry_t;

  entry_t in_e, head, cur, act;
  logic   push, pop, empty, full, have, use_head;
  logic [$clog2(QDEPTH):0] unused_count;
  logic [N_PHI-1:0] rest;
  logic             done;
  logic [N_PHI-1:0] onehot;
  eg_cand_t         pick;
  gt_word_t         w [N_OUT_LINKS];
  logic [31:0]      sent;

  always_comb begin
    in_e      = '0;
    push      = 1'b0;
    if (hdr_valid) begin
      push = 1'b1; in_e.kind = E_HDR; in_e.bx = hdr_bx;
    end else if (col_valid && cand_mask != '0) begin
      push = 1'b1; in_e.kind = E_COL; in_e.mask = cand_mask;
      for (int p = 0; p < N_PHI; p++) in_e.c[p*$bits(eg_cand_t) +: $bits(eg_cand_t)] = cands[p];
    end else if (eoe_valid) begin
      push = 1'b1; in_e.kind = E_SUM; in_e.et = total_et;
    end
  end

  sync_fifo #(.W($bits(entry_t)), .DEPTH(QDEPTH)) u_q (
    .clk, .rst, .push, .din(in_e), .pop, .dout(head), .empty, .full, .count(unused_count)
  );

  // Work on the entry in hand, or straight on the queue head.
  always_comb begin
    use_head = !have && !empty;
    act      = have ? cur : head;
    rest     = act.mask;
    done     = 1'b1;
    sent     = '0;
    for (int j = 0; j < N_OUT_LINKS; j++) w[j] = '{k: 1'b0, d: '0};
    if (have || use_head) begin
      case (act.kind)
        E_HDR: for (int j = 0; j < N_OUT_LINKS; j++) w[j] = '{k: 1'b1, d: {GT_HDR_MARK, 12'b0, act.bx}};
        E_SUM: w[0] = '{k: 1'b0, d: {GT_SUMS, 6'b0, act.et}};
        default: begin
          for (int j = 0; j < N_OUT_LINKS; j++) begin
            // isolate the lowest remaining candidate
            onehot = rest & (~rest + 1'b1);
            pick   = '0;
            for (int p = 0; p < N_PHI; p++)
              if (onehot[p]) pick = act.c[p*$bits(eg_cand_t) +: $bits(eg_cand_t)];
            if (onehot != '0) begin
              w[j] = '{k: 1'b0, d: {GT_CAND, 8'b0, pick}};
              sent = sent + 1;
            end
            rest = rest & ~onehot;
          end
          done = (rest == '0);
        end
      endcase
    end
    pop = use_head;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      have     <= 1'b0;
      cur      <= '0;
      ovf_cnt  <= '0;
      cand_cnt <= '0;
      for (int j = 0; j < N_OUT_LINKS; j++) gt_out[j] <= '{k: 1'b0, d: '0};
    end else begin
      if (push && full) ovf_cnt <= ovf_cnt + 1'b1;
      gt_out   <= w;
      cand_cnt <= cand_cnt + sent;
      if (have || use_head) begin
        have     <= !done;
        cur      <= act;
        cur.mask <= rest;
      end
    end
  end
endmodule
