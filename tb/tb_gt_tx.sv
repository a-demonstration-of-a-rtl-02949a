// tb_gt_tx: drives header / candidate-column / end-of-event entries into the
// Global Trigger output and rebuilds, here, the word stream it must produce:
// header on both links, the candidates of each column lowest phi first, two
// per cycle (link 0 then link 1), then the sums word. Events are compared
// word by word (idle words skipped). The header must leave two cycles after it
// enters an empty queue. A burst of full columns then overflows the queue and
// must be counted; afterwards normal events must again come out intact.
module tb_gt_tx;
  import tmt_pkg::*;
  localparam int NP = 8;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  logic hdr_valid = 0, col_valid = 0, eoe_valid = 0;
  logic [11:0] hdr_bx = 0;
  logic [NP-1:0] cand_mask = 0;
  eg_cand_t cands [NP];
  logic [23:0] total_et = 0;
  gt_word_t gt_out [2];
  logic [15:0] ovf_cnt;
  logic [31:0] cand_cnt;
  int checks = 0, failures = 0;

  gt_tx #(.N_PHI(NP)) dut (.clk, .rst, .hdr_valid, .hdr_bx, .col_valid, .cand_mask, .cands,
    .eoe_valid, .total_et, .gt_out, .ovf_cnt, .cand_cnt);

  logic [32:0] expq[$];
  bit cmp_en = 1;
  int cyc = 0, hdr_cyc = -1, n_words = 0, n_sent = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (!rst) begin
    for (int j = 0; j < 2; j++) begin
      if (gt_out[j].k || gt_out[j].d != 0) begin
        if (gt_out[j].k && j == 0 && hdr_cyc >= 0) begin
          checks++;
          if (cyc != hdr_cyc + 2) begin failures++; $display("FAIL header latency %0d", cyc - hdr_cyc); end
          hdr_cyc = -1;
        end
        if (cmp_en) begin
          logic [32:0] e;
          checks++;
          if (expq.size() == 0) begin failures++; $display("FAIL unexpected word %h", gt_out[j]); end
          else begin
            e = expq.pop_front();
            if (e != gt_out[j]) begin failures++; $display("FAIL word %h expected %h", gt_out[j], e); end
            else n_words++;
          end
        end
      end
    end
  end

  task automatic send_event(int bx, int ncol, bit full_cols, bit track);
    int sum;
    @(negedge clk);
    hdr_valid = 1; hdr_bx = 12'(bx);
    if (track) hdr_cyc = cyc;
    expq.push_back({1'b1, 8'hBC, 12'b0, 12'(bx)});
    expq.push_back({1'b1, 8'hBC, 12'b0, 12'(bx)});
    @(negedge clk); hdr_valid = 0;
    for (int c = 0; c < ncol; c++) begin
      @(negedge clk);
      col_valid = 1;
      cand_mask = full_cols ? '1 : NP'($urandom) & NP'($urandom);
      for (int p = 0; p < NP; p++) begin
        cands[p].et = 9'($urandom); cands[p].eta = 6'(c); cands[p].phi = 7'(p);
        if (cand_mask[p]) begin
          expq.push_back({1'b0, 2'b01, 8'b0, cands[p]});
          n_sent++;
        end
      end
    end
    @(negedge clk); col_valid = 0;
    sum = $urandom_range(0, 1 << 20);
    @(negedge clk); eoe_valid = 1; total_et = 24'(sum);
    expq.push_back({1'b0, 2'b10, 6'b0, 24'(sum)});
    @(negedge clk); eoe_valid = 0;
  endtask

  initial begin
    foreach (cands[p]) cands[p] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int ev = 0; ev < 20; ev++) begin
      send_event(ev * 10, 12, 0, 1);
      repeat (40) @(negedge clk);
    end
    checks += 2;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d words not sent", expq.size()); end
    if (cand_cnt != 32'(n_sent)) begin failures++; $display("FAIL cand_cnt %0d sent %0d", cand_cnt, n_sent); end
    // overflow burst
    cmp_en = 0;
    for (int ev = 0; ev < 3; ev++) send_event(500 + ev, 40, 1, 0);
    repeat (400) @(negedge clk);
    checks++;
    if (ovf_cnt == 0) begin failures++; $display("FAIL no overflow counted"); end
    expq = {};
    cmp_en = 1;
    for (int ev = 0; ev < 5; ev++) begin
      send_event(700 + ev * 10, 12, 0, 1);
      repeat (40) @(negedge clk);
    end
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d words not sent after overflow", expq.size()); end
    $display("words compared %0d, overflows %0d", n_words, ovf_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
