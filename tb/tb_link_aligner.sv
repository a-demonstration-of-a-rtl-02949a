// tb_link_aligner: four links carry the same 40 events (header with bx, then
// 56 tower words, 3 idle cycles) with delays of 0, 5, 13 and 2 cycles. The
// output must present each event once, with the right bx and, in every eta
// step, the tower of each link for that step. In event 20 one word of link 2
// is lost: the aligner must count one alignment error, realign on the next
// header and deliver every later event intact; at most that one event may
// come out damaged.
module tb_link_aligner;
  import tmt_pkg::*;
  localparam int NL = 4, NT = 56, NEV = 40;
  localparam int DLY [NL] = '{0, 5, 13, 2};
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  logic [NL-1:0] in_valid, in_sof;
  logic [15:0] in_data [NL];
  logic out_valid, out_sof, aligned;
  logic [11:0] out_bx;
  logic [15:0] out_towers [NL];
  logic [15:0] align_cnt, err_cnt;
  int checks = 0, failures = 0;

  link_aligner #(.N_LINKS(NL)) dut (.clk, .rst, .in_valid, .in_sof, .in_data,
    .out_valid, .out_sof, .out_bx, .out_towers, .aligned, .align_cnt, .err_cnt);

  // reference stream: per cycle valid/sof/data, identical content per link
  localparam int LEN = NEV * 60 + 100;
  logic        s_valid [LEN];
  logic        s_sof   [LEN];
  logic [15:0] s_data  [NL][LEN];
  logic [15:0] ev [NEV][NT][NL];
  int lost_cycle;

  // output event collector
  int cur_bx = -1, col = 0, good = 0, bad = 0;
  bit cur_ok;
  always @(negedge clk) if (!rst && out_valid) begin
    if (out_sof) begin
      if (cur_bx >= 0) begin if (cur_ok && col == NT) good++; else bad++; end
      cur_bx = int'(out_bx); col = 0; cur_ok = (cur_bx % 10 == 7) && (cur_bx / 10 < NEV);
    end else if (cur_bx >= 0) begin
      for (int l = 0; l < NL; l++)
        if (col >= NT || out_towers[l] != ev[cur_bx / 10][col][l]) cur_ok = 0;
      col++;
    end
  end

  initial begin
    for (int c = 0; c < LEN; c++) begin
      s_valid[c] = 0; s_sof[c] = 0;
      for (int l = 0; l < NL; l++) s_data[l][c] = '0;
    end
    for (int e = 0; e < NEV; e++) begin
      int c0;
      c0 = 20 + e * 60;
      s_valid[c0] = 1; s_sof[c0] = 1;
      for (int l = 0; l < NL; l++) s_data[l][c0] = 16'(e * 10 + 7);
      for (int t = 0; t < NT; t++) begin
        s_valid[c0 + 1 + t] = 1;
        for (int l = 0; l < NL; l++) begin
          ev[e][t][l] = 16'($urandom);
          s_data[l][c0 + 1 + t] = ev[e][t][l];
        end
      end
    end
    lost_cycle = 20 + 20 * 60 + 30;
    in_valid = '0; in_sof = '0;
    foreach (in_data[l]) in_data[l] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int c = 0; c < LEN; c++) begin
      @(negedge clk);
      for (int l = 0; l < NL; l++) begin
        int sc;
        sc = c - DLY[l];
        if (sc >= 0) begin
          in_valid[l] = s_valid[sc] && !(l == 2 && sc == lost_cycle);
          in_sof[l]   = s_sof[sc];
          in_data[l]  = s_data[l][sc];
        end else begin
          in_valid[l] = 0; in_sof[l] = 0; in_data[l] = '0;
        end
      end
    end
    @(negedge clk);
    if (cur_bx >= 0) begin if (cur_ok && col == NT) good++; else bad++; end
    checks += 4 + good + bad;
    if (good < NEV - 2) begin failures++; $display("FAIL only %0d good events", good); end
    if (bad > 1) begin failures++; $display("FAIL %0d damaged events", bad); end
    if (err_cnt != 1) begin failures++; $display("FAIL err_cnt %0d", err_cnt); end
    if (align_cnt != 2) begin failures++; $display("FAIL align_cnt %0d", align_cnt); end
    $display("good events %0d damaged %0d alignments %0d errors %0d", good, bad, align_cnt, err_cnt);
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
