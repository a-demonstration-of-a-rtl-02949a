// tb_tmt_demonstrator: the whole demonstrator at its default size (4 cards x
// 6 Pre Processors, 56 eta towers each, 2 Main Processors) run end to end,
// controlled only through the cards' IPbus ports.
//  1. Every Pre Processor gets an 8-entry pattern (block writes, all four
//     cards in parallel); the cards are started.
//  2. Each node's Global Trigger stream is decoded event by event and
//     compared with a reference e/gamma search over the 24 x 56 towers that
//     the patterns put into that bx (entry = bx & 7): header bx, candidates in
//     order, total energy. Node 0 must only see bx = 0 mod 10, node 1 bx = 1.
//  3. A Level-1 accept for a node-0 bx is captured by node 0 (before and
//     after the algorithm) and missed by node 1; the captured towers are read.
//  4. Spare swap: every card moves output 1 to slot 5; node 1 must then see
//     bx = 5 mod 10 and events must again match the reference.
//  5. Node 0's threshold is set to 0 with busy patterns: its output queue
//     must overflow and count it.
// Each mechanism (time multiplexing, link alignment, candidates, end-of-event
// sums, DAQ capture hit and miss, spare swap, re-alignment and CRC errors on
// the links cut by the swap, output overflow) is counted and must occur.
module tb_tmt_demonstrator;
  import tmt_pkg::*;
  localparam int NC = 4, NPPC = 6, NPP = 24, NMP = 2, NT = 56, LAT = 60;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  logic l1a = 0;
  logic [11:0] bx;
  logic [3:0] tm_slot;
  logic [31:0] pp_in_data [NC], pp_out_data [NC], mp_in_data [NMP], mp_out_data [NMP];
  logic pp_in_valid [NC], pp_in_last [NC], pp_in_ready [NC], pp_out_valid [NC], pp_out_last [NC], pp_out_ready [NC];
  logic mp_in_valid [NMP], mp_in_last [NMP], mp_in_ready [NMP], mp_out_valid [NMP], mp_out_last [NMP], mp_out_ready [NMP];
  gt_word_t gt_out [NMP][2];
  link_word_t spare_link [NPP][N_TM_OUT - NMP];
  int checks = 0, failures = 0;

  tmt_demonstrator dut (
    .clk, .rst, .l1a, .bx, .tm_slot,
    .pp_ipb_in_data(pp_in_data), .pp_ipb_in_valid(pp_in_valid), .pp_ipb_in_last(pp_in_last), .pp_ipb_in_ready(pp_in_ready),
    .pp_ipb_out_data(pp_out_data), .pp_ipb_out_valid(pp_out_valid), .pp_ipb_out_last(pp_out_last), .pp_ipb_out_ready(pp_out_ready),
    .mp_ipb_in_data(mp_in_data), .mp_ipb_in_valid(mp_in_valid), .mp_ipb_in_last(mp_in_last), .mp_ipb_in_ready(mp_in_ready),
    .mp_ipb_out_data(mp_out_data), .mp_ipb_out_valid(mp_out_valid), .mp_ipb_out_last(mp_out_last), .mp_ipb_out_ready(mp_out_ready),
    .gt_out, .spare_link);

  function automatic logic [31:0] hdr(int tid, int n, int t);
    return {4'h1, 11'(tid), 9'(n), 5'(t), 3'b0};
  endfunction

  // IPbus packet exchange with card c (mp = 1: a Main Processor)
  task automatic xfer(input bit mp, input int c, input logic [31:0] req[$], output logic [31:0] rsp[$]);
    rsp = {};
    fork
      begin
        for (int i = 0; i < req.size(); i++) begin
          @(negedge clk);
          if (mp) begin mp_in_data[c] = req[i]; mp_in_valid[c] = 1; mp_in_last[c] = (i == req.size() - 1); end
          else    begin pp_in_data[c] = req[i]; pp_in_valid[c] = 1; pp_in_last[c] = (i == req.size() - 1); end
          @(posedge clk);
          while (!(mp ? mp_in_ready[c] : pp_in_ready[c])) @(posedge clk);
        end
        @(negedge clk);
        if (mp) begin mp_in_valid[c] = 0; mp_in_last[c] = 0; end
        else    begin pp_in_valid[c] = 0; pp_in_last[c] = 0; end
      end
      begin
        forever begin
          @(posedge clk);
          if (mp && mp_out_valid[c]) begin rsp.push_back(mp_out_data[c]); if (mp_out_last[c]) break; end
          if (!mp && pp_out_valid[c]) begin rsp.push_back(pp_out_data[c]); if (pp_out_last[c]) break; end
        end
      end
    join
  endtask

  // patterns [pp][tower][entry]
  logic [7:0] ecal [NPP][NT][8];
  logic [6:0] hcal [NPP][NT][8];
  logic [7:0] thr [NMP];

  function automatic int E(int ent, int e, int p);
    if (e < 0 || e >= NT || p < 0 || p >= NPP) return 0;
    return ecal[p][e][ent];
  endfunction

  function automatic void expected(int m, int bxv, ref logic [32:0] q[$]);
    int ent, sum;
    ent = bxv & 7; sum = 0; q = {};
    for (int e = 0; e < NT; e++)
      for (int p = 0; p < NPP; p++) begin
        int c, mx;
        c = E(ent, e, p);
        sum += ecal[p][e][ent] + hcal[p][e][ent];
        if (c >= thr[m] && c > 0 && c > E(ent,e-1,p-1) && c > E(ent,e-1,p) && c > E(ent,e-1,p+1) && c > E(ent,e,p-1) &&
            c >= E(ent,e,p+1) && c >= E(ent,e+1,p-1) && c >= E(ent,e+1,p) && c >= E(ent,e+1,p+1)) begin
          mx = E(ent,e-1,p);
          if (E(ent,e+1,p) > mx) mx = E(ent,e+1,p);
          if (E(ent,e,p-1) > mx) mx = E(ent,e,p-1);
          if (E(ent,e,p+1) > mx) mx = E(ent,e,p+1);
          q.push_back({1'b0, 2'b01, 8'b0, 9'(c + mx), 6'(e), 7'(p)});
        end
      end
    q.push_back({1'b0, 2'b10, 6'b0, 24'(sum)});
  endfunction

  // mechanism counters
  int n_events [NMP], n_match [NMP], n_cands, n_sums, n_swapped, n_wrong_slot;
  bit compare_on = 0, swapped = 0;

  // per-node GT stream decoder
  task automatic decode(int m);
    int cur = -1;
    bit cmp = 0;
    logic [32:0] got[$], exp[$];
    forever begin
      @(negedge clk);
      if (gt_out[m][0].k) begin
        if (cur >= 0 && cmp) begin
          expected(m, cur, exp);
          checks++;
          if (got != exp) begin
            failures++; $display("FAIL node %0d bx %0d: %0d words, expected %0d", m, cur, got.size(), exp.size());
          end else begin
            n_match[m]++;
            n_cands += got.size() - 1;
            n_sums++;
          end
        end
        cur = int'(gt_out[m][0].d[11:0]);
        cmp = compare_on;
        got = {};
        n_events[m]++;
        if (compare_on) begin
          int want;
          want = (m == 0) ? 0 : (swapped ? 5 : 1);
          checks++;
          if (cur % 10 != want) begin failures++; n_wrong_slot++; $display("FAIL node %0d got bx %0d", m, cur); end
          if (m == 1 && swapped) n_swapped++;
        end
      end else begin
        for (int j = 0; j < 2; j++)
          if (gt_out[m][j].d != 0) got.push_back(gt_out[m][j]);
      end
    end
  endtask

  task automatic load_card(int c);
    logic [31:0] req[$], rsp[$];
    req = {};
    for (int k = 0; k < NPPC; k++)
      for (int t = 0; t < NT; t++) begin
        int p;
        p = c * NPPC + k;
        req.push_back(hdr(t, 8, 4));
        req.push_back(32'h0100_0000 | (k << 17) | (t << 11));
        for (int a = 0; a < 8; a++) req.push_back({16'b0, hcal[p][t][a], 1'b0, ecal[p][t][a]});
      end
    req.push_back(hdr(1, 1, 4)); req.push_back(32'h1); req.push_back(32'h7);   // pattern mask
    xfer(0, c, req, rsp);
    checks++;
    if (rsp.size() != NPPC * NT + 1) begin failures++; $display("FAIL card %0d load reply %0d", c, rsp.size()); end
  endtask

  logic [31:0] rsp[$], rsp1[$];
  int trig_bx, crc_errs, realign, ovf;
  initial begin
    for (int c = 0; c < NC; c++) begin pp_in_data[c] = 0; pp_in_valid[c] = 0; pp_in_last[c] = 0; pp_out_ready[c] = 1; end
    for (int m = 0; m < NMP; m++) begin mp_in_data[m] = 0; mp_in_valid[m] = 0; mp_in_last[m] = 0; mp_out_ready[m] = 1; thr[m] = 4; end
    for (int p = 0; p < NPP; p++)
      for (int t = 0; t < NT; t++)
        for (int a = 0; a < 8; a++) begin
          ecal[p][t][a] = ($urandom_range(0, 31) == 0) ? 8'($urandom_range(1, 255)) : 8'($urandom_range(0, 3));
          hcal[p][t][a] = 7'($urandom);
        end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    fork
      decode(0);
      decode(1);
    join_none
    // 1. load patterns, start
    fork
      load_card(0); load_card(1); load_card(2); load_card(3);
    join
    fork
      xfer(0, 0, '{hdr(2, 1, 4), 32'h0, 32'h1}, rsp);
      xfer(0, 1, '{hdr(2, 1, 4), 32'h0, 32'h1}, rsp);
      xfer(0, 2, '{hdr(2, 1, 4), 32'h0, 32'h1}, rsp);
      xfer(0, 3, '{hdr(2, 1, 4), 32'h0, 32'h1}, rsp);
      xfer(1, 0, '{hdr(3, 1, 4), 32'h2, 32'(LAT)}, rsp1);
    join
    xfer(1, 1, '{hdr(3, 1, 4), 32'h2, 32'(LAT)}, rsp);
    repeat (400) @(negedge clk);
    // 2. compare streams
    compare_on = 1;
    repeat (30 * 60) @(negedge clk);
    // 3. trigger on a node-0 bx
    while (!(bx % 10 == 0)) @(negedge clk);
    trig_bx = int'(bx) - 20;
    while (int'(bx) != trig_bx + LAT) @(negedge clk);
    l1a = 1; @(negedge clk) l1a = 0;
    repeat (200) @(negedge clk);
    xfer(1, 0, '{hdr(4, 2, 3), 32'h7, hdr(5, 1, 3), 32'h9}, rsp);
    xfer(1, 1, '{hdr(4, 2, 3), 32'h7}, rsp1);
    checks += 3;
    if (rsp[1] != 32'h0000_0001 || rsp[2] != 32'h0000_0001) begin failures++; $display("FAIL node 0 capture %h %h", rsp[1], rsp[2]); end
    if (rsp[4][11:0] != 12'(trig_bx) || rsp[4][31:16] != 16'(NT)) begin failures++; $display("FAIL node 0 capture bx %h", rsp[4]); end
    if (rsp1[1] != 32'h0001_0000 || rsp1[2] != 32'h0001_0000) begin failures++; $display("FAIL node 1 miss %h %h", rsp1[1], rsp1[2]); end
    // captured towers of eta 7, phi 0..23
    begin
      logic [31:0] req[$];
      req = {hdr(6, 12, 3), 32'h0001_0000 + 16 * 7};
      xfer(1, 0, req, rsp);
      for (int p = 0; p < NPP; p++) begin
        checks++;
        if (rsp[1 + p / 2][16 * (p % 2) +: 16] != {hcal[p][7][trig_bx & 7], 1'b0, ecal[p][7][trig_bx & 7]}) begin
          failures++; $display("FAIL captured tower phi %0d", p);
        end
      end
    end
    // 4. spare swap: output 1 carries slot 5 on every card
    compare_on = 0;
    for (int c = 0; c < NC; c++) xfer(0, c, '{hdr(7, 1, 4), 32'h2, 32'h7654_3250}, rsp);
    swapped = 1;
    repeat (400) @(negedge clk);
    compare_on = 1;
    repeat (20 * 60) @(negedge clk);
    compare_on = 0;
    xfer(1, 1, '{hdr(8, 2, 3), 32'h4, hdr(9, NPP, 3), 32'h100}, rsp);
    realign = int'(rsp[1][15:0]);
    crc_errs = 0;
    for (int p = 0; p < NPP; p++) crc_errs += int'(rsp[4 + p]);
    // 5. overflow on node 0: threshold 0, dense patterns in entry 0 of all towers
    for (int c = 0; c < NC; c++) begin
      logic [31:0] req[$];
      req = {};
      for (int k = 0; k < NPPC; k++)
        for (int t = 0; t < NT; t++) begin
          req.push_back(hdr(t, 1, 4));
          req.push_back(32'h0100_0000 | (k << 17) | (t << 11));
          req.push_back(32'(((t % 2 == 0) && (k % 2 == 0)) ? 8'd40 : 8'd0));
        end
      xfer(0, c, req, rsp);
    end
    xfer(1, 0, '{hdr(10, 1, 4), 32'h1, 32'h0}, rsp);
    repeat (40 * 60) @(negedge clk);
    xfer(1, 0, '{hdr(11, 1, 3), 32'h5}, rsp);
    ovf = int'(rsp[1]);
    // mechanism summary
    $display("events node0 %0d node1 %0d, matched %0d / %0d, candidates %0d, sums %0d",
             n_events[0], n_events[1], n_match[0], n_match[1], n_cands, n_sums);
    $display("swapped-slot events %0d, alignments on node 1 %0d, link errors at swap %0d, overflows %0d",
             n_swapped, realign, crc_errs, ovf);
    checks += 8;
    if (n_match[0] < 20 || n_match[1] < 20) begin failures++; $display("FAIL too few matched events"); end
    if (n_cands == 0)    begin failures++; $display("FAIL no candidates"); end
    if (n_sums == 0)     begin failures++; $display("FAIL no sums"); end
    if (n_swapped < 10)  begin failures++; $display("FAIL spare swap not seen"); end
    if (realign < 2)     begin failures++; $display("FAIL no re-alignment after the swap"); end
    if (crc_errs < 1)    begin failures++; $display("FAIL no link error at the swap"); end
    if (ovf < 1)         begin failures++; $display("FAIL no overflow"); end
    if (n_wrong_slot != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
