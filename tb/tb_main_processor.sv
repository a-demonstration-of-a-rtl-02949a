// tb_main_processor: one Main Processor node with 4 input links (56 towers
// each) driven with frames built here (header, towers, CRC-16, idles; one
// event every 10 bx, links skewed by 0..9 cycles). Checks:
//  - the Global Trigger stream against a reference e/gamma search over the
//    4 x 56 grid (threshold 4): headers, candidates in eta then phi order,
//    total-energy word;
//  - a corrupted CRC on link 2 is counted, read back over IPbus;
//  - registers written and read over IPbus in one packet;
//  - a Level-1 accept with latency 50 bx captures the event before the
//    algorithm (towers read back over IPbus) and after it (candidate words),
//    and a trigger for a bx this node never saw is counted as a miss.
module tb_main_processor;
  import tmt_pkg::*;
  localparam int NL = 4, NT = 56, NEV = 24, LAT = 50;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  logic [11:0] bx = 0;
  logic l1a = 0;
  link_word_t link_in [NL];
  gt_word_t gt_out [2];
  logic [31:0] in_data = 0, out_data;
  logic in_valid = 0, in_last = 0, in_ready, out_valid, out_last, out_ready = 1;
  int checks = 0, failures = 0;

  main_processor #(.N_LINKS(NL)) dut (.clk, .rst, .bx, .l1a, .link_in, .gt_out,
    .ipb_in_data(in_data), .ipb_in_valid(in_valid), .ipb_in_last(in_last), .ipb_in_ready(in_ready),
    .ipb_out_data(out_data), .ipb_out_valid(out_valid), .ipb_out_last(out_last), .ipb_out_ready(out_ready));

  // bx counter: 6 cycles per bx
  int sub = 0;
  always @(posedge clk) if (!rst) begin
    if (sub == 5) begin sub <= 0; bx <= (bx == 3563) ? 0 : bx + 1; end else sub <= sub + 1;
  end

  function automatic logic [31:0] hdr(int tid, int n, int t);
    return {4'h1, 11'(tid), 9'(n), 5'(t), 3'b0};
  endfunction

  task automatic xfer(input logic [31:0] req[$], output logic [31:0] rsp[$]);
    rsp = {};
    fork
      begin
        for (int i = 0; i < req.size(); i++) begin
          @(negedge clk);
          in_data = req[i]; in_valid = 1; in_last = (i == req.size() - 1);
          @(posedge clk);
          while (!in_ready) @(posedge clk);
        end
        @(negedge clk); in_valid = 0; in_last = 0;
      end
      begin
        forever begin
          @(posedge clk);
          if (out_valid && out_ready) begin
            rsp.push_back(out_data);
            if (out_last) break;
          end
        end
      end
    join
  endtask

  function automatic logic [15:0] crc_ref(input logic [15:0] words[$]);
    logic [15:0] c = 16'hFFFF;
    foreach (words[w])
      for (int b = 15; b >= 0; b--) begin
        logic fb = c[15] ^ words[w][b];
        c = c << 1;
        if (fb) c = c ^ 16'h1021;
      end
    return c;
  endfunction

  // events
  int ev_bx [NEV];
  logic [7:0] ecal [NEV][NT][NL];
  logic [6:0] hcal [NEV][NT][NL];
  logic [32:0] expq[$];
  logic [32:0] ev_words [NEV][$];

  function automatic int E(int ev, int e, int p);
    if (e < 0 || e >= NT || p < 0 || p >= NL) return 0;
    return ecal[ev][e][p];
  endfunction

  task automatic build_expected(int ev);
    int sum = 0;
    expq.push_back({1'b1, 8'hBC, 12'b0, 12'(ev_bx[ev])});
    expq.push_back({1'b1, 8'hBC, 12'b0, 12'(ev_bx[ev])});
    for (int e = 0; e < NT; e++)
      for (int p = 0; p < NL; p++) begin
        int c, mx;
        c = E(ev, e, p);
        sum += ecal[ev][e][p] + hcal[ev][e][p];
        if (c >= 4 && c > E(ev,e-1,p-1) && c > E(ev,e-1,p) && c > E(ev,e-1,p+1) && c > E(ev,e,p-1) &&
            c >= E(ev,e,p+1) && c >= E(ev,e+1,p-1) && c >= E(ev,e+1,p) && c >= E(ev,e+1,p+1)) begin
          mx = E(ev,e-1,p);
          if (E(ev,e+1,p) > mx) mx = E(ev,e+1,p);
          if (E(ev,e,p-1) > mx) mx = E(ev,e,p-1);
          if (E(ev,e,p+1) > mx) mx = E(ev,e,p+1);
          expq.push_back({1'b0, 2'b01, 8'b0, 9'(c + mx), 6'(e), 7'(p)});
          ev_words[ev].push_back({1'b0, 2'b01, 8'b0, 9'(c + mx), 6'(e), 7'(p)});
        end
      end
    expq.push_back({1'b0, 2'b10, 6'b0, 24'(sum)});
    ev_words[ev].push_back({1'b0, 2'b10, 6'b0, 24'(sum)});
  endtask

  // GT stream checker
  int n_words = 0;
  always @(negedge clk) if (!rst) begin
    for (int j = 0; j < 2; j++) begin
      if (gt_out[j].k || gt_out[j].d != 0) begin
        logic [32:0] e;
        checks++;
        if (expq.size() == 0) begin failures++; $display("FAIL unexpected GT word %h", gt_out[j]); end
        else begin
          e = expq.pop_front();
          if (e != gt_out[j]) begin failures++; $display("FAIL GT word %h expected %h", gt_out[j], e); end
          else n_words++;
        end
      end
    end
  end

  // link drivers: each link replays the frame words with its own skew
  link_word_t frame [NEV][NL][60];
  int ev_start [NEV];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) begin
    for (int l = 0; l < NL; l++) begin
      link_in[l] = LINK_IDLE;
      for (int ev = 0; ev < NEV; ev++) begin
        int i;
        i = cyc - ev_start[ev] - 3 * l;
        if (ev_start[ev] > 0 && i >= 0 && i < 60) link_in[l] = frame[ev][l][i];
      end
    end
  end

  logic [31:0] req[$], rsp[$];
  initial begin
    foreach (ev_start[e]) ev_start[e] = 0;
    foreach (link_in[l]) link_in[l] = LINK_IDLE;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // registers: latency 50, read threshold/latency back in the same packet
    xfer('{hdr(1, 1, 4), 32'h2, 32'(LAT), hdr(2, 2, 3), 32'h1}, rsp);
    checks++;
    if (rsp.size() != 4 || rsp[2] != 32'd4 || rsp[3] != 32'(LAT)) begin failures++; $display("FAIL regs"); end
    // events every 10 bx
    for (int ev = 0; ev < NEV; ev++) begin
      while (!(sub == 0 && bx % 10 == 3)) @(negedge clk);
      ev_bx[ev] = int'(bx);
      for (int l = 0; l < NL; l++) begin
        logic [15:0] tw[$];
        tw = {};
        frame[ev][l][0] = '{k: 1'b1, d: {4'hF, bx}};
        for (int t = 0; t < NT; t++) begin
          ecal[ev][t][l] = (ev % 4 == 1) ? 8'(3 * $urandom_range(0, 2)) : 8'($urandom_range(0, 255)) & 8'($urandom_range(0, 1) ? 8'h0F : 8'hFF);
          hcal[ev][t][l] = 7'($urandom);
          tw.push_back({hcal[ev][t][l], 1'b0, ecal[ev][t][l]});
          frame[ev][l][1 + t] = '{k: 1'b0, d: tw[t]};
        end
        frame[ev][l][NT + 1] = '{k: 1'b0, d: crc_ref(tw) ^ ((ev == 7 && l == 2) ? 16'h8000 : 16'h0)};
        frame[ev][l][NT + 2] = LINK_IDLE;
        frame[ev][l][NT + 3] = LINK_IDLE;
      end
      build_expected(ev);
      ev_start[ev] = cyc + 1;
      @(negedge clk);
    end
    // trigger on event 10
    while (!(bx == 12'((ev_bx[10] + LAT) % 3564) && sub == 0)) @(negedge clk);
    l1a = 1; @(negedge clk) l1a = 0;
    repeat (200) @(negedge clk);
    // status, counters, capture info
    xfer('{hdr(3, 8, 3), 32'h3, hdr(4, NL, 3), 32'h100}, rsp);
    checks += 6;
    if (rsp.size() != 10 + NL) begin failures++; $display("FAIL status reply size %0d", rsp.size()); end
    else begin
      if (rsp[1][2:0] != 3'b111) begin failures++; $display("FAIL status %h", rsp[1]); end
      if (rsp[5] != {16'd0, 16'd1}) begin failures++; $display("FAIL pre found/miss %h", rsp[5]); end
      if (rsp[6] != {16'd0, 16'd1}) begin failures++; $display("FAIL post found/miss %h", rsp[6]); end
      if (rsp[7][11:0] != 12'(ev_bx[10]) || rsp[7][31:16] != 16'(NT)) begin failures++; $display("FAIL pre capture %h", rsp[7]); end
      for (int l = 0; l < NL; l++)
        if (rsp[10 + l] != ((l == 2) ? 1 : 0)) begin failures++; $display("FAIL crc counter link %0d = %0d", l, rsp[10 + l]); end
      if (rsp[8][11:0] != 12'(ev_bx[10]) || rsp[8][31:16] == 0) begin failures++; $display("FAIL post capture %h", rsp[8]); end
    end
    // pre-algorithm capture: towers of all eta steps
    req = {};
    for (int e = 0; e < NT; e++) begin req.push_back(hdr(10 + e, 2, 3)); req.push_back(32'h0001_0000 + 16 * e); end
    xfer(req, rsp);
    for (int e = 0; e < NT; e++) begin
      checks++;
      if (rsp[3*e + 1] != {hcal[10][e][1], 1'b0, ecal[10][e][1], hcal[10][e][0], 1'b0, ecal[10][e][0]} ||
          rsp[3*e + 2] != {hcal[10][e][3], 1'b0, ecal[10][e][3], hcal[10][e][2], 1'b0, ecal[10][e][2]}) begin
        failures++; $display("FAIL pre capture eta %0d", e);
      end
    end
    // post-algorithm capture: the event's words in order (link 0 then link 1)
    begin
      logic [32:0] got[$];
      int nw;
      xfer('{hdr(90, 1, 3), 32'hA}, rsp);
      nw = int'(rsp[1][31:16]);
      got = {};
      for (int w = 0; w < nw; w++) begin
        xfer('{hdr(91, 3, 3), 32'h0002_0000 + 4 * w}, rsp);
        got.push_back({rsp[3][0], rsp[1]});
        if (rsp[2] != 0 || rsp[3][1]) got.push_back({rsp[3][1], rsp[2]});
      end
      checks++;
      if (got.size() != ev_words[10].size()) begin
        failures++; $display("FAIL post capture %0d words, expected %0d", got.size(), ev_words[10].size());
      end else foreach (got[i]) begin
        checks++;
        if (got[i] != ev_words[10][i]) begin failures++; $display("FAIL post capture word %0d", i); end
      end
    end
    // re-arm and trigger a bx this node never saw
    xfer('{hdr(92, 1, 4), 32'h0, 32'h1}, rsp);
    while (!(bx == 12'((ev_bx[12] + 5 + LAT) % 3564) && sub == 0)) @(negedge clk);
    l1a = 1; @(negedge clk) l1a = 0;
    repeat (100) @(negedge clk);
    xfer('{hdr(93, 1, 3), 32'h7}, rsp);
    checks++;
    if (rsp[1] != {16'd1, 16'd1}) begin failures++; $display("FAIL miss count %h", rsp[1]); end
    repeat (200) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d GT words missing", expq.size()); end
    $display("GT words matched %0d", n_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
