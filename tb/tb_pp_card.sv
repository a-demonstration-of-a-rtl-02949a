// tb_pp_card: controls one six-Pre-Processor card only through IPbus packets.
// It fills a 4-entry pattern for Pre Processors 0 and 5 with block writes,
// reads a block back, sets the pattern mask, moves output 1 to slot 7 and
// enables the spare output 10 on slot 1, reads the registers back, and sets
// run. Then, with the bx timing driven from here, it decodes output 0 of
// Pre Processor 0 and outputs 1 and 10 of Pre Processor 5: each frame must
// carry a bx of the mapped slot and the pattern entry (bx & 3) of every tower.
module tb_pp_card;
  import tmt_pkg::*;
  localparam int NT = 56, NPP = 6, NO = 12;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  logic bx_strobe = 0;
  logic [11:0] bx = 0;
  logic [3:0] tm_slot = 0;
  logic [31:0] in_data = 0, out_data;
  logic in_valid = 0, in_last = 0, in_ready, out_valid, out_last, out_ready = 1;
  link_word_t link_out [NPP][NO];
  int checks = 0, failures = 0;

  pp_card dut (.clk, .rst, .bx_strobe, .bx, .tm_slot,
    .ipb_in_data(in_data), .ipb_in_valid(in_valid), .ipb_in_last(in_last), .ipb_in_ready(in_ready),
    .ipb_out_data(out_data), .ipb_out_valid(out_valid), .ipb_out_last(out_last), .ipb_out_ready(out_ready),
    .link_out);

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

  logic [15:0] pat [NPP][NT][4];
  int frames [3];

  task automatic check_link(int id, int p, int o, int slot);
    int idx = -1, bxv = 0;
    forever begin
      @(negedge clk);
      if (is_header(link_out[p][o])) begin
        bxv = int'(link_out[p][o].d[11:0]); idx = 0;
        checks++;
        if (bxv % 10 != slot) begin failures++; $display("FAIL pp %0d out %0d bx %0d", p, o, bxv); end
      end else if (idx >= 0 && idx < NT) begin
        checks++;
        if (link_out[p][o].d != pat[p][idx][bxv & 3]) begin
          failures++; $display("FAIL pp %0d out %0d tower %0d", p, o, idx);
        end
        idx++;
        if (idx == NT) frames[id]++;
      end else idx = -1;
    end
  endtask

  logic [31:0] req[$], rsp[$];
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // patterns: one block write of 4 entries per tower
    foreach (pat[p]) begin
      if (p != 0 && p != 5) continue;
      req = {};
      for (int t = 0; t < NT; t++) begin
        req.push_back(hdr(t, 4, 4));
        req.push_back(32'h0100_0000 | (p << 17) | (t << 11));
        for (int a = 0; a < 4; a++) begin pat[p][t][a] = 16'($urandom); req.push_back(32'(pat[p][t][a])); end
      end
      xfer(req, rsp);
      checks++;
      if (rsp.size() != NT || rsp[0] != hdr(0, 4, 4)) begin failures++; $display("FAIL pattern write reply"); end
    end
    // read back tower 9 of PP 5
    xfer('{hdr(1, 4, 3), 32'h0100_0000 | (5 << 17) | (9 << 11)}, rsp);
    for (int a = 0; a < 4; a++) begin
      checks++;
      if (rsp.size() != 5 || rsp[1 + a] != 32'(pat[5][9][a])) begin failures++; $display("FAIL readback %0d", a); end
    end
    // configuration: mask 3, output 1 -> slot 7, output 10 -> slot 1, outputs 0..10 on
    xfer('{hdr(2, 1, 4), 32'h1, 32'h3,
           hdr(3, 2, 4), 32'h2, 32'h7654_3270, 32'h0000_0198,
           hdr(4, 1, 4), 32'h4, 32'h7FF,
           hdr(5, 4, 3), 32'h1}, rsp);
    checks++;
    if (rsp.size() != 8 || rsp[4] != 32'h3 || rsp[5] != 32'h7654_3270 || rsp[6] != 32'h198 || rsp[7] != 32'h7FF) begin
      failures++; $display("FAIL register readback");
    end
    xfer('{hdr(6, 1, 4), 32'h0, 32'h1}, rsp);
    fork
      check_link(0, 0, 0, 0);
      check_link(1, 5, 1, 7);
      check_link(2, 5, 10, 1);
    join_none
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      bx_strobe = 1; bx = 12'(n); tm_slot = 4'(n % 10);
      @(negedge clk) bx_strobe = 0;
      repeat (4) @(negedge clk);
    end
    repeat (70) @(negedge clk);
    checks++;
    if (frames[0] < 25 || frames[1] < 25 || frames[2] < 25) begin
      failures++; $display("FAIL frames %0d %0d %0d", frames[0], frames[1], frames[2]);
    end
    $display("frames %0d %0d %0d", frames[0], frames[1], frames[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
