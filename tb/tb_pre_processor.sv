// tb_pre_processor: loads an 8-entry pattern into the 56 tower BRAMs of one
// Pre Processor through its write port (and reads some back), then runs the
// bx timing from here (6 cycles per bx, round-robin slot = bx mod 10) and
// decodes outputs 0 and 3: every frame must carry a bx owned by that output,
// start three cycles after that bx's strobe, and hold pattern entry
// (bx & 7) of every tower, in eta order. While run is low no frame may appear.
module tb_pre_processor;
  import tmt_pkg::*;
  localparam int NT = 56, NO = 12;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  logic run = 0, bx_strobe = 0, pat_we = 0;
  logic [11:0] bx = 0;
  logic [3:0] tm_slot = 0;
  logic [10:0] pattern_mask = 11'd7, pat_addr = 0;
  logic [3:0] out_map [NO];
  logic [NO-1:0] out_en = 12'h3FF;
  logic [5:0] pat_tower = 0;
  logic [15:0] pat_wdata = 0, pat_rdata;
  link_word_t link_out [NO];
  int checks = 0, failures = 0;

  pre_processor dut (.clk, .rst, .run, .bx_strobe, .bx, .tm_slot, .pattern_mask, .out_map, .out_en,
    .pat_we, .pat_tower, .pat_addr, .pat_wdata, .pat_rdata, .link_out);

  logic [15:0] pat [NT][8];
  int cyc = 0, strobe_cyc [int];
  int frames [NO];
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check_output(int o);
    int idx = -1, bxv = 0;
    forever begin
      @(negedge clk);
      if (is_header(link_out[o])) begin
        bxv = int'(link_out[o].d[11:0]);
        idx = 0;
        checks++;
        if (!run || bxv % 10 != o || !strobe_cyc.exists(bxv) || cyc - strobe_cyc[bxv] != 3) begin
          failures++; $display("FAIL out %0d header bx %0d cycle %0d", o, bxv, cyc);
        end
      end else if (idx >= 0 && idx < NT) begin
        checks++;
        if (link_out[o].d != pat[idx][bxv & 7]) begin
          failures++; $display("FAIL out %0d bx %0d tower %0d: %h want %h", o, bxv, idx, link_out[o].d, pat[idx][bxv & 7]);
        end
        idx++;
        if (idx == NT) frames[o]++;
      end else idx = -1;
    end
  endtask

  initial begin
    for (int o = 0; o < NO; o++) out_map[o] = 4'(o);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < NT; t++)
      for (int a = 0; a < 8; a++) begin
        @(negedge clk);
        pat_we = 1; pat_tower = 6'(t); pat_addr = 11'(a); pat_wdata = 16'($urandom); pat[t][a] = pat_wdata;
      end
    @(negedge clk) pat_we = 0;
    for (int i = 0; i < 20; i++) begin
      int t, a;
      t = $urandom_range(0, NT - 1); a = $urandom_range(0, 7);
      @(negedge clk); pat_tower = 6'(t); pat_addr = 11'(a);
      repeat (2) @(negedge clk);
      checks++;
      if (pat_rdata != pat[t][a]) begin failures++; $display("FAIL readback"); end
    end
    fork
      check_output(0);
      check_output(3);
    join_none
    for (int n = 0; n < 300; n++) begin
      if (n == 30) run = 1;
      @(negedge clk);
      bx_strobe = 1; bx = 12'(n); tm_slot = 4'(n % 10); strobe_cyc[n] = cyc;
      @(negedge clk) bx_strobe = 0;
      repeat (4) @(negedge clk);
    end
    repeat (70) @(negedge clk);
    checks++;
    if (frames[0] < 25 || frames[3] < 25) begin failures++; $display("FAIL frames %0d %0d", frames[0], frames[3]); end
    $display("frames %0d %0d", frames[0], frames[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
