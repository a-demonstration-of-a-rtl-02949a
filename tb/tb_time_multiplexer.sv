// tb_time_multiplexer: drives one random event per bx into the time
// multiplexer and decodes three of its outputs with an independent frame
// checker: header with the right bx, exactly two cycles after capture, on the
// output whose slot owns that bx (bx count mod 10), the 56 towers in order,
// then the CRC-16/CCITT computed here. Halfway through, output 1 is switched
// to slot 5 and the spare output 10 is enabled on slot 1 (a spare node taking
// over); the checker resynchronises on the next header and expects the new
// mapping. It also checks that a disabled output sends only idle words.
module tb_time_multiplexer;
  import tmt_pkg::*;
  localparam int NT = 56, NO = 12;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  logic capture = 0;
  logic [11:0] bx_in = 0;
  logic [3:0] slot_in = 0;
  logic [15:0] tower_in [NT];
  logic [3:0] out_map [NO];
  logic [NO-1:0] out_en;
  link_word_t link_out [NO];
  int checks = 0, failures = 0;

  time_multiplexer dut (.clk, .rst, .capture, .bx_in, .slot_in, .tower_in, .out_map, .out_en, .link_out);

  logic [15:0] ev [int][NT];
  int cap_cyc [int];
  int cyc = 0;
  int frames_ok [NO];
  bit swapped = 0;
  int swap_cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

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

  function automatic int exp_slot(int o, int bx);
    if (!swapped) return o;
    if (o == 1) return 5;
    if (o == 10) return 1;
    return o;
  endfunction

  // frame checker for output o
  task automatic check_output(int o);
    int idx = -1, bxv = 0;
    logic [15:0] seen[$];
    forever begin
      @(negedge clk);
      if (swapped && cyc == swap_cyc + 1) idx = -1;
      if (is_header(link_out[o])) begin
        bxv = int'(link_out[o].d[11:0]);
        idx = 1; seen = {};
        checks++;
        if (!cap_cyc.exists(bxv) || cyc - cap_cyc[bxv] != 2 || (bxv % 10) != exp_slot(o, bxv)) begin
          failures++;
          $display("FAIL out %0d header bx %0d at cycle %0d", o, bxv, cyc);
        end
      end else if (idx >= 1 && idx <= NT) begin
        checks++;
        if (link_out[o].k || link_out[o].d != ev[bxv][idx-1]) begin
          failures++; $display("FAIL out %0d bx %0d tower %0d", o, bxv, idx - 1);
        end
        seen.push_back(link_out[o].d);
        idx++;
      end else if (idx == NT + 1) begin
        checks++;
        if (link_out[o].k || link_out[o].d != crc_ref(seen)) begin
          failures++; $display("FAIL out %0d bx %0d crc", o, bxv);
        end else frames_ok[o]++;
        idx = -1;
      end
    end
  endtask

  initial begin
    for (int o = 0; o < NO; o++) out_map[o] = 4'(o);
    out_en = 12'h3FF;
    foreach (tower_in[t]) tower_in[t] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    fork
      check_output(0);
      check_output(1);
      check_output(10);
      begin : idle_chk
        forever begin
          @(negedge clk);
          if (!swapped) begin
            checks++;
            if (link_out[10] != LINK_IDLE) begin failures++; $display("FAIL spare not idle"); end
          end
        end
      end
    join_none
    for (int n = 0; n < 400; n++) begin
      if (n == 200) begin
        @(negedge clk);
        out_map[1] = 4'd5; out_map[10] = 4'd1; out_en[10] = 1'b1;
        swapped = 1; swap_cyc = cyc;
      end
      @(negedge clk);
      capture = 1; bx_in = 12'(n); slot_in = 4'(n % 10);
      foreach (tower_in[t]) begin tower_in[t] = 16'($urandom); ev[n][t] = tower_in[t]; end
      cap_cyc[n] = cyc;
      @(negedge clk) capture = 0;
      repeat (4) @(negedge clk);
    end
    repeat (80) @(negedge clk);
    checks += 3;
    if (frames_ok[0] < 35 || frames_ok[1] < 35 || frames_ok[10] < 15) begin
      failures++; $display("FAIL frame counts %0d %0d %0d", frames_ok[0], frames_ok[1], frames_ok[10]);
    end
    $display("frames: out0 %0d out1 %0d spare %0d", frames_ok[0], frames_ok[1], frames_ok[10]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
