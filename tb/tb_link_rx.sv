// tb_link_rx: sends 60 frames (header, 56 towers, CRC, idles) built here with
// an independent CRC-16/CCITT into the link receiver. Every 7th frame has a
// corrupted CRC word and every 11th frame is cut by a K word after 20 towers.
// Checks: the header's bx and every tower come out one cycle after they went
// in, the error counter equals the number of bad frames and the good-frame
// counter the number of clean ones.
module tb_link_rx;
  import tmt_pkg::*;
  localparam int NT = 56;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  link_word_t rx;
  logic out_valid, out_sof;
  logic [15:0] out_data;
  logic [31:0] err_cnt, frames;
  int checks = 0, failures = 0;
  int n_bad = 0, n_good = 0;

  link_rx dut (.clk, .rst, .rx, .out_valid, .out_sof, .out_data, .err_cnt, .frames);

  // expected output stream, one entry per word that must come out
  typedef struct { logic sof; logic [15:0] d; } exp_t;
  exp_t q[$];
  exp_t ev;
  logic [15:0] v;

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

  always @(negedge clk) if (!rst && out_valid) begin
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
    else begin
      exp_t e;
      e = q.pop_front();
      if (e.sof != out_sof || e.d != out_data) begin
        failures++; $display("FAIL got sof %0d %h expected %0d %h", out_sof, out_data, e.sof, e.d);
      end
    end
  end

  initial begin
    rx = LINK_IDLE;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 60; f++) begin
      logic [15:0] tw[$];
      int bxv;
      bit cut, bad;
      tw = {};
      bxv = (f * 10 + 3) % 3564;
      cut = (f % 11 == 5);
      bad = (f % 7 == 3) && !cut;
      @(negedge clk); rx = '{k: 1'b1, d: {4'hF, 12'(bxv)}};
      ev.sof = 1'b1; ev.d = 16'(bxv);
      q.push_back(ev);
      for (int t = 0; t < NT; t++) begin
        @(negedge clk);
        if (cut && t == 20) begin rx = LINK_IDLE; break; end
        v = 16'($urandom);
        rx = '{k: 1'b0, d: v};
        tw.push_back(v);
        ev.sof = 1'b0; ev.d = v;
        q.push_back(ev);
      end
      if (!cut) begin
        @(negedge clk); rx = '{k: 1'b0, d: crc_ref(tw) ^ (bad ? 16'h0100 : 16'h0)};
      end
      if (cut || bad) n_bad++; else n_good++;
      repeat (2) begin @(negedge clk); rx = LINK_IDLE; end
    end
    repeat (5) @(negedge clk);
    checks += 3;
    if (err_cnt != 32'(n_bad)) begin failures++; $display("FAIL err_cnt %0d expected %0d", err_cnt, n_bad); end
    if (frames != 32'(n_good)) begin failures++; $display("FAIL frames %0d expected %0d", frames, n_good); end
    if (q.size() != 0) begin failures++; $display("FAIL %0d words missing", q.size()); end
    $display("bad frames %0d good frames %0d", n_bad, n_good);
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
