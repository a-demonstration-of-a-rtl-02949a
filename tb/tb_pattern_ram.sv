// tb_pattern_ram: fills the 2048 x 16 pattern BRAM with random words through
// port A, then reads every entry back on port B (playback) and port A, each
// one cycle after the address, while writing new words: checks the read
// latency and that a write does not disturb the playback port.
module tb_pattern_ram;
  logic clk = 0;
  always #2 clk = ~clk;
  logic we_a = 0;
  logic [10:0] addr_a = 0, addr_b = 0;
  logic [15:0] wdata_a = 0, rdata_a, rdata_b;
  logic [15:0] model [2048];
  int checks = 0, failures = 0;

  pattern_ram dut (.clk, .we_a, .addr_a, .wdata_a, .rdata_a, .addr_b, .rdata_b);

  initial begin
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk);
      we_a = 1; addr_a = 11'(i); wdata_a = 16'($urandom); model[i] = wdata_a;
    end
    @(negedge clk); we_a = 0;
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk);
      addr_b = 11'(i); addr_a = 11'(2047 - i);
      @(negedge clk);
      checks += 2;
      if (rdata_b != model[i]) begin failures++; $display("FAIL B %0d", i); end
      if (rdata_a != model[2047 - i]) begin failures++; $display("FAIL A %0d", i); end
    end
    // write on A while B plays back another entry
    for (int i = 0; i < 200; i++) begin
      int a, b;
      a = $urandom_range(0, 2047);
      b = $urandom_range(0, 2047);
      @(negedge clk);
      if (a == b) b = (b + 1) % 2048;
      we_a = 1; addr_a = 11'(a); wdata_a = 16'($urandom); addr_b = 11'(b);
      model[a] = wdata_a;
      @(negedge clk);
      we_a = 0;
      checks++;
      if (rdata_b != model[b]) failures++;
    end
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
