// tb_bx_timing: checks the bx counter against a count of clock edges kept here.
// Over two full orbits every cycle is compared: sub = cycle mod 6, strobe on
// sub 0, bx = (cycle / 6) mod 3564, tm_slot = (cycle / 6) mod 10.
module tb_bx_timing;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  logic bx_strobe;
  logic [2:0] sub;
  logic [11:0] bx;
  logic [3:0] tm_slot;
  int checks = 0, failures = 0;
  int orbit_wraps = 0;

  bx_timing dut (.clk, .rst, .bx_strobe, .sub, .bx, .tm_slot);

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    // cycle n = number of clock edges since reset was released
    for (int cyc = 1; cyc < 2 * 3564 * 6 + 50; cyc++) begin
      @(negedge clk);
      checks++;
      if (sub != 3'(cyc % 6) || bx_strobe != (cyc % 6 == 0) ||
          bx != 12'((cyc / 6) % 3564) || tm_slot != 4'((cyc / 6) % 10)) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: sub %0d bx %0d slot %0d", cyc, sub, bx, tm_slot);
      end
      if (cyc > 0 && cyc % (3564 * 6) == 0) begin
        orbit_wraps++;
        checks++;
        if (bx != 0) failures++;
      end
    end
    checks++;
    if (orbit_wraps != 2) failures++;
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
