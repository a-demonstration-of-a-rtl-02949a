// tb_daq_capture: streams events of random length (header with bx, then data
// words tagged with event number and word index) into the DAQ capture and
// sends Level-1 accepts with a fixed latency. Checks that the calculated
// trigger bx finds the right event (including across the orbit wrap), that
// every captured word and the length are right, and that a trigger for a bx
// that is not stored, one that arrives while a capture is held, and one for
// an event already overwritten in the ring are counted as misses.
module tb_daq_capture;
  import tmt_pkg::*;
  localparam int W = 32, RD = 256, NEV = 8, CD = 32, LAT = 25;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  logic in_valid = 0, in_sof = 0, l1a = 0, rearm = 0;
  logic [11:0] in_bx = 0, bx_now = 0, l1a_latency = 12'(LAT);
  logic [W-1:0] in_data = 0, rd_data;
  logic [4:0] rd_addr = 0;
  logic captured;
  logic [11:0] cap_bx;
  logic [5:0] cap_len;
  logic [15:0] found_cnt, miss_cnt;
  int checks = 0, failures = 0;

  daq_capture #(.W(W), .RING_DEPTH(RD), .N_EV(NEV), .CAP_DEPTH(CD)) dut (
    .clk, .rst, .in_valid, .in_sof, .in_bx, .in_data, .l1a, .bx_now, .l1a_latency, .rearm,
    .rd_addr, .rd_data, .captured, .cap_bx, .cap_len, .found_cnt, .miss_cnt);

  int ev_len [int];

  task automatic send_event(int k, int bx, int len);
    @(negedge clk); in_valid = 1; in_sof = 1; in_bx = 12'(bx);
    for (int i = 0; i < len; i++) begin
      @(negedge clk); in_sof = 0; in_data = {16'(k), 16'(i)};
    end
    @(negedge clk); in_valid = 0;
    ev_len[bx] = len;
  endtask

  task automatic trigger(int bx_event);
    // current bx chosen so that bx_now - LAT (mod 3564) = bx_event
    @(negedge clk);
    bx_now = 12'((bx_event + LAT) % 3564);
    l1a = 1;
    @(negedge clk); l1a = 0;
  endtask

  task automatic expect_capture(int k, int bx);
    int t = 0;
    while (!captured && t < 200) begin @(negedge clk); t++; end
    checks += 2;
    if (!captured || cap_bx != 12'(bx)) begin failures++; $display("FAIL no capture of bx %0d", bx); return; end
    if (cap_len != 6'(ev_len[bx] > CD ? CD : ev_len[bx])) begin failures++; $display("FAIL len %0d", cap_len); end
    for (int i = 0; i < cap_len; i++) begin
      @(negedge clk); rd_addr = 5'(i);
      @(negedge clk);
      checks++;
      if (rd_data != {16'(k), 16'(i)}) begin failures++; $display("FAIL word %0d: %h", i, rd_data); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // events 0..5, bx 3543, 3553, 3563, 9, 19, 29 (orbit wrap)
    for (int k = 0; k < 6; k++) send_event(k, (3543 + 10 * k) % 3564, 5 + 3 * k);
    trigger(3563);                       // event 2, trigger bx across the wrap
    expect_capture(2, 3563);
    trigger(19);                         // held capture: miss
    repeat (50) @(negedge clk);
    checks++;
    if (miss_cnt != 1 || found_cnt != 1) begin failures++; $display("FAIL counts %0d %0d", found_cnt, miss_cnt); end
    @(negedge clk) rearm = 1;
    @(negedge clk) rearm = 0;
    trigger(19);                         // event 4
    expect_capture(4, 19);
    @(negedge clk) rearm = 1;
    @(negedge clk) rearm = 0;
    trigger(100);                        // not stored: miss
    repeat (50) @(negedge clk);
    checks++;
    if (miss_cnt != 2 || captured) begin failures++; $display("FAIL miss not counted"); end
    // fill the ring so that event 0 is overwritten; 40-word events are cut to 32
    for (int k = 6; k < 14; k++) send_event(k, 100 + 10 * k, 40);
    trigger(3543);                       // event 0: table entry reused -> miss
    repeat (50) @(negedge clk);
    checks++;
    if (miss_cnt != 3) begin failures++; $display("FAIL overwritten event not a miss"); end
    trigger(100 + 10 * 12);              // event 12, cut to CD words
    expect_capture(12, 220);
    $display("found %0d missed %0d", found_cnt, miss_cnt);
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
