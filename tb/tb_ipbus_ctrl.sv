// tb_ipbus_ctrl: self-checking test of the IPbus transaction engine.
//
// A 256-word memory acts as bus slave (ack one cycle after the strobe, an
// error for addresses 0xE0..0xEF). Packets concatenate several transactions:
// block write then block read back, single read/write, non-incrementing
// read/write on one address, a bus error, a bad header followed by junk, and a
// read request packed after a write in the same packet. Every reply word is
// compared with the expected reply built here from the request and a model of
// the memory. The reply stream is stalled at random.
module tb_ipbus_ctrl;
  import tmt_pkg::*;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  logic [31:0] in_data = '0, out_data;
  logic in_valid = 0, in_last = 0, in_ready, out_valid, out_last, out_ready;
  ipb_wbus_t wbus;
  ipb_rbus_t rbus;
  int checks = 0, failures = 0;

  ipbus_ctrl dut (.clk, .rst, .in_data, .in_valid, .in_last, .in_ready,
                  .out_data, .out_valid, .out_last, .out_ready, .wbus, .rbus);

  // slave memory
  logic [31:0] mem [256];
  logic [31:0] model [256];
  always_ff @(posedge clk) begin
    rbus.ack <= 1'b0; rbus.err <= 1'b0;
    if (wbus.strobe && !rbus.ack && !rbus.err) begin
      if (wbus.addr[7:4] == 4'hE) rbus.err <= 1'b1;
      else begin
        rbus.ack <= 1'b1;
        if (wbus.write) mem[wbus.addr[7:0]] <= wbus.wdata;
        rbus.rdata <= mem[wbus.addr[7:0]];
      end
    end
  end

  always @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  function automatic logic [31:0] hdr(int tid, int n, int t, int info = 0);
    return {4'h1, 11'(tid), 9'(n), 5'(t), 3'(info)};
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

  task automatic compare(input string what, input logic [31:0] got[$], input logic [31:0] exp[$]);
    checks++;
    if (got.size() != exp.size()) begin
      failures++; $display("FAIL %s: %0d reply words, expected %0d", what, got.size(), exp.size());
      return;
    end
    foreach (exp[i]) begin
      checks++;
      if (got[i] !== exp[i]) begin
        failures++; $display("FAIL %s word %0d: %h expected %h", what, i, got[i], exp[i]);
      end
    end
  endtask

  logic [31:0] req[$], rsp[$], exp[$];
  initial begin
    for (int i = 0; i < 256; i++) begin mem[i] = i * 7; model[i] = i * 7; end
    repeat (4) @(posedge clk);
    rst = 0;

    // 1: block write of 8 words at 0x10, then block read of 10 words at 0x0E
    req = {hdr(1, 8, 4), 32'h10};
    exp = {hdr(1, 8, 4)};
    for (int i = 0; i < 8; i++) begin
      logic [31:0] v = $urandom; req.push_back(v); model[16 + i] = v;
    end
    req.push_back(hdr(2, 10, 3)); req.push_back(32'h0E);
    exp.push_back(hdr(2, 10, 3));
    for (int i = 0; i < 10; i++) exp.push_back(model[14 + i]);
    xfer(req, rsp); compare("block write+read", rsp, exp);

    // 2: non-incrementing write of 3 words (last one stays), non-incr read of 2
    req = {hdr(3, 3, 9), 32'h40, 32'hA, 32'hB, 32'hC, hdr(4, 2, 8), 32'h40, hdr(5, 1, 3), 32'h41};
    model[64] = 32'hC;
    exp = {hdr(3, 3, 9), hdr(4, 2, 8), 32'hC, 32'hC, hdr(5, 1, 3), model[65]};
    xfer(req, rsp); compare("non-incrementing", rsp, exp);

    // 3: write into the error region gives info code 1
    req = {hdr(6, 1, 4), 32'hE3, 32'h1234};
    exp = {hdr(6, 1, 4, 1)};
    xfer(req, rsp); compare("bus error", rsp, exp);

    // 4: bad header, rest of the packet discarded
    req = {hdr(7, 1, 5'h1F), 32'h20, 32'h55, 32'h66};
    exp = {hdr(7, 1, 5'h1F, 2)};
    xfer(req, rsp); compare("bad header", rsp, exp);

    // 5: the memory is untouched by the bad packet; read 4 words at 0x1E..0x21
    req = {hdr(8, 4, 3), 32'h1E};
    exp = {hdr(8, 4, 3), model[30], model[31], model[32], model[33]};
    xfer(req, rsp); compare("read back", rsp, exp);

    // 6: truncated write (packet ends after 2 of 4 data words)
    req = {hdr(9, 4, 4), 32'h50, 32'h1, 32'h2};
    model[80] = 32'h1; model[81] = 32'h2;
    exp = {hdr(9, 4, 4, 2)};
    xfer(req, rsp); compare("truncated", rsp, exp);
    req = {hdr(10, 2, 3), 32'h50};
    exp = {hdr(10, 2, 3), 32'h1, 32'h2};
    xfer(req, rsp); compare("after truncated", rsp, exp);

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
