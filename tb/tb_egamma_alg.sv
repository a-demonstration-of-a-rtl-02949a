// tb_egamma_alg: feeds 30 random events (8 phi x 16 eta, small energies with
// frequent ties so that plateaus occur) into the e/gamma finder and compares
// every judged column with a reference written here: the candidate mask, each
// candidate's energy, eta and phi, the header bx, the end-of-event total
// energy, and the timing: column e is judged on the cycle after column e+1
// arrives, the last column two cycles after it arrives, the sums one later.
module tb_egamma_alg;
  import tmt_pkg::*;
  localparam int NP = 8, NE = 16;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  logic [7:0] threshold = 8'd4;
  logic in_valid = 0, in_sof = 0;
  logic [11:0] in_bx = 0;
  logic [15:0] in_towers [NP];
  logic hdr_valid, col_valid, eoe_valid;
  logic [11:0] hdr_bx, eoe_bx;
  logic [5:0] col_eta;
  logic [NP-1:0] cand_mask;
  eg_cand_t cands [NP];
  logic [23:0] total_et;
  int checks = 0, failures = 0, n_cands = 0;

  egamma_alg #(.N_PHI(NP), .N_ETA(NE)) dut (.clk, .rst, .threshold, .in_valid, .in_sof, .in_bx, .in_towers,
    .hdr_valid, .hdr_bx, .col_valid, .col_eta, .cand_mask, .cands, .eoe_valid, .eoe_bx, .total_et);

  int ecal [NE][NP];
  int hcal [NE][NP];
  int cyc = 0, col_in_cyc [NE];
  int cur_bx;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int E(int e, int p);
    if (e < 0 || e >= NE || p < 0 || p >= NP) return 0;
    return ecal[e][p];
  endfunction

  // output checker
  int exp_col = 0;
  always @(negedge clk) if (!rst) begin
    if (hdr_valid) begin
      checks++;
      if (hdr_bx != 12'(cur_bx)) begin failures++; $display("FAIL hdr bx"); end
      exp_col = 0;
    end
    if (col_valid) begin
      int want_cyc;
      checks++;
      want_cyc = (exp_col < NE - 1) ? col_in_cyc[exp_col + 1] + 1 : col_in_cyc[NE - 1] + 2;
      if (col_eta != 6'(exp_col) || cyc != want_cyc) begin
        failures++; $display("FAIL column %0d (expected %0d) at cycle %0d want %0d", col_eta, exp_col, cyc, want_cyc);
      end
      for (int p = 0; p < NP; p++) begin
        int c, mx;
        bit is_max;
        c = E(exp_col, p);
        is_max = (c >= 4) && (c > 0) &&
          c > E(exp_col-1, p-1) && c > E(exp_col-1, p) && c > E(exp_col-1, p+1) && c > E(exp_col, p-1) &&
          c >= E(exp_col, p+1) && c >= E(exp_col+1, p-1) && c >= E(exp_col+1, p) && c >= E(exp_col+1, p+1);
        mx = E(exp_col-1, p);
        if (E(exp_col+1, p) > mx) mx = E(exp_col+1, p);
        if (E(exp_col, p-1) > mx) mx = E(exp_col, p-1);
        if (E(exp_col, p+1) > mx) mx = E(exp_col, p+1);
        checks++;
        if (cand_mask[p] != is_max) begin
          failures++; $display("FAIL mask eta %0d phi %0d: %0d", exp_col, p, cand_mask[p]);
        end else if (is_max) begin
          n_cands++;
          checks++;
          if (cands[p].et != 9'(c + mx) || cands[p].eta != 6'(exp_col) || cands[p].phi != 7'(p)) begin
            failures++; $display("FAIL cand eta %0d phi %0d et %0d want %0d", exp_col, p, cands[p].et, c + mx);
          end
        end
      end
      exp_col++;
    end
    if (eoe_valid) begin
      int sum;
      sum = 0;
      for (int e = 0; e < NE; e++) for (int p = 0; p < NP; p++) sum += ecal[e][p] + hcal[e][p];
      checks++;
      if (total_et != 24'(sum) || eoe_bx != 12'(cur_bx) || exp_col != NE || cyc != col_in_cyc[NE-1] + 3) begin
        failures++; $display("FAIL eoe: et %0d want %0d, %0d columns", total_et, sum, exp_col);
      end
    end
  end

  initial begin
    foreach (in_towers[p]) in_towers[p] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int ev = 0; ev < 30; ev++) begin
      for (int e = 0; e < NE; e++)
        for (int p = 0; p < NP; p++) begin
          ecal[e][p] = (ev % 3 == 0) ? $urandom_range(0, 3) * 3 : $urandom_range(0, 255) & ($urandom_range(0, 1) ? 8'h0F : 8'hFF);
          hcal[e][p] = $urandom_range(0, 127);
        end
      @(negedge clk);
      cur_bx = ev * 10 + 2;
      in_valid = 1; in_sof = 1; in_bx = 12'(cur_bx);
      for (int e = 0; e < NE; e++) begin
        if (e == 5 && ev % 2 == 1) begin      // a gap inside the event
          @(negedge clk); in_sof = 0; in_valid = 0;
        end
        @(negedge clk);
        in_sof = 0; in_valid = 1;
        for (int p = 0; p < NP; p++) in_towers[p] = {7'(hcal[e][p]), 1'b0, 8'(ecal[e][p])};
        col_in_cyc[e] = cyc;
      end
      @(negedge clk); in_valid = 0;
      repeat (6) @(negedge clk);
    end
    checks++;
    if (n_cands < 30) begin failures++; $display("FAIL too few candidates %0d", n_cands); end
    $display("candidates %0d", n_cands);
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
