// pattern_ram: one dual-port block RAM of the detector simulator.
//
// In the demonstrator there are no detector links; each Pre Processor plays
// back tower data stored in 32 kbit block RAMs, all read out simultaneously.
// One instance holds DEPTH entries of one tower (2048 x 16 bit = 32 kbit).
// Port A belongs to the control bus (write, and read back one cycle later);
// port B is the playback port, read every cycle with one cycle of latency.
// The memory is not reset: it must be written before it is played back.
module pattern_ram #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned WIDTH = tmt_pkg::TOWER_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we_a,
  input  logic [AW-1:0]    addr_a,
  input  logic [WIDTH-1:0] wdata_a,
  output logic [WIDTH-1:0] rdata_a,
  input  logic [AW-1:0]    addr_b,
  output logic [WIDTH-1:0] rdata_b
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= wdata_a;
    rdata_a <= mem[addr_a];
  end

  always_ff @(posedge clk) rdata_b <= mem[addr_b];
endmodule
