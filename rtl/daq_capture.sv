// daq_capture: event capture for readout, used before and after the algorithm.
//
// A conventional pipeline memory keeps every bx and reads out the one a fixed
// time before the trigger. Here a node only sees one bx in TM_PERIOD, and
// events arrive with varying length and latency, so this block works the
// other way round: it writes every word of every event into a ring buffer and
// notes, per event, its bx and where it starts in a table of N_EV entries.
// When a Level-1 accept (l1a) arrives it calculates the triggered bx as the
// current bx minus l1a_latency (modulo the orbit), then steps through the
// table, one entry per cycle, looking for a complete event of that bx that is
// still in the ring. If found, the event (up to CAP_DEPTH words) is copied to
// a capture buffer that the control bus reads; the buffer is held until
// rearm. found_cnt and miss_cnt count the outcomes (a miss is the normal
// result when the triggered bx belongs to another node). A trigger that
// arrives while a search or copy is under way, or while a capture is held, is
// counted as a miss.
// Input stream: in_valid with in_sof=1 and in_bx marks the start of an event
// (no data stored); in_valid with in_sof=0 stores in_data. An event is complete
// once the next one has started. Capture buffer read: rd_data is cap[rd_addr]
// one cycle later. The table search and the ring sizes are this design's own.
module daq_capture
  import tmt_pkg::*;
#(
  parameter int unsigned W          = 384,
  parameter int unsigned RING_DEPTH = 1024,
  parameter int unsigned N_EV       = 32,
  parameter int unsigned CAP_DEPTH  = 64,
  parameter int unsigned ORBIT_BX   = tmt_pkg::ORBIT_BX,
  localparam int unsigned RAW = $clog2(RING_DEPTH),
  localparam int unsigned EAW = $clog2(N_EV),
  localparam int unsigned CAW = $clog2(CAP_DEPTH)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            in_valid,
  input  logic            in_sof,
  input  logic [BX_W-1:0] in_bx,
  input  logic [W-1:0]    in_data,
  input  logic            l1a,
  input  logic [BX_W-1:0] bx_now,
  input  logic [BX_W-1:0] l1a_latency,
  input  logic            rearm,
  input  logic [CAW-1:0]  rd_addr,
  output logic [W-1:0]    rd_data,
  output logic            captured,
  output logic [BX_W-1:0] cap_bx,
  output logic [CAW:0]    cap_len,
  output logic [15:0]     found_cnt,
  output logic [15:0]     miss_cnt
);
  typedef struct packed {
    logic            valid;
    logic            done;
    logic [BX_W-1:0] bx;
    logic [31:0]     start;
    logic [31:0]     stop;
  } ev_t;

  logic [W-1:0] ring [RING_DEPTH];
  logic [W-1:0] cap  [CAP_DEPTH];
  ev_t          tab  [N_EV];
  logic [31:0]  wr_ptr;
  logic [EAW-1:0] ev_wr, ev_last;
  logic         any_ev;

  typedef enum logic [1:0] { S_IDLE, S_SEARCH, S_COPY } state_t;
  state_t          state;
  logic [BX_W-1:0] tbx;
  logic [EAW-1:0]  si;
  logic [31:0]     rp;
  logic [CAW:0]    n_rd, len;
  logic            wr_pend;
  logic [CAW-1:0]  wr_idx;
  logic [W-1:0]    ring_q;
  logic [BX_W-1:0] trig_bx;
  ev_t             e;

  assign trig_bx = (bx_now >= l1a_latency) ? bx_now - l1a_latency
                                           : BX_W'(ORBIT_BX) - (l1a_latency - bx_now);
  assign e = tab[si];

  // Ring buffer and event table.
  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr  <= '0;
      ev_wr   <= '0;
      ev_last <= '0;
      any_ev  <= 1'b0;
      for (int i = 0; i < N_EV; i++) tab[i] <= '0;
    end else if (in_valid) begin
      if (in_sof) begin
        if (any_ev) begin
          tab[ev_last].done <= 1'b1;
          tab[ev_last].stop <= wr_ptr;
        end
        tab[ev_wr] <= '{valid: 1'b1, done: 1'b0, bx: in_bx, start: wr_ptr, stop: wr_ptr};
        ev_last <= ev_wr;
        ev_wr   <= ev_wr + 1'b1;
        any_ev  <= 1'b1;
      end else begin
        ring[wr_ptr[RAW-1:0]] <= in_data;
        wr_ptr <= wr_ptr + 1'b1;
      end
    end
  end

  // Search and copy.
  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      captured  <= 1'b0;
      cap_bx    <= '0;
      cap_len   <= '0;
      found_cnt <= '0;
      miss_cnt  <= '0;
      tbx       <= '0;
      si        <= '0;
      rp        <= '0;
      n_rd      <= '0;
      len       <= '0;
      wr_pend   <= 1'b0;
      wr_idx    <= '0;
    end else begin
      if (rearm) captured <= 1'b0;
      wr_pend <= 1'b0;
      if (l1a && (state != S_IDLE || captured)) miss_cnt <= miss_cnt + 1'b1;
      case (state)
        S_IDLE: if (l1a && !captured) begin
          tbx   <= trig_bx;
          si    <= '0;
          state <= S_SEARCH;
        end
        S_SEARCH: begin
          if (e.valid && e.done && e.bx == tbx && (wr_ptr - e.start) <= 32'(RING_DEPTH)) begin
            rp    <= e.start;
            len   <= ((e.stop - e.start) > 32'(CAP_DEPTH)) ? (CAW+1)'(CAP_DEPTH) : (CAW+1)'(e.stop - e.start);
            n_rd  <= '0;
            cap_bx <= e.bx;
            state <= S_COPY;
          end else if (si == EAW'(N_EV - 1)) begin
            miss_cnt <= miss_cnt + 1'b1;
            state    <= S_IDLE;
          end
          si <= si + 1'b1;
        end
        S_COPY: begin
          if (n_rd < len) begin
            wr_pend <= 1'b1;
            wr_idx  <= CAW'(n_rd);
            rp      <= rp + 1'b1;
            n_rd    <= n_rd + 1'b1;
          end else if (!wr_pend) begin
            captured  <= 1'b1;
            cap_len   <= len;
            found_cnt <= found_cnt + 1'b1;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    ring_q <= ring[rp[RAW-1:0]];
    if (wr_pend) cap[wr_idx] <= ring_q;
    rd_data <= cap[rd_addr];
  end
endmodule
