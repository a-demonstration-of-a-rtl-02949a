// time_multiplexer: the Pre Processor's time multiplexer.
//
// Every bunch crossing the towers of this Pre Processor are captured into the
// buffer of the round-robin slot that owns that bx (slot = bx counted modulo
// TM_PERIOD). Each slot buffer then sends its event as one frame over the
// following TM_PERIOD bx (FRAME_LEN = TM_PERIOD*WORDS_PER_BX link words), so
// TM_PERIOD frames are in flight at once, staggered by one bx. A frame is:
//   word 0            header: K flag, 4'hF and the 12-bit bx number
//   words 1..N_TOWERS the towers, one per word, in tower (eta) order
//   word N_TOWERS+1   CRC-16/CCITT over the tower words
//   remaining words   idle K words
// With 56 towers and 6 words per bx the data take 9.33 bx of the 10, the rest
// carries the header (the alignment comma) and the CRC, as the demonstrator does.
//
// The slot sent on each of the N_OUT physical outputs is chosen by out_map
// (and out_en), so a spare Main Processor node can be given the bx of a
// failed one while the system runs: the change takes effect on the next word.
// Timing: capture is a one-cycle strobe with tower_in, bx_in and slot_in
// valid; the header of that event leaves link_out two cycles later.
// The slot map and the frame layout are this design's choices.
module time_multiplexer
  import tmt_pkg::*;
#(
  parameter int unsigned N_TOWERS     = tmt_pkg::N_ETA,
  parameter int unsigned TM_PERIOD    = tmt_pkg::TM_PERIOD,
  parameter int unsigned N_OUT        = tmt_pkg::N_TM_OUT,
  parameter int unsigned WORDS_PER_BX = tmt_pkg::WORDS_PER_BX,
  localparam int unsigned FRAME_LEN   = TM_PERIOD * WORDS_PER_BX
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                capture,
  input  logic [BX_W-1:0]     bx_in,
  input  logic [3:0]          slot_in,
  input  logic [TOWER_W-1:0]  tower_in [N_TOWERS],
  input  logic [3:0]          out_map  [N_OUT],
  input  logic [N_OUT-1:0]    out_en,
  output link_word_t          link_out [N_OUT]
);
  localparam int unsigned IW = $clog2(FRAME_LEN + 1);

  logic [TOWER_W-1:0] buf_q  [TM_PERIOD][N_TOWERS];
  logic [BX_W-1:0]    bx_q   [TM_PERIOD];
  logic [IW-1:0]      idx_q  [TM_PERIOD];
  logic [15:0]        crc_q  [TM_PERIOD];
  logic               live_q [TM_PERIOD];
  link_word_t         slot_word [TM_PERIOD];

  // Word each slot puts on the wire this cycle.
  always_comb begin
    for (int s = 0; s < TM_PERIOD; s++) begin
      if (!live_q[s] || idx_q[s] > IW'(N_TOWERS + 1))
        slot_word[s] = LINK_IDLE;
      else if (idx_q[s] == '0)
        slot_word[s] = link_header(bx_q[s]);
      else if (idx_q[s] == IW'(N_TOWERS + 1))
        slot_word[s] = '{k: 1'b0, d: crc_q[s]};
      else
        slot_word[s] = '{k: 1'b0, d: buf_q[s][0]};
    end
  end

  for (genvar s = 0; s < TM_PERIOD; s++) begin : g_slot
    always_ff @(posedge clk) begin
      if (rst) begin
        live_q[s] <= 1'b0;
        idx_q[s]  <= IW'(FRAME_LEN);
        crc_q[s]  <= CRC_INIT;
        bx_q[s]   <= '0;
      end else if (capture && slot_in == 4'(s)) begin
        live_q[s] <= 1'b1;
        idx_q[s]  <= '0;
        crc_q[s]  <= CRC_INIT;
        bx_q[s]   <= bx_in;
      end else if (idx_q[s] < IW'(FRAME_LEN)) begin
        idx_q[s] <= idx_q[s] + 1'b1;
        if (idx_q[s] >= IW'(1) && idx_q[s] <= IW'(N_TOWERS))
          crc_q[s] <= crc16_word(crc_q[s], buf_q[s][0]);
      end
    end

    // Tower buffer: loaded on capture, shifted one tower per word while sending.
    always_ff @(posedge clk) begin
      if (capture && slot_in == 4'(s)) begin
        buf_q[s] <= tower_in;
      end else if (idx_q[s] >= IW'(1) && idx_q[s] <= IW'(N_TOWERS)) begin
        for (int t = 0; t < N_TOWERS - 1; t++) buf_q[s][t] <= buf_q[s][t+1];
        buf_q[s][N_TOWERS-1] <= '0;
      end
    end
  end

  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    always_ff @(posedge clk) begin
      if (rst || !out_en[o] || out_map[o] >= 4'(TM_PERIOD)) link_out[o] <= LINK_IDLE;
      else                                                 link_out[o] <= slot_word[out_map[o]];
    end
  end
endmodule
