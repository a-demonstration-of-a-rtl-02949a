// tmt_pkg: constants and types shared by the time-multiplexed trigger.
//
// The trigger receives calorimeter trigger primitives for a grid of 56 towers
// in eta and 72 in phi. Every bunch crossing (bx, 25 ns) the Pre Processors
// capture their towers and re-transmit them to one of TM_PERIOD Main Processor
// nodes in round robin, so that one node sees a whole event. The demonstrator
// time-multiplexes along eta: one Pre Processor holds one phi column of 56
// towers, and a Main Processor receives 24 such columns.
//
// Clocking: everything runs on one link-rate clock of WORDS_PER_BX cycles per
// bx (6 x 40 MHz = 240 MHz). A link carries one 16-bit word plus a control
// flag (the K flag of 8b/10b) per cycle, i.e. 3.84 Gb/s of payload, 4.8 Gb/s
// on the line. The clock ratio, the word width and the CRC polynomial are this
// design's choices; the grid size, 16 bits per tower and the 10-bx period are
// the demonstrator's.
package tmt_pkg;

  localparam int unsigned N_ETA        = 56;   // towers along eta
  localparam int unsigned N_PHI_TOTAL  = 72;   // towers along phi (whole detector)
  localparam int unsigned TOWER_W      = 16;   // bits per tower in the demonstrator
  localparam int unsigned TM_PERIOD    = 10;   // bx per time-multiplex period
  localparam int unsigned N_TM_OUT     = 12;   // 10 round-robin nodes + 2 spares
  localparam int unsigned WORDS_PER_BX = 6;    // link words per bx
  localparam int unsigned FRAME_LEN    = TM_PERIOD * WORDS_PER_BX;  // 60 words
  localparam int unsigned ORBIT_BX     = 3564; // bx per LHC orbit
  localparam int unsigned BX_W         = 12;

  // Link frame layout (word index inside a frame)
  localparam int unsigned FR_HDR = 0;          // header: K flag, 4'hF, bx number
  localparam int unsigned FR_CRC = N_ETA + 1;  // CRC-16 over the tower words
  localparam logic [3:0]  HDR_MARK  = 4'hF;
  localparam logic [15:0] IDLE_CODE = 16'h50BC; // K word sent outside frames
  localparam logic [15:0] CRC_INIT  = 16'hFFFF;

  // Tower word: ECAL 8-bit energy plus its feature bit, HCAL compressed to 7.
  typedef struct packed {
    logic [6:0] hcal;
    logic       fg;
    logic [7:0] ecal;
  } tower_t;

  // One serial-link word as seen on the parallel side of the SerDes.
  typedef struct packed {
    logic        k;   // control (comma) word
    logic [15:0] d;
  } link_word_t;

  localparam link_word_t LINK_IDLE = '{k: 1'b1, d: IDLE_CODE};

  // e/gamma candidate: energy, eta index and local phi index.
  typedef struct packed {
    logic [8:0] et;
    logic [5:0] eta;
    logic [6:0] phi;
  } eg_cand_t;

  // Word on an output link to the Global Trigger.
  typedef struct packed {
    logic        k;
    logic [31:0] d;
  } gt_word_t;

  localparam logic [1:0] GT_IDLE = 2'b00, GT_CAND = 2'b01, GT_SUMS = 2'b10;
  localparam logic [7:0] GT_HDR_MARK = 8'hBC;

  // Simple SoC bus driven by the IPbus controller (master -> slave, slave -> master).
  typedef struct packed {
    logic [31:0] addr;
    logic [31:0] wdata;
    logic        strobe;
    logic        write;
  } ipb_wbus_t;

  typedef struct packed {
    logic [31:0] rdata;
    logic        ack;
    logic        err;
  } ipb_rbus_t;

  localparam ipb_rbus_t IPB_RBUS_NULL = '{rdata: '0, ack: 1'b0, err: 1'b0};

  // CRC-16/CCITT (x^16 + x^12 + x^5 + 1), MSB first, one 16-bit word per call.
  function automatic logic [15:0] crc16_word(input logic [15:0] crc, input logic [15:0] data);
    logic [15:0] c;
    c = crc;
    for (int i = 15; i >= 0; i--) begin
      if (c[15] ^ data[i]) c = {c[14:0], 1'b0} ^ 16'h1021;
      else                 c = {c[14:0], 1'b0};
    end
    return c;
  endfunction

  function automatic link_word_t link_header(input logic [BX_W-1:0] bx);
    return '{k: 1'b1, d: {HDR_MARK, bx}};
  endfunction

  function automatic logic is_header(input link_word_t w);
    return w.k && (w.d[15:12] == HDR_MARK);
  endfunction

endpackage
