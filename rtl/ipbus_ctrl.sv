// ipbus_ctrl: IPbus transaction engine, the control client inside each card.
//
// A control packet from the network holds many transactions back to back, so
// that one round trip (about 1 ms over Ethernet) can, for example, read every
// CRC error counter of a card. This engine walks through the packet, runs each
// transaction on a simple SoC bus (ipb_wbus_t / ipb_rbus_t) and streams the
// reply packet. The UDP/IP/Ethernet layers around it are not part of it.
//
// Packet words are 32 bit. A request transaction is a header, a base address
// and, for writes, N data words; its reply is a header and, for reads, N data
// words. Header fields (modelled loosely on IPbus 1.x, assignment chosen here):
//   [31:28] version = 1   [27:17] transaction id   [16:8] N (words)
//   [7:3]   type           [2:0]   info code (0 in requests)
// Types: 0x03 read, 0x04 write (address increments: block read/write when
// N > 1), 0x08 and 0x09 the same with a fixed address (reading or filling a
// FIFO-like port). Reply info: 0 done, 1 a bus slave signalled an error
// (writes only), 2 bad or truncated request; after a bad header the rest of
// the packet is discarded.
//
// Streams use valid/ready; in_last / out_last mark the last word of a packet.
// Bus: strobe is held with addr/write/wdata until the slave returns ack (or
// err) for one cycle; the slave must not ack twice in a row.
module ipbus_ctrl
  import tmt_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] in_data,
  input  logic        in_valid,
  input  logic        in_last,
  output logic        in_ready,
  output logic [31:0] out_data,
  output logic        out_valid,
  output logic        out_last,
  input  logic        out_ready,
  output ipb_wbus_t   wbus,
  input  ipb_rbus_t   rbus
);
  localparam logic [4:0] T_READ = 5'h03, T_WRITE = 5'h04, T_NIREAD = 5'h08, T_NIWRITE = 5'h09;

  typedef enum logic [3:0] {
    S_HDR, S_ADDR, S_WDATA, S_WBUS, S_WHDR, S_RHDR, S_RBUS, S_RDATA, S_BADHDR, S_DROP
  } state_t;

  state_t      state;
  logic [10:0] tid;
  logic [8:0]  words, cnt;
  logic [4:0]  ttype;
  logic [31:0] addr, wdata, rdata;
  logic        pkt_end, last_in, bus_err;

  logic is_read, incr, hdr_ok;
  assign is_read  = (ttype == T_READ)  || (ttype == T_NIREAD);
  assign incr     = (ttype == T_READ)  || (ttype == T_WRITE);
  assign hdr_ok   = (in_data[31:28] == 4'h1) && (in_data[2:0] == 3'b0) &&
                    (in_data[7:3] == T_READ || in_data[7:3] == T_WRITE ||
                     in_data[7:3] == T_NIREAD || in_data[7:3] == T_NIWRITE);

  function automatic logic [31:0] reply_hdr(input logic [2:0] info);
    return {4'h1, tid, words, ttype, info};
  endfunction

  always_comb begin
    in_ready  = (state == S_HDR) || (state == S_ADDR) || (state == S_WDATA) || (state == S_DROP);
    out_valid = 1'b0;
    out_last  = 1'b0;
    out_data  = '0;
    case (state)
      S_WHDR:   begin out_valid = 1'b1; out_data = reply_hdr(bus_err ? 3'd1 : 3'd0); out_last = pkt_end; end
      S_RHDR:   begin out_valid = 1'b1; out_data = reply_hdr(3'd0); out_last = pkt_end && (words == 0); end
      S_RDATA:  begin out_valid = 1'b1; out_data = rdata; out_last = pkt_end && (cnt == 9'd1); end
      S_BADHDR: begin out_valid = 1'b1; out_data = reply_hdr(3'd2); out_last = 1'b1; end
      default: ;
    endcase
    wbus.addr   = addr;
    wbus.wdata  = wdata;
    wbus.strobe = (state == S_WBUS) || (state == S_RBUS);
    wbus.write  = (state == S_WBUS);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_HDR;
      pkt_end <= 1'b0;
      bus_err <= 1'b0;
      tid     <= '0;
      words   <= '0;
      cnt     <= '0;
      ttype   <= '0;
      addr    <= '0;
      wdata   <= '0;
      rdata   <= '0;
      last_in <= 1'b0;
    end else begin
      case (state)
        S_HDR: if (in_valid) begin
          tid     <= in_data[27:17];
          words   <= in_data[16:8];
          cnt     <= in_data[16:8];
          ttype   <= in_data[7:3];
          bus_err <= 1'b0;
          pkt_end <= in_last;
          if (!hdr_ok || in_last) state <= S_BADHDR;
          else                    state <= S_ADDR;
        end
        S_ADDR: if (in_valid) begin
          addr    <= in_data;
          pkt_end <= in_last;
          if (is_read)              state <= S_RHDR;
          else if (words == 0)      state <= S_WHDR;
          else if (in_last)         state <= S_BADHDR;
          else                      state <= S_WDATA;
        end
        S_WDATA: if (in_valid) begin
          wdata   <= in_data;
          last_in <= in_last;
          state   <= S_WBUS;
        end
        S_WBUS: if (rbus.ack || rbus.err) begin
          bus_err <= bus_err | rbus.err;
          cnt     <= cnt - 1'b1;
          if (incr) addr <= addr + 1'b1;
          if (cnt == 9'd1) begin
            pkt_end <= last_in;
            state   <= S_WHDR;
          end else if (last_in) begin
            pkt_end <= 1'b1;
            state   <= S_BADHDR;
          end else begin
            state <= S_WDATA;
          end
        end
        S_WHDR:   if (out_ready) state <= S_HDR;
        S_RHDR:   if (out_ready) state <= (words == 0) ? S_HDR : S_RBUS;
        S_RBUS: if (rbus.ack || rbus.err) begin
          rdata <= rbus.rdata;
          state <= S_RDATA;
        end
        S_RDATA: if (out_ready) begin
          cnt <= cnt - 1'b1;
          if (incr) addr <= addr + 1'b1;
          state <= (cnt == 9'd1) ? S_HDR : S_RBUS;
        end
        S_BADHDR: if (out_ready) state <= pkt_end ? S_HDR : S_DROP;
        S_DROP:   if (in_valid && in_last) state <= S_HDR;
        default:  state <= S_HDR;
      endcase
    end
  end

  // Bus rule: a request is held until it is acknowledged.
  a_hold: assert property (@(posedge clk) disable iff (rst)
    wbus.strobe && !(rbus.ack || rbus.err) |=> wbus.strobe && $stable(wbus.addr));
endmodule
