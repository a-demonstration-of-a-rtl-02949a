// link_rx: receiver of one time-multiplexed link in a Main Processor.
//
// It finds frames by their header (a K word carrying 4'hF and the bx number),
// passes the header and the N_TOWERS tower words on as soon as they arrive
// (low latency: the algorithm does not wait for the CRC), and checks the
// CRC-16 word that follows the towers. A CRC mismatch, or a K word inside a
// frame, counts one link error and drops out of the frame; the error counter
// saturates and is read over the control bus.
// Output stream: out_valid with out_sof=1 and out_data=bx for the header, then
// out_sof=0 and out_data=tower for each tower, one cycle after the word
// arrived. frames counts frames received with a good CRC.
module link_rx
  import tmt_pkg::*;
#(
  parameter int unsigned N_TOWERS = tmt_pkg::N_ETA
) (
  input  logic         clk,
  input  logic         rst,
  input  link_word_t   rx,
  output logic         out_valid,
  output logic         out_sof,
  output logic [15:0]  out_data,
  output logic [31:0]  err_cnt,
  output logic [31:0]  frames
);
  logic        in_frame;
  logic [6:0]  idx;
  logic [15:0] crc;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_frame  <= 1'b0;
      idx       <= '0;
      crc       <= CRC_INIT;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_data  <= '0;
      err_cnt   <= '0;
      frames    <= '0;
    end else begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      if (is_header(rx)) begin
        if (in_frame && err_cnt != '1) err_cnt <= err_cnt + 1'b1;   // frame cut short
        in_frame  <= 1'b1;
        idx       <= 7'd1;
        crc       <= CRC_INIT;
        out_valid <= 1'b1;
        out_sof   <= 1'b1;
        out_data  <= {4'h0, rx.d[BX_W-1:0]};
      end else if (in_frame) begin
        if (rx.k) begin
          in_frame <= 1'b0;
          if (err_cnt != '1) err_cnt <= err_cnt + 1'b1;
        end else if (idx <= 7'(N_TOWERS)) begin
          out_valid <= 1'b1;
          out_data  <= rx.d;
          crc       <= crc16_word(crc, rx.d);
          idx       <= idx + 1'b1;
        end else begin
          in_frame <= 1'b0;
          if (rx.d != crc) begin
            if (err_cnt != '1) err_cnt <= err_cnt + 1'b1;
          end else begin
            frames <= frames + 1'b1;
          end
        end
      end
    end
  end
endmodule
