// rx_ctrl: RX state control of the receiver.
//
// Waits for packet sync from the SDR, then assembles the decoded serial bits
// (LSB first) into octets. The first octet is the PHR: its 7 LSBs give the
// PSDU length, and from it the number of octets in the frame (PHR + PSDU,
// padded to whole interleaver blocks). The next `length` octets are written
// to RXFIFO; pad octets are dropped. After the last octet rx_done pulses,
// rx_len holds the length and the SDR is sent back to preamble search.
// If the Hamming decoder reports an uncorrectable codeword, reception stops
// at once: rx_err pulses, the octets of this packet are flushed from RXFIFO
// and the SDR restarts, so the MAC can ask for a retransmission.
//
// The receiver runs from one clock; the 250 kHz operation clock of the
// published design appears here as the chip strobe that paces the front of
// the data path, while the back end (decoder, P2S, this block) works at the
// full clock rate in short bursts. Reading the length from the PHR and
// stopping on an uncorrectable error follow the published design; flushing
// the whole RXFIFO on an error is this design's choice, and assumes the MAC
// has emptied it since the previous rx_done.
module rx_ctrl
  import wban_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pkt_sync,
  input  logic       bit_i,
  input  logic       bit_valid,
  input  logic       uncorrectable,
  output logic       active,
  output logic       restart,
  output logic       fifo_wr,
  output logic [7:0] fifo_wdata,
  output logic       fifo_clr,
  output logic       rx_done,
  output logic [6:0] rx_len,
  output logic       rx_err
);
  logic [7:0] sh;
  logic [2:0] nb;        // bits of the current octet
  logic [7:0] noct;      // octets completed
  logic [7:0] total;     // octets in the frame
  logic [6:0] len;

  wire [7:0] oct = {bit_i, sh[7:1]};
  wire       oct_done = active && bit_valid && (nb == 3'd7);

  assign fifo_wdata = oct;
  assign fifo_wr    = oct_done && (noct != 0) && (noct <= {1'b0, len}) && !uncorrectable;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; restart <= 1'b0; fifo_clr <= 1'b0; rx_done <= 1'b0;
      rx_err <= 1'b0; rx_len <= '0; sh <= '0; nb <= '0; noct <= '0;
      total <= '0; len <= '0;
    end else begin
      restart  <= 1'b0;
      fifo_clr <= 1'b0;
      rx_done  <= 1'b0;
      rx_err   <= 1'b0;
      if (pkt_sync) begin
        active <= 1'b1;
        nb     <= '0;
        noct   <= '0;
        total  <= 8'd2;
        len    <= '0;
      end else if (active && uncorrectable) begin
        active   <= 1'b0;
        restart  <= 1'b1;
        fifo_clr <= 1'b1;
        rx_err   <= 1'b1;
      end else if (active && bit_valid) begin
        sh <= oct;
        nb <= nb + 1'b1;
        if (oct_done) begin
          noct <= noct + 1'b1;
          if (noct == 0) begin
            len   <= oct[6:0];
            total <= 8'(frame_octets(32'(oct[6:0])));
          end
          if (noct != 0 && noct + 1'b1 == total) begin
            active  <= 1'b0;
            restart <= 1'b1;
            rx_done <= 1'b1;
            rx_len  <= len;
          end
        end
      end
    end
  end

endmodule
