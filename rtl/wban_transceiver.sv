// wban_transceiver: digital baseband of a low-power WBAN transceiver.
//
// The transmitter and the receiver baseband stand side by side and share the
// clock (4 MHz nominal; one chip is OSR = 16 clocks, 250 kchip/s, so a
// 100 MHz clock gives 6.25 Mchip/s). The MAC side writes a PSDU octet by
// octet into TXFIFO and starts a transmission with its length; received
// PSDUs are read from RXFIFO after rx_done. tx_chip goes to the FSK
// modulator; rx_in comes from the FSK demodulator and may be asynchronous.
// The FSK modem, RF front end, SPI control and MAC are outside this module,
// so their signals are the ports. Status pulses report receiver events
// (lock, packet sync, corrected codeword, sampling-point moves).
// The split into TX and RX baseband, the clock and chip rates and the FIFO
// interfaces to the MAC follow the published design; bringing the MAC side
// out as plain FIFO ports (instead of the SPI control module, whose protocol
// is not given) and the status pulses are this design's choices.
module wban_transceiver
  import wban_pkg::*;
#(
  parameter int unsigned OSR   = wban_pkg::CHIP_OSR,
  parameter int unsigned DEPTH = 128
) (
  input  logic       clk,
  input  logic       rst_n,
  // MAC -> transmitter
  input  logic       tx_wr_en,
  input  logic [7:0] tx_wdata,
  output logic       tx_full,
  input  logic       tx_start,
  input  logic [6:0] tx_psdu_len,
  output logic       tx_busy,
  output logic       tx_done,
  // to the FSK modulator
  output logic       tx_chip,
  // from the FSK demodulator
  input  logic       rx_in,
  // receiver -> MAC
  input  logic       rx_rd_en,
  output logic [7:0] rx_rdata,
  output logic       rx_empty,
  output logic       rx_done,
  output logic [6:0] rx_len,
  output logic       rx_err,
  // receiver status
  output logic       rx_locked,
  output logic       rx_sync,
  output logic       rx_fix,
  output logic       rx_adv,
  output logic       rx_ret
);

  tx_baseband #(.OSR(OSR), .DEPTH(DEPTH)) u_tx (
    .clk, .rst_n, .tx_wr_en, .tx_wdata, .tx_full, .tx_start, .tx_psdu_len,
    .tx_busy, .tx_done, .tx_chip);

  rx_baseband #(.OSR(OSR), .DEPTH(DEPTH)) u_rx (
    .clk, .rst_n, .rx_in, .rx_rd_en, .rx_rdata, .rx_empty, .rx_done, .rx_len,
    .rx_err, .rx_locked, .rx_sync, .rx_fix, .rx_adv, .rx_ret);

endmodule
