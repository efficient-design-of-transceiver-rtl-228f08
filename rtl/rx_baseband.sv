// rx_baseband: the WBAN receiver baseband.
//
// Data path:
//   FSK demodulator output -> SDR (sync flip-flops, preamble bit sync, SFD
//   packet sync, 250 kHz chip strobe, sampling-point realignment)
//   -> Manchester decoder (first chip of each pair) -> descrambler (same
//   structure as the TX scrambler) -> 8x4 deinterleaver -> (8,4) Hamming
//   decoder -> parallel-to-serial buffer -> RX state control -> RXFIFO.
// Packet sync re-initialises the descrambler and clears the deinterleaver,
// decoder and buffer. The MAC reads received octets from RXFIFO (show-ahead:
// rx_rdata is valid while rx_empty is low, rx_rd_en pops it) after rx_done.
// rx_err reports a packet dropped for an uncorrectable codeword. The status
// pulses rx_sync, rx_fix, rx_adv and rx_ret report packet sync, a corrected
// codeword and the two realignment moves. The block chain follows the
// published design.
module rx_baseband
  import wban_pkg::*;
#(
  parameter int unsigned OSR   = wban_pkg::CHIP_OSR,
  parameter int unsigned DEPTH = 128
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_in,
  input  logic       rx_rd_en,
  output logic [7:0] rx_rdata,
  output logic       rx_empty,
  output logic       rx_done,
  output logic [6:0] rx_len,
  output logic       rx_err,
  output logic       rx_locked,
  output logic       rx_sync,
  output logic       rx_fix,
  output logic       rx_adv,
  output logic       rx_ret
);
  logic restart, chip_stb, data_stb, data_chip, pkt_sync;
  logic md_bit, md_valid, ds_bit;
  logic [7:0] cw;
  logic cw_valid, cw_ready;
  logic [3:0] nib;
  logic nib_valid, nib_ready, unc;
  logic p_bit, p_valid, active, fix;
  logic fifo_wr, fifo_clr, fifo_full;
  logic [7:0] fifo_wdata;
  logic [$clog2(DEPTH):0] fifo_count;

  sdr #(.OSR(OSR)) u_sdr (
    .clk, .rst_n, .rx_in, .restart, .chip_stb, .data_stb, .data_chip,
    .pkt_sync, .locked(rx_locked), .adj_adv(rx_adv), .adj_ret(rx_ret));

  manchester_dec u_mdec (
    .clk, .rst_n, .sync(pkt_sync), .chip_stb(data_stb), .chip(data_chip),
    .bit_o(md_bit), .bit_valid(md_valid));

  scrambler u_dscr (
    .clk, .rst_n, .init(pkt_sync), .in_bit(md_bit), .in_valid(md_valid),
    .out_bit(ds_bit));

  deinterleaver u_dil (
    .clk, .rst_n, .clr(pkt_sync), .in_bit(ds_bit), .in_valid(md_valid),
    .cw, .cw_valid, .cw_ready);

  hamming_dec u_hdec (
    .clk, .rst_n, .clr(pkt_sync), .cw, .cw_valid, .cw_ready, .nib,
    .nib_valid, .nib_ready, .corrected(fix), .uncorrectable(unc));

  p2s_buffer u_p2s (
    .clk, .rst_n, .clr(pkt_sync), .nib, .nib_valid, .nib_ready,
    .bit_o(p_bit), .bit_valid(p_valid));

  rx_ctrl u_ctrl (
    .clk, .rst_n, .pkt_sync, .bit_i(p_bit), .bit_valid(p_valid),
    .uncorrectable(unc && nib_valid), .active, .restart, .fifo_wr, .fifo_wdata,
    .fifo_clr, .rx_done, .rx_len, .rx_err);

  byte_fifo #(.WIDTH(8), .DEPTH(DEPTH)) u_rxfifo (
    .clk, .rst_n, .clr(fifo_clr), .wr_en(fifo_wr), .wdata(fifo_wdata),
    .rd_en(rx_rd_en), .rdata(rx_rdata), .empty(rx_empty), .full(fifo_full),
    .count(fifo_count));

  assign rx_sync = pkt_sync;
  assign rx_fix  = fix && nib_valid && nib_ready;

  logic unused;
  assign unused = ^{chip_stb, active, fifo_full, fifo_count};

endmodule
