// tx_baseband: the WBAN transmitter baseband.
//
// Data path (all bit-serial except the 8-bit codeword hop):
//   TXFIFO -> Prefix MUX -> (8,4) Hamming encoder -> 8x4 interleaver
//          -> scrambler (XOR with x^7+x^4+1 PRBS) -> Manchester encoder
//          -> output, preceded by the SHR from the TX state control.
// The MAC writes the PSDU into TXFIFO, then pulses tx_start with the PSDU
// length. Stages are joined by valid/ready pairs; the scrambler sits
// combinationally between interleaver and Manchester encoder and steps once
// per bit handed over. tx_chip is the chip stream for the FSK modulator, one
// chip per OSR clocks (250 kchip/s with a 4 MHz clock). The chain of blocks
// follows the published design.
module tx_baseband
  import wban_pkg::*;
#(
  parameter int unsigned OSR   = wban_pkg::CHIP_OSR,
  parameter int unsigned DEPTH = 128
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tx_wr_en,
  input  logic [7:0] tx_wdata,
  output logic       tx_full,
  input  logic       tx_start,
  input  logic [6:0] tx_psdu_len,
  output logic       tx_busy,
  output logic       tx_done,
  output logic       tx_chip
);
  logic       fifo_rd, fifo_empty;
  logic [7:0] fifo_rdata;
  logic [$clog2(DEPTH):0] fifo_count;

  logic       load, pm_empty, init, man_stb, man_chip, man_chip_valid;
  tx_sel_e    sel;
  logic [7:0] phr;
  logic       pm_bit, pm_valid, he_ready;
  logic [7:0] cw;
  logic       cw_valid, cw_ready;
  logic       il_bit, il_valid, me_ready, scr_bit;

  byte_fifo #(.WIDTH(8), .DEPTH(DEPTH)) u_txfifo (
    .clk, .rst_n, .clr(1'b0), .wr_en(tx_wr_en), .wdata(tx_wdata),
    .rd_en(fifo_rd), .rdata(fifo_rdata), .empty(fifo_empty), .full(tx_full),
    .count(fifo_count));

  tx_ctrl #(.OSR(OSR)) u_ctrl (
    .clk, .rst_n, .start(tx_start), .psdu_len(tx_psdu_len), .busy(tx_busy),
    .done(tx_done), .load, .sel, .phr, .pm_empty, .init, .man_stb,
    .man_chip, .man_chip_valid, .tx_chip);

  tx_prefix_mux u_pmux (
    .clk, .rst_n, .clr(init), .load, .sel, .phr, .fifo_rdata, .fifo_rd,
    .empty(pm_empty), .bit_o(pm_bit), .bit_valid(pm_valid), .bit_ready(he_ready));

  hamming_enc u_henc (
    .clk, .rst_n, .clr(init), .in_bit(pm_bit), .in_valid(pm_valid),
    .in_ready(he_ready), .cw, .cw_valid, .cw_ready);

  interleaver u_il (
    .clk, .rst_n, .clr(init), .cw, .cw_valid, .cw_ready,
    .out_bit(il_bit), .out_valid(il_valid), .out_ready(me_ready));

  scrambler u_scr (
    .clk, .rst_n, .init, .in_bit(il_bit), .in_valid(il_valid && me_ready),
    .out_bit(scr_bit));

  manchester_enc u_menc (
    .clk, .rst_n, .clr(init), .chip_stb(man_stb), .in_bit(scr_bit),
    .in_valid(il_valid), .in_ready(me_ready), .chip(man_chip),
    .chip_valid(man_chip_valid));

  // A PSDU octet is only read when TXFIFO holds it.
  a_fifo_has_psdu: assert property (@(posedge clk) disable iff (!rst_n)
    fifo_rd |-> !fifo_empty);

endmodule
