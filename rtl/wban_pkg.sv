// wban_pkg: constants and types shared by the WBAN baseband transmitter and
// receiver.
//
// The frame on the air is SHR (preamble + start-of-frame delimiter) followed
// by the Manchester-coded, scrambled, interleaved and Hamming-coded PHR+PSDU.
// One chip lasts CHIP_OSR clocks: 16 clocks of 4 MHz give the 250 kchip/s raw
// rate. The 250 kchip/s rate, the 4 MHz clock, the 127-octet PSDU limit, the
// (8,4) Hamming code, the 8x4 interleaver and the Manchester mapping follow
// the published design. The preamble and SFD patterns, the scrambler
// polynomial and seed, and the PHR layout are this design's own choices.
package wban_pkg;

  // Clock cycles per chip (4 MHz clock / 250 kchip/s).
  localparam int unsigned CHIP_OSR = 16;

  // Synchronisation header, sent MSB first.
  localparam int unsigned    PRE_CHIPS = 32;
  localparam logic [31:0]    PREAMBLE  = 32'hAAAA_AAAA;  // 1010...10
  localparam int unsigned    SFD_CHIPS = 16;
  localparam logic [15:0]    SFD       = 16'h0B73;
  localparam int unsigned    SHR_CHIPS = PRE_CHIPS + SFD_CHIPS;
  localparam logic [SHR_CHIPS-1:0] SHR = {PREAMBLE, SFD};

  // Scrambler: x^7 + x^4 + 1, all-ones seed at the start of each packet.
  localparam logic [6:0] SCR_SEED = 7'h7F;

  // Interleaver: 4 codewords of 8 bits, i.e. 2 octets of PHR+PSDU per block.
  localparam int unsigned IL_ROWS = 8;
  localparam int unsigned IL_COLS = 4;

  // Prefix MUX source selection.
  typedef enum logic [1:0] {
    SEL_PHR  = 2'd0,
    SEL_PSDU = 2'd1,
    SEL_PAD  = 2'd2
  } tx_sel_e;

  // Octets carried by a packet of psdu_len octets: PHR + PSDU, rounded up to
  // whole interleaver blocks of two octets.
  function automatic int unsigned frame_octets(input int unsigned psdu_len);
    int unsigned n;
    n = psdu_len + 1;
    return (n + 1) & ~32'd1;
  endfunction

  // Extended (8,4) Hamming encoder. cw[3:0] = data, cw[6:4] = Hamming(7,4)
  // parities, cw[7] = overall parity of cw[6:0].
  function automatic logic [7:0] ham84_encode(input logic [3:0] d);
    logic [6:0] c;
    c[3:0] = d;
    c[4]   = d[0] ^ d[1] ^ d[3];
    c[5]   = d[0] ^ d[2] ^ d[3];
    c[6]   = d[1] ^ d[2] ^ d[3];
    return {^c, c};
  endfunction

endpackage
