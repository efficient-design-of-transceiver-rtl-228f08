// wban_ref_pkg: behavioural reference of the WBAN baseband frame, for the
// testbenches. It builds the chip sequence of a packet step by step from the
// frame definition (SHR, PHR + PSDU + pad, (8,4) extended Hamming code, 8x4
// interleaving, x^7+x^4+1 scrambling, Manchester coding) without using the
// RTL or its package, so that the RTL is checked against an independent
// model.
package wban_ref_pkg;

  localparam logic [47:0] REF_SHR = {32'hAAAA_AAAA, 16'h0B73};

  // Extended Hamming(8,4): parity bits by explicit generator rows.
  function automatic logic [7:0] ref_ham(input logic [3:0] d);
    // rows of the generator: codeword contribution of each data bit
    logic [7:0] g [4];
    logic [7:0] c;
    g[0] = 8'b1011_0001;  // d0 -> p0, p1, p3(overall)
    g[1] = 8'b1101_0010;  // d1 -> p0, p2, p3
    g[2] = 8'b1110_0100;  // d2 -> p1, p2, p3
    g[3] = 8'b0111_1000;  // d3 -> p0, p1, p2 (overall parity even count)
    c = '0;
    for (int i = 0; i < 4; i++) if (d[i]) c ^= g[i];
    return c;
  endfunction

  // Data bits (LSB first) of PHR + PSDU + pad.
  function automatic void ref_bits(input byte unsigned psdu[$], output bit bits[$]);
    byte unsigned oct[$];
    bits.delete();
    oct.push_back(byte'(psdu.size()));
    foreach (psdu[i]) oct.push_back(psdu[i]);
    if (oct.size() % 2) oct.push_back(8'h00);
    foreach (oct[i]) for (int b = 0; b < 8; b++) bits.push_back(oct[i][b]);
  endfunction

  // Coded, interleaved and scrambled bits of a frame.
  function automatic void ref_coded(input byte unsigned psdu[$], output bit out[$]);
    bit bits[$];
    logic [7:0] cws[$];
    logic [6:0] lfsr;
    out.delete();
    ref_bits(psdu, bits);
    for (int i = 0; i < bits.size(); i += 4)
      cws.push_back(ref_ham({bits[i+3], bits[i+2], bits[i+1], bits[i]}));
    lfsr = 7'h7F;
    for (int blk = 0; blk < cws.size(); blk += 4)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 4; c++) begin
          bit p;
          p = lfsr[6] ^ lfsr[3];
          lfsr = {lfsr[5:0], p};
          out.push_back(cws[blk + c][r] ^ p);
        end
  endfunction

  // Complete chip sequence of a frame: SHR, then Manchester chips.
  function automatic void ref_chips(input byte unsigned psdu[$], output bit chips[$]);
    bit coded[$];
    chips.delete();
    for (int i = 47; i >= 0; i--) chips.push_back(REF_SHR[i]);
    ref_coded(psdu, coded);
    foreach (coded[i]) begin
      chips.push_back(coded[i]);
      chips.push_back(!coded[i]);
    end
  endfunction

endpackage
