// sfd_corr: start-of-frame delimiter correlator of the SDR block.
//
// Once bit synchronisation has fixed the sampling point, one sample per chip
// (at mid-chip) is shifted into a SFD_CHIPS-long chip register on chip_stb.
// corr counts the chips that agree with the SFD; it is combinational from the
// register, so it is valid in the cycle after chip_stb. newest is the last
// chip taken. Correlating the recovered chips with the SFD follows the
// published design; the SFD pattern is this design's choice.
module sfd_corr
  import wban_pkg::*;
#(
  localparam int unsigned CW = $clog2(SFD_CHIPS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          chip_stb,
  input  logic          chip,
  output logic [CW-1:0] corr,
  output logic          newest
);
  logic [SFD_CHIPS-1:0] csr;

  always_comb begin
    corr = '0;
    for (int i = 0; i < SFD_CHIPS; i++) corr = corr + {{(CW-1){1'b0}}, csr[i] ~^ SFD[i]};
  end
  assign newest = csr[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        csr <= '0;
    else if (clr)      csr <= '0;
    else if (chip_stb) csr <= {csr[SFD_CHIPS-2:0], chip};
  end

endmodule
