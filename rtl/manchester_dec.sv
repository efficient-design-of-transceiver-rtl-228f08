// manchester_dec: Manchester decoder of the receiver.
//
// Received chips come in pairs, one pair per data bit ("01" = 0, "10" = 1).
// The decoder keeps the first chip of every pair as the bit and drops the
// second. `sync` marks the chip strobe that carries the first chip of the
// packet, which fixes the pairing. bit_o/bit_valid are registered: the bit
// appears one clock after the strobe of its first chip. Taking the first of
// every two chips follows the published design.
module manchester_dec (
  input  logic clk,
  input  logic rst_n,
  input  logic sync,
  input  logic chip_stb,
  input  logic chip,
  output logic bit_o,
  output logic bit_valid
);
  logic second;   // next chip is the second of a pair

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      second <= 1'b0; bit_o <= 1'b0; bit_valid <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      if (chip_stb) begin
        if (sync || !second) begin
          bit_o     <= chip;
          bit_valid <= 1'b1;
          second    <= 1'b1;
        end else begin
          second <= 1'b0;
        end
      end
    end
  end

endmodule
