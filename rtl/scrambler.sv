// scrambler: additive scrambler of the transmitter and, unchanged, the
// descrambler of the receiver.
//
// A 7-bit Fibonacci LFSR for x^7 + x^4 + 1 produces one pseudo-random bit
// per data bit; out_bit = in_bit XOR prbs is combinational and the LFSR
// steps whenever in_valid is high. `init` reloads the seed at the start of a
// packet, so transmitter and receiver generate the same sequence. Scrambling
// removes long runs and periodic patterns from the payload. A 1-bit serial
// XOR scrambler, shared in structure by both directions, follows the
// published design; the polynomial and the all-ones seed are this design's
// choices.
module scrambler
  import wban_pkg::*;
#(
  parameter logic [6:0] SEED = SCR_SEED
) (
  input  logic clk,
  input  logic rst_n,
  input  logic init,
  input  logic in_bit,
  input  logic in_valid,
  output logic out_bit
);
  logic [6:0] s;
  wire prbs = s[6] ^ s[3];

  assign out_bit = in_bit ^ prbs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        s <= SEED;
    else if (init)     s <= SEED;
    else if (in_valid) s <= {s[5:0], prbs};
  end

endmodule
