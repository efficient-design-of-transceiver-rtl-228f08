// hamming_enc: (8,4) Hamming encoder of the transmitter's FEC.
//
// Serial data bits arrive one per handshake (first bit = d0). After four bits
// the extended Hamming codeword is formed in one step and held on cw with
// cw_valid until the interleaver takes it; while a codeword waits, no new
// bit is accepted. Codeword layout: cw[3:0] = d3..d0, cw[6:4] = the three
// Hamming(7,4) parities, cw[7] = overall parity, so the decoder can correct
// one error and detect two. The 4-to-8 bit coding and the serial-in,
// 8-bit-out word lengths follow the published design; the exact parity
// equations and bit layout are this design's choice.
module hamming_enc
  import wban_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       in_bit,
  input  logic       in_valid,
  output logic       in_ready,
  output logic [7:0] cw,
  output logic       cw_valid,
  input  logic       cw_ready
);
  logic [2:0] d;     // first three data bits of the nibble
  logic [1:0] n;     // bits collected

  assign in_ready = !cw_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d <= '0; n <= '0; cw <= '0; cw_valid <= 1'b0;
    end else if (clr) begin
      n <= '0; cw_valid <= 1'b0;
    end else begin
      if (cw_valid && cw_ready) cw_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (n == 2'd3) begin
          cw       <= ham84_encode({in_bit, d});
          cw_valid <= 1'b1;
        end else begin
          d[n] <= in_bit;
        end
        n <= n + 1'b1;
      end
    end
  end

endmodule
