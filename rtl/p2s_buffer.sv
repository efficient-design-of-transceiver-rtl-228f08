// p2s_buffer: parallel-to-serial buffer between the Hamming decoder and the
// RX state control / RXFIFO.
//
// A 4-bit decoded nibble is taken when the buffer is empty and shifted out
// LSB first, one bit per clock, with bit_valid; the next nibble is accepted in
// the clock after the fourth bit. The 4-bit to 1-bit conversion follows the
// published design; the bit order matches the transmitter.
module p2s_buffer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic [3:0] nib,
  input  logic       nib_valid,
  output logic       nib_ready,
  output logic       bit_o,
  output logic       bit_valid
);
  logic [3:0] sh;
  logic [2:0] left;

  assign nib_ready = (left == 0);
  assign bit_valid = (left != 0);
  assign bit_o     = sh[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; left <= '0;
    end else if (clr) begin
      left <= '0;
    end else if (nib_ready) begin
      if (nib_valid) begin
        sh   <= nib;
        left <= 3'd4;
      end
    end else begin
      sh   <= {1'b0, sh[3:1]};
      left <= left - 1'b1;
    end
  end

endmodule
