// manchester_enc: Manchester encoder of the transmitter.
//
// Each data bit becomes two chips: 0 -> "01", 1 -> "10", so every bit has a
// mid-bit transition and the stream has no DC content. A one-bit input
// buffer (valid/ready) lets the upstream stages work ahead. On each chip
// strobe the encoder either starts a new bit (first chip = the bit) or sends
// the second, inverted chip. chip_valid is low after a strobe that found no
// bit to send (underrun). The mapping follows the published design.
module manchester_enc (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic chip_stb,
  input  logic in_bit,
  input  logic in_valid,
  output logic in_ready,
  output logic chip,
  output logic chip_valid
);
  logic buf_bit, buf_valid;
  logic cur, second;   // bit being sent; next strobe sends its second chip

  assign in_ready = !buf_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_bit <= 1'b0; buf_valid <= 1'b0; cur <= 1'b0; second <= 1'b0;
      chip <= 1'b0; chip_valid <= 1'b0;
    end else if (clr) begin
      buf_valid <= 1'b0; second <= 1'b0; chip <= 1'b0; chip_valid <= 1'b0;
    end else begin
      if (in_valid && in_ready) begin
        buf_bit   <= in_bit;
        buf_valid <= 1'b1;
      end
      if (chip_stb) begin
        if (second) begin
          chip   <= ~cur;
          second <= 1'b0;
        end else if (buf_valid) begin
          chip       <= buf_bit;
          cur        <= buf_bit;
          second     <= 1'b1;
          buf_valid  <= 1'b0;
          chip_valid <= 1'b1;
        end else begin
          chip       <= 1'b0;
          chip_valid <= 1'b0;
        end
      end
    end
  end

endmodule
