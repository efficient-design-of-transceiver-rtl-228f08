// interleaver: 8x4 matrix block interleaver of the transmitter.
//
// Four consecutive codewords are written as the four columns of an 8-row
// matrix; the matrix is then read row by row, so the 32 output bits are
// bit 0 of codewords 0,1,2,3, then bit 1 of codewords 0..3, and so on. A burst
// of up to four consecutive errors on the channel thus lands in four
// different codewords, each of which the Hamming decoder corrects.
//
// Codewords are taken on a valid/ready pair while the matrix is filling; the
// 32 bits then leave serially on a valid/ready pair, after which the matrix
// accepts the next block. The 8x4 size and the serial output follow the
// published design; the orientation (codeword = column) is this design's
// reading of it.
module interleaver
  import wban_pkg::*;
#(
  parameter int unsigned ROWS = IL_ROWS,
  parameter int unsigned COLS = IL_COLS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic [ROWS-1:0] cw,
  input  logic            cw_valid,
  output logic            cw_ready,
  output logic            out_bit,
  output logic            out_valid,
  input  logic            out_ready
);
  localparam int unsigned CW_W  = $clog2(COLS) + 1;
  localparam int unsigned BIT_W = $clog2(ROWS * COLS);

  logic [ROWS-1:0] m [COLS];
  logic [CW_W-1:0]  nfill;     // codewords written
  logic [BIT_W-1:0] rd;        // read index: row * COLS + column
  logic             full;

  assign cw_ready  = !full;
  assign out_valid = full;
  assign out_bit   = m[32'(rd) % COLS][32'(rd) / COLS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nfill <= '0; rd <= '0; full <= 1'b0;
      for (int c = 0; c < COLS; c++) m[c] <= '0;
    end else if (clr) begin
      nfill <= '0; rd <= '0; full <= 1'b0;
    end else if (!full) begin
      if (cw_valid) begin
        m[nfill[CW_W-2:0]] <= cw;
        if (nfill == CW_W'(COLS - 1)) begin
          full  <= 1'b1;
          nfill <= '0;
        end else begin
          nfill <= nfill + 1'b1;
        end
      end
    end else if (out_ready) begin
      rd <= rd + 1'b1;
      if (rd == BIT_W'(ROWS * COLS - 1)) full <= 1'b0;
    end
  end

endmodule
