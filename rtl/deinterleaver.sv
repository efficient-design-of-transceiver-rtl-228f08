// deinterleaver: inverse of the 8x4 matrix interleaver, in the receiver.
//
// Serial bits fill the matrix row by row (bit i goes to row i / COLS,
// column i % COLS); once ROWS*COLS bits are in, the COLS columns are the
// original codewords and are handed out one per handshake, column 0 first.
// The next bit may arrive only after the columns are out; at one bit per two
// chips (32 clocks) a consumer that is ready within a few clocks guarantees
// it, and an assertion checks it. `clr` starts a new packet. The 8x4 size and
// the 8-bit output word follow the published design.
module deinterleaver
  import wban_pkg::*;
#(
  parameter int unsigned ROWS = IL_ROWS,
  parameter int unsigned COLS = IL_COLS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic            in_bit,
  input  logic            in_valid,
  output logic [ROWS-1:0] cw,
  output logic            cw_valid,
  input  logic            cw_ready
);
  localparam int unsigned BIT_W = $clog2(ROWS * COLS);
  localparam int unsigned CW_W  = $clog2(COLS);

  logic [ROWS-1:0]  m [COLS];
  logic [BIT_W-1:0] wi;
  logic [CW_W-1:0]  oi;
  logic             full;

  assign cw_valid = full;
  assign cw       = m[oi];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wi <= '0; oi <= '0; full <= 1'b0;
      for (int c = 0; c < COLS; c++) m[c] <= '0;
    end else if (clr) begin
      wi <= '0; oi <= '0; full <= 1'b0;
    end else begin
      if (in_valid && !full) begin
        m[32'(wi) % COLS][32'(wi) / COLS] <= in_bit;
        wi <= wi + 1'b1;
        if (wi == BIT_W'(ROWS * COLS - 1)) full <= 1'b1;
      end
      if (full && cw_ready) begin
        oi <= oi + 1'b1;
        if (oi == CW_W'(COLS - 1)) full <= 1'b0;
      end
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n || clr)
    !(in_valid && full));

endmodule
