// hamming_dec: (8,4) Hamming decoder of the receiver's FEC.
//
// For each codeword the three Hamming(7,4) parity checks give a syndrome that
// names the erroneous bit, and the overall parity tells one error from two:
//   overall parity wrong             -> one error: flip the named bit
//                                       (syndrome 0: the overall parity bit)
//   overall parity right, syndrome 0 -> no error
//   overall parity right, syndrome!=0-> two errors: `uncorrectable`
// The result is registered (one pipeline stage with valid/ready); nib holds
// the corrected data bits and the two flags qualify it. Detecting and
// correcting errors, and a 4-bit output word, follow the published design;
// the code itself matches hamming_enc.
module hamming_dec (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic [7:0] cw,
  input  logic       cw_valid,
  output logic       cw_ready,
  output logic [3:0] nib,
  output logic       nib_valid,
  input  logic       nib_ready,
  output logic       corrected,
  output logic       uncorrectable
);
  logic [2:0] syn;
  logic       par;
  logic [7:0] fixed;
  logic       c_fix, c_unc;

  always_comb begin
    syn[0] = cw[4] ^ cw[0] ^ cw[1] ^ cw[3];
    syn[1] = cw[5] ^ cw[0] ^ cw[2] ^ cw[3];
    syn[2] = cw[6] ^ cw[1] ^ cw[2] ^ cw[3];
    par    = ^cw;
    fixed  = cw;
    c_fix  = 1'b0;
    c_unc  = 1'b0;
    if (par) begin
      c_fix = 1'b1;
      unique case (syn)
        3'b011:  fixed[0] = ~cw[0];
        3'b101:  fixed[1] = ~cw[1];
        3'b110:  fixed[2] = ~cw[2];
        3'b111:  fixed[3] = ~cw[3];
        default: ;  // error in a parity bit: data is intact
      endcase
    end else if (syn != 3'b000) begin
      c_unc = 1'b1;
    end
  end

  assign cw_ready = !nib_valid || nib_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nib <= '0; nib_valid <= 1'b0; corrected <= 1'b0; uncorrectable <= 1'b0;
    end else if (clr) begin
      nib_valid <= 1'b0; corrected <= 1'b0; uncorrectable <= 1'b0;
    end else if (cw_ready) begin
      nib_valid     <= cw_valid;
      nib           <= fixed[3:0];
      corrected     <= cw_valid && c_fix;
      uncorrectable <= cw_valid && c_unc;
    end
  end

endmodule
