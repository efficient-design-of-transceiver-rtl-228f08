// peak_detect: peak detector for a correlation sequence, used after the
// preamble correlator and after the SFD correlator.
//
// Each `valid` cycle the input value is compared with the previous one. A
// peak is reported (combinationally, in the cycle of the later value) when
// the previous value reached the threshold and the current one is lower; a
// flat top is followed until it falls. After a peak the detector is disarmed
// until the sequence drops below the threshold again, so one excursion above
// the threshold yields one peak. peak_val is the peak's value. clr forgets
// the previous value and re-arms. That a peak detector searches the correlation
// peak follows the published design; this rule is this design's choice.
module peak_detect #(
  parameter int unsigned W = 9
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         valid,
  input  logic [W-1:0] value,
  input  logic [W-1:0] thr,
  output logic         peak,
  output logic [W-1:0] peak_val
);
  logic [W-1:0] prev;
  logic         armed;

  assign peak     = valid && armed && (prev >= thr) && (value < prev);
  assign peak_val = prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev  <= '0;
      armed <= 1'b1;
    end else if (clr) begin
      prev  <= '0;
      armed <= 1'b1;
    end else if (valid) begin
      prev <= value;
      if (peak)             armed <= 1'b0;
      else if (value < thr) armed <= 1'b1;
    end
  end

endmodule
