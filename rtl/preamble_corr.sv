// preamble_corr: shift-register matrix and preamble correlator of the
// receiver's synchronisation and data recovery (SDR) block.
//
// The synchronised input is over-sampled OSR times per chip and shifted into
// a WIN x OSR matrix (sr[0] is the newest sample). Every clock the matrix is
// compared sample by sample with the last WIN chips of the preamble, each
// template chip spread over its OSR samples, and the agreeing samples are
// counted. The count peaks (WIN*OSR for a clean signal) when the newest
// sample is the last sample of a preamble chip, and falls by OSR per sample
// of misalignment on the 1010 preamble, so its peak marks the chip boundary
// to one-sample accuracy.
//
// Timing: corr is registered; it holds the count for the sample that was
// newest one clock earlier. `newest` and `edge_o` are combinational from the
// matrix and feed the SDR's chip timing and sampling-point realignment, which
// shares this shift register. edge_o is a confirmed transition: the two
// newest samples agree and differ from the third, so sr[1] is the first
// sample of a new chip and a one-sample glitch is not taken for an edge.
// Over-sampling into a shift-register matrix and correlating with the
// preamble follow the published design; the window length and the
// sample-count correlation are this design's choices.
module preamble_corr
  import wban_pkg::*;
#(
  parameter int unsigned OSR = wban_pkg::CHIP_OSR,
  parameter int unsigned WIN = 16,
  localparam int unsigned N  = WIN * OSR,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sample,
  output logic [CW-1:0] corr,
  output logic          newest,
  output logic          edge_o
);
  // Template: sample i belongs to chip i / OSR counted back from the newest;
  // the newest chip of the window is the last preamble chip, PREAMBLE[0].
  function automatic logic [N-1:0] expand_template();
    logic [N-1:0] t;
    for (int i = 0; i < N; i++) t[i] = PREAMBLE[i / OSR];
    return t;
  endfunction
  localparam logic [N-1:0] TEMPLATE = expand_template();

  logic [N-1:0] sr;

  function automatic logic [CW-1:0] popcount(input logic [N-1:0] v);
    logic [CW-1:0] c;
    c = '0;
    for (int i = 0; i < N; i++) c = c + CW'(v[i]);
    return c;
  endfunction

  assign newest = sr[0];
  assign edge_o = (sr[0] == sr[1]) && (sr[1] != sr[2]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      corr <= '0;
    end else begin
      sr   <= {sr[N-2:0], sample};
      corr <= popcount(~(sr ^ TEMPLATE));
    end
  end

endmodule
