// sdr: synchronisation and data recovery of the receiver.
//
// The demodulated FSK signal is an asynchronous binary level. Two flip-flops
// bring it into the clock domain, and it is then over-sampled OSR times per
// chip. Three phases:
//  1. Preamble search: preamble_corr correlates the last 16 chips of samples
//     with the 1010 preamble every clock; when peak_detect finds a peak above
//     PRE_THR, the chip boundary is known and the chip-phase counter is set.
//     This is bit synchronisation (`locked`).
//  2. SFD search: one sample per chip, taken at mid-chip (phase OSR/2), is
//     the chip strobe - the 250 kHz clock the rest of the receiver runs on.
//     sfd_corr correlates these chips with the SFD and a second peak_detect
//     finds its peak above SFD_THR. That is packet synchronisation: pkt_sync
//     pulses together with the first PHR chip. Without an SFD within
//     SFD_TIMEOUT chips the search restarts.
//  3. Data: every chip strobe delivers one chip on data_stb/data_chip until
//     `restart` returns the block to preamble search.
// Sampling-point realignment shares the over-sampling shift register: every
// input transition should fall on phase 0. A transition (confirmed by two
// equal samples after it, so single-sample glitches are ignored) whose first
// sample the counter places at phase 1..OSR/2-2 holds the phase counter for
// a clock (adj_ret); one placed at OSR/2+1..OSR-1 skips a phase (adj_adv).
// The sampling phase OSR/2 is thus never repeated or skipped, and the
// sampling point follows a transmitter whose clock drifts. Realignment runs
// from bit sync on.
//
// Timing: a preamble peak is reported two clocks after the first sample of
// the next chip entered the matrix; data_stb comes one clock after the
// mid-chip sample. The block structure (shift-register matrix, preamble
// correlator, peak detectors, SFD correlator, packet sync, 250 kHz clock,
// realignment sharing the SDR hardware) follows the published design; the
// thresholds, the timeout and the realignment rule are this design's.
module sdr
  import wban_pkg::*;
#(
  parameter int unsigned OSR         = wban_pkg::CHIP_OSR,
  parameter int unsigned WIN         = 16,
  parameter int unsigned PRE_THR     = 232,
  parameter int unsigned SFD_THR     = 14,
  parameter int unsigned SFD_TIMEOUT = 96
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rx_in,
  input  logic restart,
  output logic chip_stb,
  output logic data_stb,
  output logic data_chip,
  output logic pkt_sync,
  output logic locked,
  output logic adj_adv,
  output logic adj_ret
);
  localparam int unsigned PCW = $clog2(WIN * OSR + 1);
  localparam int unsigned SCW = $clog2(SFD_CHIPS + 1);
  localparam int unsigned TW  = $clog2(OSR);
  localparam logic [TW-1:0] MID = TW'(OSR / 2);

  typedef enum logic [1:0] {S_PRE, S_SFD, S_DATA} state_e;
  state_e state;

  logic s1, s2;                     // input synchroniser
  logic [PCW-1:0] pcorr;
  logic newest, edge_s, pre_peak;
  logic [SCW-1:0] scorr;
  logic sfd_newest, sfd_peak, chip_stb_d;
  logic [TW-1:0] ph;                // phase of the newest sample in its chip
  logic [$clog2(SFD_TIMEOUT+1)-1:0] tmo;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 1'b0; s2 <= 1'b0;
    end else begin
      s1 <= rx_in; s2 <= s1;
    end
  end

  preamble_corr #(.OSR(OSR), .WIN(WIN)) u_pcorr (
    .clk, .rst_n, .sample(s2), .corr(pcorr), .newest, .edge_o(edge_s));

  peak_detect #(.W(PCW)) u_ppeak (
    .clk, .rst_n, .clr(state != S_PRE), .valid(state == S_PRE), .value(pcorr),
    .thr(PCW'(PRE_THR)), .peak(pre_peak), .peak_val());

  assign locked   = (state != S_PRE);
  assign chip_stb = locked && (ph == MID);

  sfd_corr u_scorr (
    .clk, .rst_n, .clr(state == S_PRE), .chip_stb, .chip(newest),
    .corr(scorr), .newest(sfd_newest));

  peak_detect #(.W(SCW)) u_speak (
    .clk, .rst_n, .clr(state != S_SFD), .valid(chip_stb_d && state == S_SFD),
    .value(scorr), .thr(SCW'(SFD_THR)), .peak(sfd_peak), .peak_val());

  assign pkt_sync  = sfd_peak;
  assign data_stb  = chip_stb_d && ((state == S_DATA) || sfd_peak);
  assign data_chip = sfd_newest;

  // Realignment: a transition should land on phase 0.
  wire [TW-1:0] bph = ph - 1'b1;    // phase the counter gave the boundary sample
  wire realign = locked && edge_s && (bph != '0) && (bph != MID) && (bph != MID - 1'b1);
  assign adj_ret = realign && (bph < MID);
  assign adj_adv = realign && (bph > MID);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_PRE; ph <= '0; tmo <= '0; chip_stb_d <= 1'b0;
    end else begin
      chip_stb_d <= chip_stb;
      // chip-phase counter
      if (state == S_PRE && pre_peak) ph <= TW'(2);
      else if (adj_ret)               ph <= ph;
      else if (adj_adv)               ph <= ph + TW'(2);
      else                            ph <= ph + 1'b1;

      if (restart) begin
        state <= S_PRE;
      end else begin
        unique case (state)
          S_PRE: if (pre_peak) begin
            state <= S_SFD;
            tmo   <= '0;
          end
          S_SFD: begin
            if (sfd_peak) state <= S_DATA;
            else if (chip_stb) begin
              if (tmo == $bits(tmo)'(SFD_TIMEOUT)) state <= S_PRE;
              else tmo <= tmo + 1'b1;
            end
          end
          default: ;
        endcase
      end
    end
  end

endmodule
