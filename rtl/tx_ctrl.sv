// tx_ctrl: TX state control of the transmitter.
//
// On `start` (with the PSDU length from the MAC) it builds the PHR, resets
// the coding pipeline, and then runs three jobs in parallel:
//  * chip timing: a divide-by-OSR counter gives one chip strobe per 16
//    clocks (250 kchip/s at 4 MHz);
//  * the synchronisation header: the SHR (preamble then SFD) is sent chip by
//    chip, MSB first, straight to the output;
//  * the Prefix MUX: each time its shift register is empty the controller
//    loads the next octet - the PHR first, then psdu_len octets from TXFIFO,
//    then zero pad octets up to a whole number of interleaver blocks.
// The coding pipeline fills while the SHR is on the air and stalls on
// back-pressure. After the last SHR chip the output switches to the
// Manchester encoder, whose chips are counted until the frame ends; `done`
// then pulses and the line returns to 0.
//
// Timing: tx_chip changes one clock after `start` and then every OSR clocks;
// a frame lasts (SHR_CHIPS + 32 * frame_octets(psdu_len)) * OSR clocks.
// The state machine driving the Prefix MUX, the PHR prefix and the SHR
// prefix follow the published design; the SHR content and PHR layout are
// this design's choices.
module tx_ctrl
  import wban_pkg::*;
#(
  parameter int unsigned OSR = wban_pkg::CHIP_OSR
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [6:0] psdu_len,
  output logic       busy,
  output logic       done,
  // prefix MUX
  output logic       load,
  output tx_sel_e    sel,
  output logic [7:0] phr,
  input  logic       pm_empty,
  // pipeline
  output logic       init,
  output logic       man_stb,
  input  logic       man_chip,
  input  logic       man_chip_valid,
  output logic       tx_chip
);
  typedef enum logic [1:0] {IDLE, SEND_SHR, SEND_PAY} state_e;
  state_e state;

  localparam int unsigned TW = $clog2(OSR);

  logic [TW-1:0] tcnt;
  logic          chip_stb;
  localparam int unsigned SW = $clog2(SHR_CHIPS);
  localparam logic [SW-1:0] SHR_LAST = SW'(SHR_CHIPS - 1);
  logic [SW-1:0] shr_idx;
  logic [7:0]    oct_loaded;      // octets handed to the prefix MUX
  logic [7:0]    oct_total;       // octets in the coded frame
  logic [12:0]   pay_chips;       // payload chips started
  logic [12:0]   pay_total;

  assign busy     = (state != IDLE);
  assign chip_stb = busy && (tcnt == TW'(OSR - 1));
  assign init     = start && !busy;
  assign load     = busy && pm_empty && (oct_loaded != oct_total);
  assign sel      = (oct_loaded == 0) ? SEL_PHR :
                    (oct_loaded <= {1'b0, phr[6:0]}) ? SEL_PSDU : SEL_PAD;
  assign man_stb  = chip_stb && ((state == SEND_PAY && pay_chips != pay_total) ||
                                 (state == SEND_SHR && shr_idx == SHR_LAST));
  assign tx_chip  = (state == SEND_SHR) ? SHR[SHR_LAST - shr_idx] :
                    (state == SEND_PAY) ? man_chip : 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; tcnt <= '0; shr_idx <= '0; phr <= '0; done <= 1'b0;
      oct_loaded <= '0; oct_total <= '0; pay_chips <= '0; pay_total <= '0;
    end else begin
      done <= 1'b0;
      if (busy) tcnt <= (tcnt == TW'(OSR - 1)) ? '0 : tcnt + 1'b1;
      if (load) oct_loaded <= oct_loaded + 1'b1;
      unique case (state)
        IDLE: if (start) begin
          state      <= SEND_SHR;
          tcnt       <= '0;
          shr_idx    <= '0;
          phr        <= {1'b0, psdu_len};
          oct_loaded <= '0;
          oct_total  <= 8'(frame_octets(32'(psdu_len)));
          pay_total  <= 13'(frame_octets(32'(psdu_len)) * 2 * 16);
          pay_chips  <= '0;
        end
        SEND_SHR: if (chip_stb) begin
          if (shr_idx == SHR_LAST) begin
            state     <= SEND_PAY;
            pay_chips <= 13'd1;
          end else begin
            shr_idx <= shr_idx + 1'b1;
          end
        end
        SEND_PAY: if (chip_stb) begin
          if (pay_chips == pay_total) begin
            state <= IDLE;
            done  <= 1'b1;
          end else begin
            pay_chips <= pay_chips + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // The coding pipeline must always have a chip ready once the payload runs.
  a_no_underrun: assert property (@(posedge clk) disable iff (!rst_n)
    (state == SEND_PAY) |-> man_chip_valid);

endmodule
