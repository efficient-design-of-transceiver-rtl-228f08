// tx_prefix_mux: the Prefix MUX of the transmitter. It chooses, under control
// of the TX state machine, where the next octet of the coded frame comes from
// (the PHR, the head of TXFIFO, or a zero pad octet) and serialises that
// octet one bit at a time into the Hamming encoder.
//
// Interface: when `empty` is high the controller pulses `load` with `sel`;
// the selected octet is copied into an 8-bit shift register (and TXFIFO is
// popped when sel is PSDU). Bits leave LSB first on a valid/ready pair, one
// per clock when the consumer is ready. `empty` rises in the cycle after the
// eighth bit is taken. The multiplexer and its control by the state machine
// follow the published design; LSB-first order and the pad octet (which fills
// the last 8x4 interleaver block) are this design's choices.
module tx_prefix_mux
  import wban_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       load,
  input  tx_sel_e    sel,
  input  logic [7:0] phr,
  input  logic [7:0] fifo_rdata,
  output logic       fifo_rd,
  output logic       empty,
  output logic       bit_o,
  output logic       bit_valid,
  input  logic       bit_ready
);
  logic [7:0] sh;
  logic [3:0] left;   // bits still to send

  assign empty     = (left == 0);
  assign bit_valid = !empty;
  assign bit_o     = sh[0];
  assign fifo_rd   = load && empty && (sel == SEL_PSDU);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh   <= '0;
      left <= '0;
    end else if (clr) begin
      left <= '0;
    end else if (load && empty) begin
      unique case (sel)
        SEL_PHR:  sh <= phr;
        SEL_PSDU: sh <= fifo_rdata;
        default:  sh <= 8'h00;
      endcase
      left <= 4'd8;
    end else if (bit_valid && bit_ready) begin
      sh   <= {1'b0, sh[7:1]};
      left <= left - 1'b1;
    end
  end

  a_load_when_empty: assert property (@(posedge clk) disable iff (!rst_n) load |-> empty);

endmodule
