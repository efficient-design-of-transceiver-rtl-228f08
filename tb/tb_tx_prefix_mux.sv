// tb_tx_prefix_mux: loads PHR, PSDU and pad octets through the Prefix MUX
// and checks the serial bits (LSB first), the TXFIFO pop strobe and that
// the consumer's ready stalls the output.
module tb_tx_prefix_mux;
  import wban_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, load = 0, bit_ready = 0;
  tx_sel_e sel = SEL_PHR;
  logic [7:0] phr = 8'h35, fifo_rdata = 8'hC6;
  logic fifo_rd, empty, bit_o, bit_valid;
  tx_prefix_mux dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic one(input tx_sel_e s, input logic [7:0] exp_oct);
    logic [7:0] got;
    int n;
    @(negedge clk);
    check(empty, "empty before load");
    sel = s; load = 1; #1;
    check(fifo_rd == (s == SEL_PSDU), "fifo_rd only for PSDU");
    @(negedge clk); load = 0;
    n = 0;
    while (n < 8) begin
      bit_ready = ($urandom % 3 != 0);
      check(bit_valid, "bit valid while octet pending");
      if (bit_ready) begin got[n] = bit_o; n++; end
      @(negedge clk);
    end
    bit_ready = 0;
    check(got == exp_oct, $sformatf("octet %h expected %h", got, exp_oct));
    check(empty && !bit_valid, "empty after 8 bits");
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      phr = 8'($urandom); fifo_rdata = 8'($urandom);
      one(SEL_PHR, phr);
      one(SEL_PSDU, fifo_rdata);
      one(SEL_PAD, 8'h00);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
