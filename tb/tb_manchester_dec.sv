// tb_manchester_dec: Manchester-encodes random bits here, strobes the chips
// into the decoder after `sync`, and checks that each bit is the first chip of
// its pair, one clock after its strobe; a second sync restarts the pairing.
module tb_manchester_dec;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sync = 0, chip_stb = 0, chip = 0, bit_o, bit_valid;
  manchester_dec dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input int nbits, input bit odd_lead);
    // odd_lead: one stray chip before sync, to test that sync fixes pairing
    if (odd_lead) begin
      @(negedge clk); chip = 1; chip_stb = 1; @(negedge clk); chip_stb = 0;
    end
    for (int i = 0; i < nbits; i++) begin
      bit b;
      b = $urandom % 2;
      for (int h = 0; h < 2; h++) begin
        repeat (3) @(negedge clk);
        chip = h ? !b : b; chip_stb = 1; sync = (i == 0 && h == 0);
        @(negedge clk); chip_stb = 0; sync = 0;
        if (h == 0) check(bit_valid && bit_o == b, $sformatf("bit %0d", i));
        else        check(!bit_valid, "no bit on the second chip");
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    run(50, 0);
    run(50, 1);
    run(50, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
