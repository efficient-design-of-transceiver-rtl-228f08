// tb_sfd_corr: shifts random chips and then the SFD into the SFD correlator
// and compares the count of agreeing chips with one computed here; checks
// 16 at the SFD and at most 9 while the 1010 preamble precedes it.
module tb_sfd_corr;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, chip_stb = 0, chip = 0, newest;
  logic [4:0] corr;
  sfd_corr dut (.*);
  localparam logic [15:0] SFD_REF = 16'b0000_1011_0111_0011;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic [15:0] win = 0;

  task automatic push(input bit c);
    @(negedge clk); chip = c; chip_stb = 1;
    @(negedge clk); chip_stb = 0;
    win = {win[14:0], c};
    check(corr == 5'(16 - $countones(win ^ SFD_REF)), $sformatf("corr %0d", corr));
    check(newest == c, "newest chip");
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 50; i++) push($urandom % 2);
    for (int i = 0; i < 32; i++) begin
      push(i % 2 == 0);
      if (i >= 15) check(corr <= 9, "preamble alone gives low SFD correlation");
    end
    for (int i = 15; i >= 0; i--) begin
      push(SFD_REF[i]);
      if (i > 0) check(corr <= 9, "partial SFD overlap stays low");
    end
    check(corr == 16, "SFD matched");
    clr = 1; @(negedge clk); clr = 0; win = 0;
    check(corr == 5'(16 - $countones(SFD_REF)), "clr empties the chip register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
