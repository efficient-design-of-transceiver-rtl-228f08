// tb_manchester_enc: sends random bits through the Manchester encoder with a
// chip strobe every 16 clocks and checks each pair of chips (0 -> 01,
// 1 -> 10), that every bit has a mid-bit transition, and that an empty
// buffer is reported as an underrun.
module tb_manchester_enc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic chip_stb;
  logic clr = 0, in_bit = 0, in_valid = 0, in_ready, chip, chip_valid;
  manchester_enc dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign chip_stb = rst_n && (cyc % 16 == 15);

  bit sent[$];
  bit chips[$];
  always @(posedge clk) if (rst_n && in_valid && in_ready) sent.push_back(in_bit);
  // sample chips in the middle of the chip period
  always @(posedge clk) if (rst_n && cyc % 16 == 7 && chip_valid) chips.push_back(chip);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      in_bit = $urandom % 2; in_valid = 1;
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      in_valid = 0;
      // keep the next bit back until the buffer has been consumed
    end
    in_valid = 0;
    repeat (100) @(negedge clk);
    check(chips.size() >= 200, $sformatf("%0d chips", chips.size()));
    for (int i = 0; i < 100 && 2 * i + 1 < chips.size(); i++) begin
      check(chips[2*i] == sent[i] && chips[2*i+1] == !sent[i], $sformatf("bit %0d chips", i));
      check(chips[2*i] != chips[2*i+1], "mid-bit transition");
    end
    repeat (64) @(negedge clk);
    check(!chip_valid && chip == 0, "underrun: idle chip");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
