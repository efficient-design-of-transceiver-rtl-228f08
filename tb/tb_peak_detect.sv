// tb_peak_detect: feeds triangular and flat-topped sequences with gaps in
// `valid` and checks that exactly one peak is reported, in the cycle of the
// first lower value, with the right value; values below the threshold give
// none, and clr forgets the previous value.
module tb_peak_detect;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, valid = 0, peak;
  logic [8:0] value = 0, thr = 9'd200, peak_val;
  peak_detect #(.W(9)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Apply a sequence; expect a peak at index exp_idx (-1: none) with value exp_v.
  task automatic run(input int seq[$], input int exp_idx, input int exp_v);
    int npk = 0;
    foreach (seq[i]) begin
      @(negedge clk);
      while ($urandom % 3 == 0) begin valid = 0; #1; check(!peak, "no peak without valid"); @(negedge clk); end
      valid = 1; value = 9'(seq[i]); #1;
      if (peak) begin
        npk++;
        check(i == exp_idx, $sformatf("peak at %0d expected %0d", i, exp_idx));
        check(peak_val == 9'(exp_v), "peak value");
      end
    end
    @(negedge clk); valid = 0;
    check(npk == (exp_idx < 0 ? 0 : 1), $sformatf("%0d peaks", npk));
    clr = 1; @(negedge clk); clr = 0;
  endtask

  initial begin
    int s[$];
    repeat (3) @(posedge clk); rst_n = 1;
    s = '{100, 150, 190, 210, 240, 256, 240, 210, 180, 120};   run(s, 6, 256);
    s = '{100, 210, 230, 230, 230, 220, 100};                  run(s, 5, 230);
    s = '{100, 150, 199, 150, 100};                            run(s, -1, 0);
    s = '{0, 50, 200, 201, 100, 100, 30, 20};                  run(s, 4, 201);
    for (int k = 0; k < 20; k++) begin
      int top;
      top = 200 + $urandom % 56;
      s = '{};
      for (int v = 120; v < top; v += 16) s.push_back(v);
      s.push_back(top);
      s.push_back(top - 16); s.push_back(top - 40);
      run(s, s.size() - 2, top);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
