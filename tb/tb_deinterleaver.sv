// tb_deinterleaver: interleaves random codewords here (row by row across four
// codewords), feeds the 32 bits one per 32 clocks, and checks that the four
// codewords come back in order with random consumer stalls; clr restarts.
module tb_deinterleaver;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, in_bit = 0, in_valid = 0, cw_valid, cw_ready = 0;
  logic [7:0] cw;
  deinterleaver dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic [7:0] exp_q[$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // consumer
  int ngot = 0;
  always @(negedge clk) begin
    cw_ready = ($urandom % 3 != 0);
    #1;
    if (rst_n && cw_valid && cw_ready) begin
      check(exp_q.size() > 0 && cw == exp_q[0], $sformatf("codeword %0d", ngot));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      ngot++;
    end
  end

  initial begin
    logic [7:0] blk [4];
    repeat (3) @(posedge clk); rst_n = 1;
    // partial block, then clr
    for (int i = 0; i < 7; i++) begin
      @(negedge clk); in_bit = 1; in_valid = 1; @(negedge clk); in_valid = 0;
    end
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    for (int n = 0; n < 20; n++) begin
      for (int c = 0; c < 4; c++) begin blk[c] = 8'($urandom); exp_q.push_back(blk[c]); end
      for (int i = 0; i < 32; i++) begin
        repeat (31) @(negedge clk);
        in_bit = blk[i % 4][i / 4]; in_valid = 1;
        @(negedge clk); in_valid = 0;
      end
    end
    repeat (40) @(negedge clk);
    check(ngot == 80 && exp_q.size() == 0, $sformatf("%0d codewords out", ngot));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
