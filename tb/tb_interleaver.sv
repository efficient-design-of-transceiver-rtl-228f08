// tb_interleaver: writes blocks of four random codewords and checks that the
// 32 serial output bits come row by row (bit r of codewords 0..3), with
// random back-pressure on the output.
module tb_interleaver;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, cw_valid = 0, cw_ready, out_bit, out_valid, out_ready = 0;
  logic [7:0] cw = 0;
  interleaver dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] blk [4];
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      for (int c = 0; c < 4; c++) begin
        blk[c] = 8'($urandom);
        @(negedge clk);
        check(cw_ready && !out_valid, "accepting while filling");
        cw = blk[c]; cw_valid = 1;
        @(negedge clk); cw_valid = 0;
      end
      check(!cw_ready, "full matrix refuses codewords");
      for (int i = 0; i < 32; ) begin
        out_ready = ($urandom % 2);
        check(out_valid, "output valid while draining");
        if (out_ready) begin
          check(out_bit == blk[i % 4][i / 4], $sformatf("block %0d bit %0d", n, i));
          i++;
        end
        @(negedge clk);
      end
      out_ready = 0;
      check(!out_valid, "empty after 32 bits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
