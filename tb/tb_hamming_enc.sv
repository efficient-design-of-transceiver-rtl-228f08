// tb_hamming_enc: feeds all 16 nibbles (and random ones) bit-serially into
// the (8,4) encoder and compares each codeword with parity equations written
// out here, and checks the minimum distance property by pairwise distance.
module tb_hamming_enc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, in_bit = 0, in_valid = 0, in_ready, cw_valid, cw_ready = 0;
  logic [7:0] cw;
  hamming_enc dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic logic [7:0] expect_cw(input logic [3:0] d);
    logic p0, p1, p2, p3;
    p0 = d[0] ^ d[1] ^ d[3];
    p1 = d[0] ^ d[2] ^ d[3];
    p2 = d[1] ^ d[2] ^ d[3];
    p3 = d[0] ^ d[1] ^ d[2] ^ d[3] ^ p0 ^ p1 ^ p2;
    return {p3, p2, p1, p0, d};
  endfunction

  logic [7:0] got [16];

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 48; k++) begin
      logic [3:0] d;
      d = (k < 16) ? 4'(k) : 4'($urandom);
      for (int b = 0; b < 4; b++) begin
        @(negedge clk);
        in_valid = 1; in_bit = d[b];
        while (!in_ready) @(negedge clk);
        @(negedge clk); in_valid = 0;
      end
      while (!cw_valid) @(negedge clk);
      check(cw == expect_cw(d), $sformatf("cw %h for %h expected %h", cw, d, expect_cw(d)));
      if (k < 16) got[k] = cw;
      check(!in_ready, "stalls while codeword waits");
      repeat ($urandom % 3) @(negedge clk);
      cw_ready = 1; @(negedge clk); cw_ready = 0;
      check(!cw_valid, "codeword taken");
    end
    for (int a = 0; a < 16; a++)
      for (int b = a + 1; b < 16; b++)
        check($countones(got[a] ^ got[b]) >= 4, "minimum distance 4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
