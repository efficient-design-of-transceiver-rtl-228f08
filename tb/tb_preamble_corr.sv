// tb_preamble_corr: drives random chips and then the 1010 preamble, 16
// samples per chip, into the shift-register matrix and compares the
// registered correlation every clock with a count computed here from the
// sample history; checks that the clean preamble reaches the full 256 at chip
// alignment, and checks the confirmed-edge output (two equal samples after a
// change).
module tb_preamble_corr;
  localparam int OSR = 16, WIN = 16, N = OSR * WIN;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sample = 0, newest, edge_o;
  logic [8:0] corr;
  preamble_corr #(.OSR(OSR), .WIN(WIN)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit hist[$];     // hist[0] = most recent sample applied
  function automatic int expect_corr(input int lag);
    int c = 0;
    for (int i = 0; i < N; i++) begin
      bit s, t;
      s = (lag + i < hist.size()) ? hist[lag + i] : 1'b0;
      t = ((i / OSR) % 2 == 1);   // preamble 1010...: newest chip 0, then 1, ...
      c += (s == t);
    end
    return c;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int maxc = 0, nfull = 0;
  task automatic drive_chip(input bit v);
    for (int k = 0; k < OSR; k++) begin
      @(negedge clk);
      if (hist.size() >= 4) begin
        check(corr == 9'(expect_corr(1)), $sformatf("corr %0d expected %0d", corr, expect_corr(1)));
        check(newest == hist[0] && edge_o == (hist[0] == hist[1] && hist[1] != hist[2]), "newest/edge");
        if (corr == 9'(N)) nfull++;
      end
      sample = v;
      hist.push_front(v);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 40; i++) drive_chip($urandom % 2);
    for (int i = 0; i < 40; i++) drive_chip(i % 2 == 0);   // 1,0,1,0...
    for (int i = 0; i < 4; i++) drive_chip(0);
    check(nfull >= 10, $sformatf("full correlation reached %0d times", nfull));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
