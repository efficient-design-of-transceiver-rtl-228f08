// tb_scrambler: runs a scrambler and a descrambler (two instances) back to
// back and checks that data comes through; checks the PRBS against a
// x^7+x^4+1 model, that it has period 127 with 64 ones, and that init
// restarts the sequence.
module tb_scrambler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init = 0, in_bit = 0, in_valid = 0, s_out, d_out;
  scrambler u_s (.clk, .rst_n, .init, .in_bit, .in_valid, .out_bit(s_out));
  scrambler u_d (.clk, .rst_n, .init, .in_bit(s_out), .in_valid, .out_bit(d_out));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [6:0] m;
    bit seq[$];
    int ones;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    m = 7'h7F;
    // PRBS: feed zeros
    for (int i = 0; i < 254; i++) begin
      bit p;
      in_bit = 0; in_valid = 1; #1;
      p = m[6] ^ m[3]; m = {m[5:0], p};
      check(s_out == p, $sformatf("prbs bit %0d", i));
      seq.push_back(s_out);
      @(negedge clk);
    end
    ones = 0;
    for (int i = 0; i < 127; i++) begin
      ones += seq[i];
      check(seq[i] == seq[i + 127], "period 127");
    end
    check(ones == 64, $sformatf("%0d ones per period", ones));
    // round trip with stalls
    in_valid = 0;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    for (int i = 0; i < 500; i++) begin
      in_valid = $urandom % 2; in_bit = $urandom % 2; #1;
      if (in_valid) check(d_out == in_bit, "descrambled equals data");
      @(negedge clk);
    end
    // init restarts
    in_valid = 0; init = 1; @(negedge clk); init = 0; in_bit = 0; #1;
    check(s_out == (1'b1 ^ 1'b1), "first PRBS bit after init");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
