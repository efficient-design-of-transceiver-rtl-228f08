// tb_hamming_dec: encodes every nibble here, then decodes it with no error,
// with each single-bit error (must be corrected and flagged) and with each
// pair of bit errors (must be flagged uncorrectable), through the decoder's
// valid/ready pipeline stage with random stalls.
module tb_hamming_dec;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, cw_valid = 0, cw_ready, nib_valid, nib_ready = 1, corrected, uncorrectable;
  logic [7:0] cw = 0;
  logic [3:0] nib;
  hamming_dec dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic logic [7:0] enc(input logic [3:0] d);
    logic [6:0] c;
    c = {d[1] ^ d[2] ^ d[3], d[0] ^ d[2] ^ d[3], d[0] ^ d[1] ^ d[3], d};
    return {^c, c};
  endfunction

  typedef struct { logic [3:0] d; int nerr; } exp_t;
  exp_t q[$];
  int n_ok = 0;

  always @(negedge clk) begin
    nib_ready = ($urandom % 4 != 0);
    #1;
    if (rst_n && nib_valid && nib_ready) begin
      exp_t e;
      e = q.pop_front();
      if (e.nerr <= 1) check(nib == e.d && !uncorrectable, $sformatf("data %h expected %h", nib, e.d));
      check(corrected == (e.nerr == 1), "corrected flag");
      check(uncorrectable == (e.nerr == 2), "uncorrectable flag");
      n_ok++;
    end
  end

  task automatic put(input logic [7:0] c, input logic [3:0] d, input int nerr);
    @(negedge clk);
    cw = c; cw_valid = 1; #2;
    while (!cw_ready) begin @(negedge clk); #2; end
    q.push_back('{d, nerr});
    @(posedge clk); #1;
    @(negedge clk); cw_valid = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int total = 0;
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int d = 0; d < 16; d++) begin
      put(enc(4'(d)), 4'(d), 0); total++;
      for (int a = 0; a < 8; a++) begin
        put(enc(4'(d)) ^ (8'd1 << a), 4'(d), 1); total++;
        for (int b = a + 1; b < 8; b++) begin
          put(enc(4'(d)) ^ (8'd1 << a) ^ (8'd1 << b), 4'(d), 2); total++;
        end
      end
    end
    repeat (20) @(negedge clk);
    check(n_ok == total, $sformatf("%0d of %0d decoded", n_ok, total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
