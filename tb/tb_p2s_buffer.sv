// tb_p2s_buffer: offers random nibbles with random gaps and checks the bits
// come out LSB first, one per clock, four per nibble, with nib_ready high
// only when the buffer is empty.
module tb_p2s_buffer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, nib_valid = 0, nib_ready, bit_o, bit_valid;
  logic [3:0] nib = 0;
  p2s_buffer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  bit q[$];
  int nbits = 0;
  always @(posedge clk) if (rst_n && bit_valid) begin
    check(q.size() > 0 && bit_o == q[0], $sformatf("bit %0d", nbits));
    if (q.size() > 0) void'(q.pop_front());
    nbits++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      while (!nib_ready) @(negedge clk);
      nib = 4'($urandom); nib_valid = 1;
      for (int b = 0; b < 4; b++) q.push_back(nib[b]);
      @(negedge clk); nib_valid = 0;
      for (int b = 0; b < 3; b++) begin
        check(!nib_ready && bit_valid, "busy for four clocks");
        @(negedge clk);
      end
      repeat ($urandom % 3) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    check(nbits == 800 && q.size() == 0, $sformatf("%0d bits", nbits));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
