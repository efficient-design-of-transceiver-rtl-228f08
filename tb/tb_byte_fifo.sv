// tb_byte_fifo: checks the octet FIFO against a queue model with random
// pushes and pops, fills it to DEPTH to see `full`, checks that a write when
// full is refused, and that clr empties it. The read port is show-ahead.
module tb_byte_fifo;
  localparam int DEPTH = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, wr_en = 0, rd_en = 0;
  logic [7:0] wdata = 0, rdata;
  logic empty, full;
  logic [7:0] count;
  byte_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  byte unsigned model[$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(empty && count == 0, "empty after reset");
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      wr_en = ($urandom % 3 != 0) && model.size() < DEPTH;
      rd_en = ($urandom % 2 == 0) && model.size() > 0;
      wdata = 8'($urandom);
      if (rd_en) check(rdata == model[0], $sformatf("head %h expected %h", rdata, model[0]));
      @(negedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wdata);
      check(count == model.size(), "count");
      check(empty == (model.size() == 0), "empty flag");
    end
    wr_en = 0; rd_en = 0;
    // fill up
    while (model.size() < DEPTH) begin
      wr_en = 1; wdata = 8'($urandom); @(negedge clk); model.push_back(wdata);
    end
    wr_en = 0;
    check(full && count == DEPTH, "full at DEPTH");
    // drain and compare
    while (model.size() > 0) begin
      check(rdata == model[0], "drain order");
      rd_en = 1; @(negedge clk); void'(model.pop_front());
    end
    rd_en = 0;
    check(empty, "empty after drain");
    // clr
    wr_en = 1; repeat (5) @(negedge clk); wr_en = 0;
    clr = 1; @(negedge clk); clr = 0;
    check(empty && count == 0, "clr flushes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
