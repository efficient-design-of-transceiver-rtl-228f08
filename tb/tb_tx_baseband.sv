// tb_tx_baseband: transmits packets of several lengths (0, odd, even, 127)
// and compares the chip stream with the reference frame model, chip by chip,
// sampling mid-chip; checks the frame duration (SHR and payload at 16
// clocks per chip, tx_done one clock after the last chip), that busy covers
// the frame and that the line idles at 0 afterwards.
module tb_tx_baseband;
  import wban_ref_pkg::*;
  localparam int OSR = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic tx_wr_en = 0, tx_start = 0, tx_full, tx_busy, tx_done, tx_chip;
  logic [7:0] tx_wdata = 0;
  logic [6:0] tx_psdu_len = 0;
  tx_baseband dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic send(input int len);
    byte unsigned p[$];
    bit ref_c[$];
    int bad, ncyc, i;
    for (int k = 0; k < len; k++) p.push_back(byte'($urandom));
    ref_chips(p, ref_c);
    foreach (p[k]) begin @(negedge clk); tx_wr_en = 1; tx_wdata = p[k]; end
    @(negedge clk); tx_wr_en = 0; tx_start = 1; tx_psdu_len = 7'(len);
    @(negedge clk); tx_start = 0;
    // now one clock after start: chip 0 on the line
    bad = 0; ncyc = 1;
    for (i = 0; i < ref_c.size(); i++) begin
      repeat (8) @(negedge clk);
      if (tx_chip != ref_c[i]) bad++;
      if (!tx_busy) bad++;
      repeat (8) @(negedge clk);
      ncyc += 16;
      if (tx_done && i != ref_c.size() - 1) bad++;
    end
    check(bad == 0, $sformatf("len %0d: %0d chip mismatches", len, bad));
    check(tx_done, $sformatf("len %0d: tx_done after %0d clocks", len, ncyc));
    @(negedge clk);
    check(!tx_busy && !tx_done && tx_chip == 0, "idle after frame");
    repeat (50) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    send(0); send(1); send(2); send(9); send(30); send(127);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
