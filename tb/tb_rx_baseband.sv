// tb_rx_baseband: drives reference frames (built by the reference model, not
// by the transmitter RTL) into the receiver baseband at random sample
// offsets, with and without chip errors, and checks rx_done, rx_len, the PSDU
// read back from RXFIFO, the error-corrected flag for a 4-bit burst, the
// dropped packet (rx_err, RXFIFO flushed) for two errors in one codeword, and
// that rx_done comes within three chips of the end of the frame.
module tb_rx_baseband;
  import wban_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rx_in = 0, rx_rd_en = 0;
  logic [7:0] rx_rdata;
  logic [6:0] rx_len;
  logic rx_empty, rx_done, rx_err, rx_locked, rx_sync, rx_fix, rx_adv, rx_ret;
  rx_baseband dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_done = 0, n_err = 0, n_fix = 0, cyc = 0, t_done = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (rx_done) begin n_done++; t_done = cyc; end
    if (rx_err) n_err++;
    if (rx_fix) n_fix++;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // flip: chip indices to invert
  task automatic frame(input int len, input int flip[$], input bit expect_err, input string name);
    byte unsigned p[$];
    bit ch[$];
    int d0, e0, f0, t_end, nrd;
    for (int k = 0; k < len; k++) p.push_back(byte'($urandom));
    ref_chips(p, ch);
    d0 = n_done; e0 = n_err; f0 = n_fix;
    repeat ($urandom % 16 + 30) @(negedge clk);
    foreach (ch[i]) begin
      bit f;
      f = 0;
      foreach (flip[k]) if (flip[k] == i) f = 1;
      rx_in = ch[i] ^ f;
      repeat (16) @(negedge clk);
    end
    t_end = cyc;
    rx_in = 0;
    repeat (100) @(negedge clk);
    if (expect_err) begin
      check(n_err == e0 + 1 && n_done == d0, {name, ": dropped with rx_err"});
      check(rx_empty, {name, ": RXFIFO flushed"});
    end else begin
      check(n_done == d0 + 1 && n_err == e0, {name, ": rx_done"});
      check(t_done <= t_end + 48, $sformatf("%s: rx_done %0d clocks after frame end", name, t_done - t_end));
      check(rx_len == 7'(len), {name, ": rx_len"});
      nrd = 0;
      for (int k = 0; k < len; k++) begin
        if (!rx_empty && rx_rdata == p[k]) nrd++;
        rx_rd_en = !rx_empty; @(negedge clk); rx_rd_en = 0;
      end
      check(nrd == len, $sformatf("%s: %0d of %0d octets right", name, nrd, len));
      check(rx_empty, {name, ": RXFIFO empty after read"});
      if (flip.size() > 0) check(n_fix > f0, {name, ": codewords corrected"});
    end
  endtask

  initial begin
    int none[$], burst[$], two[$];
    repeat (3) @(posedge clk); rst_n = 1;
    frame(0, none, 0, "len 0");
    frame(1, none, 0, "len 1");
    frame(8, none, 0, "len 8");
    frame(33, none, 0, "len 33");
    for (int c = 48 + 200; c < 48 + 208; c++) burst.push_back(c);
    frame(16, burst, 0, "burst");
    two = '{48 + 130, 48 + 131, 48 + 138, 48 + 139};   // bits 65 and 69: same codeword
    frame(16, two, 1, "double error");
    frame(127, none, 0, "len 127");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
