// tb_wban_per: packet error rate of the looped-back transceiver against
// sample noise. The channel inverts each 4 MHz sample of the chip stream
// independently with probability P (a crude stand-in for demodulator noise:
// single-sample glitches, and a chip error rate of about P at the mid-chip
// sampling point). For each P, NPKT packets of 16 random octets are sent; a
// packet counts as received only if rx_done reports the right length and
// RXFIFO holds exactly the sent data. Packets dropped with rx_err, missed,
// or delivered wrong are counted separately. Checks: no loss without noise,
// and a loss rate that does not fall as the noise rises (within a margin).
module tb_wban_per;
  localparam int OSR = 16, NPKT = 32, LEN = 16;

  logic clk = 0, rst_n = 0;
  always #125 clk = ~clk;

  logic       tx_wr_en = 0, tx_start = 0, rx_rd_en = 0;
  logic [7:0] tx_wdata = 0;
  logic [6:0] tx_psdu_len = 0;
  logic       tx_full, tx_busy, tx_done, tx_chip, rx_in;
  logic [7:0] rx_rdata;
  logic [6:0] rx_len;
  logic       rx_empty, rx_done, rx_err, rx_locked, rx_sync, rx_fix, rx_adv, rx_ret;

  wban_transceiver dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int p_ppm = 0;           // sample inversion probability, parts per million
  always @(posedge clk) rx_in <= tx_chip ^ (($urandom % 1000000) < p_ppm);

  bit seen_done = 0, seen_err = 0;
  int n_fix = 0;
  always @(posedge clk) if (rst_n) begin
    if (rx_done) seen_done = 1;
    if (rx_err) seen_err = 1;
    if (rx_fix) n_fix++;
  end

  initial begin : watchdog
    repeat (6000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // returns 0 ok, 1 dropped (rx_err), 2 missed, 3 wrong data
  task automatic one_packet(output int result);
    byte unsigned p[$];
    int good;
    for (int i = 0; i < LEN; i++) p.push_back(byte'($urandom));
    foreach (p[i]) begin @(negedge clk); tx_wr_en = 1; tx_wdata = p[i]; end
    @(negedge clk); tx_wr_en = 0; tx_start = 1; tx_psdu_len = 7'(LEN);
    seen_done = 0; seen_err = 0;
    @(negedge clk); tx_start = 0;
    while (tx_busy) @(negedge clk);
    for (int i = 0; i < 48 * OSR && !seen_done && !seen_err; i++) @(negedge clk);
    good = 0;
    if (seen_done && rx_len == 7'(LEN)) begin
      for (int i = 0; i < LEN; i++) begin
        if (!rx_empty && rx_rdata == p[i]) good++;
        rx_rd_en = !rx_empty; @(negedge clk); rx_rd_en = 0;
      end
    end
    // drain whatever is left
    while (!rx_empty) begin rx_rd_en = 1; @(negedge clk); rx_rd_en = 0; end
    if (seen_done && good == LEN) result = 0;
    else if (seen_err)            result = 1;
    else if (!seen_done)          result = 2;
    else                          result = 3;
    // let a long false frame run out before the next packet
    repeat (200 * OSR) @(negedge clk);
  endtask

  initial begin
    int levels[5] = '{0, 5000, 10000, 20000, 40000};
    int lost[5];
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (20 * OSR) @(posedge clk);
    foreach (levels[k]) begin
      int cnt[4];
      cnt = '{0, 0, 0, 0};
      p_ppm = levels[k];
      n_fix = 0;
      for (int n = 0; n < NPKT; n++) begin
        int r;
        one_packet(r);
        cnt[r]++;
      end
      lost[k] = NPKT - cnt[0];
      $display("sample error %0.1f%%: ok %0d, dropped %0d, missed %0d, wrong %0d, PER %0.2f, codewords corrected %0d",
               levels[k] / 10000.0, cnt[0], cnt[1], cnt[2], cnt[3], real'(lost[k]) / NPKT, n_fix);
    end
    check(lost[0] == 0, "no packet lost without noise");
    check(lost[4] + 3 >= lost[1], "loss does not fall as noise rises");
    check(lost[4] > 0, "noise reaches the decoder");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
