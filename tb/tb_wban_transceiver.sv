// tb_wban_transceiver: end-to-end test of the WBAN baseband at its default
// parameters. The transmitter's chip stream is looped back to the receiver
// through a behavioural channel that adds a fixed delay, clock drift (a
// sample repeated or dropped every DRIFT clocks), chip errors and, for one
// case, a bare preamble with no SFD. Every packet's chips are compared with
// the reference model, the TX frame length in clocks is checked against
// (48 + 32 * octets) * 16, and the received PSDU is compared with the sent
// one. Mechanisms counted (each must occur): bit lock, packet sync, pad
// octet, sampling-point advance and retard, corrected codeword, dropped
// packet on an uncorrectable codeword, SFD timeout, maximum-length PSDU.
module tb_wban_transceiver;
  import wban_ref_pkg::*;

  localparam int OSR = 16;

  logic clk = 0, rst_n = 0;
  always #125 clk = ~clk;   // 4 MHz

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
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- channel ----------------
  int  drift = 0;          // 0: none, >0: repeat a sample every drift clocks, <0: drop one
  bit  flip = 0;           // invert the transmitted chip (error injection)
  bit  force_en = 0;       // drive the channel from force_val instead of TX
  bit  force_val = 0;
  bit  q[$];
  int  dcnt = 0;
  bit  ch_out = 0;
  assign rx_in = ch_out;

  always @(posedge clk) begin
    q.push_back(force_en ? force_val : (tx_chip ^ flip));
    dcnt++;
    if (drift > 0 && dcnt >= drift) begin
      dcnt = 0;                       // transmitter slow: hold the output one clock
    end else begin
      if (drift < 0 && dcnt >= -drift && q.size() > 1) begin
        dcnt = 0;
        void'(q.pop_front());         // transmitter fast: skip a sample
      end
      if (q.size() > 5) ch_out <= q.pop_front();
    end
  end

  // ---------------- mechanism counters ----------------
  int n_lock = 0, n_sync = 0, n_adv = 0, n_ret = 0, n_fix = 0, n_err = 0, n_done = 0;
  int n_pad = 0, n_timeout = 0, n_max = 0;
  logic locked_q = 0;
  bit   synced_since_lock = 0;
  bit   seen_done = 0, seen_err = 0;
  always @(posedge clk) if (rst_n) begin
    locked_q <= rx_locked;
    if (rx_locked && !locked_q) begin n_lock++; synced_since_lock = 0; end
    if (rx_sync) begin n_sync++; synced_since_lock = 1; end
    if (!rx_locked && locked_q && !synced_since_lock) n_timeout++;
    if (rx_adv) n_adv++;
    if (rx_ret) n_ret++;
    if (rx_fix) n_fix++;
    if (rx_err) begin n_err++; seen_err = 1; end
    if (rx_done) begin n_done++; seen_done = 1; end
  end

  // ---------------- tx chip capture ----------------
  bit cap_on = 0;
  bit cap[$];
  int cap_phase = 0;
  always @(posedge clk) begin
    if (cap_on) begin
      if (cap_phase == 8) cap.push_back(tx_chip);
      cap_phase = (cap_phase + 1) % OSR;
    end
  end

  // Send one packet; err_chips lists chip indices to invert on the TX side.
  task automatic send(input byte unsigned psdu[$], input int err_chips[$],
                      input bit expect_err, input string name);
    bit ref_c[$];
    int t0, t_done, nchips, len, nrx;
    bit got_done, got_err;
    len = psdu.size();
    ref_chips(psdu, ref_c);
    nchips = ref_c.size();
    if ((len + 1) % 2) n_pad++;
    if (len == 127) n_max++;
    foreach (psdu[i]) begin
      @(negedge clk); tx_wr_en = 1; tx_wdata = psdu[i];
    end
    @(negedge clk); tx_wr_en = 0; tx_start = 1; tx_psdu_len = 7'(len);
    cap.delete(); cap_phase = 0;
    seen_done = 0; seen_err = 0;
    @(posedge clk); t0 = $time / 250;
    @(negedge clk); tx_start = 0; cap_on = 1;
    // error injection and wait for tx_done
    t_done = 0;
    for (int c = 0; c < nchips + 4 && t_done == 0; c++) begin
      bit f;
      f = 0;
      foreach (err_chips[k]) if (err_chips[k] == c) f = 1;
      flip = f;
      repeat (OSR) begin
        @(posedge clk);
        if (tx_done && t_done == 0) t_done = $time / 250;
      end
    end
    flip = 0; cap_on = 0;
    check(t_done != 0, {name, ": tx_done seen"});
    check(t_done - t0 == nchips * OSR + 1,
          $sformatf("%s: frame length %0d clocks, expected %0d", name, t_done - t0, nchips * OSR + 1));
    check(cap.size() >= nchips, {name, ": chips captured"});
    begin
      int bad = 0;
      for (int i = 0; i < nchips && i < cap.size(); i++) if (cap[i] != ref_c[i]) bad++;
      check(bad == 0, $sformatf("%s: %0d TX chips differ from the reference", name, bad));
    end
    // wait for the receiver
    for (int i = 0; i < 40 * OSR && !seen_done && !seen_err; i++) @(posedge clk);
    got_done = seen_done; got_err = seen_err;
    if (expect_err) begin
      check(got_err && !got_done, {name, ": packet dropped with rx_err"});
      check(rx_empty, {name, ": RXFIFO flushed"});
    end else begin
      check(got_done && !got_err, {name, ": rx_done"});
      check(rx_len == 7'(len), $sformatf("%s: rx_len %0d expected %0d", name, rx_len, len));
      nrx = 0;
      @(negedge clk);
      for (int i = 0; i < len; i++) begin
        if (!rx_empty && rx_rdata == psdu[i]) nrx++;
        rx_rd_en = !rx_empty; @(negedge clk); rx_rd_en = 0;
      end
      check(nrx == len, $sformatf("%s: %0d of %0d octets received intact", name, nrx, len));
      check(rx_empty, {name, ": RXFIFO empty after reading"});
    end
    repeat (20 * OSR) @(posedge clk);
  endtask

  function automatic void rand_psdu(input int len, output byte unsigned p[$]);
    p.delete();
    for (int i = 0; i < len; i++) p.push_back(byte'($urandom));
  endfunction

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned p[$];
    int none[$];
    int burst[$];
    int two[$];
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (20 * OSR) @(posedge clk);

    rand_psdu(5, p);  send(p, none, 0, "plain len 5");
    rand_psdu(4, p);  send(p, none, 0, "pad len 4");
    rand_psdu(0, p);  send(p, none, 0, "empty PSDU");
    drift = 300;      // transmitter clock 0.33% slow
    rand_psdu(24, p); send(p, none, 0, "slow TX len 24");
    drift = -300;     // transmitter clock 0.33% fast
    rand_psdu(23, p); send(p, none, 0, "fast TX len 23");
    drift = 0;
    // burst of 8 chips = 4 consecutive coded bits (bits 40..43 of the payload)
    for (int c = 48 + 80; c < 48 + 88; c++) burst.push_back(c);
    rand_psdu(10, p); send(p, burst, 0, "burst error len 10");
    // two errors in the first codeword of the second block (rows 0 and 1, column 0)
    two = '{48 + 64, 48 + 65, 48 + 72, 48 + 73};
    rand_psdu(10, p); send(p, two, 1, "double error len 10");
    // bare preamble: lock, no SFD, back to search
    force_val = 1; force_en = 1;
    for (int i = 0; i < 32; i++) begin
      force_val = (i % 2 == 0);
      repeat (OSR) @(posedge clk);
    end
    force_val = 0;
    repeat (200 * OSR) @(posedge clk);
    force_en = 0;
    repeat (20 * OSR) @(posedge clk);
    // longest PSDU, with drift
    drift = 500;
    rand_psdu(127, p); send(p, none, 0, "max len 127");
    drift = 0;

    $display("mechanisms: lock=%0d sync=%0d pad=%0d adv=%0d ret=%0d fix=%0d err=%0d timeout=%0d max=%0d done=%0d",
             n_lock, n_sync, n_pad, n_adv, n_ret, n_fix, n_err, n_timeout, n_max, n_done);
    check(n_lock > 0,    "bit lock happened");
    check(n_sync == 8,   $sformatf("packet sync count %0d", n_sync));
    check(n_pad > 0,     "pad octet used");
    check(n_adv > 0,     "realignment advanced");
    check(n_ret > 0,     "realignment retarded");
    check(n_fix >= 4,    "burst corrected by FEC");
    check(n_err == 1,    "uncorrectable codeword dropped a packet");
    check(n_timeout > 0, "SFD timeout");
    check(n_max == 1,    "maximum PSDU sent");
    check(n_done == 7,   "seven packets received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
