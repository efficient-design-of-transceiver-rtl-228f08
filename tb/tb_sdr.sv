// tb_sdr: drives reference frames into the synchronisation and data recovery
// block at random sample offsets, with chips of nominal (16 samples), long
// (a 17-sample chip now and then) and short (15-sample) length, and checks
// that bit lock and packet sync happen once, that the recovered chips after
// packet sync equal the frame's payload chips, that data strobes come every
// 16 clocks without drift, that realignment moves the sampling point the
// right way, that `restart` releases the lock, and that a preamble without an
// SFD times out.
module tb_sdr;
  import wban_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rx_in = 0, restart = 0;
  logic chip_stb, data_stb, data_chip, pkt_sync, locked, adj_adv, adj_ret;
  sdr dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_sync = 0, n_adv = 0, n_ret = 0, last_stb = 0, cyc = 0, bad_gap = 0;
  bit in_data = 0;
  bit got[$];
  always @(posedge clk) begin
    cyc++;
    if (pkt_sync) begin n_sync++; in_data = 1; end
    if (adj_adv) n_adv++;
    if (adj_ret) n_ret++;
    if (data_stb) begin
      got.push_back(data_chip);
      if (got.size() > 1 && cyc - last_stb != 16) bad_gap++;
      last_stb = cyc;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // stretch: 0 nominal, +1 every 12th chip is 17 samples, -1 every 12th is 15
  task automatic frame(input int len, input int stretch, input string name);
    byte unsigned p[$];
    bit ch[$];
    int bad = 0;
    for (int k = 0; k < len; k++) p.push_back(byte'($urandom));
    ref_chips(p, ch);
    got.delete(); n_sync = 0; n_adv = 0; n_ret = 0; bad_gap = 0;
    repeat ($urandom % 16 + 40) @(negedge clk);
    foreach (ch[i]) begin
      int ns;
      ns = 16 + ((i % 12 == 11) ? stretch : 0);
      rx_in = ch[i];
      repeat (ns) @(negedge clk);
    end
    rx_in = 0;
    repeat (40) @(negedge clk);
    check(locked, {name, ": locked"});
    check(n_sync == 1, $sformatf("%s: %0d packet syncs", name, n_sync));
    check(got.size() >= ch.size() - 48 - 1,
          $sformatf("%s: %0d chips recovered of %0d", name, got.size(), ch.size() - 48));
    for (int i = 48; i < ch.size() && i - 48 < got.size(); i++) if (got[i - 48] != ch[i]) bad++;
    check(bad == 0, $sformatf("%s: %0d chips wrong", name, bad));
    if (stretch == 0) check(bad_gap == 0, {name, ": data strobe every 16 clocks"});
    if (stretch > 0) check(n_ret > 0 && n_adv <= 1, $sformatf("%s: retards %0d advances %0d", name, n_ret, n_adv));
    if (stretch < 0) check(n_adv > 0 && n_ret <= 1, $sformatf("%s: advances %0d retards %0d", name, n_adv, n_ret));
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    check(!locked, {name, ": restart releases lock"});
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (100) @(negedge clk);
    check(!locked, "no lock on idle line");
    for (int k = 0; k < 4; k++) frame(6 + k, 0, "nominal");
    frame(20, 1, "slow transmitter");
    frame(20, -1, "fast transmitter");
    // bare preamble, no SFD: must lock, then time out
    for (int i = 0; i < 32; i++) begin rx_in = (i % 2 == 0); repeat (16) @(negedge clk); end
    rx_in = 0;
    check(locked, "bare preamble locks");
    repeat (16 * 120) @(negedge clk);
    check(!locked, "SFD search times out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
