// tb_crypto_bist_top: end-to-end test of the crypto core with self-test at
// its default parameters (SEA_96,8 with 93 rounds, MSIC generator with a
// 12-bit seed and an 11-stage Johnson counter, 1408 patterns per pass).
//
// Sequence: normal encryptions and decryptions checked against the
// reference cipher and for latency; a self-test start while the core is
// busy (ignored); a test-per-clock self-test and a test-per-scan self-test,
// each checked against the reference signature and for a pass verdict; a
// normal start during a self-test (ignored); a self-test with a stuck-at-0
// fault forced on one response bit, which must fail; and normal operation
// again afterwards. Every mechanism is counted and must occur.
module tb_crypto_bist_top;
  import crypto_bist_pkg::*;
  import sea_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, decrypt = 0;
  bist_mode_e  mode = MODE_NORMAL;
  tpg_scheme_e scan_scheme = SCHEME_PER_CLOCK;
  logic [95:0] data_in = '0, key_in = '0, data_out, signature;
  logic busy, done, test_busy, test_done, test_pass;
  logic [143:0] tpg_vec;
  logic tpg_shift, tpg_capture;

  crypto_bist_top dut (.*);

  always #5 clk = ~clk;

  // mechanism counters
  int n_enc = 0, n_dec = 0, n_test_clock = 0, n_test_scan = 0, n_pass = 0, n_fail = 0;
  int n_seed = 0, n_shift = 0, n_capture = 0, n_compact = 0, n_ignored = 0;

  always @(posedge clk) begin
    if (dut.u_tpg.clk1_en) n_seed++;
    if (tpg_shift)         n_shift++;
    if (tpg_capture)       n_capture++;
    if (dut.u_bist.misr_en) n_compact++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic cipher_op(input logic [95:0] d, input logic [95:0] k, input bit dir,
                           output logic [95:0] res);
    automatic int cyc = 0;
    mode = MODE_NORMAL; data_in = d; key_in = k; decrypt = dir; start = 1;
    @(posedge clk); #1 start = 0;
    // a self-test request while the core is busy must be ignored
    mode = MODE_SELFTEST; start = 1;
    @(posedge clk); #1 start = 0; mode = MODE_NORMAL; cyc = 1;
    if (!test_busy) n_ignored++;
    check(!test_busy, "self-test not started while core busy");
    while (!done && cyc < 1000) begin
      @(posedge clk); #1 cyc++;
    end
    check(cyc == SEA_NR, $sformatf("latency %0d", cyc));
    res = data_out;
    if (dir) n_dec++; else n_enc++;
  endtask

  task automatic self_test(input tpg_scheme_e sch, input bit expect_pass,
                           input logic [95:0] exp_sig);
    automatic int cyc = 0;
    scan_scheme = sch; mode = MODE_SELFTEST; start = 1;
    @(posedge clk); #1 start = 0;
    // a cipher request during the self-test must be ignored
    @(posedge clk); #1 mode = MODE_NORMAL; start = 1;
    @(posedge clk); #1 start = 0;
    if (!busy) n_ignored++;
    check(!busy && test_busy, "cipher start ignored during self-test");
    while (!test_done && cyc < 200000) begin
      @(posedge clk); #1 cyc++;
    end
    check(test_done, "self-test finished");
    if (expect_pass) check(signature == exp_sig,
                           $sformatf("signature %h expected %h", signature, exp_sig));
    check(test_pass == expect_pass, $sformatf("verdict %0d expected %0d", test_pass, expect_pass));
    if (test_pass) n_pass++; else n_fail++;
    if (sch == SCHEME_PER_SCAN) n_test_scan++; else n_test_clock++;
    $display("self-test scheme=%0d: %0d clocks, signature %h, pass=%0d", sch, cyc, signature, test_pass);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [95:0] p, k, c, back;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 4; n++) begin
      p = {$urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom};
      cipher_op(p, k, 0, c);
      check(c == cipher(p, k, SEA_NR, 0), "encryption result");
      cipher_op(c, k, 1, back);
      check(back == p, "decryption returns the plain text");
    end
    self_test(SCHEME_PER_CLOCK, 1, selftest_sig(1408, 0));
    self_test(SCHEME_PER_SCAN,  1, selftest_sig(1408, 1));
    // inject a stuck-at-0 fault on one response bit of the round logic
    force dut.u_core.test_resp[17] = 1'b0;
    self_test(SCHEME_PER_CLOCK, 0, '0);
    release dut.u_core.test_resp[17];
    // normal operation after the self-tests
    p = {$urandom, $urandom, $urandom};
    k = {$urandom, $urandom, $urandom};
    cipher_op(p, k, 0, c);
    check(c == cipher(p, k, SEA_NR, 0), "encryption after self-test");

    $display("mechanisms: enc=%0d dec=%0d selftest_clock=%0d selftest_scan=%0d pass=%0d fail=%0d seeds=%0d shifts=%0d captures=%0d compactions=%0d ignored_starts=%0d",
             n_enc, n_dec, n_test_clock, n_test_scan, n_pass, n_fail, n_seed, n_shift,
             n_capture, n_compact, n_ignored);
    check(n_enc > 0, "encryption happened");
    check(n_dec > 0, "decryption happened");
    check(n_test_clock > 0, "test-per-clock self-test happened");
    check(n_test_scan > 0, "test-per-scan self-test happened");
    check(n_pass > 0, "pass verdict happened");
    check(n_fail > 0, "fail verdict (fault detected) happened");
    check(n_seed > 0, "seed steps happened");
    check(n_shift > 0, "scan shifts happened");
    check(n_capture > 0, "scan captures happened");
    check(n_compact == 6 * 1408, $sformatf("compactions %0d", n_compact));
    check(n_ignored > 0, "ignored start happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
