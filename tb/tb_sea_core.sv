// tb_sea_core: encrypts random blocks under random keys and compares with
// the reference cipher, decrypts the result and expects the plain text,
// and checks the latency (done exactly NR clocks after start), busy, that a
// start while busy is ignored, and the self-test response path.
module tb_sea_core;
  import sea_ref_pkg::*;

  localparam int NR = 93;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, decrypt = 0, busy, done, test_en = 0, test_dec = 0;
  logic [95:0] data_in, key_in, data_out, test_resp, ct, exp;
  logic [143:0] test_vec;

  sea_core dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic run(input logic [95:0] d, input logic [95:0] k, input bit dir,
                     output logic [95:0] res);
    int cyc = 0;
    data_in = d; key_in = k; decrypt = dir; start = 1;
    @(posedge clk); #1 start = 0;
    check(busy, "busy after start");
    // a second start while busy must be ignored
    data_in = ~d; start = 1;
    @(posedge clk); #1 start = 0; cyc = 1;
    while (!done && cyc < 1000) begin
      @(posedge clk); #1 cyc++;
    end
    check(cyc == NR, $sformatf("latency %0d, expected %0d", cyc, NR));
    check(!busy, "idle when done");
    res = data_out;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [95:0] p, k, pt;
    test_vec = '0; data_in = '0; key_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 25; n++) begin
      p = {$urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom};
      if (n == 0) begin p = '0; k = '0; end
      run(p, k, 0, ct);
      exp = cipher(p, k, NR, 0);
      check(ct == exp, $sformatf("encrypt p=%h k=%h got %h exp %h", p, k, ct, exp));
      run(ct, k, 1, pt);
      check(pt == p, $sformatf("decrypt back got %h exp %h", pt, p));
      check(cipher(ct, k, NR, 1) == p, "reference decrypt consistency");
    end
    // self-test access
    test_en = 1;
    for (int n = 0; n < 200; n++) begin
      test_vec = {$urandom, $urandom, $urandom, $urandom, $urandom};
      test_dec = n[0];
      start = n[1];  // start must be ignored in test mode
      @(posedge clk); #1;
      check(test_resp == round_resp(test_vec, test_dec), "test response");
      check(!busy, "start ignored in test mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
