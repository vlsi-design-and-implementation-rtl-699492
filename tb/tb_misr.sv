// tb_misr: compacts random response streams and compares the signature
// with the reference MISR after every clock; checks enable, clear and that
// a single flipped response bit changes the final signature.
module tb_misr;
  import sea_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [95:0] d, sig, exp, good;

  misr dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    #1 check(sig == '0, "reset");
    rst_n = 1;
    exp = '0;
    for (int n = 0; n < 3000; n++) begin
      d = {$urandom, $urandom, $urandom};
      en = ($urandom % 4) != 0;
      clear = (n % 1000) == 999;
      @(posedge clk); #1;
      if (clear) exp = '0;
      else if (en) exp = misr_next(exp, d);
      check(sig == exp, $sformatf("step %0d", n));
    end
    // aliasing check: the same stream with one bit flipped
    for (int t = 0; t < 2; t++) begin
      clear = 1; en = 0;
      @(posedge clk); #1 clear = 0; en = 1;
      for (int n = 0; n < 64; n++) begin
        d = {32'(n * 7), 32'(n * 13), 32'(n)};
        if (t == 1 && n == 20) d[50] = ~d[50];
        @(posedge clk); #1;
      end
      if (t == 0) good = sig;
      else check(sig != good, "single-bit error changes signature");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
