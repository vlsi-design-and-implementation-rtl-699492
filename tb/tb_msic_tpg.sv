// tb_msic_tpg: checks the generator output against the reference model of
// Johnson counter, seed LFSR and XOR array in both schemes, and the MSIC
// property: consecutive test-per-clock vectors with the same seed differ in
// exactly one bit of each of the M groups of L bits, and no vector repeats
// within the 2816 vectors of a default self-test.
module tb_msic_tpg;
  import crypto_bist_pkg::*;
  import sea_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0;
  tpg_scheme_e scan_scheme = SCHEME_PER_CLOCK;
  logic [143:0] vec, prev;
  logic vec_valid, shift, capture;

  msic_tpg dut (.*);

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
    logic [10:0] j;
    logic [11:0] s;
    bit seen [logic [143:0]];
    int repeats = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1; run = 1;
    j = '0; s = 12'h001;
    for (int n = 0; n < 2816; n++) begin
      #1 check(vec_valid && vec == tpg_vec(j, s), $sformatf("per-clock vector %0d", n));
      if (n % 22 != 0) begin
        check($countones(vec ^ prev) == 12, "one change per group");
        for (int g = 0; g < 12; g++)
          check($countones(vec[g*11 +: 11] ^ prev[g*11 +: 11]) == 1, "single input change in group");
      end
      if (seen.exists(vec)) repeats++;
      seen[vec] = 1;
      prev = vec;
      j = johnson_next(j);
      if (n % 22 == 21) s = lfsr_next(s);
      @(posedge clk);
    end
    // a test sequence should not repeat patterns
    check(repeats == 0, $sformatf("%0d repeated vectors in 2816", repeats));
    // test-per-scan
    run = 0; rst_n = 0; scan_scheme = SCHEME_PER_SCAN;
    @(posedge clk); #1 rst_n = 1; run = 1;
    j = '0; s = lfsr_next(12'h001);
    for (int n = 0; n < 100; n++) begin
      automatic int guard = 0;
      while (!capture && guard < 100) begin
        @(posedge clk); #1 guard++;
      end
      j = johnson_next(j);
      check(vec_valid && vec == tpg_vec(j, s), $sformatf("per-scan capture %0d got %h exp %h", n, vec, tpg_vec(j, s)));
      if (n % 22 == 21) s = lfsr_next(s);
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
