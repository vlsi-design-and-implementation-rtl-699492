// tb_rj_counter: checks the reconfigurable Johnson counter in its three
// settings: Johnson mode (2L distinct states, one bit change per step,
// back to the start after 2L steps), circular shift (back to the same
// vector after L steps) and clear; and that it holds without clk2_en.
module tb_rj_counter;
  import sea_ref_pkg::*;

  localparam int L = 11;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clk2_en = 0, rj_mode = 0, init = 1;
  logic [L-1:0] j, prev, exp;

  rj_counter dut (.*);

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
    bit seen [logic [L-1:0]];
    repeat (2) @(posedge clk);
    #1 check(j == '0, "reset clears");
    rst_n = 1;
    exp = '0;
    // Johnson mode: a full cycle
    clk2_en = 1; rj_mode = 0;
    for (int n = 0; n < 2 * L; n++) begin
      prev = j;
      seen[j] = 1;
      @(posedge clk); #1;
      exp = johnson_next(exp);
      check(j == exp, "johnson step");
      check($countones(j ^ prev) == 1, "single bit change");
    end
    check(seen.num() == 2 * L, "2L distinct states");
    check(j == '0, "period 2L");
    for (int v = 0; v < 3 * L; v++) begin
      // advance the Johnson counter by a random number of steps
      rj_mode = 0; clk2_en = 1;
      repeat (1 + $urandom % 5) begin
        @(posedge clk); #1 exp = johnson_next(exp);
      end
      check(j == exp, "johnson again");
      // hold
      clk2_en = 0;
      @(posedge clk); #1 check(j == exp, "hold without clk2_en");
      // circular shift for L clocks
      clk2_en = 1; rj_mode = 1; init = 1;
      for (int s = 1; s <= L; s++) begin
        @(posedge clk); #1;
        check(j == ((exp << s) | (exp >> (L - s))), "circular shift");
      end
      check(j == exp, "back after L shifts");
    end
    // clear
    rj_mode = 1; init = 0;
    @(posedge clk); #1 check(j == '0, "clear with RJ_Mode=1, Init=0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
