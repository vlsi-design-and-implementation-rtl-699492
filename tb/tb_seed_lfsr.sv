// tb_seed_lfsr: checks the seed LFSR against the reference recurrence,
// that it only steps on clk1_en, that reset loads the seed, and that the
// sequence is maximal length (period 4095 for the 12-bit default).
module tb_seed_lfsr;
  import sea_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clk1_en = 0;
  logic [11:0] seed, exp;

  seed_lfsr dut (.*);

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
    int period = 0;
    repeat (2) @(posedge clk);
    #1 check(seed == 12'h001, "reset value");
    rst_n = 1;
    exp = 12'h001;
    for (int n = 0; n < 5000; n++) begin
      clk1_en = ($urandom % 3) != 0;
      @(posedge clk); #1;
      if (clk1_en) begin
        exp = lfsr_next(exp);
        period++;
        if (exp == 12'h001 && period > 0) begin
          check(period == 4095, $sformatf("period %0d", period));
          period = 0;
        end
      end
      check(seed == exp, $sformatf("step %0d got %h exp %h", n, seed, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
