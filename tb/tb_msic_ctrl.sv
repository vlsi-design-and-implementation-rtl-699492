// tb_msic_ctrl: checks the control sequences. Test-per-clock: a vector and
// a CLK2 tick every clock, a CLK1 tick on every 2L-th. Test-per-scan: per
// seed one CLK1 tick, then 2L times {one CLK2 tick with RJ_Mode=0, L shift
// ticks with RJ_Mode=Init=1, one capture}; and nothing while run is low.
module tb_msic_ctrl;
  import crypto_bist_pkg::*;

  localparam int L = 11;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0;
  tpg_scheme_e scan_scheme = SCHEME_PER_CLOCK;
  logic clk1_en, clk2_en, rj_mode, init, shift, capture, vec_valid;

  msic_ctrl dut (.*);

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
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    #1 check(!clk1_en && !clk2_en && !vec_valid, "idle when not running");
    // test-per-clock
    run = 1;
    for (int n = 0; n < 10 * 2 * L; n++) begin
      #1;
      check(clk2_en && vec_valid && !rj_mode && !shift && !capture, "per-clock step");
      check(clk1_en == ((n % (2 * L)) == 2 * L - 1), $sformatf("CLK1 at %0d", n));
      @(posedge clk);
    end
    // test-per-scan
    run = 0; rst_n = 0; scan_scheme = SCHEME_PER_SCAN;
    @(posedge clk); #1 rst_n = 1; run = 1;
    for (int sd = 0; sd < 3; sd++) begin
      #1 check(clk1_en && !clk2_en && !vec_valid, "seed step");
      @(posedge clk);
      for (int v = 0; v < 2 * L; v++) begin
        #1 check(clk2_en && !rj_mode && !shift && !clk1_en, "johnson step");
        @(posedge clk);
        for (int s = 0; s < L; s++) begin
          #1 check(clk2_en && rj_mode && init && shift && !capture, "shift");
          @(posedge clk);
        end
        #1 check(capture && vec_valid && !clk2_en, "capture");
        // pause in the middle: nothing must happen
        if (v == 3) begin
          run = 0;
          #1 check(!capture && !clk2_en && !clk1_en, "frozen");
          @(posedge clk); @(posedge clk);
          #1 run = 1;
          #1 check(capture, "resumes where it stopped");
        end
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
