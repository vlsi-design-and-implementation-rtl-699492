// tb_bist_ctrl: runs self-tests with a randomly gapped vec_valid and checks
// the sequence: one clock of generator reset and MISR clear, PATTERNS
// compacted vectors with the encryption round, PATTERNS with the
// decryption round, then test_done with test_pass equal to sig_ok.
module tb_bist_ctrl;
  localparam int P = 50;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, test_start = 0, vec_valid = 0, sig_ok = 0;
  logic tpg_rst_n, tpg_run, test_en, test_dec, misr_clear, misr_en;
  logic test_busy, test_done, test_pass;

  bist_ctrl #(.PATTERNS(P)) dut (.*);

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
    rst_n = 1;
    #1 check(!test_en && !test_busy && !test_done, "idle after reset");
    for (int t = 0; t < 6; t++) begin
      automatic int enc_n = 0, dec_n = 0, clr_n = 0, cyc = 0;
      automatic bit ok = t[0];
      test_start = 1;
      @(posedge clk); #1 test_start = 0;
      while (!test_done && cyc < 10000) begin
        vec_valid = ($urandom % 3) == 0;
        sig_ok = ok;
        #1;
        if (misr_clear) begin
          clr_n++;
          check(!tpg_rst_n && !misr_en, "clear cycle");
        end
        if (misr_en) begin
          check(test_en && tpg_run, "compacting only while testing");
          if (test_dec) dec_n++; else begin
            enc_n++;
            check(dec_n == 0, "encryption pass before decryption pass");
          end
        end
        check(misr_en == (tpg_run && vec_valid), "misr_en follows vec_valid");
        check(test_busy, "busy during test");
        @(posedge clk); #1 cyc++;
      end
      check(clr_n == 1, "one clear");
      check(enc_n == P, $sformatf("encryption vectors %0d", enc_n));
      check(dec_n == P, $sformatf("decryption vectors %0d", dec_n));
      check(test_done && test_pass == ok, "verdict");
      check(!test_en, "core released");
      repeat (3) @(posedge clk);
      #1 check(test_done && test_pass == ok, "verdict held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
