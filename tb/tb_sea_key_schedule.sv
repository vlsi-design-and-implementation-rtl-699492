// tb_sea_key_schedule: for random keys, steps the schedule through all NR
// rounds and compares each round key with the one the reference pseudocode
// gives (KR for the first ceil(NR/2) rounds, KL after, switch in the
// middle); checks that the registers return to the master key after round
// NR and that test mode exposes the FK logic without changing state.
module tb_sea_key_schedule;
  import sea_ref_pkg::*;

  localparam int NR = 93;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, step = 0, test_en = 0;
  logic [6:0] round_idx;
  logic [95:0] key_in, round_out;
  half_t test_kl, test_kr, test_c, rkey;
  half_t kl [NR], kr [NR];
  logic [95:0] v;

  sea_key_schedule dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    half_t t;
    int h = NR / 2;
    test_kl = '0; test_kr = '0; test_c = '0; round_idx = 1; key_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      key_in = {$urandom, $urandom, $urandom};
      // reference schedule
      kl[0] = key_in[95:48]; kr[0] = key_in[47:0];
      for (int i = 1; i <= h; i++) begin
        v = fk(kl[i-1], kr[i-1], const_c(i)); kl[i] = v[95:48]; kr[i] = v[47:0];
      end
      t = kl[h]; kl[h] = kr[h]; kr[h] = t;
      for (int i = h + 1; i <= NR - 1; i++) begin
        v = fk(kl[i-1], kr[i-1], const_c(NR - i)); kl[i] = v[95:48]; kr[i] = v[47:0];
      end
      load = 1; round_idx = 1;
      @(posedge clk); #1 load = 0;
      for (int i = 1; i <= NR; i++) begin
        round_idx = 7'(i); step = 1;
        #1 check(rkey == ((i <= h + 1) ? kr[i-1] : kl[i-1]), $sformatf("key %0d round %0d", n, i));
        @(posedge clk); #1;
      end
      step = 0;
      // after the final switch the registers hold the master key again
      round_idx = 1;
      #1 check(rkey == key_in[47:0], "KR back to KR0");
      round_idx = 7'(NR);
      #1 check(rkey == key_in[95:48], "KL back to KL0");
      // test mode
      test_en = 1; step = 1;
      test_kl = {$urandom, $urandom}; test_kr = {$urandom, $urandom}; test_c = {$urandom, $urandom};
      #1 check(round_out == fk(test_kl, test_kr, test_c), "test mode FK");
      @(posedge clk); #1;
      round_idx = 1;
      #1 check(rkey == key_in[47:0], "state holds in test mode");
      test_en = 0; step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
