// tb_sea_datapath: loads random blocks, runs rounds with random round keys
// in both directions and compares the registers (through data_out) with the
// reference round model after each clock; checks that test mode drives the
// round logic from the test inputs while the registers hold, and that reset
// clears the registers.
module tb_sea_datapath;
  import sea_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, step = 0, dec = 0, test_en = 0;
  logic [95:0] data_in, round_out, data_out;
  half_t rkey, test_l, test_r, test_k, l, r;
  logic [95:0] v;

  sea_datapath dut (.*);

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
    test_l = '0; test_r = '0; test_k = '0; rkey = '0; data_in = '0;
    repeat (2) @(posedge clk);
    #1 check(data_out == '0, "reset clears L and R");
    rst_n = 1;
    for (int blk = 0; blk < 40; blk++) begin
      data_in = {$urandom, $urandom, $urandom};
      dec = blk[0];
      load = 1;
      @(posedge clk); #1 load = 0;
      l = data_in[95:48]; r = data_in[47:0];
      check(data_out == {r, l}, "load");
      for (int i = 0; i < 20; i++) begin
        rkey = {$urandom, $urandom};
        step = 1;
        v = fe(l, r, rkey, dec);
        #1 check(round_out == v, "round_out in normal mode");
        @(posedge clk); #1;
        l = v[95:48]; r = v[47:0];
        check(data_out == {r, l}, $sformatf("block %0d round %0d", blk, i));
      end
      step = 0;
      // test mode: round logic from the test inputs, registers hold
      test_en = 1; step = 1;
      test_l = {$urandom, $urandom}; test_r = {$urandom, $urandom}; test_k = {$urandom, $urandom};
      #1 check(round_out == fe(test_l, test_r, test_k, dec), "test mode round_out");
      @(posedge clk); #1;
      check(data_out == {r, l}, "registers hold in test mode");
      test_en = 0; step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
