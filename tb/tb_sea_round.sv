// tb_sea_round: checks one SEA round, both directions, against the
// reference model on random inputs, and checks that the decryption round
// undoes the encryption round. Combinational, no clock needed; a watchdog
// still bounds the run.
module tb_sea_round;
  import sea_ref_pkg::*;

  int checks = 0, failures = 0;
  logic        dec;
  half_t       l, r, k, lo, ro, l2, r2;

  sea_round dut  (.dec(dec),  .l_in(l),  .r_in(r), .k_in(k), .l_out(lo), .r_out(ro));
  // second instance in decryption mode, fed with the encrypted halves
  sea_round inv  (.dec(1'b1), .l_in(ro), .r_in(lo), .k_in(k), .l_out(l2), .r_out(r2));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      l = {$urandom, $urandom};
      r = {$urandom, $urandom};
      k = {$urandom, $urandom};
      if (n < 4) begin  // a few corner values
        l = (n[0]) ? '1 : '0; r = (n[1]) ? '1 : '0; k = n[0] ? '0 : '1;
      end
      dec = n[0];
      #1;
      check({lo, ro} == fe(l, r, k, dec), $sformatf("round dec=%0d l=%h r=%h k=%h", dec, l, r, k));
      if (!dec) check(l2 == r && r2 == l, "decryption round inverts encryption round");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
