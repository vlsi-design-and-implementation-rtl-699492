// tb_sea_key_round: checks the key-schedule round FK against the reference
// model on random inputs and checks its Feistel property: FK applied to the
// exchanged output with the same constant gives back the exchanged input.
module tb_sea_key_round;
  import sea_ref_pkg::*;

  int checks = 0, failures = 0;
  half_t kl, kr, c, klo, kro, kl2, kr2;

  sea_key_round dut  (.kl_in(kl),  .kr_in(kr),  .c_in(c), .kl_out(klo), .kr_out(kro));
  sea_key_round back (.kl_in(kro), .kr_in(klo), .c_in(c), .kl_out(kl2), .kr_out(kr2));

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
      kl = {$urandom, $urandom};
      kr = {$urandom, $urandom};
      c  = (n % 2) ? {$urandom, $urandom} : const_c(n % 93);
      #1;
      check({klo, kro} == fk(kl, kr, c), $sformatf("fk kl=%h kr=%h c=%h", kl, kr, c));
      check(kl2 == kr && kr2 == kl, "FK(swap(FK(x))) = swap(x)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
