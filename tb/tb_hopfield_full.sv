// tb_hopfield_full: the Hopfield engine at its default size, with no
// parameter overrides: 120 nodes (a 12 x 10 pixel image), 8 exemplars,
// 128-bit PE memories, a 32-line host bus. Three noisy patterns are
// recalled; hop_tb_harness checks every iteration against a software
// Hopfield model, including the iteration time of 17718 cycles.
module tb_hopfield_full;
  int fin, chk, fl, mseg, mgrp, zs, nz, cv, mi, rc;

  hop_tb_harness #(.DEFAULTS(1'b1), .TRIALS(3), .SEED(7)) h (
    fin, chk, fl, mseg, mgrp, zs, nz, cv, mi, rc);

  initial begin
    wait (fin == 1);
    $display("converged %0d, stopped at the iteration limit %0d, exemplars recalled %0d",
             cv, mi, rc);
    $display("TB_RESULT checks=%0d failures=%0d", chk, fl);
    $finish;
  end

  initial begin
    repeat (2000000) #10;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", chk, fl + 1);
    $finish;
  end
endmodule
