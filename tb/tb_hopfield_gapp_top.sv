// tb_hopfield_gapp_top: end-to-end test of the Hopfield engine.
//
// Four engines run side by side, each driven by hop_tb_harness, which
// checks every iteration (node values, changed flag, cycle count) against
// a software Hopfield model and the final done/converged/iteration count:
//   h0  default configuration: 120 nodes, 8 exemplars, 32 data lines
//       (7 segments of 19 weights, 2 chips, one column group), 3 recalls
//   h1  120 nodes on a 5-line bus, so each plane moves in 3 column groups
//   h2  72 nodes, 10 exemplars, MAX_ITER = 1: the iteration limit stops it
//   h3  24 nodes, 2 exemplars, heavy noise: sums of exactly zero occur
// Every mechanism must have occurred at least once.
module tb_hopfield_gapp_top;
  int fin[4], chk[4], fl[4], mseg[4], mgrp[4], zs[4], nz[4], cv[4], mi[4], rc[4];
  int checks, failures;

  hop_tb_harness #(.DEFAULTS(1'b0), .TRIALS(3), .SEED(11)) h0 (
    fin[0], chk[0], fl[0], mseg[0], mgrp[0], zs[0], nz[0], cv[0], mi[0], rc[0]);
  hop_tb_harness #(.LINES(5), .TRIALS(1), .SEED(22)) h1 (
    fin[1], chk[1], fl[1], mseg[1], mgrp[1], zs[1], nz[1], cv[1], mi[1], rc[1]);
  hop_tb_harness #(.NODES(72), .EXEMPLARS(10), .MAX_ITER(1), .NOISE_PCT(20),
                   .TRIALS(2), .SEED(33)) h2 (
    fin[2], chk[2], fl[2], mseg[2], mgrp[2], zs[2], nz[2], cv[2], mi[2], rc[2]);
  hop_tb_harness #(.NODES(24), .EXEMPLARS(2), .NOISE_PCT(40), .TRIALS(4),
                   .SEED(44)) h3 (
    fin[3], chk[3], fl[3], mseg[3], mgrp[3], zs[3], nz[3], cv[3], mi[3], rc[3]);

  task automatic need(input int n, input string what);
    checks++;
    $display("mechanism %-28s occurred %0d times", what, n);
    if (n == 0) begin failures++; $display("FAIL: %s never occurred", what); end
  endtask

  initial begin
    checks = 0; failures = 0;
    wait (fin[0] == 1 && fin[1] == 1 && fin[2] == 1 && fin[3] == 1);
    for (int k = 0; k < 4; k++) begin checks += chk[k]; failures += fl[k]; end
    need(mseg.sum(), "several segments");
    need(mgrp.sum(), "several column groups");
    need(zs.sum(), "zero sum (f_h(0) = +1)");
    need(nz.sum(), "-0 product");
    need(cv.sum(), "convergence");
    need(mi.sum(), "MAX_ITER stop");
    $display("exemplars recalled: %0d", rc.sum());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) #10;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
