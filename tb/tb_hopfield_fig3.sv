// tb_hopfield_fig3: the iteration-time workload, networks with M =
// floor(0.15 N) exemplars on a 32-line bus, at N = 72, 216 and 360 nodes.
// Each engine recalls one noisy pattern (at most 3 iterations) and is
// checked iteration by iteration against a software Hopfield model,
// including the cycle count of every iteration. For the 360-node network
// the per-iteration time is also compared with the closed-form iteration
// time of the analysis, T = SD[C(w+1) + 3(p+1) + (4w-1)] + 4S + 2C - 1 =
// 66377 cycles (6.6 ms at 10 MHz), less the 4(S-1) = 100 cycles this engine
// saves by testing convergence once per iteration instead of per segment.
module tb_hopfield_fig3;
  int fin[3], chk[3], fl[3], mseg[3], mgrp[3], zs[3], nz[3], cv[3], mi[3], rc[3];
  int checks, failures;

  hop_tb_harness #(.NODES(72), .EXEMPLARS(10), .MAX_ITER(3), .NOISE_PCT(5),
                   .TRIALS(1), .SEED(72)) h72 (
    fin[0], chk[0], fl[0], mseg[0], mgrp[0], zs[0], nz[0], cv[0], mi[0], rc[0]);
  hop_tb_harness #(.NODES(216), .EXEMPLARS(32), .MAX_ITER(3), .NOISE_PCT(5),
                   .TRIALS(1), .SEED(216)) h216 (
    fin[1], chk[1], fl[1], mseg[1], mgrp[1], zs[1], nz[1], cv[1], mi[1], rc[1]);
  hop_tb_harness #(.NODES(360), .EXEMPLARS(54), .MAX_ITER(3), .NOISE_PCT(5),
                   .TRIALS(1), .SEED(360)) h360 (
    fin[2], chk[2], fl[2], mseg[2], mgrp[2], zs[2], nz[2], cv[2], mi[2], rc[2]);

  initial begin
    int t_doc, s360;
    checks = 0; failures = 0;
    wait (fin[0] == 1 && fin[1] == 1 && fin[2] == 1);
    for (int k = 0; k < 3; k++) begin checks += chk[k]; failures += fl[k]; end
    // 360 nodes, 54 exemplars: w = 7, p = 16, D = 14, S = 26, 5 chips, C = 13
    s360  = 26;
    t_doc = 66377;
    checks++;
    if (h360.T_ITER + 4 * (s360 - 1) != t_doc) begin
      failures++;
      $display("FAIL: 360-node iteration %0d cycles, analysis gives %0d - %0d",
               h360.T_ITER, t_doc, 4 * (s360 - 1));
    end
    $display("iteration time: 72 nodes %0d, 216 nodes %0d, 360 nodes %0d cycles (%0d us at 10 MHz)",
             h72.T_ITER, h216.T_ITER, h360.T_ITER, h360.T_ITER / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) #10;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
