// tb_hop_seq: runs the sequencer alone for a 30-node, 3-exemplar network
// with 32-bit PE memories on a 4-line bus (W=3, P=8, D=6, S=5, one chip of
// 6 columns in 2 column groups, C=25). The global OR input is driven by the
// testbench. Per iteration it counts, and compares with numbers worked out
// from the schedule: cycles (S*D*(C*(W+1)+3*(P+1)+4W-1)+4+2C-1), weight,
// node, own-value and upload shift cycles, CM writes, SM writes and RAM
// addresses. Run 1 reports a change twice, then none: 3 iterations and
// converged. Run 2 always reports a change: stops at MAX_ITER=4.
module tb_hop_seq;
  import hop_pkg::*;
  localparam int N = 30, M = 3, B = 32, LINES = 4, MAXI = 4;
  localparam int W = 3, P = 8, D = 6, S = 5, G = 2, C = 12 * G + 1;
  localparam int T = S * D * (C * (W + 1) + 3 * (P + 1) + 4 * W - 1) + 4 + 2 * C - 1;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, gor;
  pe_instr_t instr;
  logic [0:0] grp;
  logic pl_valid, up_valid, busy, iter_done, changed, done, converged;
  plane_e pl_kind;
  logic [15:0] pl_node, iter_count;
  logic [7:0] pl_bit;
  logic [3:0] pl_row, up_row;
  int checks = 0, failures = 0;
  int cyc, n_w, n_n, n_o, n_u, n_cm, n_sm, bad_addr, iters, chg_until;

  hop_seq #(.NODES(N), .EXEMPLARS(M), .RAM_BITS(B), .LINES(LINES), .MAX_ITER(MAXI)) dut (
    .clk, .rst_n, .start, .gor, .instr, .grp, .pl_valid, .pl_kind, .pl_node, .pl_bit,
    .pl_row, .up_valid, .up_row, .busy, .iter_done, .changed, .done, .converged,
    .iter_count);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  assign gor = (iters < chg_until);

  always @(posedge clk) begin
    if (busy) begin
      cyc++;
      if (pl_valid && pl_kind == PL_WEIGHT) begin
        n_w++;
        if (int'(pl_bit) >= W || int'(pl_node) >= S * D) bad_addr++;
      end
      if (pl_valid && pl_kind == PL_NODE) n_n++;
      if (pl_valid && pl_kind == PL_OWN) n_o++;
      if (up_valid) n_u++;
      if ((pl_valid || up_valid) && (int'(grp) >= G || int'(pl_row) >= 12)) bad_addr++;
      if (instr.wr == WR_CM) n_cm++;
      if (instr.wr == WR_SM) n_sm++;
      if (int'(instr.addr) >= B) bad_addr++;
    end
  end

  always @(negedge clk) begin
    if (iter_done) begin
      iters++;
      check(cyc == T, $sformatf("iteration %0d: %0d cycles, expected %0d", iters, cyc, T));
      check(n_w == S * D * W * 12 * G, $sformatf("weight shift cycles %0d", n_w));
      check(n_n == S * D * 12 * G, $sformatf("node shift cycles %0d", n_n));
      check(n_o == 12 * G, $sformatf("own-value shift cycles %0d", n_o));
      check(n_u == 12 * G, $sformatf("upload cycles %0d", n_u));
      check(n_cm == S * D * (W + 1) + 1, $sformatf("CM writes %0d", n_cm));
      check(n_sm == S * D * (1 + W + P), $sformatf("SM writes %0d", n_sm));
      check(bad_addr == 0, "addresses in range");
      check(changed == (iters - 1 < chg_until), "changed flag");
      cyc = 0; n_w = 0; n_n = 0; n_o = 0; n_u = 0; n_cm = 0; n_sm = 0; bad_addr = 0;
    end
  end

  task automatic run(input int chg_iters, input int exp_iters, input logic exp_conv);
    iters = 0; chg_until = chg_iters;
    cyc = 0; n_w = 0; n_n = 0; n_o = 0; n_u = 0; n_cm = 0; n_sm = 0; bad_addr = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    check(busy == 1'b1, "busy after start");
    wait (done);
    repeat (2) @(negedge clk);
    check(iters == exp_iters, $sformatf("iterations %0d, expected %0d", iters, exp_iters));
    check(int'(iter_count) == exp_iters, "iteration count output");
    check(converged == exp_conv, "converged flag");
    check(busy == 1'b0, "idle when done");
  endtask

  initial begin
    chg_until = 0; iters = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(2, 3, 1'b1);
    run(100, MAXI, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
