// hop_tb_harness: drives one Hopfield engine (hopfield_gapp_top) through
// TRIALS recalls and checks it against a reference computed here.
//
// Each trial draws EXEMPLARS random +/-1 patterns, lets the host model
// compute the weights, corrupts one exemplar in about NOISE_PCT percent of
// its elements and starts the engine on it. A software model of the
// synchronous Hopfield search (u_j <- +1 if sum_i t_ij u_i >= 0, else -1,
// until nothing changes or MAX_ITER iterations) runs alongside. At every
// iteration end the harness compares the uploaded node values and the
// changed flag with the model, and the iteration's cycle count with
//   S*D*(C*(W+1) + 3*(P+1) + 4W-1) + 4 + 2C - 1,   C = 12*groups + 1.
// At the end it checks done, converged and the iteration count. It also
// counts how often each mechanism occurred (several segments, several
// column groups, a zero sum, a -0 product, convergence, the MAX_ITER stop).
// With DEFAULTS set the engine is instantiated with no parameter overrides.
module hop_tb_harness
  import hop_pkg::*;
#(
  parameter bit          DEFAULTS  = 1'b0,
  parameter int unsigned NODES     = 120,
  parameter int unsigned EXEMPLARS = 8,
  parameter int unsigned LINES     = 32,
  parameter int unsigned MAX_ITER  = 16,
  parameter int unsigned TRIALS    = 2,
  parameter int unsigned NOISE_PCT = 10,
  parameter int unsigned SEED      = 1
) (
  output int finished,
  output int checks,
  output int failures,
  output int n_multi_seg,
  output int n_multi_grp,
  output int n_zero_sum,
  output int n_neg_zero,
  output int n_converged,
  output int n_max_iter,
  output int n_recalled
);
  localparam int unsigned W      = calc_w(EXEMPLARS);
  localparam int unsigned P      = calc_p(NODES, EXEMPLARS);
  localparam int unsigned D      = calc_d(128, NODES, EXEMPLARS);
  localparam int unsigned S      = calc_s(128, NODES, EXEMPLARS);
  localparam int unsigned CHIPS  = calc_chips(NODES);
  localparam int unsigned COLS   = CHIPS * CHIP_COLS;
  localparam int unsigned GROUPS = calc_groups(COLS, LINES);
  localparam int unsigned GRP_W  = (GROUPS > 1) ? $clog2(GROUPS) : 1;
  localparam int unsigned C      = 12 * GROUPS + 1;
  localparam int unsigned T_ITER = S * D * (C * (W + 1) + 3 * (P + 1) + 4 * W - 1) + 4 + 2 * C - 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [LINES-1:0] bus_in, bus_out;
  logic [GRP_W-1:0] grp;
  logic pl_valid, up_valid, busy, iter_done, changed, done, converged;
  plane_e pl_kind;
  logic [15:0] pl_node, iter_count;
  logic [7:0] pl_bit;
  logic [3:0] pl_row, up_row;

  always #5 clk = ~clk;

  if (DEFAULTS) begin : g_default
    hopfield_gapp_top u_dut (
      .clk, .rst_n, .start, .bus_in, .bus_out, .grp, .pl_valid, .pl_kind,
      .pl_node, .pl_bit, .pl_row, .up_valid, .up_row, .busy, .iter_done,
      .changed, .done, .converged, .iter_count);
  end else begin : g_sized
    hopfield_gapp_top #(.NODES(NODES), .EXEMPLARS(EXEMPLARS), .LINES(LINES),
                        .MAX_ITER(MAX_ITER)) u_dut (
      .clk, .rst_n, .start, .bus_in, .bus_out, .grp, .pl_valid, .pl_kind,
      .pl_node, .pl_bit, .pl_row, .up_valid, .up_row, .busy, .iter_done,
      .changed, .done, .converged, .iter_count);
  end

  hop_host_model #(.NODES(NODES), .EXEMPLARS(EXEMPLARS), .LINES(LINES), .W(W),
                   .COLS(COLS), .GRP_W(GRP_W)) host (
    .clk, .pl_valid, .pl_kind, .pl_node, .pl_bit, .pl_row, .grp, .up_valid,
    .up_row, .bus_out, .iter_done, .bus_in);

  // reference trajectory
  logic ref_u [MAX_ITER+1][NODES];
  logic ref_chg [MAX_ITER+1];
  int   ref_iters;
  int   iter_seen;
  int   cyc;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL (seed %0d): %s", SEED, what);
    end
  endtask

  task automatic run_reference(input int target);
    int k;
    k = 0;
    for (int j = 0; j < int'(NODES); j++) ref_u[0][j] = host.u[j];
    forever begin
      logic chg;
      chg = 1'b0;
      for (int j = 0; j < int'(NODES); j++) begin
        int sum;
        sum = 0;
        for (int i = 0; i < int'(NODES); i++) begin
          sum += ref_u[k][i] ? -host.t[i][j] : host.t[i][j];
          if (host.t[i][j] == 0 && ref_u[k][i]) n_neg_zero++;
        end
        if (sum == 0) n_zero_sum++;
        ref_u[k+1][j] = (sum < 0);
        if (ref_u[k+1][j] != ref_u[k][j]) chg = 1'b1;
      end
      ref_chg[k+1] = chg;
      k++;
      if (!chg || k == int'(MAX_ITER)) break;
    end
    ref_iters = k;
    if (!ref_chg[k]) begin
      int same;
      same = 1;
      for (int j = 0; j < int'(NODES); j++)
        if (ref_u[k][j] != host.x[target][j]) same = 0;
      n_recalled += same;
    end
  endtask

  // per-iteration checks
  always @(posedge clk) if (busy) cyc++;

  always @(negedge clk) begin
    if (iter_done) begin
      int bad;
      iter_seen++;
      bad = 0;
      if (iter_seen <= ref_iters)
        for (int j = 0; j < int'(NODES); j++)
          if (host.u_next[j] != ref_u[iter_seen][j]) bad++;
      check(iter_seen <= ref_iters, "more iterations than the reference");
      check(bad == 0, $sformatf("iteration %0d: %0d node values differ", iter_seen, bad));
      check(changed == ref_chg[iter_seen], $sformatf("iteration %0d: changed flag", iter_seen));
      check(cyc == int'(T_ITER), $sformatf("iteration %0d took %0d cycles, expected %0d",
                                           iter_seen, cyc, T_ITER));
      if (S > 1) n_multi_seg++;
      if (GROUPS > 1) n_multi_grp++;
      cyc = 0;
    end
  end

  initial begin
    void'($urandom(SEED));
    finished = 0; checks = 0; failures = 0;
    n_multi_seg = 0; n_multi_grp = 0; n_zero_sum = 0; n_neg_zero = 0;
    n_converged = 0; n_max_iter = 0; n_recalled = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int tr = 0; tr < int'(TRIALS); tr++) begin
      int target;
      for (int s = 0; s < int'(EXEMPLARS); s++)
        for (int j = 0; j < int'(NODES); j++) host.x[s][j] = $urandom_range(1, 0) != 0;
      host.compute_weights();
      target = $urandom_range(EXEMPLARS - 1, 0);
      for (int j = 0; j < int'(NODES); j++)
        host.u[j] = host.x[target][j] ^ ($urandom_range(99, 0) < NOISE_PCT);
      run_reference(target);
      iter_seen = 0;
      cyc = 0;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      wait (done);
      repeat (2) @(negedge clk);
      check(iter_seen == ref_iters, $sformatf("ran %0d iterations, expected %0d",
                                              iter_seen, ref_iters));
      check(int'(iter_count) == ref_iters, "iteration count output");
      check(converged == !ref_chg[ref_iters], "converged flag");
      if (converged) n_converged++;
      else n_max_iter++;
    end
    finished = 1;
  end
endmodule
