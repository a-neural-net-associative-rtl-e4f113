// hop_host_model: behavioural model of the host computer that serves the
// Hopfield engine (not synthesizable, testbench only).
//
// It keeps the M exemplar patterns and the current node values u, works
// out the weights t_ij = sum_s x_i^s x_j^s with t_jj = 0 (the off-line
// initialization phase), and answers the engine's plane requests: while
// pl_valid is high it drives bus_in, in the same cycle, with row pl_row of
// column group grp of the requested plane (weight bit pl_bit of t_ij in
// signed magnitude, the broadcast node value u_i, or each PE's own value
// u_j). While up_valid is high it stores bus_out as new node values; at
// the iter_done pulse the new values replace u. PEs past the last node, and
// slots past the last node of the last segment, get zeros.
// Bit coding: 0 is +1, 1 is -1.
module hop_host_model
  import hop_pkg::*;
#(
  parameter int unsigned NODES     = 120,
  parameter int unsigned EXEMPLARS = 8,
  parameter int unsigned LINES     = 32,
  parameter int unsigned W         = 5,
  parameter int unsigned COLS      = 12,
  parameter int unsigned GRP_W     = 1
) (
  input  logic             clk,
  input  logic             pl_valid,
  input  plane_e           pl_kind,
  input  logic [15:0]      pl_node,
  input  logic [7:0]       pl_bit,
  input  logic [3:0]       pl_row,
  input  logic [GRP_W-1:0] grp,
  input  logic             up_valid,
  input  logic [3:0]       up_row,
  input  logic [LINES-1:0] bus_out,
  input  logic             iter_done,
  output logic [LINES-1:0] bus_in
);
  logic x [EXEMPLARS][NODES];
  logic u [NODES];
  logic u_next [NODES];
  int   t [NODES][NODES];

  function automatic void compute_weights();
    for (int i = 0; i < int'(NODES); i++)
      for (int j = 0; j < int'(NODES); j++) begin
        t[i][j] = 0;
        if (i != j)
          for (int s = 0; s < int'(EXEMPLARS); s++)
            t[i][j] += (x[s][i] == x[s][j]) ? 1 : -1;
      end
  endfunction

  function automatic logic weight_bit(input int i, input int j, input int b);
    int mag;
    if (i >= int'(NODES) || j >= int'(NODES)) return 1'b0;
    mag = (t[i][j] < 0) ? -t[i][j] : t[i][j];
    if (b == int'(W) - 1) return t[i][j] < 0;
    return mag[b];
  endfunction

  always_comb begin
    bus_in = '0;
    if (pl_valid)
      for (int l = 0; l < int'(LINES); l++) begin
        int col, j, i;
        col = int'(grp) * int'(LINES) + l;
        j   = int'(pl_row) * int'(COLS) + col;
        i   = int'(pl_node);
        if (col < int'(COLS) && j < int'(NODES)) begin
          unique case (pl_kind)
            PL_WEIGHT: bus_in[l] = weight_bit(i, j, int'(pl_bit));
            PL_NODE:   bus_in[l] = (i < int'(NODES)) ? u[i] : 1'b0;
            default:   bus_in[l] = u[j];
          endcase
        end
      end
  end


  always @(posedge clk) begin
    if (up_valid)
      for (int l = 0; l < int'(LINES); l++) begin
        int col, j;
        col = int'(grp) * int'(LINES) + l;
        j   = int'(up_row) * int'(COLS) + col;
        if (col < int'(COLS) && j < int'(NODES)) u_next[j] <= bus_out[l];
      end
    if (iter_done)
      for (int j = 0; j < int'(NODES); j++) u[j] <= u_next[j];
  end
endmodule
