// hopfield_gapp_top: Hopfield associative memory, search phase, on a
// cascaded array of bit-serial processing elements.
//
// Each network node is one PE; CHIPS = ceil(NODES/72) chips of 72 PEs are
// cascaded. The weights t_ij = sum_s x_i^s x_j^s (t_jj = 0) are computed
// off-line by the host and shifted in, segment by segment, as bit planes
// together with the current node values; the PEs multiply (XOR), convert
// to two's complement and accumulate bit-serially, and the sign of each
// sum is the node's next value. The global OR of "my value changed" tells
// whether another iteration is needed. See hop_seq for the schedule and
// gapp_array for the bus-to-array mapping (node j sits at row j/COLS,
// column j%COLS, COLS = 6*CHIPS).
//
// Interface: pulse start with the host ready to serve planes. The host
// drives bus_in with the requested plane row whenever pl_valid is high
// (same cycle) and samples bus_out whenever up_valid is high. iter_done
// pulses at the end of each iteration, done rises when the network has
// converged (converged=1) or MAX_ITER iterations have run (converged=0).
// Defaults: the 120-node (12 x 10 pixel) network with 8 exemplars, a
// 128-bit PE memory and a 32-line host bus; MAX_ITER is this design's.
module hopfield_gapp_top
  import hop_pkg::*;
#(
  parameter int unsigned NODES     = 120,
  parameter int unsigned EXEMPLARS = 8,
  parameter int unsigned RAM_BITS  = 128,
  parameter int unsigned LINES     = 32,
  parameter int unsigned MAX_ITER  = 16,
  localparam int unsigned CHIPS    = calc_chips(NODES),
  localparam int unsigned GROUPS   = calc_groups(CHIPS * CHIP_COLS, LINES),
  localparam int unsigned GRP_W    = (GROUPS > 1) ? $clog2(GROUPS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  // host bus
  input  logic [LINES-1:0] bus_in,
  output logic [LINES-1:0] bus_out,
  output logic [GRP_W-1:0] grp,
  output logic             pl_valid,
  output plane_e           pl_kind,
  output logic [15:0]      pl_node,
  output logic [7:0]       pl_bit,
  output logic [3:0]       pl_row,
  output logic             up_valid,
  output logic [3:0]       up_row,
  // status
  output logic             busy,
  output logic             iter_done,
  output logic             changed,
  output logic             done,
  output logic             converged,
  output logic [15:0]      iter_count
);
  pe_instr_t instr;
  logic      gor;

  hop_seq #(
    .NODES(NODES), .EXEMPLARS(EXEMPLARS), .RAM_BITS(RAM_BITS),
    .LINES(LINES), .MAX_ITER(MAX_ITER)
  ) u_seq (
    .clk(clk), .rst_n(rst_n), .start(start), .gor(gor),
    .instr(instr), .grp(grp),
    .pl_valid(pl_valid), .pl_kind(pl_kind), .pl_node(pl_node),
    .pl_bit(pl_bit), .pl_row(pl_row), .up_valid(up_valid), .up_row(up_row),
    .busy(busy), .iter_done(iter_done), .changed(changed), .done(done),
    .converged(converged), .iter_count(iter_count)
  );

  gapp_array #(.CHIPS(CHIPS), .LINES(LINES), .RAM_BITS(RAM_BITS)) u_array (
    .clk(clk), .rst_n(rst_n), .instr(instr), .grp(grp),
    .bus_in(bus_in), .bus_out(bus_out), .gor(gor)
  );
endmodule
