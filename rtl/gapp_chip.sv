// gapp_chip: one array chip, a mesh of CHIP_ROWS x CHIP_COLS (12 x 6)
// processing elements.
//
// All PEs execute the same broadcast micro-instruction. In each column the
// CM latches form a shift chain from the south edge (row CHIP_ROWS-1) to the
// north edge (row 0): on a CM shift, row r takes row r+1 and the south row
// takes south_in. north_out is the CM of row 0, so a plane shifted in over
// 12 cycles leaves the first bit in row 0, and a plane loaded from RAM is
// read out at the north edge one row per shift. col_en gates the shift per
// column. gor is the OR of the C latches of all 72 PEs. The NS latches are
// also wired to their north and south neighbours and the EW latches to their
// east and west neighbours; the PEs on the chip's border take the *_in edge
// ports instead and show their latches on the *_out edge ports, so chips can
// be cascaded in any direction.
//
// The 72-PE chip, its edge I/O and its global OR follow the document; its
// orientation (12 rows in the shift direction, 6 columns across, so that
// chips cascade side by side) is this design's reading of the plane-shift
// cycle count 12*ceil(6n/lines)+1.
module gapp_chip
  import hop_pkg::*;
#(
  parameter int unsigned RAM_BITS = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  pe_instr_t            instr,
  input  logic [CHIP_COLS-1:0] col_en,
  input  logic [CHIP_COLS-1:0] south_in,
  output logic [CHIP_COLS-1:0] north_out,
  // mesh edges
  input  logic [CHIP_COLS-1:0] ns_north_in,   // NS beyond the north edge
  input  logic [CHIP_COLS-1:0] ns_south_in,   // NS beyond the south edge
  input  logic [CHIP_ROWS-1:0] ew_east_in,    // EW beyond the east edge
  input  logic [CHIP_ROWS-1:0] ew_west_in,    // EW beyond the west edge
  output logic [CHIP_COLS-1:0] ns_north_out,  // NS of row 0
  output logic [CHIP_COLS-1:0] ns_south_out,  // NS of the south row
  output logic [CHIP_ROWS-1:0] ew_east_out,   // EW of the east column
  output logic [CHIP_ROWS-1:0] ew_west_out,   // EW of column 0
  output logic                 gor
);
  logic [CHIP_ROWS-1:0][CHIP_COLS-1:0] cm, c, ns, ew;

  for (genvar r = 0; r < CHIP_ROWS; r++) begin : g_row
    for (genvar k = 0; k < CHIP_COLS; k++) begin : g_col
      logic cm_src, n_src, s_src, e_src, w_src;
      if (r == CHIP_ROWS - 1) begin : g_south
        assign cm_src = south_in[k];
        assign s_src  = ns_south_in[k];
      end else begin : g_not_south
        assign cm_src = cm[r+1][k];
        assign s_src  = ns[r+1][k];
      end
      if (r == 0) begin : g_north
        assign n_src = ns_north_in[k];
      end else begin : g_not_north
        assign n_src = ns[r-1][k];
      end
      if (k == CHIP_COLS - 1) begin : g_east
        assign e_src = ew_east_in[r];
      end else begin : g_not_east
        assign e_src = ew[r][k+1];
      end
      if (k == 0) begin : g_west
        assign w_src = ew_west_in[r];
      end else begin : g_not_west
        assign w_src = ew[r][k-1];
      end
      gapp_pe #(.RAM_BITS(RAM_BITS)) u_pe (
        .clk     (clk),
        .rst_n   (rst_n),
        .instr   (instr),
        .shift_en(col_en[k]),
        .cm_in   (cm_src),
        .cm_out  (cm[r][k]),
        .ns_n    (n_src),
        .ns_s    (s_src),
        .ew_e    (e_src),
        .ew_w    (w_src),
        .ns_out  (ns[r][k]),
        .ew_out  (ew[r][k]),
        .c_out   (c[r][k])
      );
    end
  end

  assign north_out = cm[0];
  assign ns_north_out = ns[0];
  assign ns_south_out = ns[CHIP_ROWS-1];
  for (genvar r = 0; r < CHIP_ROWS; r++) begin : g_ew_edge
    assign ew_east_out[r] = ew[r][CHIP_COLS-1];
    assign ew_west_out[r] = ew[r][0];
  end
  assign gor       = |c;
endmodule
