// gapp_array: CHIPS array chips cascaded side by side into a PE array of
// 12 rows by 6*CHIPS columns, with the host edge interface and the global
// OR.
//
// The host bus has LINES data lines. The columns are split into
// GROUPS = ceil(COLS/LINES) groups of LINES columns; grp selects the group
// the bus talks to. During a CM shift only the columns of that group shift:
// data line l feeds the south edge of column grp*LINES+l and bus_out[l]
// shows the north-edge CM of the same column. Moving one bit plane in thus
// takes 12 shifts per group plus one cycle to write CM into RAM, and moving
// one out takes the RAM-to-CM copy plus 12 cycles per group. The PE at row
// r, column k serves network node j = r*COLS + k. gor is the OR of the C
// latches of every PE, combinational. Neighbouring chips are joined through
// their east and west mesh edges, so EW moves cross chip borders; the
// array's own outer edges read 0 (the north and south NS edges and the
// outermost east and west EW edges).
//
// Cascading chips, shifting from an edge limited by the number of data
// lines, and the global OR follow the document; the grouping of columns on
// the data lines is this design's reading of the plane-shift cycle count.
module gapp_array
  import hop_pkg::*;
#(
  parameter int unsigned CHIPS    = 2,
  parameter int unsigned LINES    = 32,
  parameter int unsigned RAM_BITS = 128,
  localparam int unsigned COLS    = CHIPS * CHIP_COLS,
  localparam int unsigned GROUPS  = calc_groups(COLS, LINES),
  localparam int unsigned GRP_W   = (GROUPS > 1) ? $clog2(GROUPS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  pe_instr_t        instr,
  input  logic [GRP_W-1:0] grp,
  input  logic [LINES-1:0] bus_in,
  output logic [LINES-1:0] bus_out,
  output logic             gor
);
  logic [COLS-1:0]  col_en, south, north;
  logic [CHIPS-1:0] chip_gor;
  logic [CHIPS-1:0][CHIP_ROWS-1:0] ew_e_out, ew_w_out;

  always_comb begin
    for (int k = 0; k < COLS; k++) begin
      col_en[k] = (k / LINES == int'(grp));
      south[k]  = bus_in[k % LINES];
    end
    for (int l = 0; l < LINES; l++) begin
      int col;
      col = int'(grp) * LINES + l;
      bus_out[l] = (col < COLS) ? north[col] : 1'b0;
    end
  end

  for (genvar n = 0; n < CHIPS; n++) begin : g_chip
    logic [CHIP_ROWS-1:0] e_in, w_in;
    if (n == CHIPS - 1) begin : g_east_edge
      assign e_in = '0;
    end else begin : g_east_link
      assign e_in = ew_w_out[n+1];
    end
    if (n == 0) begin : g_west_edge
      assign w_in = '0;
    end else begin : g_west_link
      assign w_in = ew_e_out[n-1];
    end
    gapp_chip #(.RAM_BITS(RAM_BITS)) u_chip (
      .clk      (clk),
      .rst_n    (rst_n),
      .instr    (instr),
      .col_en   (col_en[n*CHIP_COLS +: CHIP_COLS]),
      .south_in (south[n*CHIP_COLS +: CHIP_COLS]),
      .north_out(north[n*CHIP_COLS +: CHIP_COLS]),
      .ns_north_in ('0),
      .ns_south_in ('0),
      .ew_east_in  (e_in),
      .ew_west_in  (w_in),
      .ns_north_out(),
      .ns_south_out(),
      .ew_east_out (ew_e_out[n]),
      .ew_west_out (ew_w_out[n]),
      .gor      (chip_gor[n])
    );
  end

  assign gor = |chip_gor;
endmodule
