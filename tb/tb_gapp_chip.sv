// tb_gapp_chip: shifts random 12 x 6 bit planes into one chip from the
// south edge (with some columns' shift disabled), writes them to PE RAM,
// reads them back through the north edge, and checks the global OR of the
// C latches with an all-zero plane and with planes holding one 1. Mesh
// moves: a stored plane is loaded into NS (or EW), moved one step north,
// south, east or west with random data entering at the chip edge, written
// back through the adder (SM = NS or EW with the other inputs 0) and read
// out; the edge outputs are checked too.
module tb_gapp_chip;
  import hop_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  pe_instr_t instr;
  logic [CHIP_COLS-1:0] col_en, south_in, north_out;
  logic gor;
  logic [CHIP_COLS-1:0] plane [8][CHIP_ROWS];
  logic [CHIP_COLS-1:0] ns_north_in, ns_south_in, ns_north_out, ns_south_out;
  logic [CHIP_ROWS-1:0] ew_east_in, ew_west_in, ew_east_out, ew_west_out;
  int checks = 0, failures = 0;

  gapp_chip #(.RAM_BITS(128)) dut (.clk, .rst_n, .instr, .col_en, .south_in, .north_out,
    .ns_north_in, .ns_south_in, .ew_east_in, .ew_west_in, .ns_north_out, .ns_south_out,
    .ew_east_out, .ew_west_out, .gor);

  // load plane at addr into NS (dir 0,1) or EW (dir 2,3), move it one step,
  // write it to dst; dir: 0 take from north, 1 from south, 2 east, 3 west
  task automatic move(input int addr, input int dir, input int dst);
    instr = PE_NOP; instr.addr = ADDR_W'(addr); instr.c = C_ZERO;
    if (dir < 2) begin instr.ns = NS_RAM; instr.ew = EW_ZERO; end
    else begin instr.ew = EW_RAM; instr.ns = NS_ZERO; end
    @(negedge clk);
    instr = PE_NOP;
    case (dir)
      0: instr.ns = NS_NORTH;
      1: instr.ns = NS_SOUTH;
      2: instr.ew = EW_EAST;
      default: instr.ew = EW_WEST;
    endcase
    @(negedge clk);
    instr = PE_NOP; instr.wr = WR_SM; instr.addr = ADDR_W'(dst);
    @(negedge clk);
  endtask

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // shift plane p in (row 0 first) with enabled columns en, then write it
  task automatic load(input int p, input logic [CHIP_COLS-1:0] en, input int addr);
    for (int r = 0; r < CHIP_ROWS; r++) begin
      instr = PE_NOP; instr.cm = CM_SHIFT; col_en = en; south_in = plane[p][r];
      @(negedge clk);
    end
    instr = PE_NOP; instr.wr = WR_CM; instr.addr = ADDR_W'(addr);
    @(negedge clk);
  endtask

  task automatic unload(input int p, input int addr);
    instr = PE_NOP; instr.cm = CM_RAM; instr.addr = ADDR_W'(addr);
    @(negedge clk);
    for (int r = 0; r < CHIP_ROWS; r++) begin
      check(north_out == plane[p][r], $sformatf("plane %0d row %0d: %b vs %b", p, r,
                                                north_out, plane[p][r]));
      instr = PE_NOP; instr.cm = CM_SHIFT; col_en = '1; south_in = '0;
      @(negedge clk);
    end
  endtask

  initial begin
    instr = PE_NOP; col_en = '0; south_in = '0;
    ns_north_in = CHIP_COLS'($urandom); ns_south_in = CHIP_COLS'($urandom);
    ew_east_in = CHIP_ROWS'($urandom); ew_west_in = CHIP_ROWS'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 4; p++)
      for (int r = 0; r < CHIP_ROWS; r++) plane[p][r] = CHIP_COLS'($urandom);
    for (int r = 0; r < CHIP_ROWS; r++) plane[3][r] = '0;
    load(0, '1, 5);
    load(1, '1, 100);
    load(3, '1, 7);
    // plane 2: columns 0..2 first, then columns 3..5
    begin
      logic [CHIP_COLS-1:0] keep [CHIP_ROWS];
      for (int r = 0; r < CHIP_ROWS; r++) keep[r] = plane[2][r];
      for (int r = 0; r < CHIP_ROWS; r++) plane[2][r] = keep[r] & 6'b000111;
      for (int r = 0; r < CHIP_ROWS; r++) begin
        instr = PE_NOP; instr.cm = CM_SHIFT; col_en = 6'b000111; south_in = keep[r];
        @(negedge clk);
      end
      for (int r = 0; r < CHIP_ROWS; r++) begin
        instr = PE_NOP; instr.cm = CM_SHIFT; col_en = 6'b111000; south_in = keep[r];
        @(negedge clk);
      end
      instr = PE_NOP; instr.wr = WR_CM; instr.addr = ADDR_W'(127);
      @(negedge clk);
      for (int r = 0; r < CHIP_ROWS; r++) plane[2][r] = keep[r];
    end
    unload(0, 5);
    unload(1, 100);
    unload(2, 127);
    unload(3, 7);
    // mesh moves of plane 0 (at address 5)
    for (int r = 0; r < CHIP_ROWS; r++) begin
      plane[4][r] = (r == 0) ? ns_north_in : plane[0][r-1];
      plane[5][r] = (r == CHIP_ROWS - 1) ? ns_south_in : plane[0][r+1];
      plane[6][r] = {ew_east_in[r], plane[0][r][CHIP_COLS-1:1]};
      plane[7][r] = {plane[0][r][CHIP_COLS-2:0], ew_west_in[r]};
    end
    move(5, 0, 40);
    check(ns_south_out == plane[0][CHIP_ROWS-2], "south edge NS after a move south");
    check(ns_north_out == ns_north_in, "north edge NS after a move south");
    move(5, 1, 41);
    move(5, 2, 42);
    begin
      logic [CHIP_ROWS-1:0] e, w;
      for (int r = 0; r < CHIP_ROWS; r++) begin
        e[r] = plane[6][r][CHIP_COLS-1];
        w[r] = plane[6][r][0];
      end
      check(ew_east_out == e && ew_west_out == w, "east/west edge EW after a move west");
    end
    move(5, 3, 43);
    unload(4, 40);
    unload(5, 41);
    unload(6, 42);
    unload(7, 43);
    // global OR
    instr = PE_NOP; instr.c = C_RAM; instr.addr = ADDR_W'(7);
    @(negedge clk);
    check(gor == 1'b0, "global OR of an all-zero plane");
    for (int k = 0; k < 4; k++) begin
      int rr, cc;
      rr = $urandom_range(CHIP_ROWS - 1, 0);
      cc = $urandom_range(CHIP_COLS - 1, 0);
      for (int r = 0; r < CHIP_ROWS; r++) plane[3][r] = '0;
      plane[3][rr][cc] = 1'b1;
      load(3, '1, 9);
      instr = PE_NOP; instr.c = C_RAM; instr.addr = ADDR_W'(9);
      @(negedge clk);
      check(gor == 1'b1, $sformatf("global OR with one 1 at row %0d col %0d", rr, cc));
      instr = PE_NOP; instr.c = C_ZERO;
      @(negedge clk);
      check(gor == 1'b0, "global OR after clearing C");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
