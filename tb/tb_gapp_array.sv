// tb_gapp_array: a 3-chip array (12 x 18 PEs) on a 4-line bus, so a plane
// moves in 5 column groups, the last one only half used. Random planes are
// shifted in group by group, written to PE RAM, copied back to CM and
// shifted out through bus_out; the global OR is checked across chips. A
// plane is also moved one column east and one column west through the EW
// latches, across the chip borders, with zeros entering at the array edge.
module tb_gapp_array;
  import hop_pkg::*;
  localparam int CHIPS = 3, LINES = 4, COLS = CHIPS * CHIP_COLS;
  localparam int GROUPS = (COLS + LINES - 1) / LINES;
  logic clk = 1'b0, rst_n = 1'b0;
  pe_instr_t instr;
  logic [2:0] grp;
  logic [LINES-1:0] bus_in, bus_out;
  logic gor;
  logic plane [5][CHIP_ROWS][COLS];
  int checks = 0, failures = 0;

  gapp_array #(.CHIPS(CHIPS), .LINES(LINES), .RAM_BITS(128)) dut (
    .clk, .rst_n, .instr, .grp, .bus_in, .bus_out, .gor);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic load(input int p, input int addr);
    for (int g = 0; g < GROUPS; g++)
      for (int r = 0; r < CHIP_ROWS; r++) begin
        instr = PE_NOP; instr.cm = CM_SHIFT; grp = 3'(g);
        for (int l = 0; l < LINES; l++)
          bus_in[l] = (g * LINES + l < COLS) ? plane[p][r][g * LINES + l] : 1'b1;
        @(negedge clk);
      end
    instr = PE_NOP; instr.wr = WR_CM; instr.addr = ADDR_W'(addr);
    @(negedge clk);
  endtask

  task automatic unload(input int p, input int addr);
    instr = PE_NOP; instr.cm = CM_RAM; instr.addr = ADDR_W'(addr);
    @(negedge clk);
    for (int g = 0; g < GROUPS; g++)
      for (int r = 0; r < CHIP_ROWS; r++) begin
        grp = 3'(g);
        #1;
        for (int l = 0; l < LINES; l++) begin
          logic e;
          e = (g * LINES + l < COLS) ? plane[p][r][g * LINES + l] : 1'b0;
          check(bus_out[l] == e, $sformatf("plane %0d group %0d row %0d line %0d", p, g, r, l));
        end
        instr = PE_NOP; instr.cm = CM_SHIFT; bus_in = '0;
        @(negedge clk);
      end
  endtask

  initial begin
    instr = PE_NOP; grp = '0; bus_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 3; p++)
      for (int r = 0; r < CHIP_ROWS; r++)
        for (int k = 0; k < COLS; k++) plane[p][r][k] = (p == 2) ? 1'b0 : ($urandom_range(1, 0) != 0);
    load(0, 0);
    load(1, 64);
    load(2, 127);
    unload(1, 64);
    unload(0, 0);
    // EW moves of plane 1 (address 64): 3 east-take, 4 west-take
    for (int r = 0; r < CHIP_ROWS; r++)
      for (int k = 0; k < COLS; k++) begin
        plane[3][r][k] = (k == COLS - 1) ? 1'b0 : plane[1][r][k+1];
        plane[4][r][k] = (k == 0) ? 1'b0 : plane[1][r][k-1];
      end
    for (int dir = 0; dir < 2; dir++) begin
      instr = PE_NOP; instr.ew = EW_RAM; instr.ns = NS_ZERO; instr.c = C_ZERO;
      instr.addr = ADDR_W'(64);
      @(negedge clk);
      instr = PE_NOP; instr.ew = (dir == 0) ? EW_EAST : EW_WEST;
      @(negedge clk);
      instr = PE_NOP; instr.wr = WR_SM; instr.addr = ADDR_W'(90 + dir);
      @(negedge clk);
    end
    unload(3, 90);
    unload(4, 91);
    instr = PE_NOP; instr.c = C_RAM; instr.addr = ADDR_W'(127);
    @(negedge clk);
    check(gor == 1'b0, "global OR of zero plane");
    for (int n = 0; n < CHIPS; n++) begin
      int rr, kk;
      rr = $urandom_range(CHIP_ROWS - 1, 0);
      kk = n * CHIP_COLS + $urandom_range(CHIP_COLS - 1, 0);
      for (int r = 0; r < CHIP_ROWS; r++)
        for (int k = 0; k < COLS; k++) plane[2][r][k] = 1'b0;
      plane[2][rr][kk] = 1'b1;
      load(2, 127);
      instr = PE_NOP; instr.c = C_RAM; instr.addr = ADDR_W'(127);
      @(negedge clk);
      check(gor == 1'b1, $sformatf("global OR, single 1 in chip %0d", n));
      unload(2, 127);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
