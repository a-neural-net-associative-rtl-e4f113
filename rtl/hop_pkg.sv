// hop_pkg: types, constants and size formulas shared by the Hopfield
// associative-memory engine built on an array of bit-serial processing
// elements (PEs).
//
// The PE micro-instruction (pe_instr_t) is broadcast to every PE each
// clock. It selects what each of the four single-bit latches (NS, EW, C,
// CM) loads, what is written to the local RAM and at which address. Only
// one latch may take the RAM read data in a cycle (this design's rule;
// it is what sets the cycle counts of the conversion step).
//
// The size functions follow the analysis of the design:
//   w = ceil(log2(M+1)) + 1          bits of one signed-magnitude weight
//   p = ceil(log2(N*M+1)) + 1        bits of one two's complement sum
//   D = min(floor((B-p)/(w+1)), N)   weights held in PE memory at once
//   S = ceil(N/D)                    segments per iteration
//   C = 12*ceil(6n/lines) + 1        cycles to shift one bit plane in
// Node values are coded as a sign bit: 0 means +1, 1 means -1.
package hop_pkg;

  localparam int unsigned ADDR_W    = 8;   // PE RAM address field (B <= 256)
  localparam int unsigned CHIP_ROWS = 12;  // rows of one chip (shift direction)
  localparam int unsigned CHIP_COLS = 6;   // columns of one chip
  localparam int unsigned CHIP_PES  = CHIP_ROWS * CHIP_COLS;

  // NS_NORTH: take the NS of the northern neighbour (data move south), and
  // so on for the other directions.
  typedef enum logic [2:0] {NS_HOLD, NS_RAM, NS_ZERO, NS_SM, NS_NORTH, NS_SOUTH} ns_sel_e;
  typedef enum logic [2:0] {EW_HOLD, EW_RAM, EW_ZERO, EW_EAST, EW_WEST}        ew_sel_e;
  typedef enum logic [2:0] {C_HOLD, C_RAM, C_ZERO, C_CY, C_BW, C_SM} c_sel_e;
  typedef enum logic [1:0] {CM_HOLD, CM_RAM, CM_SHIFT}       cm_sel_e;
  typedef enum logic [1:0] {WR_NONE, WR_SM, WR_CM}           wr_sel_e;

  typedef struct packed {
    ns_sel_e           ns;
    ew_sel_e           ew;
    c_sel_e            c;
    cm_sel_e           cm;
    wr_sel_e           wr;
    logic [ADDR_W-1:0] addr;
  } pe_instr_t;

  localparam pe_instr_t PE_NOP = '{ns: NS_HOLD, ew: EW_HOLD, c: C_HOLD,
                                   cm: CM_HOLD, wr: WR_NONE, addr: '0};

  // Kind of bit plane the sequencer asks the host for.
  typedef enum logic [1:0] {PL_WEIGHT, PL_NODE, PL_OWN} plane_e;

  function automatic int unsigned clog2i(input longint unsigned x);
    int unsigned r = 0;
    longint unsigned v = 1;
    while (v < x) begin v = v * 2; r++; end
    return r;
  endfunction

  function automatic int unsigned calc_w(input int unsigned m);
    return clog2i(longint'(m) + 1) + 1;
  endfunction

  function automatic int unsigned calc_p(input int unsigned n, input int unsigned m);
    return clog2i(longint'(n) * longint'(m) + 1) + 1;
  endfunction

  function automatic int unsigned calc_d(input int unsigned b, input int unsigned n,
                                         input int unsigned m);
    int unsigned d;
    d = (b - calc_p(n, m)) / (calc_w(m) + 1);
    return (d < n) ? d : n;
  endfunction

  function automatic int unsigned calc_s(input int unsigned b, input int unsigned n,
                                         input int unsigned m);
    int unsigned d;
    d = calc_d(b, n, m);
    return (n + d - 1) / d;
  endfunction

  function automatic int unsigned calc_chips(input int unsigned n);
    return (n + CHIP_PES - 1) / CHIP_PES;
  endfunction

  function automatic int unsigned calc_groups(input int unsigned cols, input int unsigned lines);
    return (cols + lines - 1) / lines;
  endfunction

endpackage
