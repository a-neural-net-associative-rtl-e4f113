// gapp_pe: one bit-serial processing element.
//
// A PE holds four single-bit latches (NS, EW, C and CM), a full-adder ALU
// and a BITS x 1 local RAM. Every clock it executes the micro-instruction
// broadcast by the sequencer:
//   SM = NS ^ EW ^ C                  sum
//   CY = maj(NS, EW, C)               carry
//   BW = maj(~NS, EW, C)              borrow of NS - EW - C
// NS, EW and C load from the RAM read bit, a constant or an ALU output;
// NS can also take the NS latch of the northern or southern neighbour and
// EW the EW latch of the eastern or western neighbour (mesh moves). CM loads from RAM or shifts: with shift_en high it takes cm_in, the CM
// bit of its southern neighbour (or the host data line at the south edge),
// and its own CM is cm_out towards the north. The RAM is written with SM
// or CM at the instruction address. The C latch drives the global OR.
//
// The four latches, the 128 x 1 RAM, the bit-serial ALU and shifting data
// in from an array edge follow the document. The exact latch sources, the
// borrow output and the one-RAM-read-per-cycle rule are this design's
// choices, as is giving the four neighbour paths to NS (north-south) and EW
// (east-west). The Hopfield schedule itself moves data only through CM.
// All latches reset to 0, synchronously.
module gapp_pe
  import hop_pkg::*;
#(
  parameter int unsigned RAM_BITS = 128
) (
  input  logic      clk,
  input  logic      rst_n,
  input  pe_instr_t instr,
  input  logic      shift_en,   // this PE's column takes part in a CM shift
  input  logic      cm_in,      // CM of the southern neighbour / edge data
  output logic      cm_out,     // own CM, to the northern neighbour / edge
  input  logic      ns_n,       // NS of the northern neighbour
  input  logic      ns_s,       // NS of the southern neighbour
  input  logic      ew_e,       // EW of the eastern neighbour
  input  logic      ew_w,       // EW of the western neighbour
  output logic      ns_out,     // own NS, to both north-south neighbours
  output logic      ew_out,     // own EW, to both east-west neighbours
  output logic      c_out       // own C, into the global OR
);
  logic ns, ew, c, cm;
  logic ram_rd, ram_we, ram_wd;
  logic sm, cy, bw;

  assign sm = ns ^ ew ^ c;
  assign cy = (ns & ew) | (ns & c) | (ew & c);
  assign bw = (~ns & ew) | (~ns & c) | (ew & c);

  assign ram_we = (instr.wr != WR_NONE);
  assign ram_wd = (instr.wr == WR_CM) ? cm : sm;

  pe_ram #(.BITS(RAM_BITS), .ADDR_W(ADDR_W)) u_ram (
    .clk  (clk),
    .addr (instr.addr),
    .we   (ram_we),
    .wdata(ram_wd),
    .rdata(ram_rd)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ns <= 1'b0; ew <= 1'b0; c <= 1'b0; cm <= 1'b0;
    end else begin
      unique case (instr.ns)
        NS_RAM:  ns <= ram_rd;
        NS_ZERO: ns <= 1'b0;
        NS_SM:   ns <= sm;
        NS_NORTH: ns <= ns_n;
        NS_SOUTH: ns <= ns_s;
        default: ns <= ns;
      endcase
      unique case (instr.ew)
        EW_RAM:  ew <= ram_rd;
        EW_ZERO: ew <= 1'b0;
        EW_EAST: ew <= ew_e;
        EW_WEST: ew <= ew_w;
        default: ew <= ew;
      endcase
      unique case (instr.c)
        C_RAM:   c <= ram_rd;
        C_ZERO:  c <= 1'b0;
        C_CY:    c <= cy;
        C_BW:    c <= bw;
        C_SM:    c <= sm;
        default: c <= c;
      endcase
      unique case (instr.cm)
        CM_RAM:   cm <= ram_rd;
        CM_SHIFT: if (shift_en) cm <= cm_in;
        default:  cm <= cm;
      endcase
    end
  end

  assign cm_out = cm;
  assign ns_out = ns;
  assign ew_out = ew;
  assign c_out  = c;

  // At most one latch takes the RAM read bit per cycle.
  a_one_ram_read: assert property (@(posedge clk) disable iff (!rst_n)
    $countones({instr.ns == NS_RAM, instr.ew == EW_RAM,
                instr.c == C_RAM, instr.cm == CM_RAM}) <= 1);
endmodule
