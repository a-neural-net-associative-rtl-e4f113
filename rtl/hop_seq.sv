// hop_seq: sequencer of the Hopfield search phase on the PE array.
//
// It broadcasts one PE micro-instruction per clock and tells the host which
// bit plane to put on the data lines. PE j (network node j) keeps in its
// RAM D weight slots of W+1 bits (slot d at address d*(W+1): weight t_ij in
// signed magnitude, bits 0..W-2 magnitude, bit W-1 sign, then the node bit
// u_i) and a P-bit two's complement sum at the top of the RAM. One
// iteration is:
//   for each of the S segments (nodes i = seg*D .. seg*D+D-1):
//     download D*(W+1) planes, each 12 shifts per column group + 1 write
//     multiply:  sign := sign XOR node bit               3 cycles/weight
//     convert:   signed magnitude -> two's complement    4W-1 cycles/weight
//     sum:       sum += weight, sign-extended, LSB first  3P cycles/weight
//                (the very first weight of an iteration adds to zero)
//   download the plane of each PE's own old value u_j into slot 0 (C cycles)
//   test: C := u_j XOR new sign, global OR of C; CM := new sign  4 cycles
//   upload the new signs, 12 cycles per column group (C-1 cycles)
// The sign bit of the sum is the new node value (sign 0 = +1, so a zero
// sum gives +1). If the global OR is 1 and fewer than MAX_ITER iterations
// have run, the next iteration starts at once; otherwise done rises, with
// converged high when the last iteration changed no node.
//
// One iteration takes
//   SD[C(W+1) + 3(P+1) + (4W-1)] + 4 + 2C - 1 cycles,
// which is the document's figure less the 4-cycle test it counts once per
// segment: this design runs the test once, after the last segment. The
// step order, the cycle counts of each step, the segmentation and the
// signed-magnitude download follow the document; the memory layout, the
// own-value plane, the micro-instruction sequences, MAX_ITER and the host
// handshake are this design's.
//
// Host handshake: while pl_valid is high the host must drive the data
// lines, in the same cycle, with row pl_row of column group grp of the plane
// (pl_kind, pl_node, pl_bit). While up_valid is high, the array's data
// outputs hold row up_row of group grp of the new node values.
module hop_seq
  import hop_pkg::*;
#(
  parameter int unsigned NODES     = 120,
  parameter int unsigned EXEMPLARS = 8,
  parameter int unsigned RAM_BITS  = 128,
  parameter int unsigned LINES     = 32,
  parameter int unsigned MAX_ITER  = 16,
  localparam int unsigned W        = calc_w(EXEMPLARS),
  localparam int unsigned P        = calc_p(NODES, EXEMPLARS),
  localparam int unsigned D        = calc_d(RAM_BITS, NODES, EXEMPLARS),
  localparam int unsigned S        = calc_s(RAM_BITS, NODES, EXEMPLARS),
  localparam int unsigned CHIPS    = calc_chips(NODES),
  localparam int unsigned GROUPS   = calc_groups(CHIPS * CHIP_COLS, LINES),
  localparam int unsigned GRP_W    = (GROUPS > 1) ? $clog2(GROUPS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             gor,
  output pe_instr_t        instr,
  output logic [GRP_W-1:0] grp,
  // host plane requests
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
  localparam int unsigned SUM_BASE  = RAM_BITS - P;
  localparam int unsigned SIGN_ADDR = RAM_BITS - 1;
  localparam int unsigned SLOT      = W + 1;
  localparam int unsigned CONV_LEN  = 4 * W - 1;
  localparam logic [15:0]  WA        = 16'(W);       // node bit of a slot
  localparam logic [15:0]  WS        = 16'(W - 1);   // sign bit of a slot

  typedef enum logic [3:0] {
    ST_IDLE, ST_DL_SHIFT, ST_DL_WRITE, ST_XOR, ST_CONV, ST_SUM,
    ST_OWN_SHIFT, ST_OWN_WRITE, ST_TEST, ST_UP, ST_DONE
  } state_e;

  state_e      st;
  logic [15:0] seg, slot, bitc, ph, grp_c, row_c;

  logic [15:0] base;      // address of the current slot
  assign base = 16'(slot * SLOT);

  // Combinational micro-instruction and host request decode.
  always_comb begin
    logic [15:0] k, q;
    instr    = PE_NOP;
    pl_valid = 1'b0;
    pl_kind  = PL_WEIGHT;
    pl_node  = 16'(seg * D + slot);
    pl_bit   = bitc[7:0];
    pl_row   = row_c[3:0];
    up_valid = 1'b0;
    up_row   = row_c[3:0];
    grp      = grp_c[GRP_W-1:0];
    k        = '0;
    q        = '0;
    unique case (st)
      ST_DL_SHIFT, ST_OWN_SHIFT: begin
        instr.cm = CM_SHIFT;
        pl_valid = 1'b1;
        pl_kind  = (st == ST_OWN_SHIFT) ? PL_OWN :
                   (bitc == 16'(W)) ? PL_NODE : PL_WEIGHT;
      end
      ST_DL_WRITE: begin
        instr.wr   = WR_CM;
        instr.addr = ADDR_W'(base + bitc);
      end
      ST_OWN_WRITE: begin
        instr.wr   = WR_CM;
        instr.addr = ADDR_W'(W);
      end
      ST_XOR: begin
        unique case (ph)
          16'd0: begin instr.ns = NS_RAM; instr.c = C_ZERO; instr.addr = ADDR_W'(base + WA); end
          16'd1: begin instr.ew = EW_RAM; instr.addr = ADDR_W'(base + WS); end
          default: begin instr.wr = WR_SM; instr.addr = ADDR_W'(base + WS); end
        endcase
      end
      ST_CONV: begin
        if (ph == 16'd0) begin
          instr.ew = EW_RAM; instr.addr = ADDR_W'(base + WS);
        end else if (ph == 16'd1) begin
          instr.c = C_RAM;   instr.addr = ADDR_W'(base + WS);
        end else if (ph == 16'(CONV_LEN - 1)) begin
          instr.wr = WR_SM;  instr.addr = ADDR_W'(base + WS);
        end else begin
          k = (ph - 16'd2) >> 2;
          q = (ph - 16'd2) & 16'd3;
          unique case (q)
            16'd0: begin instr.ns = NS_RAM; instr.addr = ADDR_W'(base + k); end
            16'd1: begin
              instr.wr = WR_SM; instr.ns = NS_SM; instr.ew = EW_ZERO;
              instr.addr = ADDR_W'(base + k);
            end
            16'd2: begin instr.c = C_BW; instr.ns = NS_ZERO; end
            default: begin instr.ew = EW_RAM; instr.addr = ADDR_W'(base + WS); end
          endcase
        end
      end
      ST_SUM: begin
        unique case (ph)
          16'd0: begin
            instr.ns   = (seg == 0 && slot == 0) ? NS_ZERO : NS_RAM;
            instr.c    = (bitc == 0) ? C_ZERO : C_HOLD;
            instr.addr = ADDR_W'(SUM_BASE + bitc);
          end
          16'd1: begin
            instr.ew   = EW_RAM;
            instr.addr = ADDR_W'(base + ((bitc < 16'(W)) ? bitc : 16'(W - 1)));
          end
          default: begin
            instr.wr = WR_SM; instr.c = C_CY; instr.addr = ADDR_W'(SUM_BASE + bitc);
          end
        endcase
      end
      ST_TEST: begin
        unique case (ph)
          16'd0: begin instr.ns = NS_RAM; instr.c = C_ZERO; instr.addr = ADDR_W'(W); end
          16'd1: begin instr.ew = EW_RAM; instr.addr = ADDR_W'(SIGN_ADDR); end
          16'd2: begin instr.c = C_SM; end
          default: begin instr.cm = CM_RAM; instr.addr = ADDR_W'(SIGN_ADDR); end
        endcase
      end
      ST_UP: begin
        instr.cm = CM_SHIFT;
        up_valid = 1'b1;
      end
      default: ;
    endcase
  end

  assign busy = (st != ST_IDLE) && (st != ST_DONE);

  // Advance the 12-row x GROUPS shift counters; returns 1 on the last shift.
  function automatic logic shift_last(input logic [15:0] g, input logic [15:0] r);
    return (r == 16'(CHIP_ROWS - 1)) && (g == 16'(GROUPS - 1));
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= ST_IDLE;
      seg <= '0; slot <= '0; bitc <= '0; ph <= '0; grp_c <= '0; row_c <= '0;
      iter_done <= 1'b0; changed <= 1'b0; done <= 1'b0; converged <= 1'b0;
      iter_count <= '0;
    end else begin
      iter_done <= 1'b0;
      unique case (st)
        ST_IDLE, ST_DONE: begin
          if (start) begin
            st <= ST_DL_SHIFT;
            seg <= '0; slot <= '0; bitc <= '0; ph <= '0; grp_c <= '0; row_c <= '0;
            done <= 1'b0; converged <= 1'b0; iter_count <= '0;
          end
        end
        ST_DL_SHIFT, ST_OWN_SHIFT, ST_UP: begin
          if (shift_last(grp_c, row_c)) begin
            grp_c <= '0; row_c <= '0;
            if (st == ST_DL_SHIFT)       st <= ST_DL_WRITE;
            else if (st == ST_OWN_SHIFT) st <= ST_OWN_WRITE;
            else begin
              // end of the iteration
              iter_done  <= 1'b1;
              iter_count <= iter_count + 16'd1;
              if (changed && (iter_count + 1 < 16'(MAX_ITER))) begin
                st <= ST_DL_SHIFT;
                seg <= '0; slot <= '0; bitc <= '0;
              end else begin
                st <= ST_DONE;
                done <= 1'b1;
                converged <= !changed;
              end
            end
          end else if (row_c == 16'(CHIP_ROWS - 1)) begin
            row_c <= '0; grp_c <= grp_c + 16'd1;
          end else begin
            row_c <= row_c + 16'd1;
          end
        end
        ST_DL_WRITE: begin
          st <= ST_DL_SHIFT;
          if (bitc == 16'(W)) begin
            bitc <= '0;
            if (slot == 16'(D - 1)) begin
              slot <= '0; ph <= '0; st <= ST_XOR;
            end else slot <= slot + 16'd1;
          end else bitc <= bitc + 16'd1;
        end
        ST_XOR: begin
          if (ph == 16'd2) begin
            ph <= '0;
            if (slot == 16'(D - 1)) begin slot <= '0; st <= ST_CONV; end
            else slot <= slot + 16'd1;
          end else ph <= ph + 16'd1;
        end
        ST_CONV: begin
          if (ph == 16'(CONV_LEN - 1)) begin
            ph <= '0;
            if (slot == 16'(D - 1)) begin slot <= '0; bitc <= '0; st <= ST_SUM; end
            else slot <= slot + 16'd1;
          end else ph <= ph + 16'd1;
        end
        ST_SUM: begin
          if (ph == 16'd2) begin
            ph <= '0;
            if (bitc == 16'(P - 1)) begin
              bitc <= '0;
              if (slot == 16'(D - 1)) begin
                slot <= '0;
                if (seg == 16'(S - 1)) st <= ST_OWN_SHIFT;
                else begin seg <= seg + 16'd1; st <= ST_DL_SHIFT; end
              end else slot <= slot + 16'd1;
            end else bitc <= bitc + 16'd1;
          end else ph <= ph + 16'd1;
        end
        ST_OWN_WRITE: begin st <= ST_TEST; ph <= '0; end
        ST_TEST: begin
          if (ph == 16'd3) begin
            changed <= gor;
            ph <= '0;
            st <= ST_UP;
          end else ph <= ph + 16'd1;
        end
        default: st <= ST_IDLE;
      endcase
    end
  end

  initial begin
    assert (RAM_BITS <= (1 << ADDR_W)) else $error("RAM_BITS too large for ADDR_W");
    assert (D >= 1) else $error("PE memory too small for one weight slot");
    assert (LINES >= 1) else $error("need at least one data line");
  end
endmodule
