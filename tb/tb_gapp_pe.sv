// tb_gapp_pe: runs a processing element on random micro-instructions (at
// most one latch taking the RAM bit per cycle) and compares its C and CM
// latches, and the NS and EW latches seen by the neighbours, every cycle
// with a model built from integer arithmetic: the sum
// and carry come from NS+EW+C, the borrow from NS-EW-C < 0.
module tb_gapp_pe;
  import hop_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  pe_instr_t instr;
  logic shift_en, cm_in, cm_out, c_out, ns_n, ns_s, ew_e, ew_w, ns_out, ew_out;
  logic ns, ew, c, cm;
  logic mem [128];
  int checks = 0, failures = 0;

  gapp_pe #(.RAM_BITS(128)) dut (.clk, .rst_n, .instr, .shift_en, .cm_in, .cm_out, .c_out,
               .ns_n, .ns_s, .ew_e, .ew_w, .ns_out, .ew_out);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    instr = PE_NOP; shift_en = 1'b0; cm_in = 1'b0;
    ns_n = 1'b0; ns_s = 1'b0; ew_e = 1'b0; ew_w = 1'b0;
    ns = 0; ew = 0; c = 0; cm = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // fill the RAM through CM shifting, checking the write path
    for (int a = 0; a < 128; a++) begin
      instr = PE_NOP; instr.cm = CM_SHIFT; shift_en = 1'b1; cm_in = $urandom_range(1, 0) != 0;
      @(negedge clk);
      cm = cm_in;
      instr = PE_NOP; instr.wr = WR_CM; instr.addr = ADDR_W'(a);
      @(negedge clk);
      mem[a] = cm;
    end
    for (int n = 0; n < 20000; n++) begin
      logic r, sm, cy, bw;
      int s, d, src;
      instr.addr = ADDR_W'($urandom_range(127, 0));
      src = $urandom_range(4, 0);   // which latch may read RAM
      instr.ns = ns_sel_e'($urandom_range(5, 0));
      instr.ew = ew_sel_e'($urandom_range(4, 0));
      ns_n = $urandom_range(1, 0) != 0;
      ns_s = $urandom_range(1, 0) != 0;
      ew_e = $urandom_range(1, 0) != 0;
      ew_w = $urandom_range(1, 0) != 0;
      instr.c  = c_sel_e'($urandom_range(5, 0));
      instr.cm = cm_sel_e'($urandom_range(2, 0));
      instr.wr = wr_sel_e'($urandom_range(2, 0));
      if (src != 0 && instr.ns == NS_RAM) instr.ns = NS_HOLD;
      if (src != 1 && instr.ew == EW_RAM) instr.ew = EW_HOLD;
      if (src != 2 && instr.c  == C_RAM)  instr.c  = C_HOLD;
      if (src != 3 && instr.cm == CM_RAM) instr.cm = CM_HOLD;
      shift_en = $urandom_range(1, 0) != 0;
      cm_in = $urandom_range(1, 0) != 0;
      // model
      r  = mem[instr.addr[6:0]];
      s  = int'(ns) + int'(ew) + int'(c);
      d  = int'(ns) - int'(ew) - int'(c);
      sm = s[0];
      cy = s >= 2;
      bw = d < 0;
      @(posedge clk);
      if (instr.wr == WR_SM) mem[instr.addr[6:0]] = sm;
      if (instr.wr == WR_CM) mem[instr.addr[6:0]] = cm;
      case (instr.ns) NS_RAM: ns = r; NS_ZERO: ns = 0; NS_SM: ns = sm;
                      NS_NORTH: ns = ns_n; NS_SOUTH: ns = ns_s; default: ; endcase
      case (instr.ew) EW_RAM: ew = r; EW_ZERO: ew = 0; EW_EAST: ew = ew_e; EW_WEST: ew = ew_w;
                      default: ; endcase
      case (instr.c) C_RAM: c = r; C_ZERO: c = 0; C_CY: c = cy; C_BW: c = bw; C_SM: c = sm;
                     default: ; endcase
      case (instr.cm) CM_RAM: cm = r; CM_SHIFT: if (shift_en) cm = cm_in; default: ; endcase
      @(negedge clk);
      check(c_out == c, $sformatf("C latch, step %0d", n));
      check(cm_out == cm, $sformatf("CM latch, step %0d", n));
      check(ns_out == ns, $sformatf("NS latch, step %0d", n));
      check(ew_out == ew, $sformatf("EW latch, step %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
