// tb_pe_ram: checks the 128 x 1 PE memory against an array model: random
// writes and reads, read-during-write returning the old bit, and addresses
// past the last word reading 0 and ignoring writes.
module tb_pe_ram;
  logic clk = 1'b0;
  logic [7:0] addr;
  logic we, wdata, rdata;
  logic model [128];
  int checks = 0, failures = 0;

  pe_ram #(.BITS(128), .ADDR_W(8)) dut (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    we = 1'b0; wdata = 1'b0; addr = '0;
    // fill every word
    for (int a = 0; a < 128; a++) begin
      @(negedge clk);
      addr = 8'(a); we = 1'b1; wdata = $urandom_range(1, 0) != 0; model[a] = wdata;
    end
    @(negedge clk) we = 1'b0;
    for (int a = 0; a < 128; a++) begin
      addr = 8'(a); #1;
      check(rdata == model[a], $sformatf("read %0d", a));
      @(negedge clk);
    end
    // random mix, read before write in the same cycle
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      addr = 8'($urandom_range(127, 0));
      we = $urandom_range(1, 0) != 0;
      wdata = $urandom_range(1, 0) != 0;
      #1 check(rdata == model[addr[6:0]], $sformatf("mixed read %0d", addr));
      @(posedge clk);
      if (we) model[addr[6:0]] = wdata;
    end
    // out of range
    @(negedge clk) addr = 8'd200; we = 1'b1; wdata = 1'b1;
    #1 check(rdata == 1'b0, "out-of-range read");
    @(negedge clk) we = 1'b0;
    for (int a = 0; a < 128; a++) begin
      addr = 8'(a); #1;
      check(rdata == model[a], $sformatf("after out-of-range write %0d", a));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
