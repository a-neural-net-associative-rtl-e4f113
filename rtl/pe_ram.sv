// pe_ram: local memory of one processing element, BITS words of one bit.
//
// The PE reads and writes it once per clock at a single address taken
// from the broadcast micro-instruction. Reading is asynchronous (the data
// is used by the latch loads of the same cycle); writing happens at the
// rising clock edge when we is high. A read and a write of the same
// address in one cycle return the old bit. The size, 128 x 1, is the
// array chip's; the asynchronous read port is this design's choice. The
// memory has no reset: the host downloads every bit that is read.
module pe_ram #(
  parameter int unsigned BITS   = 128,
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic              wdata,
  output logic              rdata
);
  logic mem [BITS];

  assign rdata = (32'(addr) < BITS) ? mem[addr[$clog2(BITS)-1:0]] : 1'b0;

  always_ff @(posedge clk) begin
    if (we && 32'(addr) < BITS) mem[addr[$clog2(BITS)-1:0]] <= wdata;
  end
endmodule
