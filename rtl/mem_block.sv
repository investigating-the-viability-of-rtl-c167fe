// mem_block: one independent storage block of the reconfigurable cache.
//
// The cache is built from many of these small, identical, one-word-wide blocks;
// each one holds either tags with their state bits or one word column of data,
// depending only on how the current configuration assigns it. The block is a
// true dual-port RAM (the cache controller uses port A, the snooper port B),
// DEPTH lines of one 32-bit word. Both ports read synchronously: data appears the
// cycle after the address. A write on a port also updates that port's read data
// (write-first). If both ports write the same line in one cycle, port A wins.
// One word width follows the design; the dual-port choice follows the baseline
// cache block diagram; the collision rule is this design's own.
module mem_block #(
  parameter int DEPTH = 256,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [31:0]   b_wdata,
  output logic [31:0]   b_rdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (b_we && !(a_we && a_addr == b_addr)) mem[b_addr] <= b_wdata;
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= a_we ? a_wdata : mem[a_addr];
    b_rdata <= b_we ? b_wdata : mem[b_addr];
  end

endmodule
