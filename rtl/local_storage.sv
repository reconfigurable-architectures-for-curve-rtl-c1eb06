// local_storage: the co-processor's local RAM, 128 locations of 32 bits.
//
// Sizes follow the design description: 32-bit words because that is the
// widest port of the FPGA block RAM it targets, 128 locations addressed by a
// 7-bit bus, four locations per GF(2^83) variable, hence 32 variables. The
// controller drives separate read (rd) and write (wr) strobes.
//
// Timing (this design's choice, matching a block RAM): the write happens at
// the clock edge with wr high; a read issued with rd high returns rdata on
// the next cycle, and rdata holds until the next read. A read and a write of
// the same location in one cycle returns the old contents. The array is not
// reset.
module local_storage #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 128,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rd,
  input  logic          wr,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr) mem[addr] <= wdata;
    if (rd) rdata <= mem[addr];
  end

endmodule
