// Memory of addresses: the link memory of the shared buffer.
//
// Entry a holds the number of the block that follows block a in whatever list
// block a belongs to: the free-address list or one of the per-output lists.
// It has one entry per 4-word block of a bank, a quarter of a bank's words.
// It is a simple dual-port SRAM, so the memory controller can follow one link
// (read) and make one link (write) in the same clock. Reads are registered:
// rdata is the entry at raddr one clock later. The dual-port structure and the
// size follow the original design; the read latency is this design's choice. Contents
// are not reset; the memory controller links every entry after reset.
module address_memory #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [$clog2(DEPTH)-1:0] wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [$clog2(DEPTH)-1:0] rdata
);
  logic [$clog2(DEPTH)-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
