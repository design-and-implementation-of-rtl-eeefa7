// One interleaved memory bank of the shared buffer.
//
// A simple dual-port SRAM: one write port, driven by the crossbar, and one
// read port, driven by the output path, both usable in the same clock. Reads
// are registered: rdata holds the word at raddr one clock after raddr is given,
// as in an FPGA block RAM. The original design specifies dual-port banks 32 bits wide
// and, by its 12-bit bank addresses, 4096 words deep; the one-clock read latency
// is this design's choice. Nothing is reset: a word is only read after a cell
// has been written to it.
module memory_bank #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
