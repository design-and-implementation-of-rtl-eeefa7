// Dual-clock FIFO between the crossbar and the memory controller.
//
// For every cell it has written, the crossbar pushes the cell's block address
// (one instance) and its destination port (a second instance, pushed and
// popped together with the first). The memory controller pops them to link the
// cell into the list of its output port. Pointers are binary inside their own
// clock domain and cross to the other one in Gray code through two flip-flops,
// so full and empty are conservative and a pushed entry becomes visible to the
// reader two to three read clocks later. rdata is show-ahead. DEPTH must be a
// power of two. The original design only names this FIFO; its depth and construction
// are this design's choices. Each side has its own active-low reset.
module async_fifo #(
  parameter int unsigned WIDTH = 10,
  parameter int unsigned DEPTH = 8
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen by the write side
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen by the read side
  logic [AW:0] wbin_nxt, rbin_nxt;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign full  = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];

  assign wbin_nxt = wbin + (AW+1)'(push && !full);
  assign rbin_nxt = rbin + (AW+1)'(pop && !empty);

  always_ff @(posedge wclk) begin
    if (push && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nxt;
      wgray    <= bin2gray(wbin_nxt);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge rclk) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nxt;
      rgray    <= bin2gray(rbin_nxt);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
endmodule
