// Crossbar: barrel-shifter write path into the interleaved banks.
//
// At slot 4p+k of a cell time, sorter lane i carries word ((i+p) mod 4)+4k of
// its cell. The crossbar steers lane i to bank (i+p) mod 4, so every bank
// receives exactly one word per clock, and addresses it at {blk_i, k}: the
// block the memory controller allocated for that cell, with two bits appended
// for the word inside the block. A cell therefore lands in the same block of
// all four banks, rows k of word columns 0..3, and no wider bus or faster
// multiplexer is needed. Bank write signals are registered, one clock after
// the lane word.
// After the words are under way, the crossbar reports each written cell
// (block address and destination port) to the memory controller: lane i is
// pushed at slot 12+i. The steering and address generation follow the
// original design; the register stage and the report timing are this design's
// choices.
module crossbar
  import sms_pkg::*;
#(
  parameter int unsigned N     = N_PORTS,
  parameter int unsigned BLK_AW = BANK_AW - 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [SLOT_W-1:0]    slot,
  input  word_t                lane_word  [N],
  input  logic [N-1:0]         lane_valid,
  input  port_t                lane_dest  [N],
  input  logic [BLK_AW-1:0]    wr_blk     [N],   // write address array
  output logic [N-1:0]         bank_we,
  output logic [BLK_AW+1:0]    bank_waddr [N],
  output word_t                bank_wdata [N],
  output logic                 req_push,
  output logic [BLK_AW-1:0]    req_blk,
  output port_t                req_dest
);
  localparam int unsigned PW = $clog2(N);

  logic [PW-1:0] phase, kk;
  assign phase = slot[SLOT_W-1 -: PW];
  assign kk    = slot[PW-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bank_we <= '0;
    end else begin
      for (int b = 0; b < N; b++) begin
        logic [PW-1:0] lane;
        lane          = PW'(b) - phase;        // inverse of bank = lane + phase
        bank_we[b]    <= lane_valid[lane];
        bank_waddr[b] <= {wr_blk[lane], kk};
        bank_wdata[b] <= lane_word[lane];
      end
    end
  end

  // Report of written cells, lane i at slot 12+i.
  logic [PW-1:0] rep_lane;
  assign rep_lane = slot[PW-1:0];
  always_comb begin
    req_push = (slot >= SLOT_W'(N * N - N)) && lane_valid[rep_lane];
    req_blk  = wr_blk[rep_lane];
    req_dest = lane_dest[rep_lane];
  end
endmodule
