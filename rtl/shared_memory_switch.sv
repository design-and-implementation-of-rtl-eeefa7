// 4x4 shared-memory switch fabric for fixed 64-byte cells.
//
// All four inputs share one cell buffer made of four interleaved 32-bit banks.
// Time is cut into cell times of 16 clocks; in each one every input can bring
// in one cell (one 32-bit word per clock) and every output can send one. A
// free-running slot counter gives the clock within the cell time to all blocks.
//
// Data path: input FIFO -> sorter (fills one register part, copies it to a
// second, reads it back diagonally) -> crossbar (barrel shifter: lane i writes
// bank (i+p) mod 4 during phase p, address {block_i, k}) -> memory banks ->
// output path (diagonal reads, reorder, serial output).
// Control: the memory controller fetches one free block per admitted cell from
// the free list kept in the memory of addresses, hands the blocks to the
// crossbar, links each written cell (reported through the bank-address and
// destination-port FIFOs) onto the list of its output port, whose head and
// last pointers are in the first-last module, dequeues one cell per output per
// cell time and returns read blocks to the free list.
//
// Timing of one cell: loaded into the sorter in cell time T, written in T+1,
// linked in T+2, dequeued in T+3, read in T+4, sent out from slot 1 of T+5.
// Cells wait in their input FIFO (in_ready falls when it is full) while no free
// block is left. in_dest is sampled with the first word of each 16-word cell.
// The block structure, widths, cell format, diagonal write order, linked-list
// buffer management and memory sizes follow the original design; the output path,
// the cell-time schedule, the admission rule and the interface signals are
// this design's choices. The two FIFOs between crossbar and controller are
// dual-clock FIFOs, both sides run on clk here.
module shared_memory_switch
  import sms_pkg::*;
#(
  parameter int unsigned N             = N_PORTS,
  parameter int unsigned BANK_DEPTH_P  = BANK_DEPTH,
  parameter int unsigned IN_FIFO_DEPTH = 2 * CELL_WORDS,
  localparam int unsigned NUM_BLOCKS   = BANK_DEPTH_P / 4,
  localparam int unsigned BLK_AW       = $clog2(NUM_BLOCKS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  in_valid,
  output logic [N-1:0]  in_ready,
  input  word_t         in_data  [N],
  input  port_t         in_dest  [N],
  output logic [N-1:0]  out_valid,
  output logic [N-1:0]  out_sop,
  output word_t         out_data [N],
  output logic          init_done
);
  localparam int unsigned FCW = $clog2(IN_FIFO_DEPTH + 1);

  // Cell-time slot counter.
  logic [SLOT_W-1:0] slot;
  always_ff @(posedge clk) begin
    if (!rst_n) slot <= '0;
    else        slot <= slot + 1'b1;
  end

  // Input FIFOs.
  in_entry_t       fifo_rdata [N];
  logic [N-1:0]    fifo_pop, fifo_full, fifo_empty, cell_avail;
  logic [FCW-1:0]  fifo_count [N];

  for (genvar i = 0; i < N; i++) begin : g_in
    sync_fifo #(.WIDTH($bits(in_entry_t)), .DEPTH(IN_FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .push  (in_valid[i]),
      .wdata ({in_dest[i], in_data[i]}),
      .full  (fifo_full[i]),
      .pop   (fifo_pop[i]),
      .rdata (fifo_rdata[i]),
      .empty (fifo_empty[i]),
      .count (fifo_count[i])
    );
    assign in_ready[i]   = !fifo_full[i];
    assign cell_avail[i] = (fifo_count[i] >= FCW'(CELL_WORDS));
  end

  // Sorter.
  logic [N-1:0] grant, lane_valid;
  word_t        lane_word [N];
  port_t        lane_dest [N];
  sorter #(.N(N)) u_sorter (
    .clk, .rst_n, .slot, .grant,
    .fifo_rdata, .fifo_pop,
    .lane_word, .lane_valid, .lane_dest
  );

  // Crossbar.
  logic [BLK_AW-1:0] wr_blk     [N];
  logic [N-1:0]      bank_we;
  logic [BLK_AW+1:0] bank_waddr [N];
  word_t             bank_wdata [N];
  logic              req_push, req_pop, req_empty, req_full, dst_empty, dst_full;
  logic [BLK_AW-1:0] req_blk_w, req_blk_r;
  port_t             req_dest_w, req_dest_r;
  crossbar #(.N(N), .BLK_AW(BLK_AW)) u_crossbar (
    .clk, .rst_n, .slot,
    .lane_word, .lane_valid, .lane_dest, .wr_blk,
    .bank_we, .bank_waddr, .bank_wdata,
    .req_push, .req_blk(req_blk_w), .req_dest(req_dest_w)
  );

  // Bank-address and destination-port FIFOs, pushed and popped together.
  async_fifo #(.WIDTH(BLK_AW), .DEPTH(8)) u_bank_addr_fifo (
    .wclk(clk), .wrst_n(rst_n), .push(req_push), .wdata(req_blk_w), .full(req_full),
    .rclk(clk), .rrst_n(rst_n), .pop(req_pop), .rdata(req_blk_r), .empty(req_empty)
  );
  async_fifo #(.WIDTH(PORT_W), .DEPTH(8)) u_dest_fifo (
    .wclk(clk), .wrst_n(rst_n), .push(req_push), .wdata(req_dest_w), .full(dst_full),
    .rclk(clk), .rrst_n(rst_n), .pop(req_pop), .rdata(req_dest_r), .empty(dst_empty)
  );

  // Memory controller, memory of addresses, first-last.
  logic              am_we;
  logic [BLK_AW-1:0] am_waddr, am_wdata, am_raddr, am_rdata;
  logic              fl_ins_en, fl_deq_en;
  port_t             fl_ins_q, fl_deq_q;
  logic [BLK_AW-1:0] fl_ins_addr, fl_deq_next;
  logic [BLK_AW-1:0] fl_head [N];
  logic [BLK_AW-1:0] fl_tail [N];
  logic [BLK_AW:0]   fl_len  [N];
  logic [BLK_AW-1:0] rd_blk  [N];
  logic [N-1:0]      rd_valid;
  logic [BLK_AW:0]   free_count;

  memory_controller #(.N(N), .NUM_BLOCKS(NUM_BLOCKS)) u_mc (
    .clk, .rst_n, .slot, .init_done,
    .cell_avail, .grant, .wr_blk,
    .req_empty, .req_pop, .req_blk(req_blk_r), .req_dest(req_dest_r),
    .am_we, .am_waddr, .am_wdata, .am_raddr, .am_rdata,
    .fl_ins_en, .fl_ins_q, .fl_ins_addr, .fl_deq_en, .fl_deq_q, .fl_deq_next,
    .fl_head, .fl_tail, .fl_len,
    .rd_blk, .rd_valid, .free_count
  );

  address_memory #(.DEPTH(NUM_BLOCKS)) u_addr_mem (
    .clk, .we(am_we), .waddr(am_waddr), .wdata(am_wdata),
    .raddr(am_raddr), .rdata(am_rdata)
  );

  first_last #(.N(N), .BLK_AW(BLK_AW)) u_first_last (
    .clk, .rst_n,
    .ins_en(fl_ins_en), .ins_q(fl_ins_q), .ins_addr(fl_ins_addr),
    .deq_en(fl_deq_en), .deq_q(fl_deq_q), .deq_next(fl_deq_next),
    .head(fl_head), .tail(fl_tail), .len(fl_len)
  );

  // Interleaved memory banks.
  logic [BLK_AW+1:0] bank_raddr [N];
  word_t             bank_rdata [N];
  for (genvar b = 0; b < N; b++) begin : g_bank
    memory_bank #(.WIDTH(WORD_W), .DEPTH(BANK_DEPTH_P)) u_bank (
      .clk, .we(bank_we[b]), .waddr(bank_waddr[b]), .wdata(bank_wdata[b]),
      .raddr(bank_raddr[b]), .rdata(bank_rdata[b])
    );
  end

  // Output path.
  output_part #(.N(N), .BLK_AW(BLK_AW)) u_out (
    .clk, .rst_n, .slot, .rd_blk, .rd_valid,
    .bank_raddr, .bank_rdata,
    .out_valid, .out_sop, .out_data
  );

  // The sorter only pops a FIFO that holds a whole cell.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    (fifo_pop & fifo_empty) == '0);
  // At most N cells are reported per cell time and N are linked, so the
  // report FIFOs never fill.
  a_req_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    req_push |-> !req_full);
  a_req_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    (req_empty == dst_empty) && (req_full == dst_full));
  a_free_bound: assert property (@(posedge clk) disable iff (!rst_n)
    free_count <= (BLK_AW+1)'(NUM_BLOCKS));
endmodule
