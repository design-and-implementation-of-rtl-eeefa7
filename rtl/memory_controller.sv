// Memory controller: address allocation and linked-list management.
//
// Every block of the shared buffer is on exactly one list: the free-address
// list, kept here (head, tail, count), or the list of one output port, whose
// head and last pointers live in the first-last module. The links of all lists
// are in the memory of addresses, which allows one read and one write per
// clock. After reset the controller links every block to the next one, one
// write per clock, to form the free list (init_done rises when this is over).
//
// Each 16-clock cell time follows a fixed schedule (slot = clock in the cell
// time):
//   slot 0        grant: port i with a whole cell in its input FIFO is admitted
//                 if fewer than free_count lower-numbered ports also ask;
//   slots 0,2,4,6 read port: fetch a free block for granted port 0,1,2,3;
//   slots 1,3,5,7 read port: dequeue the head of output list 0,1,2,3 if the
//                 list is not empty (the read returns the new head);
//   slots 0..3    write port: register the block that input port 0..3 writes
//                 in this cell time (next[block] = block, a self-link that
//                 marks the end of a list; the block is on no list yet);
//   slots 8..11   write port: link one reported written cell into the list of
//                 its destination port (next[last] = block, last = block);
//                 with the register access above, these are the two accesses
//                 of one insert;
//   slots 12..15  write port: return to the free list the block that output
//                 port 0..3 reads from the banks in this cell time.
// At the end of the cell time the fetched blocks become the crossbar's write
// address array and the dequeued blocks the output path's read addresses for
// the next cell time. The list structure, the free-list initialisation, the
// two accesses of an insert and the one-link-plus-one-fetch-per-clock rule
// follow the original design; the slot plan, the self-link as the register access, the
// admission rule and the length counters are this design's choices.
module memory_controller
  import sms_pkg::*;
#(
  parameter int unsigned N          = N_PORTS,
  parameter int unsigned NUM_BLOCKS = BANK_DEPTH / 4,
  localparam int unsigned BLK_AW    = $clog2(NUM_BLOCKS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [SLOT_W-1:0] slot,
  output logic              init_done,
  // input side
  input  logic [N-1:0]      cell_avail,
  output logic [N-1:0]      grant,
  output logic [BLK_AW-1:0] wr_blk   [N],    // write address array
  // reports of written cells (bank address and destination port FIFOs)
  input  logic              req_empty,
  output logic              req_pop,
  input  logic [BLK_AW-1:0] req_blk,
  input  port_t             req_dest,
  // memory of addresses
  output logic              am_we,
  output logic [BLK_AW-1:0] am_waddr,
  output logic [BLK_AW-1:0] am_wdata,
  output logic [BLK_AW-1:0] am_raddr,
  input  logic [BLK_AW-1:0] am_rdata,
  // first-last module
  output logic              fl_ins_en,
  output port_t             fl_ins_q,
  output logic [BLK_AW-1:0] fl_ins_addr,
  output logic              fl_deq_en,
  output port_t             fl_deq_q,
  output logic [BLK_AW-1:0] fl_deq_next,
  input  logic [BLK_AW-1:0] fl_head  [N],
  input  logic [BLK_AW-1:0] fl_tail  [N],
  input  logic [BLK_AW:0]   fl_len   [N],
  // output side
  output logic [BLK_AW-1:0] rd_blk   [N],
  output logic [N-1:0]      rd_valid,
  output logic [BLK_AW:0]   free_count
);
  localparam int unsigned PW = $clog2(N);

  typedef enum logic [1:0] {RD_NONE, RD_FREE, RD_QUEUE} rd_kind_e;

  logic [BLK_AW-1:0] free_head, free_tail;
  logic [BLK_AW-1:0] init_cnt;
  logic [N-1:0]      granted, gr_eff;
  logic [BLK_AW-1:0] alloc   [N];
  logic [BLK_AW-1:0] deq_blk [N];
  logic [N-1:0]      deq_v;
  logic [N-1:0]      wr_v;
  rd_kind_e          pend_kind, issue_kind;
  logic [PW-1:0]     pend_idx, idx;
  logic              do_free;

  assign idx = slot[PW:1];

  // Admission at slot 0: rank of each requesting port against the free count.
  always_comb begin
    int unsigned ahead;
    ahead = 0;
    for (int i = 0; i < N; i++) begin
      grant[i] = init_done && (slot == '0) && cell_avail[i] &&
                 ((BLK_AW+1)'(ahead) < free_count);
      if (cell_avail[i]) ahead++;
    end
  end
  assign gr_eff = (slot == '0) ? grant : granted;

  // Read port: free fetch on even slots, dequeue on odd slots, 0..7.
  always_comb begin
    issue_kind = RD_NONE;
    am_raddr   = free_head;
    if (init_done && slot < SLOT_W'(2 * N)) begin
      if (!slot[0]) begin
        if (gr_eff[idx]) issue_kind = RD_FREE;
      end else begin
        am_raddr = fl_head[idx];
        if (fl_len[idx] != '0) issue_kind = RD_QUEUE;
      end
    end
  end

  // Write port: initialisation, registering on slots 0..3, linking on slots
  // 8..11, freeing on 12..15.
  assign do_free = init_done && slot >= SLOT_W'(3 * N) && rd_valid[slot[PW-1:0]];
  always_comb begin
    am_we       = 1'b0;
    am_waddr    = init_cnt;
    am_wdata    = init_cnt + 1'b1;
    req_pop     = 1'b0;
    fl_ins_en   = 1'b0;
    fl_ins_q    = req_dest;
    fl_ins_addr = req_blk;
    if (!init_done) begin
      am_we = 1'b1;
    end else if (slot < SLOT_W'(N)) begin
      am_we    = wr_v[slot[PW-1:0]];
      am_waddr = wr_blk[slot[PW-1:0]];
      am_wdata = wr_blk[slot[PW-1:0]];
    end else if (slot >= SLOT_W'(2 * N) && slot < SLOT_W'(3 * N)) begin
      if (!req_empty) begin
        req_pop   = 1'b1;
        fl_ins_en = 1'b1;
        am_we     = (fl_len[req_dest] != '0);
        am_waddr  = fl_tail[req_dest];
        am_wdata  = req_blk;
      end
    end else if (do_free) begin
      am_we    = (free_count != '0);
      am_waddr = free_tail;
      am_wdata = rd_blk[slot[PW-1:0]];
    end
  end

  // Returning read data.
  assign fl_deq_en   = (pend_kind == RD_QUEUE);
  assign fl_deq_q    = PORT_W'(pend_idx);
  assign fl_deq_next = am_rdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      init_done  <= 1'b0;
      init_cnt   <= '0;
      free_head  <= '0;
      free_tail  <= BLK_AW'(NUM_BLOCKS - 1);
      free_count <= '0;
      granted    <= '0;
      deq_v      <= '0;
      wr_v       <= '0;
      rd_valid   <= '0;
      pend_kind  <= RD_NONE;
      pend_idx   <= '0;
    end else begin
      if (!init_done) begin
        init_cnt <= init_cnt + 1'b1;
        if (init_cnt == BLK_AW'(NUM_BLOCKS - 1)) begin
          init_done  <= 1'b1;
          free_count <= (BLK_AW+1)'(NUM_BLOCKS);
        end
      end
      if (slot == '0) granted <= grant;

      pend_kind <= issue_kind;
      pend_idx  <= idx;
      if (issue_kind == RD_FREE) begin
        alloc[idx] <= free_head;
      end
      if (issue_kind == RD_QUEUE) begin
        deq_blk[idx] <= fl_head[idx];
        deq_v[idx]   <= 1'b1;
      end
      if (pend_kind == RD_FREE) free_head <= am_rdata;

      // free count: minus one per fetch issued, plus one per block returned
      if (init_done)
        free_count <= free_count - (BLK_AW+1)'(issue_kind == RD_FREE)
                                 + (BLK_AW+1)'(do_free);
      if (do_free) begin
        free_tail <= rd_blk[slot[PW-1:0]];
        if (free_count == '0) free_head <= rd_blk[slot[PW-1:0]];
      end

      if (slot == SLOT_W'(N * N - 1)) begin
        for (int i = 0; i < N; i++) begin
          wr_blk[i] <= alloc[i];
          rd_blk[i] <= deq_blk[i];
        end
        wr_v     <= granted;
        rd_valid <= deq_v;
        deq_v    <= '0;
      end
    end
  end
  // A free block is fetched only for a granted cell, and grants never exceed
  // the free count, so the free list cannot run dry during a fetch.
  a_fetch_has_block: assert property (@(posedge clk) disable iff (!rst_n)
    (issue_kind == RD_FREE) |-> (free_count != '0));
  // Grants are made only at the cell-time boundary.
  a_grant_at_slot0: assert property (@(posedge clk) disable iff (!rst_n)
    (grant != '0) |-> (slot == '0));
endmodule
