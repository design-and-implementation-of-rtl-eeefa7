// Testbench of the memory controller, run with the memory of addresses and
// the first-last module it drives, at 16 blocks so that the buffer fills.
// The testbench plays the rest of the switch: it raises cell_avail at random,
// reports every written cell with a random destination through a queue that
// stands for the bank-address/destination FIFOs, and keeps its own model of
// which blocks are in use and of each output's queue. It checks that
//  - grants go to the lowest-numbered requesting ports, as many as there are
//    free blocks, and only after the free list has been built;
//  - every block handed to the crossbar is distinct and not in use;
//  - one cell time after dequeuing, each output is given the oldest block of
//    its queue, or nothing when the queue is empty;
//  - the free count matches the model, and every block comes back at the end;
//  - the node of each block appended to a list holds the block's own address.
module tb_memory_controller;
  import sms_pkg::*;
  localparam int unsigned N  = 4;
  localparam int unsigned NB = 16;
  localparam int unsigned AW = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]    slot;
  logic          init_done;
  logic [N-1:0]  cell_avail, grant, rd_valid;
  logic [AW-1:0] wr_blk [N];
  logic          req_empty, req_pop;
  logic [AW-1:0] req_blk;
  port_t         req_dest;
  logic          am_we;
  logic [AW-1:0] am_waddr, am_wdata, am_raddr, am_rdata;
  logic          fl_ins_en, fl_deq_en;
  port_t         fl_ins_q, fl_deq_q;
  logic [AW-1:0] fl_ins_addr, fl_deq_next;
  logic [AW-1:0] fl_head [N];
  logic [AW-1:0] fl_tail [N];
  logic [AW:0]   fl_len  [N];
  logic [AW-1:0] rd_blk  [N];
  logic [AW:0]   free_count;

  memory_controller #(.NUM_BLOCKS(NB)) u_dut (
    .clk, .rst_n, .slot, .init_done, .cell_avail, .grant, .wr_blk,
    .req_empty, .req_pop, .req_blk, .req_dest,
    .am_we, .am_waddr, .am_wdata, .am_raddr, .am_rdata,
    .fl_ins_en, .fl_ins_q, .fl_ins_addr, .fl_deq_en, .fl_deq_q, .fl_deq_next,
    .fl_head, .fl_tail, .fl_len, .rd_blk, .rd_valid, .free_count
  );
  address_memory #(.DEPTH(NB)) u_am (
    .clk, .we(am_we), .waddr(am_waddr), .wdata(am_wdata), .raddr(am_raddr), .rdata(am_rdata)
  );
  first_last #(.BLK_AW(AW)) u_fl (
    .clk, .rst_n, .ins_en(fl_ins_en), .ins_q(fl_ins_q), .ins_addr(fl_ins_addr),
    .deq_en(fl_deq_en), .deq_q(fl_deq_q), .deq_next(fl_deq_next),
    .head(fl_head), .tail(fl_tail), .len(fl_len)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  // report queue standing for the two FIFOs
  typedef struct packed { logic [AW-1:0] blk; port_t dest; } rep_t;
  rep_t reqq [$];
  assign req_empty = (reqq.size() == 0);
  assign req_blk   = (reqq.size() > 0) ? reqq[0].blk : '0;
  assign req_dest  = (reqq.size() > 0) ? reqq[0].dest : '0;

  bit            in_use [NB];
  int            n_in_use = 0;
  logic [AW-1:0] linked [N][$];
  logic [N-1:0]  granted_now, granted_prev, exp_rd_v, cur_rd_v;
  logic [AW-1:0] exp_rd_blk [N];
  logic [AW-1:0] cur_rd_blk [N];
  bit            ever_used [NB];
  int            held = 0, deqs = 0, multi = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rep_t rep;
    logic pop_now;
    slot = '0; cell_avail = '0;
    granted_now = '0; granted_prev = '0; exp_rd_v = '0; cur_rd_v = '0;
    for (int b = 0; b < NB; b++) begin in_use[b] = 0; ever_used[b] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 1200; c++) begin
      for (int s = 0; s < 16; s++) begin
        @(negedge clk);
        slot = 4'(s);
        if (s == 0) begin
          int rate;
          rate = (c < 400) ? 90 : (c < 800) ? 40 : (c < 1150) ? 20 : 0;
          for (int i = 0; i < N; i++) cell_avail[i] = ($urandom_range(99) < rate);
          granted_prev = granted_now;
          cur_rd_v = exp_rd_v; cur_rd_blk = exp_rd_blk; exp_rd_v = '0;
        end
        #1;
        if (s == 0) begin
          int expect_n, ahead;
          // blocks handed to the crossbar for this cell time
          for (int i = 0; i < N; i++) if (granted_prev[i]) begin
            check(!in_use[wr_blk[i]], $sformatf("block %0d handed out while in use", wr_blk[i]));
            in_use[wr_blk[i]] = 1; ever_used[wr_blk[i]] = 1; n_in_use++;
          end
          // read side of this cell time
          for (int o = 0; o < N; o++) begin
            check(rd_valid[o] == cur_rd_v[o], $sformatf("cell %0d rd_valid[%0d]", c, o));
            if (cur_rd_v[o]) check(rd_blk[o] == cur_rd_blk[o],
                                   $sformatf("rd_blk[%0d] %0d expected %0d", o, rd_blk[o], cur_rd_blk[o]));
          end
          if (init_done) check(free_count == (AW+1)'(NB - n_in_use),
                               $sformatf("free_count %0d model %0d", free_count, NB - n_in_use));
          // grant rule
          ahead = 0;
          for (int i = 0; i < N; i++) begin
            bit e;
            e = init_done && cell_avail[i] && (ahead < NB - n_in_use);
            check(grant[i] == e, $sformatf("cell %0d grant[%0d]=%b expected %b", c, i, grant[i], e));
            if (cell_avail[i]) ahead++;
          end
          if (init_done && grant != cell_avail) held++;
          granted_now = grant;
        end else begin
          check(grant == '0, "grant outside slot 0");
        end
        // dequeue decisions of the controller follow the model queues
        if (s < 8 && s % 2 == 1 && init_done) begin
          int o;
          o = s / 2;
          if (linked[o].size() > 0) begin
            exp_rd_v[o] = 1'b1;
            exp_rd_blk[o] = linked[o].pop_front();
            deqs++;
            if (linked[o].size() > 0) multi++;
          end
        end
        // crossbar emulation: the cell of lane i is reported at slot 12+i
        if (s >= 12 && granted_prev[s - 12]) begin
          rep.blk  = wr_blk[s - 12];
          rep.dest = port_t'($urandom);
        end
        pop_now = req_pop;
        @(posedge clk);
        #1;
        if (pop_now) begin
          check(s >= 8 && s < 12 && reqq.size() > 0, "report popped outside slots 8..11 or from empty");
          if (reqq.size() > 0) begin
            rep_t r;
            r = reqq.pop_front();
            linked[r.dest].push_back(r.blk);
            // the register access of the insert left a self-link in the
            // node of the block just appended
            check(u_am.mem[r.blk] == r.blk,
                  $sformatf("node of linked block %0d holds %0d", r.blk, u_am.mem[r.blk]));
          end
        end
        if (s >= 12 && granted_prev[s - 12]) reqq.push_back(rep);
        // blocks read this cell time are free after it
        if (s == 15) for (int o = 0; o < N; o++) if (cur_rd_v[o]) begin
          in_use[cur_rd_blk[o]] = 0; n_in_use--;
        end
      end
    end
    check(n_in_use == 0, $sformatf("%0d blocks still in use", n_in_use));
    check(free_count == (AW+1)'(NB), "free count back to all blocks");
    for (int b = 0; b < NB; b++) check(ever_used[b], $sformatf("block %0d never used", b));
    check(held > 0, "admission never limited by free blocks");
    check(multi > 0, "no output queue ever held two cells");
    check(deqs > 100, "too few dequeues");
    $display("held=%0d deqs=%0d multi=%0d", held, deqs, multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
