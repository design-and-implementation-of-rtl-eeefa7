// First-last module: head ("first") and last pointer of every output list.
//
// For each output port it keeps the block at the head of that port's list of
// waiting cells, the block at its tail, and the list length. An insert appends
// a block: it becomes the last pointer, and also the head when the list was
// empty. A dequeue replaces the head with the next block, which the memory
// controller has just read from the memory of addresses. An insert and a
// dequeue may hit the same list in one clock; the length then stays, and if
// the list held one cell the inserted block becomes the head. Updates take
// effect at the clock edge. Head and last registers follow the original design; the
// length counter, which tells the memory controller whether a list is empty,
// is this design's addition. Synchronous active-low reset empties all lists.
module first_last
  import sms_pkg::*;
#(
  parameter int unsigned N      = N_PORTS,
  parameter int unsigned BLK_AW = BANK_AW - 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ins_en,
  input  port_t             ins_q,
  input  logic [BLK_AW-1:0] ins_addr,
  input  logic              deq_en,
  input  port_t             deq_q,
  input  logic [BLK_AW-1:0] deq_next,
  output logic [BLK_AW-1:0] head [N],
  output logic [BLK_AW-1:0] tail [N],
  output logic [BLK_AW:0]   len  [N]
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int q = 0; q < N; q++) begin
        head[q] <= '0;
        tail[q] <= '0;
        len[q]  <= '0;
      end
    end else begin
      for (int q = 0; q < N; q++) begin
        logic ins, deq;
        ins = ins_en && (ins_q == PORT_W'(q));
        deq = deq_en && (deq_q == PORT_W'(q)) && (len[q] != '0);
        if (ins) tail[q] <= ins_addr;
        if (ins && (len[q] == '0 || (deq && len[q] == 1)))
          head[q] <= ins_addr;
        else if (deq)
          head[q] <= deq_next;
        len[q] <= len[q] + (BLK_AW+1)'(ins) - (BLK_AW+1)'(deq);
      end
    end
  end
endmodule
