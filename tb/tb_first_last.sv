// Testbench of the first-last module (first_last).
// Random inserts and dequeues, sometimes on the same list in the same clock,
// are applied to the four lists and compared every clock with queue models:
// head (first) pointer, last pointer and length of every non-empty list.
module tb_first_last;
  localparam int unsigned N = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       ins_en, deq_en;
  logic [1:0] ins_q, deq_q;
  logic [9:0] ins_addr, deq_next;
  logic [9:0] head [N];
  logic [9:0] tail [N];
  logic [10:0] len [N];

  first_last u_dut (
    .clk, .rst_n, .ins_en, .ins_q, .ins_addr, .deq_en, .deq_q, .deq_next,
    .head, .tail, .len
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  logic [9:0] model [N][$];
  int same_clock = 0, ins_to_empty = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ins_en = 0; deq_en = 0; ins_q = 0; deq_q = 0; ins_addr = 0; deq_next = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      for (int q = 0; q < N; q++) begin
        check(len[q] == 11'(model[q].size()), $sformatf("len[%0d] %0d model %0d", q, len[q], model[q].size()));
        if (model[q].size() > 0) begin
          check(head[q] == model[q][0], $sformatf("head[%0d] %0d model %0d", q, head[q], model[q][0]));
          check(tail[q] == model[q][$], $sformatf("tail[%0d] %0d model %0d", q, tail[q], model[q][$]));
        end
      end
      ins_en   = ($urandom_range(99) < 55);
      ins_q    = 2'($urandom);
      ins_addr = 10'($urandom);
      deq_q    = (t % 7 == 0) ? ins_q : 2'($urandom);
      deq_en   = ($urandom_range(99) < 50) && model[deq_q].size() > 0;
      // the caller supplies the real next block, as the memory of addresses would
      deq_next = (model[deq_q].size() > 1) ? model[deq_q][1] : 10'($urandom);
      if (ins_en && deq_en && ins_q == deq_q) same_clock++;
      if (ins_en && model[ins_q].size() == 0) ins_to_empty++;
      @(posedge clk);
      if (deq_en) void'(model[deq_q].pop_front());
      if (ins_en) model[ins_q].push_back(ins_addr);
    end
    check(same_clock > 0, "no insert and dequeue on one list in one clock");
    check(ins_to_empty > 0, "no insert into an empty list");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
