// Testbench of the input FIFO (sync_fifo).
// Random pushes and pops, including pushes when full and pops when empty, are
// compared clock by clock with a queue model: head data, count, full, empty.
module tb_sync_fifo;
  localparam int unsigned WIDTH = 34;
  localparam int unsigned DEPTH = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             push, pop, full, empty;
  logic [WIDTH-1:0] wdata, rdata;
  logic [5:0]       count;

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_dut (
    .clk, .rst_n, .push, .wdata, .full, .pop, .rdata, .empty, .count
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  logic [WIDTH-1:0] model [$];
  int saw_full = 0, saw_empty_pop = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      int bias;
      @(negedge clk);
      // check state against the model
      check(count == 6'(model.size()), $sformatf("count %0d model %0d", count, model.size()));
      check(full == (model.size() == DEPTH), "full flag");
      check(empty == (model.size() == 0), "empty flag");
      if (model.size() > 0) check(rdata == model[0], $sformatf("rdata %h model %h", rdata, model[0]));
      // choose next operation; drift between filling and draining
      bias = ((t / 500) % 2 == 0) ? 70 : 30;
      push  = ($urandom_range(99) < bias);
      pop   = ($urandom_range(99) < 100 - bias);
      wdata = {$urandom, $urandom} & {WIDTH{1'b1}};
      if (push && model.size() == DEPTH) saw_full++;
      if (pop && model.size() == 0) saw_empty_pop++;
      begin
        int pre;
        pre = model.size();
        @(posedge clk);
        if (pop && pre > 0) void'(model.pop_front());
        if (push && pre < DEPTH) model.push_back(wdata);
      end
    end
    check(saw_full > 0, "never pushed into a full FIFO");
    check(saw_empty_pop > 0, "never popped an empty FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
