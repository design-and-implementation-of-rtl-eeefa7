// Testbench of the dual-clock FIFO (async_fifo).
// Write clock 10 ns, read clock 7 ns. The writer pushes an increasing sequence
// with random gaps whenever the FIFO is not full; the reader pops with random
// gaps whenever it is not empty and checks that every value arrives once, in
// order. The test also checks that the FIFO does fill up (full is seen while
// the reader is slow) and that nothing is lost or invented.
module tb_async_fifo;
  localparam int unsigned WIDTH = 10;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned TOTAL = 3000;

  logic wclk = 1'b0, rclk = 1'b0;
  logic wrst_n = 1'b0, rrst_n = 1'b0;
  always #5   wclk = ~wclk;
  always #3.5 rclk = ~rclk;

  logic             push, pop, full, empty;
  logic [WIDTH-1:0] wdata, rdata;

  async_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_dut (
    .wclk, .wrst_n, .push, .wdata, .full,
    .rclk, .rrst_n, .pop, .rdata, .empty
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  int sent = 0, got = 0, saw_full = 0;
  int wr_rate = 90, rd_rate = 90;

  // writer
  always @(posedge wclk) begin
    if (wrst_n) begin
      if (push && !full) sent <= sent + 1;
      if (full) saw_full++;
    end
  end
  always @(negedge wclk) begin
    int s;
    s = sent + ((push && !full) ? 1 : 0);
    push  <= wrst_n && (s < TOTAL) && ($urandom_range(99) < wr_rate);
  end
  assign wdata = WIDTH'(sent * 7 + 3);

  // reader
  always @(posedge rclk) begin
    if (rrst_n && pop && !empty) begin
      check(rdata == WIDTH'(got * 7 + 3), $sformatf("got %0d expected %0d", rdata, WIDTH'(got * 7 + 3)));
      got <= got + 1;
    end
  end
  always @(negedge rclk) pop <= rrst_n && ($urandom_range(99) < rd_rate);

  initial begin
    repeat (200000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog, sent %0d got %0d", sent, got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0;
    repeat (3) @(posedge wclk);
    wrst_n = 1'b1; rrst_n = 1'b1;
    // phase: slow reader, the FIFO fills
    rd_rate = 10;
    wait (sent >= TOTAL / 3);
    rd_rate = 90;
    wait (got == TOTAL);
    repeat (20) @(posedge rclk);
    check(empty, "FIFO empty at the end");
    check(got == TOTAL && sent == TOTAL, $sformatf("sent %0d got %0d", sent, got));
    check(saw_full > 0, "FIFO never became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
