// Testbench of one memory bank (memory_bank).
// Each clock writes a random word to a random address and reads another
// random address; read data must equal the model one clock later. Written at
// full size, 4096 x 32.
module tb_memory_bank;
  localparam int unsigned DEPTH = 4096;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        we;
  logic [11:0] waddr, raddr;
  logic [31:0] wdata, rdata;

  memory_bank u_dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  logic [31:0] model [DEPTH];
  bit          known [DEPTH];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_q;
    bit          exp_known;
    we = 0; waddr = '0; raddr = '0; wdata = '0;
    exp_known = 0; exp_q = '0;
    for (int i = 0; i < DEPTH; i++) known[i] = 0;
    for (int t = 0; t < 30000; t++) begin
      @(negedge clk);
      if (exp_known) check(rdata == exp_q, $sformatf("rdata %h expected %h", rdata, exp_q));
      we    = (t < 6000) ? 1'b1 : ($urandom_range(1) == 1);
      waddr = 12'($urandom);
      wdata = $urandom;
      raddr = (t % 3 == 0) ? waddr ^ 12'h1 : 12'($urandom);
      if (raddr == waddr) raddr = raddr + 1'b1;
      exp_known = known[raddr];
      exp_q     = model[raddr];
      if (we) begin
        model[waddr] = wdata;
        known[waddr] = 1;
      end
    end
    check(checks > 20000, "too few reads of written words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
