// Testbench of the sorter.
// A slot counter runs 0..15. At slot 0 of each cell time random ports are
// granted; the testbench then serves each granted port's pops from its own
// word stream, as the input FIFO would. During the next cell time, lane i at
// slot 4p+k must carry word ((i+p) mod 4)+4k of the cell it loaded, with
// lane_valid set and lane_dest equal to the destination given with word 0;
// ungranted lanes must be invalid. Pops must happen on every clock of a
// granted cell time and never otherwise.
module tb_sorter;
  import sms_pkg::*;
  localparam int unsigned N = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]   slot;
  logic [N-1:0] grant, fifo_pop, lane_valid;
  in_entry_t    fifo_rdata [N];
  word_t        lane_word [N];
  port_t        lane_dest [N];

  sorter u_dut (
    .clk, .rst_n, .slot, .grant, .fifo_rdata, .fifo_pop,
    .lane_word, .lane_valid, .lane_dest
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  // word stream per port: word n of port i
  int rdptr [N];
  function automatic in_entry_t stream(int i, int n);
    in_entry_t e;
    e.data = 32'(i * 32'h0100_0000 + n * 32'h9e37 + 5);
    e.dest = port_t'((n / 16 + i) % N);
    return e;
  endfunction

  always_comb for (int i = 0; i < N; i++) fifo_rdata[i] = stream(i, rdptr[i]);

  // expected held cells
  int   exp_base [N];        // stream index of word 0 of the cell now being read out
  logic [N-1:0] exp_valid, cur_grant;
  int   load_base [N];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    slot = '0; grant = '0; exp_valid = '0; cur_grant = '0;
    for (int i = 0; i < N; i++) begin rdptr[i] = 0; exp_base[i] = 0; load_base[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 200; c++) begin
      for (int s = 0; s < 16; s++) begin
        @(negedge clk);
        slot = 4'(s);
        if (s == 0) begin
          grant = (c < 198) ? 4'($urandom) : 4'b0;
          if (c == 1) grant = 4'hf;
          cur_grant = grant;
          for (int i = 0; i < N; i++) load_base[i] = rdptr[i];
        end else begin
          grant = 4'($urandom);   // must be ignored outside slot 0
        end
        #1;
        check(fifo_pop == cur_grant, $sformatf("pop %b expected %b at slot %0d", fifo_pop, cur_grant, s));
        for (int i = 0; i < N; i++) begin
          int p, k, w;
          p = s / 4; k = s % 4;
          w = ((i + p) % N) + 4 * k;
          check(lane_valid[i] == exp_valid[i], $sformatf("lane %0d valid", i));
          if (exp_valid[i]) begin
            check(lane_word[i] == stream(i, exp_base[i] + w).data,
                  $sformatf("cell %0d lane %0d slot %0d word %h expected word %0d", c, i, s, lane_word[i], w));
            check(lane_dest[i] == stream(i, exp_base[i]).dest, $sformatf("lane %0d dest", i));
          end
        end
        @(posedge clk);
        #1;
        for (int i = 0; i < N; i++) if (cur_grant[i]) rdptr[i]++;
      end
      exp_valid = cur_grant;
      for (int i = 0; i < N; i++) exp_base[i] = load_base[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
