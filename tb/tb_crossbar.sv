// Testbench of the crossbar (barrel-shifter write path).
// Random lane words, lane valids, destinations and block addresses are applied
// at every slot. One clock later bank b must be written with the word of lane
// (b - p) mod 4 at address {block of that lane, k}, enabled by that lane's
// valid, where the slot was 4p+k. Reports must be pushed at slot 12+i for
// valid lane i only, with lane i's block and destination. The test also checks
// that over a cell time every lane has visited every bank.
module tb_crossbar;
  import sms_pkg::*;
  localparam int unsigned N = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]   slot;
  word_t        lane_word [N];
  logic [N-1:0] lane_valid, bank_we;
  port_t        lane_dest [N];
  logic [9:0]   wr_blk [N];
  logic [11:0]  bank_waddr [N];
  word_t        bank_wdata [N];
  logic         req_push;
  logic [9:0]   req_blk;
  port_t        req_dest;

  crossbar u_dut (
    .clk, .rst_n, .slot, .lane_word, .lane_valid, .lane_dest, .wr_blk,
    .bank_we, .bank_waddr, .bank_wdata, .req_push, .req_blk, .req_dest
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t        pw [N];
    logic [N-1:0] pv;
    logic [9:0]   pb [N];
    int           ps;
    bit           have_prev;
    bit           visited [N][N];
    slot = '0; lane_valid = '0;
    for (int i = 0; i < N; i++) begin lane_word[i] = '0; lane_dest[i] = '0; wr_blk[i] = '0; end
    have_prev = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 300; c++) begin
      logic [N-1:0] v;
      v = (c == 0) ? 4'hf : 4'($urandom);
      for (int s = 0; s < 16; s++) begin
        @(negedge clk);
        // registered bank side, from the previous clock
        if (have_prev) begin
          int p, k;
          p = ps / 4; k = ps % 4;
          for (int b = 0; b < N; b++) begin
            int l;
            l = (b - p + N) % N;
            check(bank_we[b] == pv[l], $sformatf("bank %0d we at slot %0d", b, ps));
            if (pv[l]) begin
              check(bank_wdata[b] == pw[l], $sformatf("bank %0d data slot %0d", b, ps));
              check(bank_waddr[b] == {pb[l], 2'(k)}, $sformatf("bank %0d addr %h slot %0d", b, bank_waddr[b], ps));
              visited[l][b] = 1;
            end
          end
        end
        if (s == 0) begin
          for (int i = 0; i < N; i++) begin
            wr_blk[i]    = 10'($urandom);
            lane_dest[i] = port_t'($urandom);
            for (int b = 0; b < N; b++) visited[i][b] = 0;
          end
        end
        slot = 4'(s);
        lane_valid = v;
        for (int i = 0; i < N; i++) lane_word[i] = $urandom;
        #1;
        if (s >= 12) begin
          int i;
          i = s - 12;
          check(req_push == v[i], $sformatf("req_push at slot %0d", s));
          if (v[i]) begin
            check(req_blk == wr_blk[i], "req_blk");
            check(req_dest == lane_dest[i], "req_dest");
          end
        end else begin
          check(!req_push, $sformatf("req_push at slot %0d", s));
        end
        for (int i = 0; i < N; i++) pw[i] = lane_word[i];
        pv = v; ps = s; pb = wr_blk; have_prev = 1;
        if (s == 15) begin
          // the visit of slot 15 is checked in the next clock; check the rest now
          for (int i = 0; i < N; i++)
            if (v[i]) for (int b = 0; b < N; b++)
              if (b != (i + 3) % N) check(visited[i][b], $sformatf("lane %0d never wrote bank %0d", i, b));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
