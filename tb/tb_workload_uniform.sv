// Workload testbench: the switch at its default size under full offered load
// with uniformly random destinations.
// Every input offers a new 16-word cell back to back (in_valid never drops),
// each to a random output, so the four outputs see a fluctuating share of the
// traffic and the shared buffer absorbs the bursts. The test checks every word
// and the per input-output order of every cell, and measures the carried
// load: output words sent divided by four words per clock over the time from
// the first to the last output word. At a 173.575 MHz clock, 32-bit ports carry
// 5.55 Gbit/s each, so a carried load of 0.9 or more is 20 Gbit/s in all; the
// test fails below that. It also reports how many cells the buffer held at
// most and how often an input was held back.
module tb_workload_uniform;
  import sms_pkg::*;
  localparam int unsigned N = 4;
  localparam int CELLS = 1500;              // per input

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] in_valid, in_ready, out_valid, out_sop;
  word_t        in_data [N];
  port_t        in_dest [N];
  word_t        out_data [N];
  logic         init_done;

  shared_memory_switch u_dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .in_dest,
    .out_valid, .out_sop, .out_data, .init_done
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  function automatic word_t mkword(int src, int dst, int seq, int w);
    logic [11:0] h;
    h = 12'((seq * 29 + w * 13 + src * 7 + dst) ^ 12'h3c3);
    return {2'(src), 2'(dst), 12'(seq), 4'(w), h};
  endfunction

  // stimulus: destinations drawn in advance
  int dest_of [N][CELLS];
  int seq_of  [N][CELLS];
  int sent_cell [N], word_idx [N];

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (in_valid[i] && in_ready[i]) begin
        if (word_idx[i] == 15) begin
          word_idx[i]  <= 0;
          sent_cell[i] <= sent_cell[i] + 1;
        end else begin
          word_idx[i] <= word_idx[i] + 1;
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      int c;
      c = sent_cell[i];
      in_valid[i] = rst_n && init_done && (c < CELLS);
      in_dest[i]  = (c < CELLS) ? port_t'(dest_of[i][c]) : '0;
      in_data[i]  = (c < CELLS) ? mkword(i, dest_of[i][c], seq_of[i][c], word_idx[i]) : '0;
    end
  end

  // checking
  int rx_word [N], rx_src [N], rx_seq [N];
  int seq_next [N][N];
  int received = 0, out_words = 0;
  longint cycle = 0, first_out = -1, last_out = 0;
  int max_used = 0, held = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      int used;
      used = int'(u_dut.BANK_DEPTH_P / 4) - int'(u_dut.free_count);
      if (u_dut.init_done && used > max_used) max_used = used;
      if (u_dut.init_done && u_dut.slot == '0 && u_dut.grant != u_dut.cell_avail) held++;
    end
    for (int o = 0; o < N; o++) begin
      if (rst_n && out_valid[o]) begin
        word_t d;
        d = out_data[o];
        out_words++;
        if (first_out < 0) first_out = cycle;
        last_out = cycle;
        if (out_sop[o]) begin
          rx_src[o] = int'(d[31:30]);
          rx_seq[o] = int'(d[27:16]);
          rx_word[o] = 0;
          check(int'(d[29:28]) == o, $sformatf("out %0d got a cell for %0d", o, d[29:28]));
          check(rx_seq[o] == seq_next[rx_src[o]][o] % 4096,
                $sformatf("out %0d from %0d: seq %0d expected %0d", o, rx_src[o], rx_seq[o],
                          seq_next[rx_src[o]][o]));
          seq_next[rx_src[o]][o]++;
        end
        check(rx_word[o] < 16 && d == mkword(rx_src[o], o, rx_seq[o], rx_word[o]),
              $sformatf("out %0d word %0d data %h", o, rx_word[o], d));
        if (rx_word[o] == 15) received++;
        rx_word[o]++;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, %0d of %0d cells received", received, N * CELLS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt [N][N];
    real carried;
    for (int i = 0; i < N; i++) begin
      sent_cell[i] = 0; word_idx[i] = 0; rx_word[i] = 16;
      for (int j = 0; j < N; j++) begin cnt[i][j] = 0; seq_next[i][j] = 0; end
      for (int c = 0; c < CELLS; c++) begin
        dest_of[i][c] = int'($urandom_range(N - 1));
        seq_of[i][c]  = cnt[i][dest_of[i][c]]++;
      end
    end
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (received == N * CELLS);
    repeat (40) @(posedge clk);
    carried = real'(out_words) / (4.0 * real'(last_out - first_out + 1));
    $display("cells=%0d carried load=%0.4f max cells buffered=%0d admissions held=%0d",
             received, carried, max_used, held);
    check(out_words == N * CELLS * 16, "every word delivered once");
    check(carried >= 0.9, $sformatf("carried load %0.4f below 0.9", carried));
    check(held == 0 || max_used >= int'(u_dut.BANK_DEPTH_P / 4) - 8,
          "admission held back while the buffer still had room");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
