// End-to-end testbench of the switch with every parameter at its default.
//
// Self-checking end-to-end test of the 4x4 shared-memory switch at its default size (4096-word banks, 1024 cell blocks); the hotspot phase is long enough to fill the whole buffer.
// Each input sends 16-word cells whose words carry source port, destination
// port, a per-source sequence number, the word index and a check field, all
// computed by the testbench. Every cell leaving an output is checked word by
// word, for the right output port, and for order: cells from one input to one
// output must leave in the order they entered. Three traffic phases run:
//   1. permutation traffic at full line rate (no two inputs share an output):
//      every output must send back-to-back cells, one per 16-clock cell time;
//   2. hotspot: all inputs to output 0, which fills the shared buffer so that
//      cells wait in the input FIFOs and the inputs are back-pressured;
//   3. random destinations with random idle clocks.
// The test also counts how often each mechanism of the switch happened
// (diagonal write phases, admission held back for lack of free blocks, input
// back-pressure, insert into an empty and into a non-empty output list, list
// dequeue, several cells waiting for one output, blocks returned to an empty
// free list) and fails a mechanism that never occurred.
module tb_switch_full;
  import sms_pkg::*;
  localparam int unsigned N = 4;
  localparam int P1_CELLS = 40;
  localparam int P2_CELLS = 360;
  localparam int P3_CELLS = 60;
  localparam int MAXC = P1_CELLS + P2_CELLS + P3_CELLS;

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
    h = 12'((seq * 37 + w * 11 + src * 5 + dst * 3) ^ 12'h5a5);
    return {2'(src), 2'(dst), 12'(seq), 4'(w), h};
  endfunction

  // ---------------- stimulus ----------------
  int  cell_dest [N][MAXC];
  int  cell_gap  [N][MAXC];     // percent idle probability
  int  ncells    [N];           // cells released so far
  int  sent_cell [N];           // cells fully sent
  int  word_idx  [N];
  int  seq_next_tx [N][N];      // per (src,dst) sequence number
  int  cell_seq  [N][MAXC];
  int  expected_total = 0;

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
      in_valid[i] = 1'b0;
      in_data[i]  = '0;
      in_dest[i]  = '0;
      if (rst_n && c < ncells[i] && !idle[i]) begin
        in_valid[i] = 1'b1;
        in_dest[i]  = port_t'(cell_dest[i][c]);
        in_data[i]  = mkword(i, cell_dest[i][c], cell_seq[i][c], word_idx[i]);
      end
    end
  end

  logic [N-1:0] idle;
  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      int c;
      c = sent_cell[i];
      idle[i] <= (c < MAXC) && (int'($urandom_range(99)) < cell_gap[i][c]);
    end
  end

  task automatic add_cell(int src, int dst, int gap);
    int c;
    c = ncells[src];
    cell_dest[src][c] = dst;
    cell_gap[src][c]  = gap;
    cell_seq[src][c]  = seq_next_tx[src][dst];
    seq_next_tx[src][dst]++;
    ncells[src] = c + 1;
    expected_total++;
  endtask

  // ---------------- checking ----------------
  int rx_word [N];
  int rx_src  [N], rx_dst [N], rx_seq [N];
  int seq_next_rx [N][N];
  int received = 0;
  int cells_out [N];
  longint first_sop [N], last_sop [N];
  longint cycle = 0;
  bit measure = 0;

  always_ff @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    for (int o = 0; o < N; o++) begin
      if (rst_n && out_valid[o]) begin
        word_t d;
        d = out_data[o];
        if (out_sop[o]) begin
          rx_src[o] = int'(d[31:30]);
          rx_dst[o] = int'(d[29:28]);
          rx_seq[o] = int'(d[27:16]);
          rx_word[o] = 0;
          check(rx_dst[o] == o, $sformatf("out %0d got cell for %0d", o, rx_dst[o]));
          check(rx_seq[o] == seq_next_rx[rx_src[o]][o] % 4096,
                $sformatf("out %0d from %0d seq %0d expected %0d", o, rx_src[o], rx_seq[o],
                          seq_next_rx[rx_src[o]][o]));
          seq_next_rx[rx_src[o]][o]++;
          if (measure) begin
            if (cells_out[o] == 0) first_sop[o] = cycle;
            last_sop[o] = cycle;
            cells_out[o]++;
          end
        end
        if (rx_word[o] < 16) begin
          check(d == mkword(rx_src[o], o, rx_seq[o], rx_word[o]),
                $sformatf("out %0d word %0d data %h", o, rx_word[o], d));
          if (rx_word[o] == 15) received++;
          rx_word[o]++;
        end else begin
          check(1'b0, $sformatf("out %0d valid without a cell", o));
        end
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int ev_phase [4];
  int ev_admit_held = 0, ev_backpressure = 0, ev_ins_empty = 0, ev_ins_link = 0;
  int ev_deq = 0, ev_contention = 0, ev_free_to_empty = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (u_dut.lane_valid != '0) ev_phase[u_dut.slot[3:2]]++;
      if (u_dut.init_done && u_dut.slot == '0 && (u_dut.grant != u_dut.cell_avail))
        ev_admit_held++;
      if ((in_valid & ~in_ready) != '0) ev_backpressure++;
      if (u_dut.fl_ins_en) begin
        if (u_dut.fl_len[u_dut.fl_ins_q] == '0) ev_ins_empty++;
        else ev_ins_link++;
      end
      if (u_dut.fl_deq_en) ev_deq++;
      for (int q = 0; q < N; q++) if (u_dut.fl_len[q] >= 2) ev_contention++;
      if (u_dut.u_mc.do_free && u_dut.free_count == '0) ev_free_to_empty++;
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, %0d of %0d cells received", received, expected_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_drained();
    while (received < expected_total) @(posedge clk);
    repeat (40) @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      ncells[i] = 0; sent_cell[i] = 0; word_idx[i] = 0; cells_out[i] = 0;
      rx_word[i] = 16;
      for (int j = 0; j < N; j++) begin seq_next_tx[i][j] = 0; seq_next_rx[i][j] = 0; end
    end
    for (int p = 0; p < 4; p++) ev_phase[p] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (init_done);
    @(posedge clk);

    // Phase 1: permutation traffic at full rate.
    measure = 1;
    for (int c = 0; c < P1_CELLS; c++)
      for (int i = 0; i < N; i++) add_cell(i, (i + c / 5) % N, 0);
    wait_drained();
    measure = 0;
    for (int o = 0; o < N; o++) begin
      check(cells_out[o] == P1_CELLS, $sformatf("out %0d sent %0d cells", o, cells_out[o]));
      check(last_sop[o] - first_sop[o] == longint'((P1_CELLS - 1) * 16),
            $sformatf("out %0d: %0d cells took %0d clocks between first and last start",
                      o, P1_CELLS, last_sop[o] - first_sop[o]));
    end

    // Phase 2: hotspot on output 0.
    for (int c = 0; c < P2_CELLS; c++)
      for (int i = 0; i < N; i++) add_cell(i, 0, 0);
    wait_drained();

    // Phase 3: random destinations and idle clocks.
    for (int c = 0; c < P3_CELLS; c++)
      for (int i = 0; i < N; i++) add_cell(i, int'($urandom_range(N - 1)), 30);
    wait_drained();

    check(received == expected_total, "all cells received");
    check(u_dut.free_count == (u_dut.BANK_DEPTH_P / 4), "all blocks back on the free list");
    for (int p = 0; p < 4; p++) check(ev_phase[p] > 0, $sformatf("write phase %0d never used", p));
    check(ev_admit_held > 0,    "admission never held back by a full buffer");
    check(ev_backpressure > 0,  "input back-pressure never happened");
    check(ev_ins_empty > 0,     "no insert into an empty list");
    check(ev_ins_link > 0,      "no insert into a non-empty list");
    check(ev_deq > 0,           "no dequeue");
    check(ev_contention > 0,    "no output contention");
    check(ev_free_to_empty > 0, "no block returned to an empty free list");
    $display("cells=%0d phases=%0d/%0d/%0d/%0d held=%0d bp=%0d ins_empty=%0d ins_link=%0d deq=%0d contention=%0d free_to_empty=%0d",
             received, ev_phase[0], ev_phase[1], ev_phase[2], ev_phase[3], ev_admit_held,
             ev_backpressure, ev_ins_empty, ev_ins_link, ev_deq, ev_contention, ev_free_to_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
