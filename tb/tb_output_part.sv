// Testbench of the output path (output_part).
// The four banks are modelled with registered reads of a fixed content,
// word(bank, address). Each cell time random outputs are given random blocks
// to read. The cell read by output o in cell time U must appear on output o
// word by word, word j = word(j mod 4, {block, j / 4}), from slot 1 of cell
// time U+1 to slot 0 of U+2, with out_sop on word 0; outputs with nothing to
// read must stay invalid. The test also checks that in every clock the four
// banks are addressed by four different outputs (no bank conflict).
module tb_output_part;
  import sms_pkg::*;
  localparam int unsigned N = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]   slot;
  logic [9:0]   rd_blk [N];
  logic [N-1:0] rd_valid, out_valid, out_sop;
  logic [11:0]  bank_raddr [N];
  word_t        bank_rdata [N];
  word_t        out_data [N];

  output_part u_dut (
    .clk, .rst_n, .slot, .rd_blk, .rd_valid, .bank_raddr, .bank_rdata,
    .out_valid, .out_sop, .out_data
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  function automatic word_t bank_word(int b, logic [11:0] a);
    return {8'(b * 17 + 1), 12'(a), 12'(a * 5 + b * 3)};
  endfunction

  always @(posedge clk)
    for (int b = 0; b < N; b++) bank_rdata[b] <= bank_word(b, bank_raddr[b]);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // blocks read in cell time c-1 (being sent) and c-2 (finishing on slot 0)
  logic [9:0]   send_blk [N];
  logic [N-1:0] send_v;
  logic [9:0]   prev_blk [N];
  logic [N-1:0] prev_v;

  initial begin
    slot = '0; rd_valid = '0; send_v = '0; prev_v = '0;
    for (int i = 0; i < N; i++) begin rd_blk[i] = '0; send_blk[i] = '0; prev_blk[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 300; c++) begin
      for (int s = 0; s < 16; s++) begin
        @(negedge clk);
        slot = 4'(s);
        if (s == 0) begin
          prev_blk = send_blk; prev_v = send_v;
          send_blk = rd_blk;   send_v = rd_valid;
          rd_valid = (c < 297) ? 4'($urandom) : 4'b0;
          if (c == 2) rd_valid = 4'hf;
          for (int i = 0; i < N; i++) rd_blk[i] = 10'($urandom);
        end
        #1;
        for (int o = 0; o < N; o++) begin
          int j;
          logic [9:0] blk;
          logic v;
          // slot 0 carries word 15 of the cell read two cell times ago
          j   = (s == 0) ? 15 : s - 1;
          v   = (s == 0) ? prev_v[o] : send_v[o];
          blk = (s == 0) ? prev_blk[o] : send_blk[o];
          if (c >= 2) begin
            check(out_valid[o] == v, $sformatf("cell %0d out %0d slot %0d valid %b expected %b", c, o, s, out_valid[o], v));
            check(out_sop[o] == (v && s == 1), $sformatf("out %0d sop", o));
            if (v) check(out_data[o] == bank_word(j % 4, {blk, 2'(j / 4)}),
                         $sformatf("cell %0d out %0d word %0d: %h expected %h", c, o, j, out_data[o],
                                   bank_word(j % 4, {blk, 2'(j / 4)})));
          end
          // address check: output o reads bank (o+p) mod 4 at {rd_blk, k}
          check(bank_raddr[(o + s / 4) % N] == {rd_blk[o], 2'(s % 4)},
                $sformatf("bank read address for out %0d slot %0d", o, s));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
