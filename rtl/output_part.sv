// Output path: diagonal bank reads, reordering and serial output.
//
// During a cell time the memory controller names, per output port o, the block
// holding the cell that port sends next (rd_blk, rd_valid). The read side
// mirrors the crossbar: at slot 4p+k output o reads bank (o+p) mod 4 at
// address {rd_blk_o, k}, so every bank serves one output per clock and the four
// outputs read at full rate in parallel. Bank data returns one clock later and
// is stored at its word position, ((o+p) mod 4)+4k, in a first register part.
// When the last word has arrived (global slot 0 of the next cell time) the
// whole part is copied into a second register part, which is sent out in word
// order 0..15, one word per clock, from slot 1 of that cell time to slot 0 of
// the one after; out_sop marks word 0. Outputs take no back-pressure.
// The original design only says that cells are read from the banks and forwarded to
// the output ports; this block's structure is this design's own, built as the
// mirror image of the write path.
module output_part
  import sms_pkg::*;
#(
  parameter int unsigned N      = N_PORTS,
  parameter int unsigned BLK_AW = BANK_AW - 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [SLOT_W-1:0] slot,
  input  logic [BLK_AW-1:0] rd_blk     [N],
  input  logic [N-1:0]      rd_valid,
  output logic [BLK_AW+1:0] bank_raddr [N],
  input  word_t             bank_rdata [N],
  output logic [N-1:0]      out_valid,
  output logic [N-1:0]      out_sop,
  output word_t             out_data   [N]
);
  localparam int unsigned W  = N * N;
  localparam int unsigned PW = $clog2(N);

  logic [PW-1:0] phase, kk;
  assign phase = slot[SLOT_W-1 -: PW];
  assign kk    = slot[PW-1:0];

  // Read addresses: bank b serves output (b - phase) mod N.
  always_comb begin
    for (int b = 0; b < N; b++) begin
      logic [PW-1:0] lane;
      lane          = PW'(b) - phase;
      bank_raddr[b] = {rd_blk[lane], kk};
    end
  end

  // Capture stage, one clock behind the read request.
  logic [PW-1:0]     cap_lane [N];
  logic [N-1:0]      cap_v;
  logic [PW-1:0]     cap_k;
  logic              cap_last;
  logic [N-1:0]      cap_cell_v;
  word_t             fill   [N][W];
  word_t             fill_n [N][W];
  word_t             hold   [N][W];
  logic [N-1:0]      hold_v;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cap_v      <= '0;
      cap_last   <= 1'b0;
      cap_k      <= '0;
      cap_cell_v <= '0;
      hold_v     <= '0;
    end else begin
      for (int b = 0; b < N; b++) begin
        logic [PW-1:0] lane;
        lane        = PW'(b) - phase;
        cap_lane[b] <= lane;
        cap_v[b]    <= rd_valid[lane];
      end
      cap_k      <= kk;
      cap_last   <= (slot == SLOT_W'(W - 1));
      cap_cell_v <= rd_valid;
      if (cap_last) hold_v <= cap_cell_v;
    end
  end

  always_comb begin
    fill_n = fill;
    for (int b = 0; b < N; b++) begin
      if (cap_v[b]) fill_n[cap_lane[b]][{cap_k, PW'(b)}] = bank_rdata[b];
    end
  end

  always_ff @(posedge clk) begin
    fill <= fill_n;
    if (cap_last) hold <= fill_n;
  end

  // Serial output: word j of the held cell at slot j+1 (mod 16).
  logic [SLOT_W-1:0] widx;
  assign widx = slot - 1'b1;
  always_comb begin
    for (int o = 0; o < N; o++) begin
      out_valid[o] = hold_v[o];
      out_sop[o]   = hold_v[o] && (slot == SLOT_W'(1));
      out_data[o]  = hold[o][widx];
    end
  end
endmodule
