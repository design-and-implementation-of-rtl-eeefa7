// Sorter: puts each input cell into the order the crossbar writes it.
//
// Each port has two register parts of 16 words. When the memory controller
// grants a port at slot 0 of a cell time, the sorter pops that port's input
// FIFO once per clock for the whole cell time and fills the first register
// part in arrival order, word k at position k, and takes the destination port
// from the first word. At the last clock the filled part, including the word
// arriving then, is copied whole into the second part. During the following
// cell time the second part is read out diagonally: at slot 4p+k lane i
// presents word ((i+p) mod 4) + 4k, the word that belongs in bank (i+p) mod 4,
// so that in the first clock the lanes carry A0, B1, C2, D3 and in the second
// A4, B5, C6, D7. lane_valid and lane_dest stay constant for the cell time.
//
// The two register parts, the copy between them and the diagonal word order
// follow the original design. The order of the four rotation phases (one step per
// four clocks) and the way a cell is granted are this design's choices.
module sorter
  import sms_pkg::*;
#(
  parameter int unsigned N = N_PORTS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [SLOT_W-1:0]    slot,
  input  logic [N-1:0]         grant,       // sampled at slot 0
  input  in_entry_t            fifo_rdata [N],
  output logic [N-1:0]         fifo_pop,
  output word_t                lane_word  [N],
  output logic [N-1:0]         lane_valid,
  output port_t                lane_dest  [N]
);
  localparam int unsigned W = N * N;       // words per cell
  localparam int unsigned PW = $clog2(N);

  word_t  fill [N][W];                     // first register part
  word_t  hold [N][W];                     // second register part
  port_t  fill_dest [N];
  logic [N-1:0] loading;
  logic [N-1:0] active;

  logic [PW-1:0] phase, kk;
  assign phase = slot[SLOT_W-1 -: PW];
  assign kk    = slot[PW-1:0];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      active[i] = (slot == '0) ? grant[i] : loading[i];
    end
  end
  assign fifo_pop = active;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      loading    <= '0;
      lane_valid <= '0;
    end else begin
      loading <= (slot == SLOT_W'(W - 1)) ? '0 : active;
      if (slot == SLOT_W'(W - 1)) lane_valid <= active;
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (active[i]) begin
        fill[i][slot] <= fifo_rdata[i].data;
        if (slot == '0) fill_dest[i] <= fifo_rdata[i].dest;
      end
      if (slot == SLOT_W'(W - 1)) begin
        for (int w = 0; w < W - 1; w++) hold[i][w] <= fill[i][w];
        hold[i][W-1] <= fifo_rdata[i].data;
        lane_dest[i] <= fill_dest[i];
      end
    end
  end

  // Diagonal read-out of the second register part.
  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic [PW-1:0] bank;
      bank = PW'(i) + phase;
      lane_word[i] = hold[i][{kk, bank}];
    end
  end
endmodule
