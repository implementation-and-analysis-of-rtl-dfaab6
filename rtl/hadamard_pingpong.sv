// hadamard_pingpong: ping-pong register barrier for one 4x4 block.
//
// Two banks of sixteen words. The producer writes LANES words per cycle into
// the write bank, each at its own position wr_idx[k] (0..15), so that the
// block fills slot by slot (four slots of four words with four lanes, eight
// slots of two words with two lanes). Meanwhile the whole other bank is
// visible on rd_data for the adders of the next stage, which may pick any
// word of it. swap exchanges the two banks at the end of the cycle; words
// written in the same cycle still go to the old write bank, so the last slot
// of a block and the swap can share a cycle and the block is readable from
// the next cycle on.
//
// Only the bank select is reset (asynchronous, active low); the data words
// are not, since no word is read before a full block has been written. The
// double bank follows the ping-pong barriers of the source; the per-word
// write positions are this design's way of letting the producer write its
// results in whatever order it computes them.
module hadamard_pingpong #(
  parameter int unsigned W     = 17,
  parameter int unsigned LANES = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [LANES-1:0][3:0]      wr_idx,
  input  logic [LANES-1:0][W-1:0]    wr_data,
  input  logic                       swap,
  output logic [15:0][W-1:0]         rd_data
);

  logic [15:0][W-1:0] bank0, bank1;
  logic               wsel;   // bank being written: 0 = bank0

  always_ff @(posedge clk)
    if (wr_en)
      for (int k = 0; k < LANES; k++)
        if (wsel) bank1[wr_idx[k]] <= wr_data[k];
        else      bank0[wr_idx[k]] <= wr_data[k];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    wsel <= 1'b0;
    else if (swap) wsel <= ~wsel;

  assign rd_data = wsel ? bank0 : bank1;

endmodule
