// split_decision: whole-versus-quarters choice for one coding block.
//
// A block of size N coded whole costs RD_N, the sum of its per-pixel estimates.
// Coded as four N/2 blocks it costs the four quarter sums plus the side information
// of the three extra blocks, 3 * 7/64 * (4 mode bits + 1 cbf bit) = 105/64. The block
// is split when RD_N > RD_split; a tie keeps it whole, as the method prescribes.
//
// Interface: rd_whole and rd_quarters (sum of the four quarter costs) in Q.8;
// rd_split is rd_quarters plus the overhead, split is 1 when the block should be
// divided. Purely combinational.
module split_decision
  import pmf_pkg::*;
(
  input  logic [RD_W-1:0] rd_whole,
  input  logic [RD_W-1:0] rd_quarters,
  output logic [RD_W-1:0] rd_split,
  output logic            split
);

  always_comb begin
    rd_split = rd_quarters + SPLIT_OVERHEAD;
    split    = rd_whole > rd_split;
  end

endmodule
