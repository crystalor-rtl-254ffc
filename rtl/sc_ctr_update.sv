// sc_ctr_update: split-counter increment for one node of a counter block.
//
// With split counters, K_SHARE sibling nodes share one L_MA-bit major counter
// and each keeps an L_MI-bit minor counter; a node's nonce counter is
// major || minor. Updating node `slot` increments its minor counter. If that
// minor is already all ones it would overflow: instead the major counter is
// incremented and every minor of the block is reset to zero, which keeps all
// nonces unique. `overflow` tells the caller that the siblings' tags must be
// recomputed under the new major counter.
// Block layout: {major, minor[K_SHARE-1], ..., minor[0]}. Combinational.
// The update rule follows the source design; the layout and the wrap of the
// major counter at 2^L_MA are this design's choice.
module sc_ctr_update #(
  parameter int unsigned L_MA    = 56,
  parameter int unsigned L_MI    = 8,
  parameter int unsigned K_SHARE = 8,
  localparam int unsigned BLK_W  = L_MA + K_SHARE * L_MI,
  localparam int unsigned SLOT_W = (K_SHARE > 1) ? $clog2(K_SHARE) : 1
) (
  input  logic [BLK_W-1:0]  blk_in,
  input  logic [SLOT_W-1:0] slot,
  output logic [BLK_W-1:0]  blk_out,
  output logic              overflow
);

  logic [L_MA-1:0] major;
  logic [L_MI-1:0] minor;

  always_comb begin
    major    = blk_in[BLK_W-1 -: L_MA];
    minor    = blk_in[int'(slot)*L_MI +: L_MI];
    overflow = &minor;
    blk_out  = blk_in;
    if (overflow) begin
      blk_out = '0;
      blk_out[BLK_W-1 -: L_MA] = major + 1'b1;
    end else begin
      blk_out[int'(slot)*L_MI +: L_MI] = minor + 1'b1;
    end
  end

endmodule
