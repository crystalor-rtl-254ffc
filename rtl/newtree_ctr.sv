// newtree_ctr: new counter values for one block of parent nodes after a crash.
//
// After a crash the old intermediate nodes are discarded and a new tree is
// built whose counters are at least as large as any value the old tree could
// have used, so no old (node, counter) pair can be replayed. For parent node j
// of a block, with child counter blocks i' (major Ma[i'], minors mi[i'][j']):
//     ctr_pa[j] = sum_i' ( Ma[i'] * (K*(2^L_MI - 1) + 1) + sum_j' mi[i'][j'] )
// which bounds the number of updates the parent can have seen. The new block is
//     major    = sum_j floor(ctr_pa[j] / 2^L_MI)
//     minor[j] = ctr_pa[j] mod 2^L_MI.
// Interface: one child block per cycle on in_blk/in_valid. in_node_last marks
// the last child block of the current parent node (ARITY/K_SHARE blocks per
// node); in_group_last (with in_node_last) marks the last node of the parent
// block. The new parent block is on out_blk with out_valid one cycle after
// the in_group_last beat. Slots of a block with fewer nodes (the root) stay 0.
// The equations follow the source design; the streaming interface, the
// ctr_pa width PA_W and the truncation of the new major counter to L_MA bits
// are this design's choice.
module newtree_ctr #(
  parameter int unsigned L_MA    = 56,
  parameter int unsigned L_MI    = 8,
  parameter int unsigned K_SHARE = 8,
  parameter int unsigned ARITY   = 128,
  parameter int unsigned PA_W    = L_MA + $clog2(K_SHARE * ((1 << L_MI) - 1) + 1) + $clog2(ARITY / K_SHARE) + 1,
  localparam int unsigned BLK_W  = L_MA + K_SHARE * L_MI,
  localparam int unsigned SLOT_W = (K_SHARE > 1) ? $clog2(K_SHARE) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [BLK_W-1:0] in_blk,
  input  logic             in_node_last,
  input  logic             in_group_last,
  output logic             out_valid,
  output logic [BLK_W-1:0] out_blk
);

  localparam logic [PA_W-1:0] EPOCH = PA_W'(K_SHARE * ((1 << L_MI) - 1) + 1);

  logic [PA_W-1:0]   acc_q;
  logic [PA_W-1:0]   pa_q [K_SHARE];
  logic [SLOT_W-1:0] slot_q;
  logic [PA_W-1:0]   term, acc_d;
  logic [PA_W-1:0]   pa_d [K_SHARE];
  logic [BLK_W-1:0]  blk_d;

  always_comb begin
    term = PA_W'(in_blk[BLK_W-1 -: L_MA]) * EPOCH;
    for (int j = 0; j < K_SHARE; j++) term = term + PA_W'(in_blk[j*L_MI +: L_MI]);
    acc_d = acc_q + term;
    for (int j = 0; j < K_SHARE; j++)
      pa_d[j] = (in_node_last && SLOT_W'(j) == slot_q) ? acc_d : pa_q[j];
    blk_d = '0;
    for (int j = 0; j < K_SHARE; j++) begin
      blk_d[BLK_W-1 -: L_MA]  = blk_d[BLK_W-1 -: L_MA] + L_MA'(pa_d[j] >> L_MI);
      blk_d[j*L_MI +: L_MI]   = pa_d[j][L_MI-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      slot_q    <= '0;
      out_valid <= 1'b0;
      for (int j = 0; j < K_SHARE; j++) pa_q[j] <= '0;
    end else begin
      out_valid <= in_valid && in_node_last && in_group_last;
      if (in_valid) begin
        if (in_node_last) begin
          acc_q <= '0;
          if (in_group_last) begin
            slot_q <= '0;
            for (int j = 0; j < K_SHARE; j++) pa_q[j] <= '0;
          end else begin
            slot_q <= slot_q + 1'b1;
            pa_q   <= pa_d;
          end
        end else begin
          acc_q <= acc_d;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_node_last && in_group_last) out_blk <= blk_d;
  end

endmodule
