// recovery_ctrl: key setup, leaf tag initialisation and crash recovery.
//
// Commands (crystalor_pkg::rec_cmd_e), taken when cmd_valid && cmd_ready:
//   CMD_SETUP    L = E_K(0) through the PXOR-Hash engine, written to the L word.
//   CMD_INIT     leaf tag = TagGen over all leaf counter blocks read from the
//                NVM, written to the Leaf TAG register and cache.
//   CMD_RECOVER  after a reboot:
//     1. wait until the non-volatile register and the WPQ have drained into
//        the NVM (`drained`), so the leaf counters in the NVM are final;
//     2. build the new tree bottom-up: for parent level p = DEPTH-1 .. 0 read
//        every child counter block of level p+1, one per cycle, through
//        newtree_ctr, and write each new parent block to level p (meta_wr_*,
//        which is also where a MAC engine picks the blocks up); the level-0
//        block is the new root and goes to root_blk instead;
//     3. read all leaf counter blocks again, hash them with PXOR-Hash TagGen
//        and compare with the Leaf TAG register: verify_ok or verify_err.
//   Steps 2 and 3 run strictly in this order, so a replayed leaf is either
//   caught by the tag check or protected by the new tree.
// Metadata addressing is by (level, block index); level DEPTH holds the leaf
// counter blocks (ARITY^DEPTH / K_SHARE of them), level p holds
// ARITY^p / K_SHARE blocks (one for the root). Reads use a valid/ready
// request and return in order on meta_rsp_valid with no back-pressure;
// writes have no back-pressure either. done pulses when a command ends.
// Cycle count of a recovery: one read per cycle when the memory keeps up,
// i.e. about sum_p ARITY^(p+1)/K_SHARE reads for the tree plus
// ARITY^DEPTH/K_SHARE for the tag, plus the cipher latency.
// The steps, their order and the equations follow the source design; the
// leaf tag initialisation command and the port protocol are this design's
// choice.
module recovery_ctrl
  import crystalor_pkg::*;
#(
  parameter int unsigned ARITY   = 128,
  parameter int unsigned DEPTH   = 5,
  parameter int unsigned K_SHARE = 8,
  parameter int unsigned L_MA    = 56,
  parameter int unsigned L_MI    = 8,
  localparam int unsigned LOG_A  = $clog2(ARITY),
  localparam int unsigned LOG_K  = $clog2(K_SHARE),
  localparam int unsigned LOG_CB = LOG_A - LOG_K,
  localparam int unsigned LEAF_W = DEPTH * LOG_A,
  localparam int unsigned NBLK_W = LEAF_W - LOG_K,
  localparam int unsigned IDX_W  = NBLK_W + 1,
  localparam int unsigned LVL_W  = $clog2(DEPTH + 1),
  localparam int unsigned BLK_W  = L_MA + K_SHARE * L_MI
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  input  rec_cmd_e          cmd,
  output logic              cmd_ready,
  output logic              done,
  output logic              verify_ok,
  output logic              verify_err,
  output logic              busy,
  input  logic              drained,
  // PXOR-Hash engine
  output logic              ph_valid,
  output ph_op_e            ph_op,
  output logic [IDX_W-1:0]  ph_idx,
  output logic [127:0]      ph_d,
  input  logic              ph_ready,
  input  logic              ph_raw_valid,
  input  logic [127:0]      ph_raw_value,
  output logic              ph_gen_clear,
  input  logic [127:0]      ph_gen_tag,
  input  logic              ph_gen_busy,
  // secure registers
  output logic              l_wr,
  output logic [127:0]      l_out,
  output logic              tag_wr,
  output logic [127:0]      tag_out,
  input  logic [127:0]      tag_reg,
  // NVM metadata
  output logic              meta_rd_valid,
  input  logic              meta_rd_ready,
  output logic [LVL_W-1:0]  meta_rd_level,
  output logic [NBLK_W-1:0] meta_rd_index,
  input  logic              meta_rsp_valid,
  input  logic [BLK_W-1:0]  meta_rsp_data,
  output logic              meta_wr_valid,
  output logic [LVL_W-1:0]  meta_wr_level,
  output logic [NBLK_W-1:0] meta_wr_index,
  output logic [BLK_W-1:0]  meta_wr_data,
  output logic              root_wr,
  output logic [BLK_W-1:0]  root_blk
);

  typedef enum logic [2:0] {
    S_IDLE, S_L_ISSUE, S_L_WAIT, S_DRAIN, S_TREE, S_TREE_END, S_HASH, S_HASH_END
  } state_e;

  state_e   state_q;
  rec_cmd_e cmd_q;

  // read-issue side and response-consume side counters
  logic [LVL_W-1:0]  lvl_q;                  // parent level being built
  logic [LEAF_W:0]   is_cnt_q, cs_cnt_q;     // child blocks (tree) or leaf blocks (hash)
  logic [LEAF_W:0]   total;                  // reads in the current pass
  logic              issue_left, last_rsp;

  // number of child blocks read for parent level p: ARITY^(p+1) / K_SHARE
  function automatic logic [LEAF_W:0] tree_reads(input logic [LVL_W-1:0] p);
    return (LEAF_W+1)'(1) << ((int'(p) + 1) * LOG_A - LOG_K);
  endfunction
  localparam logic [LEAF_W:0] LEAF_BLKS = (LEAF_W+1)'(1) << NBLK_W;

  assign total      = (state_q == S_TREE) ? tree_reads(lvl_q) : LEAF_BLKS;
  assign issue_left = is_cnt_q != total;
  assign last_rsp   = meta_rsp_valid && (cs_cnt_q == total - 1'b1);

  // ---- new tree counter datapath
  logic             nt_valid, nt_node_last, nt_group_last, nt_out_valid;
  logic [BLK_W-1:0] nt_out_blk;
  logic [LEAF_W:0]  cs_node;       // parent node of the block being consumed
  logic [LEAF_W:0]  nodes_in_lvl;

  assign cs_node       = cs_cnt_q >> LOG_CB;
  assign nodes_in_lvl  = (LEAF_W+1)'(1) << (int'(lvl_q) * LOG_A);
  assign nt_valid      = (state_q == S_TREE) && meta_rsp_valid;
  assign nt_node_last  = cs_cnt_q[LOG_CB-1:0] == '1;
  assign nt_group_last = nt_node_last &&
                         ((cs_node[LOG_K-1:0] == '1) || (cs_node == nodes_in_lvl - 1'b1));

  newtree_ctr #(.L_MA(L_MA), .L_MI(L_MI), .K_SHARE(K_SHARE), .ARITY(ARITY)) u_nt (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_valid     (nt_valid),
    .in_blk       (meta_rsp_data),
    .in_node_last (nt_node_last),
    .in_group_last(nt_group_last),
    .out_valid    (nt_out_valid),
    .out_blk      (nt_out_blk)
  );

  logic [NBLK_W-1:0] grp_q;        // index of the parent block being formed
  always_ff @(posedge clk) begin
    if (nt_valid && nt_group_last) grp_q <= NBLK_W'(cs_node >> LOG_K);
  end

  assign meta_wr_valid = nt_out_valid && lvl_q != '0;
  assign meta_wr_level = lvl_q;
  assign meta_wr_index = grp_q;
  assign meta_wr_data  = nt_out_blk;
  assign root_wr       = nt_out_valid && lvl_q == '0;
  assign root_blk      = nt_out_blk;

  // ---- read requests
  assign meta_rd_valid = (state_q == S_TREE || state_q == S_HASH) && issue_left;
  assign meta_rd_level = (state_q == S_TREE) ? LVL_W'(lvl_q + 1'b1) : LVL_W'(DEPTH);
  assign meta_rd_index = NBLK_W'(is_cnt_q);

  // ---- PXOR-Hash requests
  assign ph_valid     = (state_q == S_L_ISSUE) || (state_q == S_HASH && meta_rsp_valid);
  assign ph_op        = (state_q == S_L_ISSUE) ? PH_RAW : PH_GEN;
  assign ph_idx       = IDX_W'(cs_cnt_q) + 1'b1;
  assign ph_d         = (state_q == S_L_ISSUE) ? 128'h0 : 128'(meta_rsp_data);
  assign ph_gen_clear = cmd_valid && cmd_ready;

  assign l_wr    = (state_q == S_L_WAIT) && ph_raw_valid;
  assign l_out   = ph_raw_value;
  assign tag_wr  = (state_q == S_HASH_END) && !ph_gen_busy && cmd_q == CMD_INIT;
  assign tag_out = ph_gen_tag;

  assign cmd_ready = state_q == S_IDLE;
  assign busy      = state_q != S_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      cmd_q      <= CMD_SETUP;
      lvl_q      <= '0;
      is_cnt_q   <= '0;
      cs_cnt_q   <= '0;
      done       <= 1'b0;
      verify_ok  <= 1'b0;
      verify_err <= 1'b0;
    end else begin
      done <= 1'b0;
      if (meta_rd_valid && meta_rd_ready) is_cnt_q <= is_cnt_q + 1'b1;
      if (meta_rsp_valid)                 cs_cnt_q <= cs_cnt_q + 1'b1;
      unique case (state_q)
        S_IDLE: if (cmd_valid) begin
          cmd_q      <= cmd;
          verify_ok  <= 1'b0;
          verify_err <= 1'b0;
          is_cnt_q   <= '0;
          cs_cnt_q   <= '0;
          lvl_q      <= LVL_W'(DEPTH - 1);
          unique case (cmd)
            CMD_SETUP: state_q <= S_L_ISSUE;
            CMD_INIT:  state_q <= S_HASH;
            default:   state_q <= S_DRAIN;
          endcase
        end
        S_L_ISSUE: if (ph_ready) state_q <= S_L_WAIT;
        S_L_WAIT: if (ph_raw_valid) begin
          state_q <= S_IDLE;
          done    <= 1'b1;
        end
        S_DRAIN: if (drained) state_q <= S_TREE;
        S_TREE: if (last_rsp) state_q <= S_TREE_END;
        S_TREE_END: if (nt_out_valid) begin
          // the last parent block of this level has been written
          is_cnt_q <= '0;
          cs_cnt_q <= '0;
          if (lvl_q == '0) state_q <= S_HASH;
          else begin
            lvl_q   <= lvl_q - 1'b1;
            state_q <= S_TREE;
          end
        end
        S_HASH: if (last_rsp) state_q <= S_HASH_END;
        S_HASH_END: if (!ph_gen_busy) begin
          state_q <= S_IDLE;
          done    <= 1'b1;
          if (cmd_q == CMD_RECOVER) begin
            verify_ok  <= ph_gen_tag == tag_reg;
            verify_err <= ph_gen_tag != tag_reg;
          end else begin
            verify_ok  <= 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // TagGen terms are issued straight from read responses, one per cycle.
  property p_hash_accepted;
    @(posedge clk) disable iff (!rst_n) (state_q == S_HASH && meta_rsp_valid) |-> ph_ready;
  endproperty
  assert property (p_hash_accepted) else $error("PXOR-Hash not ready for a leaf block");

endmodule
