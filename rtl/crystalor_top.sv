// crystalor_top: Crystalor crash-recovery hardware for a persistent memory
// protected by a parallelizable authentication tree (ELM) with split counters.
//
// Crystalor keeps one 128-bit leaf tag on chip: a PXOR-Hash over every leaf
// counter block of the tree. During normal operation each store updates it
// with two AES calls, in step with the store's trip through the non-volatile
// register and the write pending queue (WPQ). After a crash the old
// intermediate nodes are abandoned: a new tree is built from the leaf
// counters with counter values that upper-bound the old ones, and then the
// leaf tag is recomputed and compared, which detects any replayed leaf
// counter. Leaf data itself is checked lazily by the tree's AE on later reads.
//
// Blocks: secure_regs (K, L, Leaf TAG register + cache), pxor_hash (with the
// pipelined AES-128 and the i*L multiplier), store_ctrl (store steps,
// split-counter update), nv_stage_reg, wpq, recovery_ctrl (setup, tag init,
// new tree via newtree_ctr, tag verification) and the on-chip root counter.
// The ELM engine and the NVM are outside: their ports are brought out.
//
// Ports
//   nv_clear            provisioning: clears all persistent state
//   key_wr/key_in       load the PXOR-Hash key K (then run CMD_SETUP)
//   cmd_*               CMD_SETUP / CMD_INIT / CMD_RECOVER; cmd_done pulses at
//                       the end, verify_ok / verify_err hold the tag check
//   st_*                store requests: leaf index and its current counter block
//   elm_*               request to the ELM engine (new counter block) and its
//                       ciphertext + AE tag answer
//   nvm_wr_*            WPQ head to the NVM; ready means the write is durable
//   meta_*              counter block reads and new-tree writes by (level, index)
//   root_blk            on-chip root counter block (slot 0 used)
// Reset: rst_n is a reboot; it clears volatile state only. K, L, the leaf tag,
// the non-volatile register, the WPQ and the root counter keep their values.
// Stores are refused while a command runs or the tag cache is reloading.
// The structure follows the source design's architecture figure and its store
// and recovery steps; widths, handshakes and the command set are this design's.
module crystalor_top
  import crystalor_pkg::*;
#(
  parameter int unsigned ARITY     = 128,
  parameter int unsigned DEPTH     = 5,
  parameter int unsigned K_SHARE   = 8,
  parameter int unsigned L_MA      = 56,
  parameter int unsigned L_MI      = 8,
  parameter int unsigned LEAF_BITS = 1024,
  parameter int unsigned WPQ_DEPTH = 8,
  localparam int unsigned LOG_A    = $clog2(ARITY),
  localparam int unsigned LOG_K    = $clog2(K_SHARE),
  localparam int unsigned LEAF_W   = DEPTH * LOG_A,
  localparam int unsigned NBLK_W   = LEAF_W - LOG_K,
  localparam int unsigned IDX_W    = NBLK_W + 1,
  localparam int unsigned LVL_W    = $clog2(DEPTH + 1),
  localparam int unsigned BLK_W    = L_MA + K_SHARE * L_MI,
  localparam int unsigned ELM_W    = LEAF_BITS + 128,
  localparam int unsigned ENT_W    = LEAF_W + BLK_W + ELM_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              nv_clear,
  input  logic              key_wr,
  input  logic [127:0]      key_in,
  input  logic              cmd_valid,
  input  rec_cmd_e          cmd,
  output logic              cmd_ready,
  output logic              cmd_done,
  output logic              verify_ok,
  output logic              verify_err,
  input  logic              st_valid,
  output logic              st_ready,
  input  logic [LEAF_W-1:0] st_leaf,
  input  logic [BLK_W-1:0]  st_old_blk,
  output logic              elm_req_valid,
  output logic [LEAF_W-1:0] elm_req_leaf,
  output logic [BLK_W-1:0]  elm_req_blk,
  output logic              elm_req_ovf,
  input  logic              elm_rsp_valid,
  input  logic [ELM_W-1:0]  elm_rsp_data,
  output logic              nvm_wr_valid,
  input  logic              nvm_wr_ready,
  output logic [LEAF_W-1:0] nvm_wr_leaf,
  output logic [BLK_W-1:0]  nvm_wr_blk,
  output logic [ELM_W-1:0]  nvm_wr_data,
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
  output logic [BLK_W-1:0]  root_blk
);

  // ---- secure registers
  logic [127:0] key, lmask, tag_cache, tag_reg;
  logic         cache_valid;
  logic         l_wr, st_tag_wr, rc_tag_wr;
  logic [127:0] l_val, st_tag, rc_tag;

  secure_regs u_regs (
    .clk        (clk),
    .rst_n      (rst_n),
    .nv_clear   (nv_clear),
    .key_wr     (key_wr),
    .key_in     (key_in),
    .l_wr       (l_wr),
    .l_in       (l_val),
    .tag_wr     (st_tag_wr || rc_tag_wr),
    .tag_in     (st_tag_wr ? st_tag : rc_tag),
    .key        (key),
    .lmask      (lmask),
    .tag_cache  (tag_cache),
    .tag_reg    (tag_reg),
    .cache_valid(cache_valid)
  );

  // ---- PXOR-Hash engine, shared by the store and recovery controllers
  logic             rc_busy;
  logic             ph_valid, ph_ready, st_ph_valid, rc_ph_valid;
  ph_op_e           ph_op, rc_ph_op;
  logic [IDX_W-1:0] ph_idx, st_ph_idx, rc_ph_idx;
  logic [127:0]     ph_d_old, ph_d_new, st_ph_old, st_ph_new, rc_ph_d;
  logic             upd_valid, raw_valid, gen_clear, gen_busy;
  logic [127:0]     upd_delta, raw_value, gen_tag;
  logic [3:0]       upd_tid;

  // The recovery controller only issues requests while no store is in flight
  // (CMD_RECOVER waits for the store path to drain first), so requests never
  // collide; the store side is simply held off while recovery drives.
  always_comb begin
    if (rc_ph_valid) begin
      ph_valid = rc_ph_valid;
      ph_op    = rc_ph_op;
      ph_idx   = rc_ph_idx;
      ph_d_old = rc_ph_d;
      ph_d_new = rc_ph_d;
    end else begin
      ph_valid = st_ph_valid;
      ph_op    = PH_UPDATE;
      ph_idx   = st_ph_idx;
      ph_d_old = st_ph_old;
      ph_d_new = st_ph_new;
    end
  end

  pxor_hash #(.IDX_W(IDX_W), .TID_W(4)) u_hash (
    .clk      (clk),
    .rst_n    (rst_n),
    .key      (key),
    .lmask    (lmask),
    .in_valid (ph_valid),
    .in_ready (ph_ready),
    .in_op    (ph_op),
    .in_idx   (ph_idx),
    .in_d_old (ph_d_old),
    .in_d_new (ph_d_new),
    .in_tid   (4'h0),
    .upd_valid(upd_valid),
    .upd_delta(upd_delta),
    .upd_tid  (upd_tid),
    .raw_valid(raw_valid),
    .raw_value(raw_value),
    .gen_clear(gen_clear),
    .gen_tag  (gen_tag),
    .gen_busy (gen_busy)
  );

  // ---- store path
  logic             nv_wr_en, nv_flag, nv_clr;
  logic [ENT_W-1:0] nv_wr_data, nv_rd_data;
  logic [127:0]     nv_wr_tag, nv_rd_tag;
  logic             wpq_push_valid, wpq_push_ready, wpq_head_valid, wpq_empty, wpq_ack;
  logic [ENT_W-1:0] wpq_push_data, wpq_head_data;
  logic             st_busy;

  store_ctrl #(
    .LEAF_W(LEAF_W), .L_MA(L_MA), .L_MI(L_MI), .K_SHARE(K_SHARE), .ELM_W(ELM_W)
  ) u_store (
    .clk           (clk),
    .rst_n         (rst_n),
    .enable        (!rc_busy && cache_valid),
    .st_valid      (st_valid),
    .st_ready      (st_ready),
    .st_leaf       (st_leaf),
    .st_old_blk    (st_old_blk),
    .elm_req_valid (elm_req_valid),
    .elm_req_leaf  (elm_req_leaf),
    .elm_req_blk   (elm_req_blk),
    .elm_req_ovf   (elm_req_ovf),
    .elm_rsp_valid (elm_rsp_valid),
    .elm_rsp_data  (elm_rsp_data),
    .ph_valid      (st_ph_valid),
    .ph_ready      (ph_ready && !rc_ph_valid),
    .ph_idx        (st_ph_idx),
    .ph_d_old      (st_ph_old),
    .ph_d_new      (st_ph_new),
    .ph_upd_valid  (upd_valid),
    .ph_upd_delta  (upd_delta),
    .tag_cache     (tag_cache),
    .tag_wr        (st_tag_wr),
    .tag_out       (st_tag),
    .nv_wr_en      (nv_wr_en),
    .nv_wr_data    (nv_wr_data),
    .nv_wr_tag     (nv_wr_tag),
    .nv_flag       (nv_flag),
    .nv_rd_data    (nv_rd_data),
    .nv_rd_tag     (nv_rd_tag),
    .nv_clr        (nv_clr),
    .wpq_push_valid(wpq_push_valid),
    .wpq_push_ready(wpq_push_ready),
    .wpq_push_data (wpq_push_data),
    .commit_en     (cache_valid && !nv_clear),
    .busy          (st_busy)
  );

  nv_stage_reg #(.W(ENT_W)) u_nvreg (
    .clk     (clk),
    .nv_clear(nv_clear),
    .wr_en   (nv_wr_en),
    .wr_data (nv_wr_data),
    .wr_tag  (nv_wr_tag),
    .clr     (nv_clr),
    .flag    (nv_flag),
    .rd_data (nv_rd_data),
    .rd_tag  (nv_rd_tag)
  );

  wpq #(.DEPTH(WPQ_DEPTH), .W(ENT_W)) u_wpq (
    .clk       (clk),
    .nv_clear  (nv_clear),
    .push_valid(wpq_push_valid),
    .push_ready(wpq_push_ready),
    .push_data (wpq_push_data),
    .head_valid(wpq_head_valid),
    .head_data (wpq_head_data),
    .head_ack  (wpq_ack),
    .empty     (wpq_empty)
  );

  assign nvm_wr_valid = wpq_head_valid;
  assign {nvm_wr_leaf, nvm_wr_blk, nvm_wr_data} = wpq_head_data;
  assign wpq_ack      = wpq_head_valid && nvm_wr_ready;

  // ---- on-chip root counter: one increment per leaf write that reaches the NVM
  logic [BLK_W-1:0] root_q, root_inc, rc_root;
  logic             root_ovf, rc_root_wr;

  sc_ctr_update #(.L_MA(L_MA), .L_MI(L_MI), .K_SHARE(K_SHARE)) u_root_inc (
    .blk_in  (root_q),
    .slot    ('0),
    .blk_out (root_inc),
    .overflow(root_ovf)
  );

  always_ff @(posedge clk) begin
    if (nv_clear)        root_q <= '0;
    else if (rc_root_wr) root_q <= rc_root;
    else if (wpq_ack)    root_q <= root_inc;
  end
  assign root_blk = root_q;

  // ---- recovery controller
  recovery_ctrl #(
    .ARITY(ARITY), .DEPTH(DEPTH), .K_SHARE(K_SHARE), .L_MA(L_MA), .L_MI(L_MI)
  ) u_rec (
    .clk           (clk),
    .rst_n         (rst_n),
    .cmd_valid     (cmd_valid),
    .cmd           (cmd),
    .cmd_ready     (cmd_ready),
    .done          (cmd_done),
    .verify_ok     (verify_ok),
    .verify_err    (verify_err),
    .busy          (rc_busy),
    .drained       (!nv_flag && wpq_empty && !st_busy),
    .ph_valid      (rc_ph_valid),
    .ph_op         (rc_ph_op),
    .ph_idx        (rc_ph_idx),
    .ph_d          (rc_ph_d),
    .ph_ready      (ph_ready),
    .ph_raw_valid  (raw_valid),
    .ph_raw_value  (raw_value),
    .ph_gen_clear  (gen_clear),
    .ph_gen_tag    (gen_tag),
    .ph_gen_busy   (gen_busy),
    .l_wr          (l_wr),
    .l_out         (l_val),
    .tag_wr        (rc_tag_wr),
    .tag_out       (rc_tag),
    .tag_reg       (tag_reg),
    .meta_rd_valid (meta_rd_valid),
    .meta_rd_ready (meta_rd_ready),
    .meta_rd_level (meta_rd_level),
    .meta_rd_index (meta_rd_index),
    .meta_rsp_valid(meta_rsp_valid),
    .meta_rsp_data (meta_rsp_data),
    .meta_wr_valid (meta_wr_valid),
    .meta_wr_level (meta_wr_level),
    .meta_wr_index (meta_wr_index),
    .meta_wr_data  (meta_wr_data),
    .root_wr       (rc_root_wr),
    .root_blk      (rc_root)
  );

  // A command may only start when no store is in flight.
  property p_cmd_when_quiet;
    @(posedge clk) disable iff (!rst_n) (cmd_valid && cmd_ready && cmd != CMD_RECOVER) |-> !st_busy;
  endproperty
  assert property (p_cmd_when_quiet) else $error("command issued while a store is in flight");

endmodule
