// store_ctrl: store operation sequencer of Crystalor.
//
// A store of leaf node `st_leaf`, whose current counter block is st_old_blk,
// runs through these steps:
//   accept   the split-counter rule gives the new counter block D' (and a
//            minor-overflow flag); the ELM engine is asked to encrypt the
//            payload under the new nonce (elm_req_*), and in parallel the
//            PXOR-Hash engine is asked for the update delta
//            E_K(i*L ^ D) ^ E_K(i*L ^ D') with i = block index + 1.
//   stage    when both answers are in, the leaf address, D' and the ELM output
//            go to the non-volatile register together with the new leaf tag
//            (cached tag ^ delta), and its flag is raised.
//   commit   whenever the flag is up and the WPQ has room, the entry is pushed
//            into the WPQ and the new tag is written to the Leaf TAG register
//            and cache in the same edge, and the flag is lowered. The same
//            path moves a flagged entry found after a reboot.
// One store is in flight at a time. st_ready is high when `enable` is set,
// the controller is idle and the non-volatile register is empty.
// Timing: the PXOR-Hash delta is ready 12 cycles after accept, so with an ELM
// latency above that the Crystalor work adds one cycle (stage) plus one
// (commit) to the store. The step order follows the source design; the
// handshakes and the single in-flight store are this design's choice.
module store_ctrl
  import crystalor_pkg::*;
#(
  parameter int unsigned LEAF_W  = 35,
  parameter int unsigned L_MA    = 56,
  parameter int unsigned L_MI    = 8,
  parameter int unsigned K_SHARE = 8,
  parameter int unsigned ELM_W   = 1152,
  localparam int unsigned LOG_K  = $clog2(K_SHARE),
  localparam int unsigned IDX_W  = LEAF_W - LOG_K + 1,
  localparam int unsigned BLK_W  = L_MA + K_SHARE * L_MI,
  localparam int unsigned ENT_W  = LEAF_W + BLK_W + ELM_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  // store requests
  input  logic              st_valid,
  output logic              st_ready,
  input  logic [LEAF_W-1:0] st_leaf,
  input  logic [BLK_W-1:0]  st_old_blk,
  // ELM engine
  output logic              elm_req_valid,
  output logic [LEAF_W-1:0] elm_req_leaf,
  output logic [BLK_W-1:0]  elm_req_blk,
  output logic              elm_req_ovf,
  input  logic              elm_rsp_valid,
  input  logic [ELM_W-1:0]  elm_rsp_data,
  // PXOR-Hash update requests
  output logic              ph_valid,
  input  logic              ph_ready,
  output logic [IDX_W-1:0]  ph_idx,
  output logic [127:0]      ph_d_old,
  output logic [127:0]      ph_d_new,
  input  logic              ph_upd_valid,
  input  logic [127:0]      ph_upd_delta,
  // leaf tag
  input  logic [127:0]      tag_cache,
  output logic              tag_wr,
  output logic [127:0]      tag_out,
  // non-volatile register
  output logic              nv_wr_en,
  output logic [ENT_W-1:0]  nv_wr_data,
  output logic [127:0]      nv_wr_tag,
  input  logic              nv_flag,
  input  logic [ENT_W-1:0]  nv_rd_data,
  input  logic [127:0]      nv_rd_tag,
  output logic              nv_clr,
  // write pending queue
  output logic              wpq_push_valid,
  input  logic              wpq_push_ready,
  output logic [ENT_W-1:0]  wpq_push_data,
  input  logic              commit_en,
  output logic              busy
);

  logic [LEAF_W-1:0] leaf_q;
  logic [BLK_W-1:0]  old_q, new_q;
  logic              ovf_q;
  logic              active_q, elm_done_q, ph_done_q, ph_sent_q, elm_sent_q;
  logic [ELM_W-1:0]  elm_q;
  logic [127:0]      delta_q;
  logic [BLK_W-1:0]  new_blk;
  logic              new_ovf;

  sc_ctr_update #(.L_MA(L_MA), .L_MI(L_MI), .K_SHARE(K_SHARE)) u_sc (
    .blk_in  (st_old_blk),
    .slot    (st_leaf[LOG_K-1:0]),
    .blk_out (new_blk),
    .overflow(new_ovf)
  );

  logic accept, finish;
  assign st_ready = enable && !active_q && !nv_flag;
  assign accept   = st_valid && st_ready;
  assign finish   = active_q && (elm_done_q || elm_rsp_valid) && (ph_done_q || ph_upd_valid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q   <= 1'b0;
      elm_done_q <= 1'b0;
      ph_done_q  <= 1'b0;
      ph_sent_q  <= 1'b0;
      elm_sent_q <= 1'b0;
    end else if (accept) begin
      active_q   <= 1'b1;
      elm_done_q <= 1'b0;
      ph_done_q  <= 1'b0;
      ph_sent_q  <= 1'b0;
      elm_sent_q <= 1'b0;
    end else if (finish) begin
      active_q <= 1'b0;
    end else if (active_q) begin
      elm_sent_q <= 1'b1;
      if (ph_valid && ph_ready) ph_sent_q  <= 1'b1;
      if (elm_rsp_valid)        elm_done_q <= 1'b1;
      if (ph_upd_valid)         ph_done_q  <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      leaf_q <= st_leaf;
      old_q  <= st_old_blk;
      new_q  <= new_blk;
      ovf_q  <= new_ovf;
    end
    if (active_q && elm_rsp_valid) elm_q   <= elm_rsp_data;
    if (active_q && ph_upd_valid)  delta_q <= ph_upd_delta;
  end

  // requests, issued in the first cycle after accept
  assign elm_req_valid = active_q && !elm_sent_q;
  assign elm_req_leaf  = leaf_q;
  assign elm_req_blk   = new_q;
  assign elm_req_ovf   = ovf_q;

  assign ph_valid = active_q && !ph_sent_q;
  assign ph_idx   = IDX_W'(leaf_q >> LOG_K) + 1'b1;
  assign ph_d_old = 128'(old_q);
  assign ph_d_new = 128'(new_q);

  // stage into the non-volatile register
  assign nv_wr_en   = finish;
  assign nv_wr_data = {leaf_q, new_q, elm_rsp_valid ? elm_rsp_data : elm_q};
  assign nv_wr_tag  = tag_cache ^ (ph_upd_valid ? ph_upd_delta : delta_q);

  // commit: WPQ push and leaf tag update in one edge
  assign wpq_push_valid = nv_flag && commit_en;
  assign wpq_push_data  = nv_rd_data;
  assign nv_clr         = wpq_push_valid && wpq_push_ready;
  assign tag_wr         = nv_clr;
  assign tag_out        = nv_rd_tag;

  assign busy = active_q || nv_flag;

  property p_stage_needs_empty;
    @(posedge clk) disable iff (!rst_n) nv_wr_en |-> !nv_flag;
  endproperty
  assert property (p_stage_needs_empty) else $error("store staged while the NV register is full");

endmodule
