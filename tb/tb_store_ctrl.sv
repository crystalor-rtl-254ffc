// tb_store_ctrl: checks the store sequencer with small widths (6-bit leaf
// index, 2 nodes per block, 2-bit minors, 16-bit ELM output).
// The ELM engine answers after a random 3..40 cycles, the PXOR-Hash engine is
// a model that takes the two-cycle update and answers 10 cycles later with a
// known function of its inputs, the NV register and the WPQ are modelled with
// a random WPQ stall. For every store: the ELM and hash requests carry the
// expected new counter block and block index; staging happens in the cycle
// both answers are in, with tag = cached tag ^ delta; the commit pushes the
// staged entry and writes its tag in the same cycle; no store is accepted
// while one is in flight or the NV register is full.
`timescale 1ns/1ps
module tb_store_ctrl;
  localparam int LEAF_W = 6, L_MA = 8, L_MI = 2, K = 2, ELM_W = 16;
  localparam int LOG_K = 1, IDX_W = LEAF_W - LOG_K + 1, BLK_W = L_MA + K * L_MI, ENT_W = LEAF_W + BLK_W + ELM_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic enable = 1, st_valid = 0, st_ready;
  logic [LEAF_W-1:0] st_leaf = '0; logic [BLK_W-1:0] st_old_blk = '0;
  logic elm_req_valid, elm_req_ovf, elm_rsp_valid = 0;
  logic [LEAF_W-1:0] elm_req_leaf; logic [BLK_W-1:0] elm_req_blk; logic [ELM_W-1:0] elm_rsp_data = '0;
  logic ph_valid, ph_ready = 0, ph_upd_valid = 0;
  logic [IDX_W-1:0] ph_idx; logic [127:0] ph_d_old, ph_d_new, ph_upd_delta = '0;
  logic [127:0] tag_cache = '0, tag_out; logic tag_wr;
  logic nv_wr_en, nv_flag = 0, nv_clr; logic [ENT_W-1:0] nv_wr_data, nv_rd_data = '0;
  logic [127:0] nv_wr_tag, nv_rd_tag = '0;
  logic wpq_push_valid, wpq_push_ready = 0, commit_en = 1, busy; logic [ENT_W-1:0] wpq_push_data;

  store_ctrl #(.LEAF_W(LEAF_W), .L_MA(L_MA), .L_MI(L_MI), .K_SHARE(K), .ELM_W(ELM_W)) dut (.*);

  int checks = 0, failures = 0, n_commit = 0, n_ovf = 0, n_wpq_stall = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  function automatic logic [127:0] hmodel(input logic [127:0] a, input logic [127:0] b, input logic [IDX_W-1:0] i);
    return (a * 128'd3) ^ (b << 7) ^ 128'(i) ^ 128'hA5;
  endfunction

  // expectations of the store in flight
  int exp_leaf; logic [BLK_W-1:0] exp_old, exp_new; bit exp_ovf;
  logic [ELM_W-1:0] elm_val; longint elm_at = -1, ph_at = -1, ph_first = -1;
  logic [127:0] delta_val;

  always @(posedge clk) if (rst_n) begin
    // ELM model
    if (elm_req_valid) begin
      chk(int'(elm_req_leaf) == exp_leaf && elm_req_blk == exp_new && elm_req_ovf == exp_ovf, "ELM request");
      elm_at = cyc + $urandom_range(40, 3);
      elm_val = ELM_W'($urandom);
      if (elm_req_ovf) n_ovf++;
    end
    // PXOR-Hash model: two request cycles, answer 10 cycles after the second
    if (ph_valid && !ph_ready) begin
      ph_first = cyc;
      chk(ph_idx == IDX_W'((exp_leaf >> LOG_K) + 1) && ph_d_old == 128'(exp_old), "hash request first call");
    end
    if (ph_valid && ph_ready) begin
      chk(ph_first == cyc - 1, "hash request held for two cycles");
      chk(ph_d_new == 128'(exp_new), "hash request new block");
      ph_at = cyc + 10;
      delta_val = hmodel(ph_d_old, ph_d_new, ph_idx);
    end
    // staging
    if (nv_wr_en) begin
      chk(nv_wr_data == {LEAF_W'(exp_leaf), exp_new, elm_val}, "staged data");
      chk(nv_wr_tag == (tag_cache ^ delta_val), "staged tag = cache ^ delta");
      chk(cyc == ((elm_at > ph_at) ? elm_at : ph_at), "staged in the cycle both answers are in");
      chk(!nv_flag, "NV register empty when staged");
    end
    // commit
    if (wpq_push_valid && !wpq_push_ready) n_wpq_stall++;
    if (wpq_push_valid && wpq_push_ready) begin
      chk(tag_wr && nv_clr && tag_out == nv_rd_tag && wpq_push_data == nv_rd_data, "commit: push, tag write and flag clear together");
      n_commit++;
    end else chk(!tag_wr && !nv_clr, "no tag write without a push");
    if (st_valid && st_ready) chk(!nv_flag && !busy, "store accepted only when idle");
  end

  // drive models
  always @(posedge clk) begin
    bit stage, clr;
    logic [ENT_W-1:0] d; logic [127:0] t;
    stage = nv_wr_en; clr = nv_clr; d = nv_wr_data; t = nv_wr_tag;
    if (tag_wr) tag_cache <= tag_out;
    #1;
    elm_rsp_valid = (cyc == elm_at);
    elm_rsp_data  = elm_rsp_valid ? elm_val : ELM_W'($urandom);
    ph_upd_valid  = (cyc == ph_at);
    ph_upd_delta  = ph_upd_valid ? delta_val : {4{$urandom}};
    ph_ready      = ph_valid && (ph_first == cyc - 1);
    if (stage) begin nv_flag = 1; nv_rd_data = d; nv_rd_tag = t; end
    else if (clr) nv_flag = 0;
    wpq_push_ready = ($urandom_range(99) < 60);
  end

  initial begin
    bit o;
    repeat (3) @(posedge clk); #2 rst_n = 1;
    for (int n = 0; n < 150; n++) begin
      int w = 0;
      while (!st_ready) begin @(posedge clk); #2; w++; end
      exp_leaf = (n % 4 == 0) ? 5 : $urandom_range(63);
      exp_old  = {8'($urandom), 2'($urandom), 2'($urandom)};
      exp_new  = exp_old;
      exp_ovf  = (exp_old[(exp_leaf % K)*L_MI +: L_MI] == 2'b11);
      if (exp_ovf) begin exp_new = '0; exp_new[BLK_W-1 -: L_MA] = exp_old[BLK_W-1 -: L_MA] + 1; end
      else exp_new[(exp_leaf % K)*L_MI +: L_MI] = exp_old[(exp_leaf % K)*L_MI +: L_MI] + 1;
      st_valid = 1; st_leaf = LEAF_W'(exp_leaf); st_old_blk = exp_old;
      @(posedge clk); #2;
      st_valid = 0;
      #1 chk(!st_ready, "busy after accept");
      while (dut.active_q) begin @(posedge clk); #2; end
    end
    while (nv_flag) begin @(posedge clk); #2; end
    chk(n_commit == 150, $sformatf("all stores committed (%0d)", n_commit));
    chk(n_ovf > 0 && n_wpq_stall > 0, "overflow and WPQ stall seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
