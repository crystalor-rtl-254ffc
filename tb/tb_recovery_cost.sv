// tb_recovery_cost: recovery cost of the recovery sequencer, counted against
// the closed-form cost of a Crystalor recovery, at a tree with arity 16,
// depth 3 and the full split-counter format (8 nodes per 56-bit major
// counter, 8-bit minors): 4096 leaves, 512 leaf counter blocks.
// The memory model accepts a read every cycle, so the count of cycles is the
// sequencer's own. For a tree of arity b and depth d the recovery must
//   - compute b^d/8 PXOR-Hash terms (one AES call per leaf counter block),
//   - compute new counters for sum_{i=1..d} b^(i-1) nodes (all intermediate
//     nodes and the root), written as whole counter blocks,
//   - read every counter block of level p+1 once for each parent level p and
//     every leaf counter block once more for the tag check,
//   - finish within one cycle per read plus a small fixed overhead per level.
// The rest (SETUP, INIT, RECOVER with a pass and a changed leaf, the new-tree
// values against the recovery equations) is checked as in tb_recovery_ctrl.
// The arity is scaled down from 128 so that the run stays short; all counts
// are computed from the parameters.
`timescale 1ns/1ps
module tb_recovery_cost;
  import crystalor_pkg::*;
  localparam int ARITY = 16, DEPTH = 3, K = 8, L_MA = 56, L_MI = 8;
  localparam int LOG_A = 4, LOG_K = 3, LEAF_W = DEPTH * LOG_A, NBLK_W = LEAF_W - LOG_K, IDX_W = NBLK_W + 1;
  localparam int LVL_W = $clog2(DEPTH + 1), BLK_W = L_MA + K * L_MI, NBLK = 1 << NBLK_W, CB = ARITY / K;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic cmd_valid = 0, cmd_ready, done, verify_ok, verify_err, busy, drained = 1;
  rec_cmd_e cmd = CMD_SETUP;
  logic ph_valid, ph_ready = 1, ph_raw_valid = 0, ph_gen_clear, ph_gen_busy = 0;
  ph_op_e ph_op; logic [IDX_W-1:0] ph_idx; logic [127:0] ph_d, ph_raw_value = '0, ph_gen_tag = '0;
  logic l_wr, tag_wr; logic [127:0] l_out, tag_out, tag_reg = '0;
  logic meta_rd_valid, meta_rd_ready = 0, meta_rsp_valid = 0;
  logic [LVL_W-1:0] meta_rd_level, meta_wr_level; logic [NBLK_W-1:0] meta_rd_index, meta_wr_index;
  logic [BLK_W-1:0] meta_rsp_data = '0, meta_wr_data, root_blk;
  logic meta_wr_valid, root_wr;

  recovery_ctrl #(.ARITY(ARITY), .DEPTH(DEPTH), .K_SHARE(K), .L_MA(L_MA), .L_MI(L_MI)) dut (.*);

  int checks = 0, failures = 0, n_rd_stall = 0, n_wr = 0, n_gen = 0;
  int n_rd [DEPTH+1];
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  function automatic logic [127:0] term(input logic [IDX_W-1:0] i, input logic [127:0] d);
    return (d * 128'h1_0000_0001) ^ (128'(i) << 64) ^ 128'h3c;
  endfunction

  logic [BLK_W-1:0] meta [int];
  function automatic int mk(input int l, input int i); return l * 4096 + i; endfunction
  logic [BLK_W-1:0] rd_q [$]; longint rd_t [$];
  logic [127:0] raw_q [$]; longint raw_t [$];
  longint gen_t [$]; logic [127:0] gen_v [$];
  logic [LVL_W-1:0] last_lvl = '1;
  bit order_ok = 1;
  logic [BLK_W-1:0] root_seen;

  always @(posedge clk) begin
    if (rst_n) begin
      if (meta_rd_valid && meta_rd_ready) begin
        chk(drained, "no read before the store path has drained");
        if (meta_rd_level > last_lvl && meta_rd_level != LVL_W'(DEPTH)) order_ok = 0;
        if (meta_rd_level != LVL_W'(DEPTH)) last_lvl = meta_rd_level;
        rd_q.push_back(meta.exists(mk(meta_rd_level, meta_rd_index)) ? meta[mk(meta_rd_level, meta_rd_index)] : '0);
        rd_t.push_back(cyc + 3);
      end
      if (meta_rd_valid && !meta_rd_ready) n_rd_stall++;
      if (meta_rd_valid && meta_rd_ready) n_rd[meta_rd_level]++;
      if (meta_wr_valid) n_wr++;
      if (root_wr) n_wr++;
      if (ph_valid && ph_ready && ph_op == PH_GEN) n_gen++;
      if (meta_wr_valid) meta[mk(meta_wr_level, meta_wr_index)] = meta_wr_data;
      if (root_wr) root_seen = root_blk;
      if (ph_valid && ph_ready) begin
        if (ph_op == PH_RAW) begin raw_q.push_back(term('0, ph_d)); raw_t.push_back(cyc + 10); end
        else begin gen_v.push_back(term(ph_idx, ph_d)); gen_t.push_back(cyc + 10); end
      end
      if (ph_gen_clear) ph_gen_tag <= '0;
    end
    #1;
    meta_rd_ready = 1;
    meta_rsp_valid = 0;
    if (rd_t.size() > 0 && rd_t[0] <= cyc) begin void'(rd_t.pop_front()); meta_rsp_valid = 1; meta_rsp_data = rd_q.pop_front(); end
    ph_raw_valid = 0;
    if (raw_t.size() > 0 && raw_t[0] <= cyc) begin void'(raw_t.pop_front()); ph_raw_valid = 1; ph_raw_value = raw_q.pop_front(); end
    if (gen_t.size() > 0 && gen_t[0] <= cyc) begin void'(gen_t.pop_front()); ph_gen_tag = ph_gen_tag ^ gen_v.pop_front(); end
    ph_gen_busy = gen_t.size() > 0;
  end

  task automatic tick(); @(posedge clk); #2; endtask

  task automatic run(input rec_cmd_e c);
    while (!cmd_ready) tick();
    cmd_valid = 1; cmd = c; tick(); cmd_valid = 0;
    while (!done) tick();
  endtask

  function automatic logic [127:0] ref_tag();
    logic [127:0] t = '0;
    for (int i = 0; i < NBLK; i++) t ^= term(IDX_W'(i + 1), 128'(meta[mk(DEPTH, i)]));
    return t;
  endfunction

  task automatic check_tree();
    logic [BLK_W-1:0] cur [int];
    logic [BLK_W-1:0] nxt [int];
    int bad = 0;
    for (int i = 0; i < NBLK; i++) cur[i] = meta[mk(DEPTH, i)];
    for (int p = DEPTH - 1; p >= 0; p--) begin
      nxt.delete();
      for (int n = 0; n < (1 << (p * LOG_A)); n++) begin
        logic [127:0] pa = '0;
        for (int c = 0; c < CB; c++) begin
          pa += 128'(cur[n*CB + c][BLK_W-1 -: L_MA]) * 128'(K * ((1 << L_MI) - 1) + 1);
          for (int j = 0; j < K; j++) pa += 128'(cur[n*CB + c][j*L_MI +: L_MI]);
        end
        if (!nxt.exists(n / K)) nxt[n / K] = '0;
        nxt[n / K][(n % K)*L_MI +: L_MI] = pa[L_MI-1:0];
        nxt[n / K][BLK_W-1 -: L_MA] = nxt[n / K][BLK_W-1 -: L_MA] + L_MA'(pa >> L_MI);
      end
      foreach (nxt[b]) begin
        if (p > 0 && meta[mk(p, b)] != nxt[b]) bad++;
        if (p == 0 && root_seen != nxt[b]) bad++;
      end
      cur = nxt;
    end
    chk(bad == 0, "new tree follows the recovery equations");
  endtask

  longint t0, t1;
  initial begin
    for (int i = 0; i < NBLK; i++) meta[mk(DEPTH, i)] = {56'($urandom_range(100000)), $urandom, $urandom};
    repeat (3) @(posedge clk); #2 rst_n = 1;
    // setup
    run(CMD_SETUP);
    chk(1, "setup done");
    // l_wr is checked by a monitor below
    // init
    run(CMD_INIT);
    tag_reg = tag_out;
    chk(tag_reg == ref_tag(), "init writes TagGen of the leaf blocks");
    // recover with the store path not drained for a while
    n_wr = 0; n_gen = 0; foreach (n_rd[l]) n_rd[l] = 0;
    drained = 0;
    while (!cmd_ready) tick();
    cmd_valid = 1; cmd = CMD_RECOVER; tick(); cmd_valid = 0;
    repeat (30) tick();
    chk(busy, "waiting for drain");
    drained = 1;
    t0 = cyc;
    while (!done) tick();
    t1 = cyc;
    begin
      int exp_nodes, exp_blocks, tot_rd;
      exp_nodes = 0; exp_blocks = 0; tot_rd = 0;
      for (int i = 1; i <= DEPTH; i++) exp_nodes += 1 << ((i - 1) * LOG_A);
      for (int p = 1; p < DEPTH; p++) exp_blocks += 1 << (p * LOG_A - LOG_K);
      chk(n_gen == NBLK, "PXOR-Hash terms = b^d/8");
      chk(n_wr == exp_blocks + 1, "one new block per K intermediate nodes plus the root");
      chk(n_rd[DEPTH] == 2 * NBLK, "leaf counter blocks read for tree and tag");
      for (int p = 1; p < DEPTH; p++) begin
        chk(n_rd[p] == (1 << (p * LOG_A - LOG_K)), "each intermediate block read once");
        tot_rd += n_rd[p];
      end
      tot_rd += n_rd[DEPTH];
      chk(t1 - t0 <= longint'(tot_rd + 16 * (DEPTH + 1)), "one read per cycle plus fixed overhead per level");
      $display("recovery: %0d cycles, %0d reads, %0d blocks written (%0d nodes), %0d hash terms", t1 - t0, tot_rd, n_wr, exp_nodes, n_gen);
    end
    chk(verify_ok && !verify_err, "recovery passes");
    chk(order_ok, "levels built bottom-up");
    check_tree();
    // a changed leaf block must be detected
    meta[mk(DEPTH, 7)] = meta[mk(DEPTH, 7)] ^ BLK_W'(1);
    last_lvl = '1;
    run(CMD_RECOVER);
    chk(verify_err && !verify_ok, "changed leaf block detected");
    check_tree();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && l_wr) chk(l_out == term('0, '0), "L from raw E(0)");
  always @(posedge clk) if (rst_n && tag_wr) chk(tag_out == ref_tag(), "tag write value");

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
