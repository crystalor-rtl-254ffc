// tb_crystalor_top: end-to-end test of the Crystalor hardware at a reduced
// tree size (arity 4, depth 3, 2 nodes per major counter, 2-bit minor
// counters so that minor overflows are frequent; 64 leaves, 32 leaf counter
// blocks). The NVM and the ELM engine are behavioural models in this file.
// Sequence:
//   setup   provisioning clear, key load, CMD_SETUP (L = E_K(0), cycle count
//           checked), random leaf counters in the NVM, CMD_INIT; the Leaf TAG
//           register must equal a reference TagGen.
//   stores  random stores (hot leaves for overflows) with random NVM write
//           stalls so that the WPQ fills; every ELM request must carry the
//           expected new counter block, every NVM write the right data; after
//           draining, NVM leaf counters, leaf tag and root counter are checked.
//   crash   a reset in the middle of a store burst with the NVM write port
//           blocked, so the NV register flag is up and the WPQ is full; after
//           the reboot both drain by themselves, then CMD_RECOVER must rebuild
//           every intermediate block and the root as the reference equations
//           give, pass the tag check, and finish within the cycle bound.
//   replay  a leaf counter block is rolled back in the NVM during a crash;
//           CMD_RECOVER must flag verify_err. Restored, recovery passes again.
// Each mechanism is counted and a mechanism that never occurred is a failure.
`timescale 1ns/1ps
module tb_crystalor_top;
  import aes_ref_pkg::*;
  import crystalor_pkg::*;

  localparam int ARITY = 4, DEPTH = 3, K = 2, L_MA = 56, L_MI = 2, LEAF_BITS = 128, WPQ_DEPTH = 4;
  localparam int LOG_A = $clog2(ARITY), LOG_K = $clog2(K);
  localparam int LEAF_W = DEPTH * LOG_A, NBLK_W = LEAF_W - LOG_K, LVL_W = $clog2(DEPTH + 1);
  localparam int BLK_W = L_MA + K * L_MI, ELM_W = LEAF_BITS + 128;
  localparam int NLEAF = 1 << LEAF_W, NBLK = NLEAF / K, CB = ARITY / K;
  localparam int ELM_LAT = 30, RD_LAT = 3;

  logic clk = 0, rst_n = 0, nv_clear = 0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic key_wr = 0; logic [127:0] key_in = '0;
  logic cmd_valid = 0, cmd_ready, cmd_done, verify_ok, verify_err;
  rec_cmd_e cmd = CMD_SETUP;
  logic st_valid = 0, st_ready; logic [LEAF_W-1:0] st_leaf = '0; logic [BLK_W-1:0] st_old_blk = '0;
  logic elm_req_valid, elm_req_ovf, elm_rsp_valid = 0;
  logic [LEAF_W-1:0] elm_req_leaf; logic [BLK_W-1:0] elm_req_blk; logic [ELM_W-1:0] elm_rsp_data = '0;
  logic nvm_wr_valid, nvm_wr_ready = 0; logic [LEAF_W-1:0] nvm_wr_leaf; logic [BLK_W-1:0] nvm_wr_blk;
  logic [ELM_W-1:0] nvm_wr_data;
  logic meta_rd_valid, meta_rd_ready = 0; logic [LVL_W-1:0] meta_rd_level; logic [NBLK_W-1:0] meta_rd_index;
  logic meta_rsp_valid = 0; logic [BLK_W-1:0] meta_rsp_data = '0;
  logic meta_wr_valid; logic [LVL_W-1:0] meta_wr_level; logic [NBLK_W-1:0] meta_wr_index; logic [BLK_W-1:0] meta_wr_data;
  logic [BLK_W-1:0] root_blk;

  crystalor_top #(.ARITY(ARITY), .DEPTH(DEPTH), .K_SHARE(K), .L_MA(L_MA), .L_MI(L_MI),
                  .LEAF_BITS(LEAF_BITS), .WPQ_DEPTH(WPQ_DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // mechanism counters
  int n_overflow = 0, n_wpq_full = 0, n_nvm_stall = 0, n_rd_stall = 0, n_nv_replay = 0,
      n_wpq_replay = 0, n_detect = 0, n_recover_ok = 0, n_store_held = 0, n_root_ovf = 0;

  // ------------------------------------------------------------------ NVM model
  logic [BLK_W-1:0] meta [int];            // key = level * 65536 + index
  logic [ELM_W-1:0] leaf_data [int];
  int   rd_ready_pct = 100, wr_ready_pct = 100;
  bit   wr_block = 0;
  logic [BLK_W-1:0] rd_pipe [$];
  longint rd_due [$];

  function automatic int mk(input int lvl, input int idx); return lvl * 65536 + idx; endfunction

  always @(posedge clk) begin
    // sample requests of this edge
    if (meta_rd_valid && meta_rd_ready) begin
      rd_pipe.push_back(meta.exists(mk(meta_rd_level, meta_rd_index)) ? meta[mk(meta_rd_level, meta_rd_index)] : '0);
      rd_due.push_back(cyc + RD_LAT);
    end
    if (meta_rd_valid && !meta_rd_ready) n_rd_stall++;
    if (meta_wr_valid) meta[mk(meta_wr_level, meta_wr_index)] = meta_wr_data;
    if (nvm_wr_valid && nvm_wr_ready) begin
      meta[mk(DEPTH, nvm_wr_leaf >> LOG_K)] = nvm_wr_blk;
      leaf_data[nvm_wr_leaf] = nvm_wr_data;
    end
    if (nvm_wr_valid && !nvm_wr_ready) n_nvm_stall++;
    #1;
    meta_rd_ready = ($urandom_range(99) < rd_ready_pct);
    nvm_wr_ready  = !wr_block && ($urandom_range(99) < wr_ready_pct);
    meta_rsp_valid = 0;
    if (rd_due.size() > 0 && rd_due[0] <= cyc) begin
      void'(rd_due.pop_front());
      meta_rsp_valid = 1;
      meta_rsp_data  = rd_pipe.pop_front();
    end
  end

  // ------------------------------------------------------------------ ELM model
  logic [ELM_W-1:0] elm_q [$];
  longint elm_due [$];
  function automatic logic [ELM_W-1:0] elm_out(input logic [LEAF_W-1:0] leaf, input logic [BLK_W-1:0] b);
    return {ELM_W'(b) << 40} ^ ELM_W'(leaf) ^ {ELM_W{1'b1}} << 200;
  endfunction
  always @(posedge clk) begin
    if (!rst_n) begin elm_q.delete(); elm_due.delete(); end
    else if (elm_req_valid) begin
      elm_q.push_back(elm_out(elm_req_leaf, elm_req_blk));
      elm_due.push_back(cyc + ELM_LAT);
    end
    #1;
    elm_rsp_valid = 0;
    if (elm_due.size() > 0 && elm_due[0] <= cyc) begin
      void'(elm_due.pop_front());
      elm_rsp_valid = 1;
      elm_rsp_data  = elm_q.pop_front();
    end
  end

  // ------------------------------------------------------------------ reference state
  logic [127:0] key, ref_l;
  logic [BLK_W-1:0] model [NBLK];           // leaf counter blocks after every staged store
  logic [BLK_W-1:0] root_model;
  int   pend_leaf = -1; logic [BLK_W-1:0] pend_blk;
  int   exp_elm_leaf = -1; logic [BLK_W-1:0] exp_elm_blk; bit exp_elm_ovf;

  function automatic logic [BLK_W-1:0] sc_inc(input logic [BLK_W-1:0] b, input int slot, output bit ovf);
    logic [BLK_W-1:0] r;
    r = b;
    ovf = (b[slot*L_MI +: L_MI] == {L_MI{1'b1}});
    if (ovf) begin r = '0; r[BLK_W-1 -: L_MA] = b[BLK_W-1 -: L_MA] + 1; end
    else r[slot*L_MI +: L_MI] = b[slot*L_MI +: L_MI] + 1;
    return r;
  endfunction

  function automatic logic [127:0] ref_taggen();
    logic [127:0] t = '0;
    for (int i = 0; i < NBLK; i++) t ^= ref_aes(key, ref_gfmul_idx(64'(i + 1), ref_l) ^ 128'(model[i]));
    return t;
  endfunction

  // ELM requests and staging are followed through the design's own handshakes
  always @(posedge clk) if (rst_n) begin
    if (elm_req_valid) begin
      chk(int'(elm_req_leaf) == exp_elm_leaf, "ELM request leaf");
      chk(elm_req_blk == exp_elm_blk && elm_req_ovf == exp_elm_ovf, "ELM request new counter block");
      if (elm_req_ovf) n_overflow++;
    end
    if (dut.nv_wr_en) begin
      model[pend_leaf >> LOG_K] = pend_blk;
      pend_leaf = -1;
    end
    if (dut.wpq_push_valid && !dut.wpq_push_ready) n_wpq_full++;
    if (nvm_wr_valid && nvm_wr_ready) begin
      bit o;
      chk(nvm_wr_data == elm_out(nvm_wr_leaf, nvm_wr_blk), "NVM write carries the ELM output");
      root_model = sc_inc(root_model, 0, o);
      if (o) n_root_ovf++;
    end
  end

  task automatic tick(); @(posedge clk); #1; endtask

  task automatic store(input int leaf);
    bit o;
    int w = 0;
    while (!st_ready) begin tick(); w++; if (w > 2000) begin chk(0, "store never accepted"); return; end end
    st_valid = 1; st_leaf = LEAF_W'(leaf); st_old_blk = model[leaf >> LOG_K];
    pend_leaf = leaf;
    pend_blk  = sc_inc(model[leaf >> LOG_K], leaf % K, o);
    exp_elm_leaf = leaf; exp_elm_blk = pend_blk; exp_elm_ovf = o;
    tick();
    st_valid = 0;
  endtask

  task automatic run_cmd(input rec_cmd_e c, output longint cycles);
    longint t0;
    while (!cmd_ready) tick();
    cmd_valid = 1; cmd = c; t0 = cyc;
    tick();
    cmd_valid = 0;
    while (!cmd_done) tick();
    cycles = cyc - t0;
  endtask

  task automatic wait_quiet();
    int w = 0;
    while ((dut.st_busy || !dut.wpq_empty) && w < 5000) begin tick(); w++; end
    chk(w < 5000, "store path drains");
  endtask

  task automatic check_store_state(input string when);
    int bad = 0;
    for (int i = 0; i < NBLK; i++) if (meta[mk(DEPTH, i)] != model[i]) bad++;
    chk(bad == 0, {when, ": NVM leaf counters match"});
    chk(dut.tag_reg == ref_taggen(), {when, ": leaf tag equals TagGen of the leaf counters"});
    chk(dut.tag_cache == dut.tag_reg, {when, ": tag cache equals register"});
    chk(root_blk == root_model, {when, ": root counter"});
  endtask

  // reference new tree from the leaf counters
  task automatic check_new_tree();
    logic [BLK_W-1:0] lvl_blk [int];
    logic [BLK_W-1:0] cur [int];
    int nblk_child = NBLK, bad = 0;
    for (int i = 0; i < NBLK; i++) cur[i] = model[i];
    for (int p = DEPTH - 1; p >= 0; p--) begin
      int nodes = 1 << (p * LOG_A);
      lvl_blk.delete();
      for (int n = 0; n < nodes; n++) begin
        logic [127:0] pa = '0;
        for (int c = 0; c < CB; c++) begin
          logic [BLK_W-1:0] b = cur[n * CB + c];
          pa += 128'(b[BLK_W-1 -: L_MA]) * 128'(K * ((1 << L_MI) - 1) + 1);
          for (int j = 0; j < K; j++) pa += 128'(b[j*L_MI +: L_MI]);
        end
        if (!lvl_blk.exists(n / K)) lvl_blk[n / K] = '0;
        lvl_blk[n / K][(n % K)*L_MI +: L_MI] = pa[L_MI-1:0];
        lvl_blk[n / K][BLK_W-1 -: L_MA] = lvl_blk[n / K][BLK_W-1 -: L_MA] + L_MA'(pa >> L_MI);
      end
      foreach (lvl_blk[b]) begin
        if (p > 0 && meta[mk(p, b)] != lvl_blk[b]) bad++;
        if (p == 0 && root_blk != lvl_blk[b]) bad++;
      end
      cur = lvl_blk;
    end
    chk(bad == 0, "new tree blocks and root follow the recovery equations");
  endtask

  task automatic crash(input int hold);
    rst_n = 0;
    repeat (hold) tick();
    rst_n = 1;
  endtask

  initial begin
    longint cycles, t_first_rd;
    int reads;
    key = {$urandom, $urandom, $urandom, $urandom};
    ref_l = ref_aes(key, '0);
    root_model = '0;
    for (int i = 0; i < NBLK; i++) begin
      model[i] = {L_MA'($urandom_range(5)), 2'($urandom), 2'($urandom)};
      meta[mk(DEPTH, i)] = model[i];
    end
    repeat (3) tick();
    rst_n = 1; nv_clear = 1; tick(); nv_clear = 0;
    key_wr = 1; key_in = key; tick(); key_wr = 0;
    // ---- setup and init
    run_cmd(CMD_SETUP, cycles);
    chk(dut.lmask == ref_l, "L = E_K(0)");
    chk(cycles == 12, $sformatf("setup takes issue + 10 cipher stages + write (%0d)", cycles));
    run_cmd(CMD_INIT, cycles);
    chk(verify_ok, "init done");
    chk(dut.tag_reg == ref_taggen(), "initial leaf tag equals TagGen");
    // ---- stores, with NVM write stalls so the WPQ backs up
    wr_ready_pct = 30;
    for (int n = 0; n < 60; n++) store((n % 3 == 0) ? 5 : $urandom_range(NLEAF - 1));
    wr_ready_pct = 100;
    wait_quiet();
    check_store_state("after stores");
    // ---- crash with NV register flagged and WPQ full
    wr_block = 1;
    for (int n = 0; n < WPQ_DEPTH + 1; n++) store((n % 2) ? 9 : $urandom_range(NLEAF - 1));
    while (!dut.nv_flag) tick();
    tick();
    chk(dut.nv_flag && !dut.wpq_empty, "crash point has staged and queued stores");
    if (dut.nv_flag) n_nv_replay++;
    if (!dut.wpq_empty) n_wpq_replay++;
    crash(4);
    wr_block = 0;
    chk(!st_ready, "no store accepted before the tag cache is reloaded");
    // recovery while stores are requested: they must be held off
    cmd_valid = 1; cmd = CMD_RECOVER; tick(); cmd_valid = 0;
    st_valid = 1; st_leaf = '0; st_old_blk = model[0];
    repeat (5) begin if (!st_ready) n_store_held++; tick(); end
    st_valid = 0;
    // the cycle count starts with the first metadata read (after the drain)
    rd_ready_pct = 100;
    while (!meta_rd_valid) tick();
    t_first_rd = cyc;
    while (!cmd_done) tick();
    cycles = cyc - t_first_rd;
    chk(verify_ok && !verify_err, "recovery after crash passes the leaf tag check");
    if (verify_ok) n_recover_ok++;
    check_new_tree();
    root_model = root_blk;
    check_store_state("after crash and replay");
    reads = 0;
    for (int p = DEPTH - 1; p >= 0; p--) reads += (1 << ((p + 1) * LOG_A)) / K;
    reads += NBLK;
    chk(cycles >= reads && cycles <= reads + (DEPTH + 1) * (RD_LAT + 4) + 20,
        $sformatf("recovery cycles %0d for %0d reads", cycles, reads));
    // ---- more stores on the new tree, then a replay attack during a crash
    rd_ready_pct = 70;
    for (int n = 0; n < 20; n++) store($urandom_range(NLEAF - 1));
    wait_quiet();
    check_store_state("stores after recovery");
    begin
      int victim;
      logic [BLK_W-1:0] saved;
      victim = 3;
      saved = meta[mk(DEPTH, victim)];
      crash(3);
      // roll the victim's counters back to an older value
      meta[mk(DEPTH, victim)] = (saved[BLK_W-1 -: L_MA] != 0 || saved[L_MI-1:0] != 0) ?
                                 (saved - 1'b1) : {saved[BLK_W-1:L_MI], {L_MI{1'b1}}} ;
      run_cmd(CMD_RECOVER, cycles);
      chk(verify_err && !verify_ok, "replayed leaf counter detected");
      if (verify_err) n_detect++;
      meta[mk(DEPTH, victim)] = saved;
      crash(3);
      run_cmd(CMD_RECOVER, cycles);
      chk(verify_ok, $sformatf("restored NVM passes (ok=%0b err=%0b, %0d cycles)", verify_ok, verify_err, cycles));
      if (verify_ok) n_recover_ok++;
      check_new_tree();
      root_model = root_blk;
    end
    // ---- mechanism coverage
    $display("overflows=%0d root_overflows=%0d wpq_full=%0d nvm_stalls=%0d rd_stalls=%0d nv_replays=%0d wpq_replays=%0d detects=%0d recoveries=%0d stores_held=%0d",
             n_overflow, n_root_ovf, n_wpq_full, n_nvm_stall, n_rd_stall, n_nv_replay, n_wpq_replay, n_detect, n_recover_ok, n_store_held);
    chk(n_overflow > 0, "minor counter overflow happened");
    chk(n_root_ovf > 0, "root minor overflow happened");
    chk(n_wpq_full > 0, "WPQ full happened");
    chk(n_nvm_stall > 0, "NVM write stall happened");
    chk(n_rd_stall > 0, "metadata read stall happened");
    chk(n_nv_replay > 0, "NV register replay after crash happened");
    chk(n_wpq_replay > 0, "WPQ drain after crash happened");
    chk(n_detect > 0, "replay detection happened");
    chk(n_recover_ok > 1, "recoveries passed");
    chk(n_store_held > 0, "stores held off during recovery");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
