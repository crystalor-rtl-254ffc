// tb_recovery_ctrl: checks the recovery sequencer with a small tree (arity 4,
// depth 3, 2 nodes per major counter, 2-bit minors, 16-bit majors).
// A NVM model answers metadata reads after 3 cycles with random request
// stalls; a PXOR-Hash model returns raw results after 10 cycles and keeps a
// TagGen accumulator of a known per-block function.
//   CMD_SETUP    l_wr must carry the raw result of input 0.
//   CMD_INIT     tag_wr must carry the accumulated tag over all leaf blocks,
//                each hashed with index block+1.
//   CMD_RECOVER  nothing is read while `drained` is low; every level is read
//                bottom-up; every written block and the root must follow the
//                recovery equations; verify_ok with the right tag, verify_err
//                after one leaf block is changed.
`timescale 1ns/1ps
module tb_recovery_ctrl;
  import crystalor_pkg::*;
  localparam int ARITY = 4, DEPTH = 3, K = 2, L_MA = 16, L_MI = 2;
  localparam int LOG_A = 2, LOG_K = 1, LEAF_W = DEPTH * LOG_A, NBLK_W = LEAF_W - LOG_K, IDX_W = NBLK_W + 1;
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

  int checks = 0, failures = 0, n_rd_stall = 0;
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
      if (meta_wr_valid) meta[mk(meta_wr_level, meta_wr_index)] = meta_wr_data;
      if (root_wr) root_seen = root_blk;
      if (ph_valid && ph_ready) begin
        if (ph_op == PH_RAW) begin raw_q.push_back(term('0, ph_d)); raw_t.push_back(cyc + 10); end
        else begin gen_v.push_back(term(ph_idx, ph_d)); gen_t.push_back(cyc + 10); end
      end
      if (ph_gen_clear) ph_gen_tag <= '0;
    end
    #1;
    meta_rd_ready = ($urandom_range(99) < 75);
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
          pa += 128'(cur[n*CB + c][BLK_W-1 -: L_MA]) * 128'(K * 3 + 1);
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

  initial begin
    for (int i = 0; i < NBLK; i++) meta[mk(DEPTH, i)] = {16'($urandom_range(300)), 4'($urandom)};
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
    drained = 0;
    while (!cmd_ready) tick();
    cmd_valid = 1; cmd = CMD_RECOVER; tick(); cmd_valid = 0;
    repeat (30) tick();
    chk(busy, "waiting for drain");
    drained = 1;
    while (!done) tick();
    chk(verify_ok && !verify_err, "recovery passes");
    chk(order_ok, "levels built bottom-up");
    check_tree();
    // a changed leaf block must be detected
    meta[mk(DEPTH, 7)] = meta[mk(DEPTH, 7)] ^ 20'h1;
    last_lvl = '1;
    run(CMD_RECOVER);
    chk(verify_err && !verify_ok, "changed leaf block detected");
    check_tree();
    chk(n_rd_stall > 0, "read stalls seen");
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
