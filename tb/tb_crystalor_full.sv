// tb_crystalor_full: crystalor_top at its default (full) size: arity 128,
// depth 5, 8 nodes per 56-bit major counter with 8-bit minors, 1024-bit
// leaves, 8-entry WPQ, i.e. a 4 TB protected memory with 2^32 leaf counter
// blocks. Recovery and tag initialisation walk all 2^32 blocks and cannot be
// simulated at this size; they are covered by the reduced-size end-to-end
// test. This bench checks the parts whose cost does not grow with the tree:
//   - provisioning clear, key load and CMD_SETUP: L must equal AES_K(0) and
//     the command must finish within the AES latency plus a few cycles;
//   - stores to leaves across the whole 35-bit leaf range (including the last
//     leaf and a minor-counter overflow): each ELM request must carry the
//     expected split-counter block, each staged store must reach the NV
//     register no later than 3 cycles after the ELM answer (30 cycles here),
//     so the two PXOR-Hash AES calls stay hidden behind the ELM engine;
//   - every NVM write carries the ELM output, the root counter counts the
//     writes, and after draining the Leaf TAG register equals the cleared
//     value 0 XORed with the reference delta of every store.
// The ELM engine and the NVM are behavioural models in this file.
`timescale 1ns/1ps
module tb_crystalor_full;
  import aes_ref_pkg::*;
  import crystalor_pkg::*;

  localparam int LEAF_W = 35, NBLK_W = 32, LVL_W = 3, BLK_W = 120, ELM_W = 1152;
  localparam int ELM_LAT = 30, NST = 8;

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
  logic nvm_wr_valid, nvm_wr_ready = 1; logic [LEAF_W-1:0] nvm_wr_leaf; logic [BLK_W-1:0] nvm_wr_blk;
  logic [ELM_W-1:0] nvm_wr_data;
  logic meta_rd_valid, meta_rd_ready = 1, meta_rsp_valid = 0;
  logic [LVL_W-1:0] meta_rd_level, meta_wr_level; logic [NBLK_W-1:0] meta_rd_index, meta_wr_index;
  logic [BLK_W-1:0] meta_rsp_data = '0, meta_wr_data, root_blk;
  logic meta_wr_valid;

  crystalor_top dut (.*);

  int checks = 0, failures = 0, n_writes = 0, n_ovf = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // ELM model: fixed latency, output depends on leaf and new counter block
  logic [ELM_W-1:0] elm_q [$];
  longint elm_due [$];
  function automatic logic [ELM_W-1:0] elm_out(input logic [LEAF_W-1:0] leaf, input logic [BLK_W-1:0] b);
    return (ELM_W'(b) << 300) ^ ELM_W'(leaf) ^ ({ELM_W{1'b1}} << 1000);
  endfunction
  always @(posedge clk) begin
    if (rst_n && elm_req_valid) begin
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

  logic [127:0] key, ref_l, ref_tag;
  logic [BLK_W-1:0] exp_blk;
  bit exp_ovf;
  longint t_acc, t_elm;

  always @(posedge clk) if (rst_n) begin
    if (elm_req_valid) begin
      chk(elm_req_blk == exp_blk && elm_req_ovf == exp_ovf, "ELM request new counter block");
      if (elm_req_ovf) n_ovf++;
    end
    if (elm_rsp_valid) t_elm = cyc;
    if (dut.nv_wr_en) chk(cyc - t_elm <= 3, "store staged within 3 cycles of the ELM answer");
    if (nvm_wr_valid && nvm_wr_ready) begin
      chk(nvm_wr_data == elm_out(nvm_wr_leaf, nvm_wr_blk), "NVM write carries the ELM output");
      n_writes++;
    end
  end

  task automatic tick(); @(posedge clk); #2; endtask

  function automatic logic [BLK_W-1:0] sc_inc(input logic [BLK_W-1:0] b, input int slot, output bit ovf);
    logic [BLK_W-1:0] r;
    r = b;
    ovf = (b[slot*8 +: 8] == 8'hff);
    if (ovf) begin r = '0; r[BLK_W-1 -: 56] = b[BLK_W-1 -: 56] + 1; end
    else r[slot*8 +: 8] = b[slot*8 +: 8] + 1;
    return r;
  endfunction

  task automatic store(input logic [LEAF_W-1:0] leaf, input logic [BLK_W-1:0] old);
    logic [127:0] iL;
    int w;
    w = 0;
    while (!st_ready && w < 500) begin tick(); w++; end
    chk(st_ready, "store accepted");
    exp_blk = sc_inc(old, int'(leaf[2:0]), exp_ovf);
    iL = ref_gfmul_idx(64'(leaf[LEAF_W-1:3]) + 64'd1, ref_l);
    ref_tag = ref_tag ^ ref_aes(key, iL ^ 128'(old)) ^ ref_aes(key, iL ^ 128'(exp_blk));
    st_valid = 1; st_leaf = leaf; st_old_blk = old;
    tick();
    st_valid = 0;
  endtask

  logic [LEAF_W-1:0] leaves [NST];
  logic [BLK_W-1:0]  olds [NST];

  initial begin
    longint t0;
    int w;
    key = 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c;
    ref_l = ref_aes(key, '0);
    ref_tag = '0;
    // provisioning clear with the clock running, then reboot
    @(posedge clk); #2 nv_clear = 1;
    tick(); tick(); nv_clear = 0;
    rst_n = 1;
    key_wr = 1; key_in = key; tick(); key_wr = 0;
    while (!cmd_ready) tick();
    cmd_valid = 1; cmd = CMD_SETUP; t0 = cyc; tick(); cmd_valid = 0;
    while (!cmd_done) tick();
    chk(cyc - t0 <= 16, "setup within AES latency + a few cycles");
    chk(dut.lmask == ref_l, "L = AES_K(0)");
    chk(dut.tag_reg == '0, "cleared leaf tag");
    leaves[0] = '0;                   olds[0] = '0;
    leaves[1] = 35'h7_ffff_ffff;      olds[1] = {56'h1234, 64'h0102_0304_0506_0708};
    leaves[2] = 35'h2_4000_0006;      olds[2] = {56'hab_cdef, 64'h00ff_0000_0000_0000};
    leaves[3] = 35'h4_0000_0003;      olds[3] = {56'hff_ffff_ffff_ffff, 64'h0000_0000_ff00_0000};
    leaves[4] = 35'h1_2345_6789;      olds[4] = {56'h1, 64'h8899_aabb_ccdd_eeff};
    leaves[5] = 35'h1_2345_678a;      olds[5] = {56'h77, 64'h1};
    leaves[6] = 35'h5_5555_5550;      olds[6] = {56'h5, 64'hffff_ffff_ffff_ffff};
    leaves[7] = 35'h0_0000_0008;      olds[7] = {56'h9, 64'h7f00_0000_0000_0000};
    for (int s = 0; s < NST; s++) store(leaves[s], olds[s]);
    w = 0;
    while ((dut.st_busy || !dut.wpq_empty) && w < 2000) begin tick(); w++; end
    chk(w < 2000, "store path drains");
    chk(n_writes == NST, "one NVM write per store");
    chk(n_ovf == 3, "minor overflows seen");
    chk(dut.tag_reg == ref_tag, "leaf tag = 0 xor every store delta");
    chk(dut.tag_cache == dut.tag_reg, "tag cache equals register");
    chk(root_blk[7:0] == 8'(NST), "root counter counts the writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
