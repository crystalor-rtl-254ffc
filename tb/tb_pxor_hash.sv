// tb_pxor_hash: checks the PXOR-Hash engine against a reference computed with
// the reference AES and GF(2^128) multiply.
//  1. PH_RAW of 0 gives L = E_K(0).
//  2. PH_GEN over m = 12 random blocks (one per cycle) gives
//     T = xor_i E_K(i*L ^ D[i]); gen_busy must drop once all are done.
//  3. Eight PH_UPDATE requests: each delta must equal
//     E_K(i*L ^ D[i]) ^ E_K(i*L ^ D'[i]), arrive 10 cycles after the second
//     issue cycle, and T ^ delta must equal TagGen over the updated blocks.
`timescale 1ns/1ps
module tb_pxor_hash;
  import aes_ref_pkg::*;
  import crystalor_pkg::*;

  localparam int IDX_W = 33, TID_W = 4, M = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [127:0] key, lmask;
  logic in_valid, in_ready;
  ph_op_e in_op;
  logic [IDX_W-1:0] in_idx;
  logic [127:0] in_d_old, in_d_new;
  logic [TID_W-1:0] in_tid;
  logic upd_valid, raw_valid, gen_clear, gen_busy;
  logic [127:0] upd_delta, raw_value, gen_tag;
  logic [TID_W-1:0] upd_tid;

  pxor_hash #(.IDX_W(IDX_W), .TID_W(TID_W)) dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [127:0] d [1:M];
  logic [127:0] ref_l;

  function automatic logic [127:0] ref_term(input int i, input logic [127:0] x);
    return ref_aes(key, ref_gfmul_idx(64'(i), ref_l) ^ x);
  endfunction
  function automatic logic [127:0] ref_tag();
    logic [127:0] t = '0;
    for (int i = 1; i <= M; i++) t ^= ref_term(i, d[i]);
    return t;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [127:0] t_now, dn, exp_delta;
    longint t_issue;
    int i;
    key = {$urandom, $urandom, $urandom, $urandom};
    lmask = '0; in_valid = 0; in_op = PH_RAW; in_idx = '0; in_d_old = '0; in_d_new = '0; in_tid = '0;
    gen_clear = 0;
    for (int k = 1; k <= M; k++) d[k] = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(posedge clk); #1 rst_n = 1;
    ref_l = ref_aes(key, '0);
    // 1. L = E_K(0)
    in_valid = 1; in_op = PH_RAW; in_d_new = '0;
    @(posedge clk); #1 in_valid = 0;
    while (!raw_valid) @(posedge clk);
    chk(raw_value == ref_l, "L = E_K(0)");
    #1 lmask = raw_value;
    gen_clear = 1; @(posedge clk); #1 gen_clear = 0;
    // 2. TagGen
    for (int k = 1; k <= M; k++) begin
      in_valid = 1; in_op = PH_GEN; in_idx = IDX_W'(k); in_d_old = d[k];
      chk(in_ready, "GEN accepted every cycle");
      @(posedge clk); #1;
    end
    in_valid = 0;
    chk(gen_busy, "busy while in flight");
    while (gen_busy) @(posedge clk);
    #1 t_now = ref_tag();
    chk(gen_tag == t_now, "TagGen over 12 blocks");
    // 3. incremental updates
    for (int u = 0; u < 8; u++) begin
      i  = 1 + $urandom_range(M - 1);
      dn = {$urandom, $urandom, $urandom, $urandom};
      exp_delta = ref_term(i, d[i]) ^ ref_term(i, dn);
      in_valid = 1; in_op = PH_UPDATE; in_idx = IDX_W'(i); in_d_old = d[i]; in_d_new = dn; in_tid = TID_W'(u);
      #1;
      chk(!in_ready, $sformatf("update %0d first cycle not yet accepted", u));
      @(posedge clk); #1;
      chk(in_ready, "update accepted in second cycle");
      @(posedge clk); t_issue = cyc; #1;
      in_valid = 0;
      while (!upd_valid) @(posedge clk);
      chk(cyc - t_issue == 10, $sformatf("update latency %0d", cyc - t_issue));
      chk(upd_delta == exp_delta, "update delta");
      chk(upd_tid == TID_W'(u), "update id");
      d[i] = dn;
      t_now = t_now ^ upd_delta;
      chk(t_now == ref_tag(), "incremental tag equals full TagGen");
      @(posedge clk); #1;
    end
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
