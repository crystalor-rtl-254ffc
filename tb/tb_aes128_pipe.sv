// tb_aes128_pipe: checks the pipelined AES-128 engine.
//
// Known-answer tests from FIPS-197 (Appendix B and C.1) and E_K(0) for the
// all-zero key, then 200 random key/plaintext pairs issued back to back (one
// per cycle, with random gaps) against the reference cipher. Every result
// must arrive exactly 10 cycles after its block entered, in order.
`timescale 1ns/1ps
module tb_aes128_pipe;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid;
  logic [127:0] in_key, in_pt;
  logic [7:0] in_tag;
  logic out_valid;
  logic [127:0] out_ct;
  logic [7:0] out_tag;

  aes128_pipe #(.TAG_W(8)) dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected-result queue
  logic [127:0] exp_q [$];
  longint       t_q   [$];

  task automatic issue(input logic [127:0] k, input logic [127:0] p, input logic [127:0] e);
    in_valid = 1'b1; in_key = k; in_pt = p; in_tag = 8'(exp_q.size());
    exp_q.push_back(e);
    @(posedge clk); #1;
    in_valid = 1'b0;
  endtask

  // issue time, taken at the edge where the engine samples the block
  always @(posedge clk) if (rst_n && in_valid) t_q.push_back(cyc);

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [127:0] e; longint t;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = exp_q.pop_front(); t = t_q.pop_front();
      if (out_ct !== e) begin failures++; $display("ct mismatch got %h exp %h", out_ct, e); end
      checks++;
      if (cyc - t != 10) begin failures++; $display("latency %0d", cyc - t); end
    end
  end

  initial begin
    in_valid = 0; in_key = '0; in_pt = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    issue(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
          128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    issue(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
          128'h3925841d02dc09fbdc118597196a0b32);
    issue(128'h0, 128'h0, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e);
    for (int n = 0; n < 200; n++) begin
      logic [127:0] k, p;
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      issue(k, p, ref_aes(k, p));
      if ($urandom_range(3) == 0) begin @(posedge clk); #1; end
    end
    repeat (15) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
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
