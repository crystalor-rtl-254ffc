// tb_gf128_mul_idx: checks i*L against a bit-serial reference multiply.
// Covers index 0, 1, 2, all-ones, top bit and 500 random index/L pairs, with
// L values that exercise the reduction (top bits set).
`timescale 1ns/1ps
module tb_gf128_mul_idx;
  import aes_ref_pkg::*;
  localparam int IDX_W = 33;
  logic [IDX_W-1:0] idx;
  logic [127:0] l_in, mask;
  int checks = 0, failures = 0;

  gf128_mul_idx #(.IDX_W(IDX_W)) dut (.*);

  task automatic check(input logic [IDX_W-1:0] i, input logic [127:0] l);
    logic [127:0] e;
    idx = i; l_in = l; #1;
    e = ref_gfmul_idx(64'(i), l);
    checks++;
    if (mask !== e) begin failures++; $display("i=%h L=%h got %h exp %h", i, l, mask, e); end
  endtask

  initial begin
    check('0, 128'h1234);
    check(1, {4{$urandom}});
    check(2, 128'h8000_0000_0000_0000_0000_0000_0000_0001);
    check(3, 128'hffff_ffff_ffff_ffff_ffff_ffff_ffff_ffff);
    check('1, {4{$urandom}});
    check({1'b1, {(IDX_W-1){1'b0}}}, 128'hc000_0000_0000_0000_0000_0000_0000_0000);
    for (int n = 0; n < 500; n++)
      check({$urandom, 1'b1}, {1'b1, 127'({$urandom, $urandom, $urandom, $urandom})});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
