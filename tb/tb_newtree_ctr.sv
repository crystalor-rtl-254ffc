// tb_newtree_ctr: checks the new-tree counter equations.
// Default sizes (ARITY 128, K 8, 8-bit minors, 56-bit majors): 16 child blocks
// per parent node, 8 parent nodes per block. Random child blocks, some with
// large major counters, are streamed one per cycle; the output block must
// equal the reference (ctr_pa summed in 128-bit arithmetic) one cycle after
// the last beat. A one-node group (the root) must leave slots 1..7 at zero.
`timescale 1ns/1ps
module tb_newtree_ctr;
  localparam int L_MA = 56, L_MI = 8, K = 8, ARITY = 128, CB = ARITY / K;
  localparam int BLK_W = L_MA + K * L_MI;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_node_last, in_group_last, out_valid;
  logic [BLK_W-1:0] in_blk, out_blk;
  int checks = 0, failures = 0;

  newtree_ctr #(.L_MA(L_MA), .L_MI(L_MI), .K_SHARE(K), .ARITY(ARITY)) dut (.*);

  function automatic logic [127:0] term(input logic [BLK_W-1:0] b);
    logic [127:0] t;
    t = 128'(b[BLK_W-1 -: L_MA]) * 128'(K * 255 + 1);
    for (int j = 0; j < K; j++) t = t + 128'(b[j*8 +: 8]);
    return t;
  endfunction

  task automatic run_group(input int nodes);
    logic [127:0] pa [K];
    logic [BLK_W-1:0] e, b;
    logic [127:0] maj;
    for (int j = 0; j < K; j++) pa[j] = '0;
    for (int j = 0; j < nodes; j++)
      for (int c = 0; c < CB; c++) begin
        b = {56'({$urandom, $urandom}) >> $urandom_range(55), 32'($urandom), 32'($urandom)};
        pa[j] = pa[j] + term(b);
        in_valid = 1; in_blk = b; in_node_last = (c == CB - 1); in_group_last = (j == nodes - 1);
        @(posedge clk); #1;
      end
    in_valid = 0;
    maj = '0;
    for (int j = 0; j < K; j++) begin
      maj = maj + (pa[j] >> 8);
      e[j*8 +: 8] = pa[j][7:0];
    end
    e[BLK_W-1 -: L_MA] = maj[L_MA-1:0];
    checks += 2;
    if (!out_valid) begin failures++; $display("out_valid not one cycle after last beat"); end
    if (out_blk !== e) begin failures++; $display("nodes=%0d got %h exp %h", nodes, out_blk, e); end
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("out_valid held"); end
  endtask

  initial begin
    in_valid = 0; in_blk = '0; in_node_last = 0; in_group_last = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int g = 0; g < 20; g++) run_group(K);
    run_group(1);
    run_group(K);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
