// tb_secure_regs: checks persistence of K, L and the Leaf TAG register across
// a reboot, the loss and reload of the Leaf TAG cache, and that a tag write
// updates register and cache in the same edge.
`timescale 1ns/1ps
module tb_secure_regs;
  logic clk = 0, rst_n = 0, nv_clear = 0;
  always #5 clk = ~clk;
  logic key_wr = 0, l_wr = 0, tag_wr = 0, cache_valid;
  logic [127:0] key_in = '0, l_in = '0, tag_in = '0, key, lmask, tag_cache, tag_reg;
  int checks = 0, failures = 0;

  secure_regs dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [127:0] k, l, t;
    k = {4{$urandom}}; l = {4{$urandom}}; t = {4{$urandom}};
    repeat (2) @(posedge clk); #1 rst_n = 1; nv_clear = 1;
    @(posedge clk); #1 nv_clear = 0;
    chk(tag_reg == '0 && key == '0 && cache_valid, "cleared at provisioning");
    key_wr = 1; key_in = k; l_wr = 1; l_in = l; tag_wr = 1; tag_in = t;
    @(posedge clk); #1 key_wr = 0; l_wr = 0; tag_wr = 0;
    chk(key == k && lmask == l, "K and L written");
    chk(tag_reg == t && tag_cache == t, "tag written to register and cache together");
    // crash and reboot
    rst_n = 0; #1;
    chk(!cache_valid && tag_cache == '0, "cache lost at reboot");
    @(posedge clk); #1 rst_n = 1;
    chk(key == k && lmask == l && tag_reg == t, "persistent words kept over reboot");
    chk(!cache_valid, "cache invalid before reload");
    @(posedge clk); #1;
    chk(cache_valid && tag_cache == t, "cache reloaded from register");
    for (int n = 0; n < 20; n++) begin
      t = {$urandom, $urandom, $urandom, $urandom};
      tag_wr = 1; tag_in = t;
      @(posedge clk); #1 tag_wr = 0;
      chk(tag_reg == t && tag_cache == t, "tag update both copies");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
