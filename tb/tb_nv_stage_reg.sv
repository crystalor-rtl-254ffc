// tb_nv_stage_reg: checks that a write raises the flag and holds data and tag,
// that clr lowers it, that the contents survive a simulated crash (no reset
// reaches the register, inputs idle for a while) and that nv_clear drops the
// flag.
`timescale 1ns/1ps
module tb_nv_stage_reg;
  localparam int W = 200;
  logic clk = 0, nv_clear = 0, wr_en = 0, clr = 0, flag;
  always #5 clk = ~clk;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [127:0] wr_tag = '0, rd_tag;
  int checks = 0, failures = 0;

  nv_stage_reg #(.W(W)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [W-1:0] d; logic [127:0] t;
    @(posedge clk); #1 nv_clear = 1;
    @(posedge clk); #1 nv_clear = 0;
    chk(!flag, "flag down after provisioning");
    for (int n = 0; n < 10; n++) begin
      d = W'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      t = {$urandom, $urandom, $urandom, $urandom};
      wr_en = 1; wr_data = d; wr_tag = t;
      @(posedge clk); #1 wr_en = 0; wr_data = '0; wr_tag = '0;
      chk(flag && rd_data == d && rd_tag == t, "write raises flag and holds data");
      repeat ($urandom_range(5, 1)) @(posedge clk);
      #1 chk(flag && rd_data == d && rd_tag == t, "held while idle / across crash");
      if (n % 2 == 0) begin
        clr = 1; @(posedge clk); #1 clr = 0;
        chk(!flag && rd_data == d, "clr lowers flag");
      end else begin
        nv_clear = 1; @(posedge clk); #1 nv_clear = 0;
        chk(!flag, "nv_clear lowers flag");
      end
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
