// tb_wpq: checks the write pending queue against a reference FIFO.
// Random pushes and acknowledgements for 2000 cycles; push_ready must be low
// exactly when 8 entries are busy; head data must match the oldest entry;
// the queue must fill up at least once. Contents are left in place with no
// activity (a crash, no reset reaches the queue) and must drain intact after.
`timescale 1ns/1ps
module tb_wpq;
  localparam int DEPTH = 8, W = 64;
  logic clk = 0, nv_clear = 0, push_valid = 0, push_ready, head_valid, head_ack = 0, empty;
  always #5 clk = ~clk;
  logic [W-1:0] push_data = '0, head_data;
  int checks = 0, failures = 0, n_full = 0;
  logic [W-1:0] q [$];

  wpq #(.DEPTH(DEPTH), .W(W)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    @(posedge clk); #1 nv_clear = 1;
    @(posedge clk); #1 nv_clear = 0;
    for (int c = 0; c < 2400; c++) begin
      bit do_push, do_ack;
      chk(push_ready == (q.size() < DEPTH), "push_ready vs occupancy");
      chk(head_valid == (q.size() > 0) && empty == (q.size() == 0), "head_valid/empty");
      if (q.size() > 0) chk(head_data == q[0], "head data in order");
      if (q.size() == DEPTH) n_full++;
      // phase 1 fills, phase 2 random, phase 3 (after the idle crash) drains
      do_push = (c < 2000) && ($urandom_range(99) < ((c < 1000) ? 70 : 45));
      do_ack  = (c >= 2000 || ($urandom_range(99) < ((c < 1000) ? 40 : 55))) && q.size() > 0 && head_valid;
      if (c == 2000) repeat (50) @(posedge clk);
      #1;
      push_valid = do_push; push_data = {$urandom, $urandom}; head_ack = do_ack;
      @(posedge clk);
      if (do_ack) void'(q.pop_front());
      if (do_push && push_ready) q.push_back(push_data);
      #1 push_valid = 0; head_ack = 0;
    end
    chk(n_full > 0, "queue became full");
    chk(empty && q.size() == 0, "drained");
    $display("full cycles=%0d", n_full);
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
