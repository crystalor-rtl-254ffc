// tb_sc_ctr_update: checks the split-counter increment.
// Random blocks and slots (with minors biased towards 0xff so that overflow
// is frequent) are compared with a reference computed on unpacked arrays:
// without overflow only the chosen minor grows by one; with overflow the
// major grows by one and all minors become zero. Both cases must be seen.
`timescale 1ns/1ps
module tb_sc_ctr_update;
  localparam int L_MA = 56, L_MI = 8, K = 8, BLK_W = L_MA + K * L_MI;
  logic [BLK_W-1:0] blk_in, blk_out;
  logic [2:0] slot;
  logic overflow;
  int checks = 0, failures = 0, n_ovf = 0, n_inc = 0;

  sc_ctr_update #(.L_MA(L_MA), .L_MI(L_MI), .K_SHARE(K)) dut (.*);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      longint unsigned ma;
      int mi [K];
      int s;
      logic [BLK_W-1:0] e;
      bit eo;
      ma = {$urandom, $urandom} & 64'h00ff_ffff_ffff_ffff;
      if (n == 0) ma = 64'h00ff_ffff_ffff_ffff;
      for (int j = 0; j < K; j++) mi[j] = ($urandom_range(2) == 0) ? 255 : $urandom_range(255);
      s = $urandom_range(K - 1);
      if (n == 0) mi[s] = 255;
      blk_in = {ma[L_MA-1:0], 8'(mi[7]), 8'(mi[6]), 8'(mi[5]), 8'(mi[4]), 8'(mi[3]), 8'(mi[2]), 8'(mi[1]), 8'(mi[0])};
      slot = 3'(s);
      #1;
      eo = (mi[s] == 255);
      if (eo) begin
        ma = ma + 1;
        for (int j = 0; j < K; j++) mi[j] = 0;
        n_ovf++;
      end else begin
        mi[s] = mi[s] + 1;
        n_inc++;
      end
      e = {ma[L_MA-1:0], 8'(mi[7]), 8'(mi[6]), 8'(mi[5]), 8'(mi[4]), 8'(mi[3]), 8'(mi[2]), 8'(mi[1]), 8'(mi[0])};
      checks += 2;
      if (blk_out !== e) begin failures++; $display("blk got %h exp %h", blk_out, e); end
      if (overflow !== eo) begin failures++; $display("overflow flag"); end
    end
    checks += 2;
    if (n_ovf == 0) failures++;
    if (n_inc == 0) failures++;
    $display("overflows=%0d increments=%0d", n_ovf, n_inc);
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
