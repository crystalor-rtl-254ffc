// secure_regs: on-chip trusted storage of Crystalor.
//
// Holds three persistent 128-bit words - the PXOR-Hash key K, the mask
// L = E_K(0) and the Leaf TAG register - plus a volatile Leaf TAG cache that
// the datapath reads. None of this ever leaves the chip, which is what lets
// the leaf tag be a keyed universal hash instead of a full MAC.
// Persistence: the three words survive a crash/reboot (rst_n); only nv_clear
// (first provisioning) zeroes them. The cache is lost on a reboot and is
// reloaded from the Leaf TAG register in the first cycle after rst_n rises;
// cache_valid says it holds the tag.
// Writes: key_wr, l_wr and tag_wr take effect at the next edge. tag_wr writes
// register and cache in the same edge so both copies always agree.
// The word set (K, L, tag: 3 x 128 = 384 bits) and the register-plus-cache
// pair follow the source design; the reload-on-reboot behaviour is this
// design's choice.
module secure_regs (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         nv_clear,
  input  logic         key_wr,
  input  logic [127:0] key_in,
  input  logic         l_wr,
  input  logic [127:0] l_in,
  input  logic         tag_wr,
  input  logic [127:0] tag_in,
  output logic [127:0] key,
  output logic [127:0] lmask,
  output logic [127:0] tag_cache,
  output logic [127:0] tag_reg,
  output logic         cache_valid
);

  typedef enum logic [1:0] {W_KEY = 2'd0, W_L = 2'd1, W_TAG = 2'd2} word_e;

  // persistent SRAM words, not touched by the reboot reset
  logic [127:0] mem_q [3];
  logic [127:0] cache_q;
  logic         cache_valid_q;

  always_ff @(posedge clk) begin
    if (nv_clear) begin
      for (int w = 0; w < 3; w++) mem_q[w] <= '0;
    end else begin
      if (key_wr) mem_q[W_KEY] <= key_in;
      if (l_wr)   mem_q[W_L]   <= l_in;
      if (tag_wr) mem_q[W_TAG] <= tag_in;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cache_valid_q <= 1'b0;
      cache_q       <= '0;
    end else if (nv_clear) begin
      cache_valid_q <= 1'b1;
      cache_q       <= '0;
    end else if (tag_wr) begin
      cache_valid_q <= 1'b1;
      cache_q       <= tag_in;
    end else if (!cache_valid_q) begin
      cache_valid_q <= 1'b1;
      cache_q       <= mem_q[W_TAG];
    end
  end

  assign key         = mem_q[W_KEY];
  assign lmask       = mem_q[W_L];
  assign tag_reg     = mem_q[W_TAG];
  assign tag_cache   = cache_q;
  assign cache_valid = cache_valid_q;

endmodule
