// aes128_pipe: fully pipelined AES-128 encryption, one block per clock.
//
// This is the block cipher E_K behind every PXOR-Hash call. The ten rounds
// are unrolled into ten register stages; the initial AddRoundKey is folded
// into the first stage. Each stage carries its own round key, expanded from
// the previous stage's key, so the key may change from one block to the next
// and nothing has to be precomputed when the key is loaded.
//
// Interface: in_valid/in_key/in_pt/in_tag are sampled on a rising edge; the
// ciphertext appears on out_ct with out_valid exactly 10 cycles later, with
// the same in_tag on out_tag. There is no back-pressure. Blocks leave in the
// order they entered.
//
// The cipher itself is FIPS-197 AES-128. The stage split and the 10-cycle
// latency are this design's choice; the source design only asks for a
// pipelined AES engine.
module aes128_pipe
  import aes_pkg::*;
#(
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [127:0]     in_key,
  input  logic [127:0]     in_pt,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [127:0]     out_ct,
  output logic [TAG_W-1:0] out_tag
);

  localparam int NR = 10;

  logic [127:0]     st_q  [1:NR];
  logic [127:0]     rk_q  [1:NR];
  logic [TAG_W-1:0] tag_q [1:NR];
  logic [NR:1]      v_q;

  // Combinational round function of every stage, from the previous stage.
  logic [127:0] st_d [1:NR];
  logic [127:0] rk_d [1:NR];

  for (genvar r = 1; r <= NR; r++) begin : g_round
    logic [127:0] s_in, k_in, sb;
    if (r == 1) begin : g_first
      assign s_in = in_pt ^ in_key;
      assign k_in = in_key;
    end else begin : g_next
      assign s_in = st_q[r-1];
      assign k_in = rk_q[r-1];
    end
    always_comb begin
      rk_d[r] = next_round_key(k_in, rcon(r));
      sb      = sub_shift(s_in);
      st_d[r] = ((r == NR) ? sb : mix_columns(sb)) ^ rk_d[r];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= '0;
    else        v_q <= {v_q[NR-1:1], in_valid};
  end

  always_ff @(posedge clk) begin
    for (int r = 1; r <= NR; r++) begin
      st_q[r]  <= st_d[r];
      rk_q[r]  <= rk_d[r];
      tag_q[r] <= (r == 1) ? in_tag : tag_q[r-1];
    end
  end

  assign out_valid = v_q[NR];
  assign out_ct    = st_q[NR];
  assign out_tag   = tag_q[NR];

endmodule
