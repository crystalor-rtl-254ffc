// pxor_hash: PXOR-Hash engine of Crystalor (leaf tag computation).
//
// The leaf tag over counter blocks D[1..m] is
//     T = E_K(1*L ^ D[1]) ^ E_K(2*L ^ D[2]) ^ ... ^ E_K(m*L ^ D[m]),  L = E_K(0),
// with i*L taken in GF(2^128). Because every term depends on one block only,
// a change of D[i] to D'[i] updates the tag with two cipher calls:
//     T' = T ^ E_K(i*L ^ D[i]) ^ E_K(i*L ^ D'[i]).
// One pipelined AES-128 engine serves three request kinds (crystalor_pkg::ph_op_e):
//   PH_UPDATE  the two calls of an incremental update are issued in two
//              consecutive cycles; the engine returns their xor (the "delta")
//              on upd_delta with upd_tid. The caller xors it into the tag, so
//              the tag itself only changes when the caller commits.
//   PH_GEN     one TagGen term for block in_idx with data in_d_old; the term is
//              xored into the internal accumulator gen_tag (cleared by
//              gen_clear). One block per cycle; gen_busy is high while terms
//              are in flight.
//   PH_RAW     E_K(in_d_new) with no mask, returned on raw_value; used to
//              derive L = E_K(0) after a key is loaded.
// Timing: a request is taken when in_valid && in_ready. PH_GEN and PH_RAW take
// one cycle; PH_UPDATE holds in_ready low for its first cycle and takes two.
// Results appear 10 cycles after the (last) issue cycle. The formula, the
// two-call update and the use of one pipelined AES engine follow the source
// design; the request interface and the single shared pipeline are this
// design's choice.
module pxor_hash
  import crystalor_pkg::*;
#(
  parameter int unsigned IDX_W = 33,
  parameter int unsigned TID_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [127:0]     key,
  input  logic [127:0]     lmask,
  input  logic             in_valid,
  output logic             in_ready,
  input  ph_op_e           in_op,
  input  logic [IDX_W-1:0] in_idx,
  input  logic [127:0]     in_d_old,
  input  logic [127:0]     in_d_new,
  input  logic [TID_W-1:0] in_tid,
  output logic             upd_valid,
  output logic [127:0]     upd_delta,
  output logic [TID_W-1:0] upd_tid,
  output logic             raw_valid,
  output logic [127:0]     raw_value,
  input  logic             gen_clear,
  output logic [127:0]     gen_tag,
  output logic             gen_busy
);

  // side-band carried through the cipher pipeline
  typedef struct packed {
    ph_op_e           op;
    logic             second;  // second call of an update
    logic [TID_W-1:0] tid;
  } sb_t;

  logic         upd_second_q;  // first call of the current update already issued
  logic [127:0] mask;
  logic         aes_in_valid;
  logic [127:0] aes_in;
  sb_t          sb_in, sb_out;
  logic         aes_out_valid;
  logic [127:0] aes_out;
  logic [127:0] half_q;        // first result of an update, waiting for its pair
  logic [127:0] acc_q;
  logic [4:0]   gen_cnt_q;

  gf128_mul_idx #(.IDX_W(IDX_W)) u_mask (.idx(in_idx), .l_in(lmask), .mask(mask));

  always_comb begin
    in_ready     = (in_op != PH_UPDATE) || upd_second_q;
    aes_in_valid = in_valid;
    unique case (in_op)
      PH_UPDATE: aes_in = mask ^ (upd_second_q ? in_d_new : in_d_old);
      PH_GEN:    aes_in = mask ^ in_d_old;
      default:   aes_in = in_d_new;
    endcase
    sb_in = '{op: in_op, second: upd_second_q, tid: in_tid};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) upd_second_q <= 1'b0;
    else if (in_valid && in_op == PH_UPDATE) upd_second_q <= !upd_second_q;
  end

  aes128_pipe #(.TAG_W($bits(sb_t))) u_aes (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (aes_in_valid),
    .in_key   (key),
    .in_pt    (aes_in),
    .in_tag   (sb_in),
    .out_valid(aes_out_valid),
    .out_ct   (aes_out),
    .out_tag  (sb_out)
  );

  logic gen_in, gen_out;
  assign gen_in  = in_valid && in_op == PH_GEN;
  assign gen_out = aes_out_valid && sb_out.op == PH_GEN;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gen_cnt_q <= '0;
      acc_q     <= '0;
    end else begin
      gen_cnt_q <= gen_cnt_q + 5'(gen_in) - 5'(gen_out);
      if (gen_clear)    acc_q <= gen_out ? aes_out : '0;
      else if (gen_out) acc_q <= acc_q ^ aes_out;
    end
  end

  always_ff @(posedge clk) begin
    if (aes_out_valid && sb_out.op == PH_UPDATE && !sb_out.second) half_q <= aes_out;
  end

  assign upd_valid = aes_out_valid && sb_out.op == PH_UPDATE && sb_out.second;
  assign upd_delta = half_q ^ aes_out;
  assign upd_tid   = sb_out.tid;
  assign raw_valid = aes_out_valid && sb_out.op == PH_RAW;
  assign raw_value = aes_out;
  assign gen_tag   = acc_q;
  assign gen_busy  = gen_cnt_q != '0;

  // An update's two calls must be issued back to back with the same request.
  property p_update_held;
    @(posedge clk) disable iff (!rst_n)
      (in_valid && in_op == PH_UPDATE && !upd_second_q) |=> (in_valid && in_op == PH_UPDATE);
  endproperty
  assert property (p_update_held) else $error("PH_UPDATE request dropped between its two cycles");

endmodule
