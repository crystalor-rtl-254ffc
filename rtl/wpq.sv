// wpq: write pending queue in the ADR (asynchronous DRAM refresh) domain.
//
// Committed leaf writes wait here until the NVM has stored them. The queue
// lies in the power-fail-safe domain, so its entries, their busy flags and
// its pointers are persistent: a reboot (no rst_n port) leaves them as they
// are and the queue simply keeps draining to the NVM afterwards. A slot whose
// busy flag is down holds nothing and its contents are ignored.
// Interface: push_valid/push_ready/push_data append an entry and raise its
// busy flag. head_valid/head_data show the oldest busy entry; head_ack (the
// NVM write has completed) lowers its busy flag and frees it. empty is high
// when no entry is busy. nv_clear empties the queue at provisioning.
// The depth (8 entries) follows the source design's evaluation; FIFO order
// is this design's choice.
module wpq #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned W     = 1307,
  localparam int unsigned PW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic         clk,
  input  logic         nv_clear,
  input  logic         push_valid,
  output logic         push_ready,
  input  logic [W-1:0] push_data,
  output logic         head_valid,
  output logic [W-1:0] head_data,
  input  logic         head_ack,
  output logic         empty
);

  logic [W-1:0]     mem_q [DEPTH];
  logic [DEPTH-1:0] busy_q;
  logic [PW-1:0]    wr_q, rd_q;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign push_ready = !busy_q[wr_q];
  assign head_valid = busy_q[rd_q];
  assign head_data  = mem_q[rd_q];
  assign empty      = busy_q == '0;

  always_ff @(posedge clk) begin
    if (nv_clear) begin
      busy_q <= '0;
      wr_q   <= '0;
      rd_q   <= '0;
    end else begin
      if (push_valid && push_ready) begin
        busy_q[wr_q] <= 1'b1;
        wr_q         <= inc(wr_q);
      end
      if (head_ack && head_valid) begin
        busy_q[rd_q] <= 1'b0;
        rd_q         <= inc(rd_q);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (push_valid && push_ready && !nv_clear) mem_q[wr_q] <= push_data;
  end

  property p_ack_needs_entry;
    @(posedge clk) disable iff (nv_clear) head_ack |-> head_valid;
  endproperty
  assert property (p_ack_needs_entry) else $error("WPQ head acknowledged while empty");

endmodule
