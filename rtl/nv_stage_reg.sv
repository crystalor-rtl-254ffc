// nv_stage_reg: on-chip non-volatile register between the store pipeline
// and the write pending queue.
//
// A store's results (leaf address, new counter block, ELM ciphertext and AE
// tag) and the new leaf tag computed for it are written here together, and
// the flag bit is raised in the same edge: from then on the store is
// complete and must reach the WPQ. Data and flag are non-volatile: a reboot
// (there is no rst_n port) does not touch them, so a store whose flag was up
// at a crash is still here afterwards and is moved to the WPQ by the same
// commit path; a store whose flag was down is simply overwritten later.
// Interface: wr_en loads wr_data/wr_tag and raises the flag; clr lowers it
// (the entry has been moved). wr_en while the flag is up is a protocol error.
// nv_clear lowers the flag at provisioning.
// Keeping the leaf tag beside the data, so that the WPQ push and the tag
// update stay atomic across a crash, is this design's choice.
module nv_stage_reg #(
  parameter int unsigned W = 1307
) (
  input  logic         clk,
  input  logic         nv_clear,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic [127:0] wr_tag,
  input  logic         clr,
  output logic         flag,
  output logic [W-1:0] rd_data,
  output logic [127:0] rd_tag
);

  logic [W-1:0] data_q;
  logic [127:0] tag_q;
  logic         flag_q;

  always_ff @(posedge clk) begin
    if (nv_clear)   flag_q <= 1'b0;
    else if (wr_en) flag_q <= 1'b1;
    else if (clr)   flag_q <= 1'b0;
    if (wr_en && !nv_clear) begin
      data_q <= wr_data;
      tag_q  <= wr_tag;
    end
  end

  assign flag    = flag_q;
  assign rd_data = data_q;
  assign rd_tag  = tag_q;

  property p_no_overwrite;
    @(posedge clk) disable iff (nv_clear) wr_en |-> !flag_q;
  endproperty
  assert property (p_no_overwrite) else $error("nv_stage_reg written while its flag is raised");

endmodule
