// Original address table address memory (OATAM) of one sub-word partition.
//
// A 2^W x W memory addressed by the W-bit sub-word. The word stored for a
// sub-word that occurs in the layer's hybrid partition is the row (OATA) of
// the partition's original address table that holds that sub-word's original
// addresses. Words of absent sub-words are never used. The size and role
// follow the architecture; the read enable is driven by the layer's
// activation signal, so the OATAM is read only once every VM of the layer has
// validated its sub-word.
//
// Interface: when rd_en is high at a rising clk edge, rd_data takes
// mem[rd_addr] after that edge; otherwise rd_data holds. A write takes effect
// at the same edge; read-during-write to one address returns the old word.
// The contents are not reset.
module ztcam_oatam #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rd_en,
  input  logic [W-1:0] rd_addr,
  output logic [W-1:0] rd_data,
  input  logic         wr_en,
  input  logic [W-1:0] wr_addr,
  input  logic [W-1:0] wr_data
);

  logic [W-1:0] mem [2**W];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
