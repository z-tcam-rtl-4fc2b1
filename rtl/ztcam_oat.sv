// Original address table (OAT) of one sub-word partition of a Z-TCAM layer.
//
// A 2^W x K memory addressed by the OATA read from the OATAM. Each row holds
// one bit per original address covered by the layer: bit i is 1 when entry
// (layer base + i) of the ternary table carries the row's sub-word in this
// partition. Bit i standing for the i-th address of the layer is this
// design's ordering; the architecture only says each bit represents an
// original address. The read enable follows the layer's activation signal one
// stage later.
//
// Interface: when rd_en is high at a rising clk edge, rd_data takes
// mem[rd_addr] after that edge; otherwise rd_data holds. A write takes effect
// at the same edge; read-during-write to one address returns the old row.
// The contents are not reset.
module ztcam_oat #(
  parameter int unsigned W = 8,
  parameter int unsigned K = 16
) (
  input  logic         clk,
  input  logic         rd_en,
  input  logic [W-1:0] rd_addr,
  output logic [K-1:0] rd_data,
  input  logic         wr_en,
  input  logic [W-1:0] wr_addr,
  input  logic [K-1:0] wr_data
);

  logic [K-1:0] mem [2**W];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
