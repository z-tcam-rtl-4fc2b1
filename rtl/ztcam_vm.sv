// Validation memory (VM) of one sub-word partition of a Z-TCAM layer.
//
// A 2^W x 1 memory addressed by a W-bit sub-word. A 1 at address s means that
// sub-word s occurs (after expanding don't-care bits) in at least one entry of
// the layer's hybrid partition; a 0 means no entry of the layer can match a
// key carrying s in this position. The size and meaning follow the
// architecture; the synchronous read (one clock from address to data, like a
// block RAM) and the separate write port are this design's choices.
//
// Interface: rd_addr is sampled on each rising clk edge and rd_data shows the
// addressed bit after that edge. A write (wr_en, wr_addr, wr_data) takes effect
// at the same edge; a read of the word being written returns the old value.
// The contents are not reset, as in an SRAM: every word must be written before
// searches are trusted.
module ztcam_vm #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic [W-1:0] rd_addr,
  output logic         rd_data,
  input  logic         wr_en,
  input  logic [W-1:0] wr_addr,
  input  logic         wr_data
);

  logic mem [2**W];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
