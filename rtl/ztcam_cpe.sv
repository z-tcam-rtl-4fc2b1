// CAM priority encoder (CPE) of the Z-TCAM.
//
// Each of the L layers reports whether it found a match (pma_hit) and its
// potential match address (pma). Layer l covers original addresses
// l*K .. l*K+K-1, so the lowest-numbered layer that hits holds the lowest
// matching address; the CPE selects that layer's PMA as the match address
// (MA). Lowest address first is this design's reading; the architecture only
// says the CPE selects the MA among the PMAs, and its example picks address 0
// over address 2.
//
// Timing: one register stage. in_valid, pma_hit and pma are sampled on a
// rising clk edge and ma_valid, match and ma appear after it, which makes the
// whole search four clocks long. ma_valid marks the cycle that carries the
// result of one search; match is 0 (and ma is 0) when no layer matched.
// rst_n is an active-low synchronous reset of the valid flag.
module ztcam_cpe #(
  parameter int unsigned L  = 4,
  parameter int unsigned AW = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [L-1:0]  pma_hit,
  input  logic [AW-1:0] pma [L],
  output logic          ma_valid,
  output logic          match,
  output logic [AW-1:0] ma
);

  logic          sel_hit;
  logic [AW-1:0] sel_pma;

  always_comb begin
    sel_hit = 1'b0;
    sel_pma = '0;
    for (int l = L - 1; l >= 0; l--) begin
      if (pma_hit[l]) begin
        sel_hit = 1'b1;
        sel_pma = pma[l];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ma_valid <= 1'b0;
      match    <= 1'b0;
      ma       <= '0;
    end else begin
      ma_valid <= in_valid;
      match    <= in_valid & sel_hit;
      ma       <= in_valid ? sel_pma : '0;
    end
  end

endmodule
