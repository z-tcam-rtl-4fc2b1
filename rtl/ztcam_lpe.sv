// Layer priority encoder (LPE) of a Z-TCAM layer.
//
// Several entries of a layer may match one key; the LPE picks one of them.
// As in a conventional TCAM the lowest original address wins: the output is
// the index of the lowest set bit of match_vec, and hit says whether any bit
// was set (idx is 0 when none was). Choosing the lowest address is this
// design's reading of the architecture, which says only that the LPE selects
// one address among the matches; it agrees with the worked example, where
// address 0 wins over address 2. Combinational.
module ztcam_lpe #(
  parameter int unsigned K = 16,
  localparam int unsigned IW = ztcam_pkg::idx_w(K)
) (
  input  logic [K-1:0]  match_vec,
  output logic          hit,
  output logic [IW-1:0] idx
);

  always_comb begin
    hit = 1'b0;
    idx = '0;
    for (int i = K - 1; i >= 0; i--) begin
      if (match_vec[i]) begin
        hit = 1'b1;
        idx = IW'(i);
      end
    end
  end

endmodule
