// K-bit AND operation of a Z-TCAM layer.
//
// ANDs bit by bit the N K-bit rows read from the layer's original address
// tables. Bit i of the result is 1 exactly when every sub-word of the key
// occurs at original address (layer base + i), that is, when that ternary
// entry matches the whole key. Purely combinational, as in the architecture.
module ztcam_andk #(
  parameter int unsigned N = 4,
  parameter int unsigned K = 16
) (
  input  logic [K-1:0] rows [N],
  output logic [K-1:0] match_vec
);

  always_comb begin
    match_vec = '1;
    for (int n = 0; n < N; n++) match_vec = match_vec & rows[n];
  end

endmodule
