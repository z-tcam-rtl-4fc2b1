// 1-bit AND operation of a Z-TCAM layer.
//
// ANDs the N one-bit outputs of the layer's validation memories into the
// activation signal. The signal is high only when every sub-word of the key
// occurs in its partition of the layer; it then lets the OATAM read go ahead,
// otherwise the layer reports a mismatch. Purely combinational, as in the
// architecture.
module ztcam_and1 #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] vm_bits,
  output logic         activation
);

  always_comb begin
    activation = 1'b1;
    for (int n = 0; n < N; n++) activation = activation & vm_bits[n];
  end

endmodule
