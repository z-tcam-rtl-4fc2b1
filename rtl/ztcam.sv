// Z-TCAM: a ternary CAM of DEPTH entries of C bits built from SRAM.
//
// The ternary table is cut along its columns into N sub-words of W = C/N bits
// and along its rows into L layers of K = DEPTH/L entries. Each layer stores,
// per sub-word position, which sub-word values occur among its entries
// (validation memory) and at which of its entries they occur (OAT address
// memory plus original address table), with don't-care bits expanded into
// every value they stand for. A search splits the key into its N sub-words,
// looks them up in every layer at once, ANDs the per-position address sets
// and lets each layer's priority encoder report a potential match address.
// The CAM priority encoder then returns the lowest matching address. The
// structure, the sizes and the four-clock latency follow the architecture;
// the write port, the reset and the valid flags are this design's own.
//
// Parameters: C bits per entry, DEPTH entries, L layers, N sub-words. C must
// be a multiple of N and DEPTH a multiple of L. The defaults are the 64 x 32
// example with L = 4 and N = 4 (W = 8, K = 16).
//
// Timing: one search per clock. search_valid and key are sampled on a rising
// clk edge; the layers' PMAs are ready three edges later and ma_valid, match
// and ma four edges later. match is 0 when no entry matches.
//
// Loading: the table is mapped in software (expand don't-cares, number the
// distinct sub-words of each partition) and written word by word through
// wr_*: wr_layer and wr_part pick the partition, wr_mem the memory, wr_addr
// the word, wr_data the right-aligned data. Every VM word of every partition
// must be written once, since the memories are not reset.
module ztcam
  import ztcam_pkg::*;
#(
  parameter int unsigned C     = 32,
  parameter int unsigned DEPTH = 64,
  parameter int unsigned L     = 4,
  parameter int unsigned N     = 4,
  localparam int unsigned W  = C / N,
  localparam int unsigned K  = DEPTH / L,
  localparam int unsigned AW = idx_w(DEPTH),
  localparam int unsigned LW = idx_w(L),
  localparam int unsigned PW = idx_w(N),
  localparam int unsigned DW = (K > W) ? K : W
) (
  input  logic          clk,
  input  logic          rst_n,
  // search
  input  logic          search_valid,
  input  logic [C-1:0]  key,
  output logic          ma_valid,
  output logic          match,
  output logic [AW-1:0] ma,
  // table write
  input  logic          wr_en,
  input  logic [LW-1:0] wr_layer,
  input  mem_sel_e      wr_mem,
  input  logic [PW-1:0] wr_part,
  input  logic [W-1:0]  wr_addr,
  input  logic [DW-1:0] wr_data
);

  // Sub-word 1 is the most significant W bits of the key, sub-word N the
  // least significant, as the table columns read from left to right.
  logic [W-1:0]  sw [N];
  logic [L-1:0]  res_valid;
  logic [L-1:0]  pma_hit;
  logic [AW-1:0] pma [L];

  always_comb begin
    for (int n = 0; n < N; n++) sw[n] = key[C-1-n*W -: W];
  end

  for (genvar l = 0; l < L; l++) begin : g_layer
    ztcam_layer #(
      .N(N), .W(W), .K(K), .AW(AW), .LAYER_ID(l)
    ) u_layer (
      .clk          (clk),
      .rst_n        (rst_n),
      .search_valid (search_valid),
      .sw           (sw),
      .res_valid    (res_valid[l]),
      .pma_hit      (pma_hit[l]),
      .pma          (pma[l]),
      .wr_en        (wr_en && wr_layer == LW'(l)),
      .wr_mem       (wr_mem),
      .wr_part      (wr_part),
      .wr_addr      (wr_addr),
      .wr_data      (wr_data)
    );
  end

  ztcam_cpe #(.L(L), .AW(AW)) u_cpe (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (&res_valid),
    .pma_hit  (pma_hit),
    .pma      (pma),
    .ma_valid (ma_valid),
    .match    (match),
    .ma       (ma)
  );

  if (C % N != 0) begin : g_bad_n
    $error("C (%0d) must be a multiple of N (%0d)", C, N);
  end
  if (DEPTH % L != 0) begin : g_bad_l
    $error("DEPTH (%0d) must be a multiple of L (%0d)", DEPTH, L);
  end

  // All layers run in lockstep, so they report a search in the same cycle.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               (res_valid == '0) || (res_valid == '1))
    else $error("layers out of step: res_valid = %b", res_valid);

  a_wr_layer: assert property (@(posedge clk) disable iff (!rst_n)
                               wr_en |-> (int'(wr_layer) < L))
    else $error("write to layer %0d of %0d", wr_layer, L);

endmodule
