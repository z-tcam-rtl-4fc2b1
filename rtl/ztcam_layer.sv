// One layer of the Z-TCAM.
//
// A layer covers K consecutive entries of the ternary table (original
// addresses LAYER_ID*K .. LAYER_ID*K+K-1), cut into N sub-word partitions of
// W bits. Per partition it holds a validation memory (VM), an OAT address
// memory (OATAM) and an original address table (OAT). A search reads the VMs
// with the N sub-words of the key; if all of them are 1 (1-bit AND, the
// activation signal) the OATAMs are read with the same sub-words, their
// outputs (OATAs) select one row of each OAT, the rows are ANDed bit by bit
// (K-bit AND) and the layer priority encoder picks the lowest matching
// address as the potential match address (PMA). This structure is the one of
// the architecture; register placement is this design's choice.
//
// Timing: a three-stage pipeline that accepts one search per clock.
//   edge 1: VMs read with the sub-words
//   edge 2: OATAMs read, enabled by the activation signal
//   edge 3: OATs read, enabled by the activation carried one stage on
// After edge 3 the K-bit AND and the LPE settle combinationally, so res_valid,
// pma_hit and pma belong to the search presented three clocks earlier.
// pma_hit is 0 when a VM rejects a sub-word or when the ANDed rows are all 0.
// pma is the full table address, LAYER_ID*K plus the LPE index; in layer 0
// its bits above the index are therefore constant 0.
//
// Write port: wr_mem selects VM, OATAM or OAT, wr_part the partition,
// wr_addr the word; wr_data carries the word right-aligned. Writes and
// searches may share a cycle; a search then sees the old word.
// rst_n is an active-low synchronous reset of the pipeline valid flags only.
module ztcam_layer
  import ztcam_pkg::*;
#(
  parameter int unsigned N        = 4,
  parameter int unsigned W        = 8,
  parameter int unsigned K        = 16,
  parameter int unsigned AW       = 6,
  parameter int unsigned LAYER_ID = 0,
  localparam int unsigned PW = idx_w(N),
  localparam int unsigned DW = (K > W) ? K : W,
  localparam int unsigned IW = idx_w(K)
) (
  input  logic          clk,
  input  logic          rst_n,
  // search
  input  logic          search_valid,
  input  logic [W-1:0]  sw [N],
  output logic          res_valid,
  output logic          pma_hit,
  output logic [AW-1:0] pma,
  // table write
  input  logic          wr_en,
  input  mem_sel_e      wr_mem,
  input  logic [PW-1:0] wr_part,
  input  logic [W-1:0]  wr_addr,
  input  logic [DW-1:0] wr_data
);

  logic [N-1:0] vm_bit;
  logic [W-1:0] sw_d1 [N];
  logic [W-1:0] oata  [N];
  logic [K-1:0] row   [N];
  logic         activation;
  logic         v1, v2, v3;   // search in flight at each stage
  logic         a2, a3;       // search still alive after the VM check
  logic [K-1:0] match_vec;
  logic         lpe_hit;
  logic [IW-1:0] lpe_idx;

  for (genvar n = 0; n < N; n++) begin : g_part
    logic sel;
    assign sel = wr_en && (wr_part == PW'(n));

    ztcam_vm #(.W(W)) u_vm (
      .clk     (clk),
      .rd_addr (sw[n]),
      .rd_data (vm_bit[n]),
      .wr_en   (sel && wr_mem == MEM_VM),
      .wr_addr (wr_addr),
      .wr_data (wr_data[0])
    );

    ztcam_oatam #(.W(W)) u_oatam (
      .clk     (clk),
      .rd_en   (v1 && activation),
      .rd_addr (sw_d1[n]),
      .rd_data (oata[n]),
      .wr_en   (sel && wr_mem == MEM_OATAM),
      .wr_addr (wr_addr),
      .wr_data (wr_data[W-1:0])
    );

    ztcam_oat #(.W(W), .K(K)) u_oat (
      .clk     (clk),
      .rd_en   (a2),
      .rd_addr (oata[n]),
      .rd_data (row[n]),
      .wr_en   (sel && wr_mem == MEM_OAT),
      .wr_addr (wr_addr),
      .wr_data (wr_data[K-1:0])
    );

    always_ff @(posedge clk) sw_d1[n] <= sw[n];
  end

  ztcam_and1 #(.N(N)) u_and1 (
    .vm_bits    (vm_bit),
    .activation (activation)
  );

  ztcam_andk #(.N(N), .K(K)) u_andk (
    .rows      (row),
    .match_vec (match_vec)
  );

  ztcam_lpe #(.K(K)) u_lpe (
    .match_vec (match_vec),
    .hit       (lpe_hit),
    .idx       (lpe_idx)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      v3 <= 1'b0;
      a2 <= 1'b0;
      a3 <= 1'b0;
    end else begin
      v1 <= search_valid;
      v2 <= v1;
      v3 <= v2;
      a2 <= v1 && activation;
      a3 <= a2;
    end
  end

  assign res_valid = v3;
  assign pma_hit   = a3 && lpe_hit;
  assign pma       = AW'(LAYER_ID * K) + AW'(lpe_idx);

  a_wr_part: assert property (@(posedge clk) disable iff (!rst_n)
                              wr_en |-> (int'(wr_part) < N))
    else $error("write to partition %0d of a layer with %0d partitions", wr_part, N);

endmodule
