// Reference model of the Z-TCAM table mapping and search, for testbenches.
//
// Holds a ternary table (value and care bits per entry; a care bit of 0 is a
// don't-care "x") and provides:
//   load()         maps the table into the memories of every layer through
//                  the write-port signals below, one word per clock,
//                  changing them on falling edges;
//   ref_search()   the expected result of a search, found by matching the
//                  key against every ternary entry directly.
// Mapping, for layer l and sub-word position n: the sub-word values s are
// visited in ascending order; the K-bit set of entries of the layer whose
// sub-word n matches s (don't-cares expanded) is formed; if it is not empty,
// VM[s] = 1, OATAM[s] = next free OAT row r and OAT[r] = that set, else
// VM[s] = 0. Bit i of an OAT row stands for entry l*K + i. Numbering the
// distinct sub-words in ascending order reproduces the worked example of the
// architecture.
module ztcam_map_model
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
  output logic          wr_en,
  output logic [LW-1:0] wr_layer,
  output mem_sel_e      wr_mem,
  output logic [PW-1:0] wr_part,
  output logic [W-1:0]  wr_addr,
  output logic [DW-1:0] wr_data
);

  logic [C-1:0] tval  [DEPTH];
  logic [C-1:0] tcare [DEPTH];
  int unsigned  words_written;

  initial begin
    wr_en = 1'b0;
    wr_layer = '0;
    wr_mem = MEM_VM;
    wr_part = '0;
    wr_addr = '0;
    wr_data = '0;
    words_written = 0;
  end

  function automatic logic entry_matches(int unsigned e, logic [C-1:0] key);
    return ((key ^ tval[e]) & tcare[e]) == '0;
  endfunction

  // Lowest matching address, as a ternary CAM reports it.
  function automatic void ref_search(input logic [C-1:0] key,
                                     output logic hit, output int unsigned addr);
    hit = 1'b0;
    addr = 0;
    for (int e = DEPTH - 1; e >= 0; e--) begin
      if (entry_matches(e, key)) begin
        hit = 1'b1;
        addr = e;
      end
    end
  endfunction

  function automatic int unsigned count_matches(input logic [C-1:0] key);
    int unsigned c = 0;
    for (int e = 0; e < DEPTH; e++) if (entry_matches(e, key)) c++;
    return c;
  endfunction

  task automatic write_word(int unsigned l, mem_sel_e m, int unsigned n,
                            int unsigned a, logic [DW-1:0] d);
    @(negedge clk);
    wr_en    = 1'b1;
    wr_layer = LW'(l);
    wr_mem   = m;
    wr_part  = PW'(n);
    wr_addr  = W'(a);
    wr_data  = d;
    words_written++;
  endtask

  task automatic load();
    for (int unsigned l = 0; l < L; l++) begin
      for (int unsigned n = 0; n < N; n++) begin
        int unsigned row = 0;
        for (int unsigned s = 0; s < 2 ** W; s++) begin
          logic [K-1:0] vec = '0;
          for (int unsigned i = 0; i < K; i++) begin
            int unsigned e = l * K + i;
            logic [W-1:0] v = tval[e][C-1-n*W -: W];
            logic [W-1:0] c = tcare[e][C-1-n*W -: W];
            vec[i] = ((W'(s) ^ v) & c) == '0;
          end
          if (vec != '0) begin
            write_word(l, MEM_VM, n, s, DW'(1));
            write_word(l, MEM_OATAM, n, s, DW'(row));
            write_word(l, MEM_OAT, n, row, DW'(vec));
            row++;
          end else begin
            write_word(l, MEM_VM, n, s, DW'(0));
          end
        end
      end
    end
    @(negedge clk);
    wr_en = 1'b0;
  endtask

endmodule
