// One Z-TCAM configuration under test, for the configuration sweep.
//
// Instantiates the Z-TCAM with the given size and partitioning, loads a
// random ternary table through the mapping model, runs SEARCHES searches one
// per clock (keys drawn from table entries, entries with one bit flipped, and
// random keys) and compares each match address, four clocks after its key,
// with a direct ternary match. Reports its counts and raises done at the end.
module ztcam_workload_run
  import ztcam_pkg::*;
#(
  parameter int unsigned C        = 32,
  parameter int unsigned DEPTH    = 64,
  parameter int unsigned L        = 4,
  parameter int unsigned N        = 4,
  parameter int unsigned SEARCHES = 1000
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        done,
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned hits
);
  localparam int unsigned W = C / N, K = DEPTH / L;
  localparam int unsigned AW = idx_w(DEPTH), LW = idx_w(L), PW = idx_w(N);
  localparam int unsigned DW = (K > W) ? K : W;

  logic          search_valid = 1'b0;
  logic [C-1:0]  key = '0;
  logic          ma_valid, match;
  logic [AW-1:0] ma;
  logic          wr_en;
  logic [LW-1:0] wr_layer;
  mem_sel_e      wr_mem;
  logic [PW-1:0] wr_part;
  logic [W-1:0]  wr_addr;
  logic [DW-1:0] wr_data;
  longint unsigned cycle = 0;

  ztcam #(.C(C), .DEPTH(DEPTH), .L(L), .N(N)) dut (.*);
  ztcam_map_model #(.C(C), .DEPTH(DEPTH), .L(L), .N(N)) u_map (.*);

  typedef struct { logic hit; int unsigned addr; longint unsigned issued; } exp_t;
  exp_t q[$];

  initial begin
    done = 1'b0; checks = 0; failures = 0; hits = 0;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && ma_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
      end else begin
        e = q.pop_front();
        if (cycle - e.issued != 4 || match !== e.hit || (e.hit && ma !== AW'(e.addr))) begin
          failures++;
          $display("FAIL %0dx%0d L=%0d N=%0d: got match=%0d ma=%0d after %0d, expected match=%0d ma=%0d",
                   DEPTH, C, L, N, match, ma, cycle - e.issued, e.hit, e.addr);
        end
        if (e.hit) hits++;
      end
    end
  end

  initial begin
    for (int e = 0; e < DEPTH; e++) begin
      logic [C-1:0] care;
      care = {C{1'b1}};
      for (int b = 0; b < C; b++) if ($urandom_range(0, 3) == 0) care[b] = 1'b0;
      u_map.tcare[e] = care;
      for (int b = 0; b < C; b++) u_map.tval[e][b] = care[b] & 1'($urandom);
    end
    @(posedge rst_n);
    u_map.load();
    for (int i = 0; i < SEARCHES; i++) begin
      int unsigned e;
      logic [C-1:0] k;
      exp_t x;
      e = $urandom_range(0, DEPTH - 1);
      for (int b = 0; b < C; b++) k[b] = u_map.tcare[e][b] ? u_map.tval[e][b] : 1'($urandom);
      if (i % 4 == 1) k[$urandom_range(0, C - 1)] ^= 1'b1;
      if (i % 8 == 3) for (int b = 0; b < C; b++) k[b] = 1'($urandom);
      @(negedge clk);
      search_valid = 1'b1;
      key = k;
      u_map.ref_search(k, x.hit, x.addr);
      x.issued = cycle;
      q.push_back(x);
    end
    @(negedge clk);
    search_valid = 1'b0;
    repeat (6) @(negedge clk);
    checks++;
    if (q.size() != 0 || hits == 0) begin
      failures++;
      $display("FAIL %0dx%0d L=%0d N=%0d: %0d unanswered, %0d hits", DEPTH, C, L, N, q.size(), hits);
    end
    $display("config %0dx%0d L=%0d N=%0d (w=%0d, K=%0d): %0d checks, %0d hits, %0d failures, %0d words written",
             DEPTH, C, L, N, W, K, checks, hits, failures, u_map.words_written);
    done = 1'b1;
  end
endmodule
