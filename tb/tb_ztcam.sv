// End-to-end testbench of the Z-TCAM at its default size (64 x 32, L = 4,
// N = 4).
//
// A random ternary table is mapped into the memories through the write port
// and searched with one key per clock. Keys are built from table entries
// (don't-cares filled at random), from entries with one cared-for bit
// flipped, and at random, and every result is compared with a direct ternary
// match of the key against the table (lowest matching address wins). The
// testbench also checks the latency (PMAs three clocks and the match address
// four clocks after the key), that the pipeline takes a key every clock, and
// counts how often each mechanism of the design was exercised: a VM
// rejecting a sub-word, validated sub-words whose OAT rows AND to zero, a
// layer resolving several matches, several layers matching at once, a match
// through don't-care bits, a total miss. A mechanism never seen is a failure.
// The table is then rewritten with a second random table and searched again.
module tb_ztcam;
  import ztcam_pkg::*;

  localparam int unsigned C = 32, DEPTH = 64, L = 4, N = 4;
  localparam int unsigned W = C / N, K = DEPTH / L;
  localparam int unsigned AW = idx_w(DEPTH), LW = idx_w(L), PW = idx_w(N);
  localparam int unsigned DW = (K > W) ? K : W;
  localparam int unsigned SEARCHES = 4000;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
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

  int unsigned checks = 0, failures = 0;
  longint unsigned cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  ztcam dut (.*);   // default parameters

  ztcam_map_model #(.C(C), .DEPTH(DEPTH), .L(L), .N(N)) u_map (
    .clk(clk), .wr_en(wr_en), .wr_layer(wr_layer), .wr_mem(wr_mem),
    .wr_part(wr_part), .wr_addr(wr_addr), .wr_data(wr_data)
  );

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ mechanism counters
  int unsigned n_vm_reject = 0, n_and_empty = 0, n_lpe_multi = 0;
  int unsigned n_cpe_multi = 0, n_dontcare_hit = 0, n_miss = 0;
  int unsigned n_back_to_back = 0, n_pma_late = 0;
  logic [L-1:0] layer_hit_now;

  for (genvar l = 0; l < L; l++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n && dut.g_layer[l].u_layer.v1 && !dut.g_layer[l].u_layer.activation)
        n_vm_reject++;
      if (rst_n && dut.g_layer[l].u_layer.a3 && !dut.g_layer[l].u_layer.lpe_hit)
        n_and_empty++;
      if (rst_n && dut.g_layer[l].u_layer.a3 &&
          $countones(dut.g_layer[l].u_layer.match_vec) > 1)
        n_lpe_multi++;
    end
    assign layer_hit_now[l] = dut.pma_hit[l];
  end

  always @(posedge clk) begin
    if (rst_n && $countones(layer_hit_now) > 1) n_cpe_multi++;
  end

  // --------------------------------------------------- result scoreboarding
  typedef struct {
    logic [C-1:0]    key;
    logic            hit;
    int unsigned     addr;
    longint unsigned issued;
  } exp_t;
  exp_t q[$];
  longint unsigned pq[$];   // issue cycles of searches whose PMAs are due

  // Sampled at each rising edge: the key presented at edge t must produce the
  // layers' res_valid after edge t+3 and ma_valid after edge t+4.
  always @(posedge clk) begin
    if (rst_n && dut.res_valid != '0) begin
      if (pq.size() == 0 || cycle - pq.pop_front() != 3) n_pma_late++;
    end
    if (rst_n && ma_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: result with no search outstanding");
      end else begin
        e = q.pop_front();
        if (cycle - e.issued != 4) begin
          failures++;
          $display("FAIL: latency %0d, expected 4", cycle - e.issued);
        end
        if (match !== e.hit || (e.hit && ma !== AW'(e.addr))) begin
          failures++;
          $display("FAIL: key %h got match=%0d ma=%0d, expected match=%0d ma=%0d",
                   e.key, match, ma, e.hit, e.addr);
        end
        if (!e.hit) n_miss++;
        else if (u_map.tcare[e.addr] != '1) n_dontcare_hit++;
      end
    end
  end

  // ------------------------------------------------------------- stimulus
  task automatic random_table();
    for (int e = 0; e < DEPTH; e++) begin
      int unsigned style = $urandom_range(0, 3);
      logic [C-1:0] care;
      case (style)
        0: care = '1;                                     // binary entry
        1: care = C'({$urandom, $urandom});               // about half x
        2: care = ~C'((64'(1) << $urandom_range(1, 16)) - 1); // prefix
        default: care = C'({$urandom, $urandom}) | C'({$urandom, $urandom});
      endcase
      u_map.tcare[e] = care;
      // Copy part of an earlier entry so that entries overlap and keys
      // match in several places.
      if (e > 0 && $urandom_range(0, 2) == 0)
        u_map.tval[e] = u_map.tval[$urandom_range(0, e - 1)] & care;
      else
        u_map.tval[e] = C'({$urandom, $urandom}) & care;
    end
  endtask

  function automatic logic [C-1:0] make_key(int unsigned kind);
    int unsigned e = $urandom_range(0, DEPTH - 1);
    logic [C-1:0] fill = C'({$urandom, $urandom});
    logic [C-1:0] k = (u_map.tval[e] & u_map.tcare[e]) | (fill & ~u_map.tcare[e]);
    case (kind)
      0: return k;
      1: return k ^ (C'(1) << $urandom_range(0, C - 1));
      default: return fill;
    endcase
  endfunction

  task automatic run_searches(int unsigned count);
    for (int unsigned i = 0; i < count; i++) begin
      exp_t e;
      logic [C-1:0] k = make_key($urandom_range(0, 3) == 0 ? 1 :
                                 ($urandom_range(0, 5) == 0 ? 2 : 0));
      // Mostly back-to-back, sometimes with an idle cycle in between.
      if ($urandom_range(0, 7) == 0) begin
        @(negedge clk);
        search_valid = 1'b0;
      end
      @(negedge clk);
      if (search_valid) n_back_to_back++;
      search_valid = 1'b1;
      key = k;
      e.key = k;
      u_map.ref_search(k, e.hit, e.addr);
      // Monitors read the edge count from before the edge they run at, so
      // the value now is what they see at the edge that samples this key.
      e.issued = cycle;
      q.push_back(e);
      pq.push_back(cycle);
    end
    @(negedge clk);
    search_valid = 1'b0;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 2; round++) begin
      random_table();
      u_map.load();
      run_searches(SEARCHES);
    end
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d searches never answered", q.size());
    end

    $display("mechanisms: vm_reject=%0d and_empty=%0d lpe_multi=%0d cpe_multi=%0d dontcare_hit=%0d miss=%0d back_to_back=%0d",
             n_vm_reject, n_and_empty, n_lpe_multi, n_cpe_multi, n_dontcare_hit,
             n_miss, n_back_to_back);
    checks += 8;
    if (n_vm_reject == 0)    begin failures++; $display("FAIL: no VM rejection seen"); end
    if (n_and_empty == 0)    begin failures++; $display("FAIL: no empty K-bit AND seen"); end
    if (n_lpe_multi == 0)    begin failures++; $display("FAIL: no multi-match layer seen"); end
    if (n_cpe_multi == 0)    begin failures++; $display("FAIL: no multi-layer match seen"); end
    if (n_dontcare_hit == 0) begin failures++; $display("FAIL: no don't-care match seen"); end
    if (n_miss == 0)         begin failures++; $display("FAIL: no miss seen"); end
    if (n_back_to_back == 0) begin failures++; $display("FAIL: no back-to-back searches"); end
    if (n_pma_late != 0)     begin failures++; $display("FAIL: %0d PMAs not 3 clocks after their key", n_pma_late); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
