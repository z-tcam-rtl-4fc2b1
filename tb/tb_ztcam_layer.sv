// Testbench of one Z-TCAM layer, in two parts.
//
// Part 1, the worked example of the architecture: layer 2 of a 4 x 4 table
// (entries 2 = "0x11" and 3 = "111x", N = 2, w = 2, K = 2). Its VM, OATAM and
// OAT words are written by hand from the mapping tables, the key 0011 is
// searched and every stage is checked: VM bits 1 and 1, OATAs 0 and 1, OAT
// rows "10" and "11" (address 2 first), AND result "10", PMA 2, three clocks
// after the key. Then all 16 keys are searched and compared with a direct
// ternary match of the two entries.
//
// Part 2, a default-size layer (N = 4, w = 8, K = 16) loaded with a random
// table through the mapping model and searched with random keys, one per
// clock, the PMA checked against a direct ternary match.
module tb_ztcam_layer;
  import ztcam_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int unsigned checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s = %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- part 1
  logic         s_valid = 1'b0;
  logic [1:0]   s_sw [2];
  logic         s_res_valid, s_hit;
  logic [1:0]   s_pma;
  logic         s_wr_en = 1'b0;
  mem_sel_e     s_wr_mem = MEM_VM;
  logic [0:0]   s_wr_part = '0;
  logic [1:0]   s_wr_addr = '0;
  logic [1:0]   s_wr_data = '0;

  ztcam_layer #(.N(2), .W(2), .K(2), .AW(2), .LAYER_ID(1)) u_small (
    .clk(clk), .rst_n(rst_n), .search_valid(s_valid), .sw(s_sw),
    .res_valid(s_res_valid), .pma_hit(s_hit), .pma(s_pma),
    .wr_en(s_wr_en), .wr_mem(s_wr_mem), .wr_part(s_wr_part),
    .wr_addr(s_wr_addr), .wr_data(s_wr_data)
  );

  task automatic sw_write(mem_sel_e m, int p, int a, int d);
    @(negedge clk);
    s_wr_en = 1'b1; s_wr_mem = m; s_wr_part = 1'(p);
    s_wr_addr = 2'(a); s_wr_data = 2'(d);
  endtask

  // Mapping tables of the example. OAT rows are written with bit 0 standing
  // for address 2 and bit 1 for address 3, so the printed row "1 0" is 2'b01.
  task automatic load_example();
    // partition 1: sub-words 00, 01 (from 0x) and 11
    sw_write(MEM_VM, 0, 0, 1); sw_write(MEM_VM, 0, 1, 1);
    sw_write(MEM_VM, 0, 2, 0); sw_write(MEM_VM, 0, 3, 1);
    sw_write(MEM_OATAM, 0, 0, 0); sw_write(MEM_OATAM, 0, 1, 1); sw_write(MEM_OATAM, 0, 3, 2);
    sw_write(MEM_OAT, 0, 0, 2'b01); sw_write(MEM_OAT, 0, 1, 2'b01); sw_write(MEM_OAT, 0, 2, 2'b10);
    // partition 2: sub-words 10 and 11 (from 11 and 1x)
    sw_write(MEM_VM, 1, 0, 0); sw_write(MEM_VM, 1, 1, 0);
    sw_write(MEM_VM, 1, 2, 1); sw_write(MEM_VM, 1, 3, 1);
    sw_write(MEM_OATAM, 1, 2, 0); sw_write(MEM_OATAM, 1, 3, 1);
    sw_write(MEM_OAT, 1, 0, 2'b10); sw_write(MEM_OAT, 1, 1, 2'b11);
    @(negedge clk);
    s_wr_en = 1'b0;
  endtask

  task automatic example_search();
    @(negedge clk);
    s_valid = 1'b1; s_sw[0] = 2'b00; s_sw[1] = 2'b11;
    @(negedge clk);
    s_valid = 1'b0;
    expect_eq("VM21 bit", u_small.vm_bit[0], 1);
    expect_eq("VM22 bit", u_small.vm_bit[1], 1);
    expect_eq("activation", u_small.activation, 1);
    expect_eq("result valid too early", s_res_valid, 0);
    @(negedge clk);
    expect_eq("OATA21", u_small.oata[0], 0);
    expect_eq("OATA22", u_small.oata[1], 1);
    @(negedge clk);
    expect_eq("OAT21 row", u_small.row[0], 2'b01);
    expect_eq("OAT22 row", u_small.row[1], 2'b11);
    expect_eq("K-bit AND", u_small.match_vec, 2'b01);
    expect_eq("result valid after 3 clocks", s_res_valid, 1);
    expect_eq("PMA hit", s_hit, 1);
    expect_eq("PMA", s_pma, 2);
  endtask

  task automatic example_all_keys();
    for (int k = 0; k < 16; k++) begin
      logic [3:0] key = 4'(k);
      logic m2 = ((key ^ 4'b0011) & 4'b1011) == 0;   // entry 2: 0x11
      logic m3 = ((key ^ 4'b1110) & 4'b1110) == 0;   // entry 3: 111x
      @(negedge clk);
      s_valid = 1'b1; s_sw[0] = key[3:2]; s_sw[1] = key[1:0];
      @(negedge clk);
      s_valid = 1'b0;
      repeat (2) @(negedge clk);
      expect_eq($sformatf("key %b hit", key), s_hit, m2 | m3);
      if (m2 | m3) expect_eq($sformatf("key %b PMA", key), s_pma, m2 ? 2 : 3);
    end
  endtask

  // ------------------------------------------------------------- part 2
  localparam int unsigned C = 32, N = 4, W = 8, K = 16, AW = 4;
  logic          b_valid = 1'b0;
  logic [W-1:0]  b_sw [N];
  logic          b_res_valid, b_hit;
  logic [AW-1:0] b_pma;
  logic          b_wr_en;
  logic [0:0]    b_wr_layer;
  mem_sel_e      b_wr_mem;
  logic [1:0]    b_wr_part;
  logic [W-1:0]  b_wr_addr;
  logic [K-1:0]  b_wr_data;

  ztcam_layer #(.N(N), .W(W), .K(K), .AW(AW), .LAYER_ID(0)) u_big (
    .clk(clk), .rst_n(rst_n), .search_valid(b_valid), .sw(b_sw),
    .res_valid(b_res_valid), .pma_hit(b_hit), .pma(b_pma),
    .wr_en(b_wr_en), .wr_mem(b_wr_mem), .wr_part(b_wr_part),
    .wr_addr(b_wr_addr), .wr_data(b_wr_data)
  );

  ztcam_map_model #(.C(C), .DEPTH(K), .L(1), .N(N)) u_map (
    .clk(clk), .wr_en(b_wr_en), .wr_layer(b_wr_layer), .wr_mem(b_wr_mem),
    .wr_part(b_wr_part), .wr_addr(b_wr_addr), .wr_data(b_wr_data)
  );

  typedef struct { logic hit; int unsigned addr; } exp_t;
  exp_t q[$];
  int unsigned n_hits = 0;

  always @(posedge clk) begin
    if (rst_n && b_res_valid) begin
      exp_t e;
      e = q.pop_front();
      checks++;
      if (b_hit !== e.hit || (e.hit && b_pma !== AW'(e.addr))) begin
        failures++;
        $display("FAIL: layer got hit=%0d pma=%0d, expected hit=%0d pma=%0d",
                 b_hit, b_pma, e.hit, e.addr);
      end
      if (e.hit) n_hits++;
    end
  end

  task automatic random_layer();
    for (int e = 0; e < K; e++) begin
      u_map.tcare[e] = C'($urandom) | C'($urandom) | (e % 2 ? C'($urandom) : '0);
      u_map.tval[e]  = C'($urandom) & u_map.tcare[e];
    end
    u_map.load();
    for (int t = 0; t < 2000; t++) begin
      int unsigned e = $urandom_range(0, K - 1);
      logic [C-1:0] key = (u_map.tval[e] & u_map.tcare[e]) | (C'($urandom) & ~u_map.tcare[e]);
      exp_t x;
      if (t % 3 == 0) key ^= C'(1) << $urandom_range(0, C - 1);
      @(negedge clk);
      b_valid = 1'b1;
      for (int n = 0; n < N; n++) b_sw[n] = key[C-1-n*W -: W];
      u_map.ref_search(key, x.hit, x.addr);
      q.push_back(x);
    end
    @(negedge clk);
    b_valid = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_hits == 0) begin
      failures++;
      $display("FAIL: %0d results missing, %0d hits", q.size(), n_hits);
    end
  endtask

  initial begin
    s_sw[0] = '0; s_sw[1] = '0;
    for (int n = 0; n < N; n++) b_sw[n] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    load_example();
    example_search();
    example_all_keys();
    random_layer();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
