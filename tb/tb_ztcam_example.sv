// Whole-design run of the worked example of the architecture: a 4 x 4
// ternary table (entries 0011, 0101, 0x11, 111x) in two layers of two
// entries, each cut into two 2-bit sub-words. The table is mapped through the
// mapping model; the memories of layer 2 are compared word by word with the
// mapping tables of the example; the key 0011 must give PMA 0 in layer 1,
// PMA 2 in layer 2 and match address 0. All 16 keys are then searched back
// to back and compared with a direct ternary match.
module tb_ztcam_example;
  import ztcam_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic search_valid = 1'b0;
  logic [3:0] key = '0;
  logic ma_valid, match;
  logic [1:0] ma;
  logic wr_en;
  logic [0:0] wr_layer;
  mem_sel_e wr_mem;
  logic [0:0] wr_part;
  logic [1:0] wr_addr;
  logic [1:0] wr_data;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  ztcam #(.C(4), .DEPTH(4), .L(2), .N(2)) dut (.*);
  ztcam_map_model #(.C(4), .DEPTH(4), .L(2), .N(2)) u_map (.*);

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s = %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic hit; int unsigned addr; } exp_t;
  exp_t q[$];
  always @(posedge clk) begin
    if (rst_n && ma_valid && q.size() > 0) begin
      exp_t e;
      e = q.pop_front();
      expect_eq("match", match, e.hit);
      if (e.hit) expect_eq("MA", ma, e.addr);
    end
  end

  initial begin
    // value / care; care 0 marks an x
    u_map.tval[0] = 4'b0011; u_map.tcare[0] = 4'b1111;
    u_map.tval[1] = 4'b0101; u_map.tcare[1] = 4'b1111;
    u_map.tval[2] = 4'b0011; u_map.tcare[2] = 4'b1011;
    u_map.tval[3] = 4'b1110; u_map.tcare[3] = 4'b1110;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    u_map.load();

    // Layer 2 against the mapping tables (OAT bit 0 = address 2).
    expect_eq("VM21[0]", dut.g_layer[1].u_layer.g_part[0].u_vm.mem[0], 1);
    expect_eq("VM21[1]", dut.g_layer[1].u_layer.g_part[0].u_vm.mem[1], 1);
    expect_eq("VM21[2]", dut.g_layer[1].u_layer.g_part[0].u_vm.mem[2], 0);
    expect_eq("VM21[3]", dut.g_layer[1].u_layer.g_part[0].u_vm.mem[3], 1);
    expect_eq("VM22[0]", dut.g_layer[1].u_layer.g_part[1].u_vm.mem[0], 0);
    expect_eq("VM22[1]", dut.g_layer[1].u_layer.g_part[1].u_vm.mem[1], 0);
    expect_eq("VM22[2]", dut.g_layer[1].u_layer.g_part[1].u_vm.mem[2], 1);
    expect_eq("VM22[3]", dut.g_layer[1].u_layer.g_part[1].u_vm.mem[3], 1);
    expect_eq("OATAM21[0]", dut.g_layer[1].u_layer.g_part[0].u_oatam.mem[0], 0);
    expect_eq("OATAM21[1]", dut.g_layer[1].u_layer.g_part[0].u_oatam.mem[1], 1);
    expect_eq("OATAM21[3]", dut.g_layer[1].u_layer.g_part[0].u_oatam.mem[3], 2);
    expect_eq("OATAM22[2]", dut.g_layer[1].u_layer.g_part[1].u_oatam.mem[2], 0);
    expect_eq("OATAM22[3]", dut.g_layer[1].u_layer.g_part[1].u_oatam.mem[3], 1);
    expect_eq("OAT21[0]", dut.g_layer[1].u_layer.g_part[0].u_oat.mem[0], 2'b01);
    expect_eq("OAT21[1]", dut.g_layer[1].u_layer.g_part[0].u_oat.mem[1], 2'b01);
    expect_eq("OAT21[2]", dut.g_layer[1].u_layer.g_part[0].u_oat.mem[2], 2'b10);
    expect_eq("OAT22[0]", dut.g_layer[1].u_layer.g_part[1].u_oat.mem[0], 2'b10);
    expect_eq("OAT22[1]", dut.g_layer[1].u_layer.g_part[1].u_oat.mem[1], 2'b11);

    // Search 0011.
    @(negedge clk);
    search_valid = 1'b1; key = 4'b0011;
    @(negedge clk);
    search_valid = 1'b0;
    repeat (2) @(negedge clk);
    expect_eq("PMA1 hit", dut.pma_hit[0], 1);
    expect_eq("PMA1", dut.pma[0], 0);
    expect_eq("PMA2 hit", dut.pma_hit[1], 1);
    expect_eq("PMA2", dut.pma[1], 2);
    expect_eq("MA not before 4 clocks", ma_valid, 0);
    @(negedge clk);
    expect_eq("MA valid after 4 clocks", ma_valid, 1);
    expect_eq("match", match, 1);
    expect_eq("MA", ma, 0);
    repeat (2) @(negedge clk);

    // All keys, one per clock.
    for (int k = 0; k < 16; k++) begin
      exp_t e;
      @(negedge clk);
      search_valid = 1'b1; key = 4'(k);
      u_map.ref_search(key, e.hit, e.addr);
      q.push_back(e);
    end
    @(negedge clk);
    search_valid = 1'b0;
    repeat (6) @(negedge clk);
    expect_eq("results outstanding", q.size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
