// Testbench of the CAM priority encoder: random layer hits and PMAs, the
// expected match address being the PMA of the lowest layer that hits, one
// clock after the inputs; also checks that reset clears the valid flag.
module tb_ztcam_cpe;
  localparam int unsigned L = 4, AW = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [L-1:0] pma_hit = '0;
  logic [AW-1:0] pma [L];
  logic ma_valid, match;
  logic [AW-1:0] ma;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  ztcam_cpe #(.L(L), .AW(AW)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < L; l++) pma[l] = '0;
    in_valid = 1'b1;
    @(negedge clk); @(negedge clk);
    checks++;
    if (ma_valid !== 1'b0) begin failures++; $display("FAIL: valid during reset"); end
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      logic exp_v, exp_m;
      logic [AW-1:0] exp_a;
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      pma_hit = L'($urandom);
      // Layer l reports an address of its own range l*16 .. l*16+15.
      for (int l = 0; l < L; l++) pma[l] = AW'(l * 16 + $urandom_range(0, 15));
      exp_v = in_valid;
      exp_m = 1'b0;
      exp_a = '0;
      if (in_valid) begin
        for (int l = 0; l < L; l++) if (!exp_m && pma_hit[l]) begin exp_m = 1'b1; exp_a = pma[l]; end
      end
      @(negedge clk);
      checks++;
      if (ma_valid !== exp_v || match !== exp_m || (exp_m && ma !== exp_a)) begin
        failures++;
        $display("FAIL: hit %b got v=%0d m=%0d ma=%0d, expected v=%0d m=%0d ma=%0d",
                 pma_hit, ma_valid, match, ma, exp_v, exp_m, exp_a);
      end
      in_valid = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
