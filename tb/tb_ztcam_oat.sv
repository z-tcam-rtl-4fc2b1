// Testbench of the original address table: fills it through the write port,
// keeps a shadow copy, and checks that an enabled read returns the row one
// clock later (old row on a same-cycle write) and that a disabled read
// leaves the output unchanged.
module tb_ztcam_oat;
  localparam int unsigned W = 8, K = 16;
  logic clk = 1'b0;
  logic rd_en = 1'b0, wr_en = 1'b0;
  logic [W-1:0] rd_addr = '0, wr_addr = '0;
  logic [K-1:0] rd_data, wr_data = '0;
  logic [K-1:0] shadow [2**W];
  logic [K-1:0] last = '0;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  ztcam_oat #(.W(W), .K(K)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**W; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = W'(a); wr_data = K'($urandom);
      shadow[a] = wr_data;
    end
    @(negedge clk);
    wr_en = 1'b0;
    rd_en = 1'b1;
    @(negedge clk);
    last = rd_data;
    for (int i = 0; i < 2000; i++) begin
      logic [K-1:0] exp;
      @(negedge clk);
      rd_en = ($urandom_range(0, 3) != 0);
      rd_addr = W'($urandom);
      exp = rd_en ? shadow[rd_addr] : last;
      wr_en = 1'($urandom);
      wr_addr = ($urandom_range(0, 3) == 0) ? rd_addr : W'($urandom);
      wr_data = K'($urandom);
      @(posedge clk);
      if (wr_en) shadow[wr_addr] = wr_data;
      @(negedge clk);
      wr_en = 1'b0;
      rd_en = 1'b0;
      checks++;
      if (rd_data !== exp) begin
        failures++;
        $display("FAIL: rd_en %0d addr %0d read %h expected %h", rd_en, rd_addr, rd_data, exp);
      end
      last = rd_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
