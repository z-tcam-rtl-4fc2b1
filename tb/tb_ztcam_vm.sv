// Testbench of the validation memory: fills it through the write port, keeps
// a shadow copy, and checks random reads one clock after the address,
// including reads of the word being written in the same cycle (old value).
module tb_ztcam_vm;
  localparam int unsigned W = 8;
  logic clk = 1'b0;
  logic [W-1:0] rd_addr = '0, wr_addr = '0;
  logic rd_data, wr_en = 1'b0, wr_data = 1'b0;
  logic shadow [2**W];
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  ztcam_vm #(.W(W)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**W; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = W'(a); wr_data = 1'($urandom);
      shadow[a] = wr_data;
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      logic exp;
      @(negedge clk);
      rd_addr = W'($urandom);
      exp = shadow[rd_addr];
      wr_en = 1'($urandom);
      wr_addr = ($urandom_range(0, 3) == 0) ? rd_addr : W'($urandom);
      wr_data = 1'($urandom);
      @(posedge clk);
      if (wr_en) shadow[wr_addr] = wr_data;
      @(negedge clk);
      wr_en = 1'b0;
      checks++;
      if (rd_data !== exp) begin
        failures++;
        $display("FAIL: addr %0d read %0d expected %0d", rd_addr, rd_data, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
