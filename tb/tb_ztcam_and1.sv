// Testbench of the 1-bit AND: every combination of N = 4 VM bits, with the
// expected activation worked out by comparing with the all-ones pattern.
module tb_ztcam_and1;
  localparam int unsigned N = 4;
  logic [N-1:0] vm_bits = '0;
  logic activation;
  int unsigned checks = 0, failures = 0;

  ztcam_and1 #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2**N; v++) begin
      vm_bits = N'(v);
      #1;
      checks++;
      if (activation !== (v == 2**N - 1)) begin
        failures++;
        $display("FAIL: vm_bits %b activation %0d", vm_bits, activation);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
