// Testbench of the K-bit AND: random OAT rows, sparse and dense, with each
// result bit checked against a count of the rows holding that bit.
module tb_ztcam_andk;
  localparam int unsigned N = 4, K = 16;
  logic [K-1:0] rows [N];
  logic [K-1:0] match_vec;
  int unsigned checks = 0, failures = 0;

  ztcam_andk #(.N(N), .K(K)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      for (int n = 0; n < N; n++)
        rows[n] = K'($urandom) | K'($urandom) | ((t % 2) ? K'($urandom) : '0);
      #1;
      for (int i = 0; i < K; i++) begin
        int unsigned ones;
        ones = 0;
        for (int n = 0; n < N; n++) ones += rows[n][i];
        checks++;
        if (match_vec[i] !== (ones == N)) begin
          failures++;
          $display("FAIL: bit %0d is %0d with %0d of %0d rows set", i, match_vec[i], ones, N);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
