// Testbench of the layer priority encoder: the empty vector, every single
// bit, and random vectors, checked against a scan for the lowest set bit.
module tb_ztcam_lpe;
  localparam int unsigned K = 16, IW = 4;
  logic [K-1:0] match_vec = '0;
  logic hit;
  logic [IW-1:0] idx;
  int unsigned checks = 0, failures = 0;

  ztcam_lpe #(.K(K)) dut (.*);

  task automatic check();
    int unsigned lowest = 0;
    logic any = 1'b0;
    for (int i = 0; i < K; i++) if (!any && match_vec[i]) begin any = 1'b1; lowest = i; end
    #1;
    checks++;
    if (hit !== any || (any && idx !== IW'(lowest))) begin
      failures++;
      $display("FAIL: vec %b hit %0d idx %0d, expected hit %0d idx %0d",
               match_vec, hit, idx, any, lowest);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    match_vec = '0; check();
    for (int i = 0; i < K; i++) begin match_vec = K'(1) << i; check(); end
    for (int t = 0; t < 1000; t++) begin
      match_vec = K'($urandom) & K'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
