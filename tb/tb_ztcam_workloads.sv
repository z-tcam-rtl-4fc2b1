// Configuration sweep of the Z-TCAM: the six FPGA example configurations,
// 512 x 36 with (L, N) = (2, 4), (4, 4), (2, 3), (4, 3) and 64 x 32 with
// (2, 4), (4, 4), the last one also being the ASIC example. Each is loaded
// with a random ternary table and searched; all run side by side.
module tb_ztcam_workloads;
  localparam int unsigned NCFG = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NCFG-1:0] done;
  int unsigned c_checks [NCFG], c_failures [NCFG], c_hits [NCFG];
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  ztcam_workload_run #(.C(36), .DEPTH(512), .L(2), .N(4)) u_512_2_4 (
    .clk(clk), .rst_n(rst_n), .done(done[0]), .checks(c_checks[0]), .failures(c_failures[0]), .hits(c_hits[0]));
  ztcam_workload_run #(.C(36), .DEPTH(512), .L(4), .N(4)) u_512_4_4 (
    .clk(clk), .rst_n(rst_n), .done(done[1]), .checks(c_checks[1]), .failures(c_failures[1]), .hits(c_hits[1]));
  ztcam_workload_run #(.C(36), .DEPTH(512), .L(2), .N(3)) u_512_2_3 (
    .clk(clk), .rst_n(rst_n), .done(done[2]), .checks(c_checks[2]), .failures(c_failures[2]), .hits(c_hits[2]));
  ztcam_workload_run #(.C(36), .DEPTH(512), .L(4), .N(3)) u_512_4_3 (
    .clk(clk), .rst_n(rst_n), .done(done[3]), .checks(c_checks[3]), .failures(c_failures[3]), .hits(c_hits[3]));
  ztcam_workload_run #(.C(32), .DEPTH(64), .L(2), .N(4)) u_64_2_4 (
    .clk(clk), .rst_n(rst_n), .done(done[4]), .checks(c_checks[4]), .failures(c_failures[4]), .hits(c_hits[4]));
  ztcam_workload_run #(.C(32), .DEPTH(64), .L(4), .N(4)) u_64_4_4 (
    .clk(clk), .rst_n(rst_n), .done(done[5]), .checks(c_checks[5]), .failures(c_failures[5]), .hits(c_hits[5]));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired, done = %b", done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done == '1);
    for (int i = 0; i < NCFG; i++) begin
      checks += c_checks[i];
      failures += c_failures[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
