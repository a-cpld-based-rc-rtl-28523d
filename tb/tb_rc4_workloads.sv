// tb_rc4_workloads: the engine sizes of the device comparison.
//
// Runs one search on each configuration the design is scaled to: 12 units
// (EPF10K100-sized), 24 units (EPF10K200-sized) and 384 units (a 32-device
// system), with 32-bit keys, and the default five units with 40-bit keys.
// Each search is a short one (the secret is placed on the second key of the
// last unit) that checks the matching unit, key, probe port and the
// 1304-cycles-per-key pass; a full search only repeats the same pass.
module tb_rc4_workloads;
  logic clk = 1'b0;
  logic start = 1'b0;
  logic fin [4];
  int   c [4];
  int   f [4];
  int   checks, failures;

  always #5 clk = ~clk;

  rc4_workload_run #(.NUM_FU(12),  .KEY_BYTES(4)) u_w12  (.clk(clk), .start(start), .finished(fin[0]), .checks(c[0]), .failures(f[0]));
  rc4_workload_run #(.NUM_FU(24),  .KEY_BYTES(4)) u_w24  (.clk(clk), .start(start), .finished(fin[1]), .checks(c[1]), .failures(f[1]));
  rc4_workload_run #(.NUM_FU(384), .KEY_BYTES(4)) u_w384 (.clk(clk), .start(start), .finished(fin[2]), .checks(c[2]), .failures(f[2]));
  rc4_workload_run #(.NUM_FU(5),   .KEY_BYTES(5)) u_w40  (.clk(clk), .start(start), .finished(fin[3]), .checks(c[3]), .failures(f[3]));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3],
             f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  initial begin
    @(negedge clk);
    start = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    checks   = c[0] + c[1] + c[2] + c[3];
    failures = f[0] + f[1] + f[2] + f[3];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
