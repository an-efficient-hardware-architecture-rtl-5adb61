// tb_sorter_configs: the sorter in the other evaluated configurations.
//
// Runs sorter_workload end to end in four configurations side by side:
//   * 10-bit samples (10.8 format), three templates;
//   * 32-bit samples (32.20 format), three templates;
//   * 16-bit samples with seven templates (e.g. three neurons plus their
//     overlaps);
//   * 16-bit samples with thirty templates, the top of the template sweep.
// Each run checks correct, complete sorting and the 68-clock matching
// latency; the test passes when all four do.
module tb_sorter_configs;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int c [4], f [4], m [4], d [4];
  bit fin [4];

  sorter_workload #(.WL(10), .NT(3),  .SCALE(0.125), .NOISE(5))      u_wl10 (
    .clk(clk), .checks(c[0]), .failures(f[0]), .n_match(m[0]), .n_drop(d[0]), .finished(fin[0]));
  sorter_workload #(.WL(32), .NT(3),  .SCALE(512.0), .NOISE(20480))  u_wl32 (
    .clk(clk), .checks(c[1]), .failures(f[1]), .n_match(m[1]), .n_drop(d[1]), .finished(fin[1]));
  sorter_workload #(.WL(16), .NT(7),  .SCALE(1.0),   .NOISE(40))     u_nt7 (
    .clk(clk), .checks(c[2]), .failures(f[2]), .n_match(m[2]), .n_drop(d[2]), .finished(fin[2]));
  sorter_workload #(.WL(16), .NT(30), .SCALE(1.0),   .NOISE(40), .NSPK(80)) u_nt30 (
    .clk(clk), .checks(c[3]), .failures(f[3]), .n_match(m[3]), .n_drop(d[3]), .finished(fin[3]));

  int checks, failures;

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3],
             f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  initial begin
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
