// Runs scalable_mm at several sizes side by side, covering conversion adder
// widths of 8, 16 and 32 bits and operand sizes from 32 to 512 bits, through
// mm_tester (random Montgomery and ordinary multiplications with reference
// and latency checks).
module tb_scalable_mm_sizes;
  logic clk = 0, rst_n = 0;
  int c[5], f[5];
  logic fin[5];
  int checks, failures;

  always #5 clk = ~clk;

  mm_tester #(.N(32),  .D(8),  .OPS(20)) t0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .finished(fin[0]));
  mm_tester #(.N(64),  .D(16), .OPS(20)) t1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .finished(fin[1]));
  mm_tester #(.N(128), .D(32), .OPS(20)) t2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .finished(fin[2]));
  mm_tester #(.N(256), .D(16), .OPS(10)) t3 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .finished(fin[3]));
  mm_tester #(.N(512), .D(32), .OPS(5))  t4 (.clk, .rst_n, .checks(c[4]), .failures(f[4]), .finished(fin[4]));

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4]);
    checks = 0; failures = 0;
    for (int i = 0; i < 5; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < 5; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
