// tb_dk_formats: runs the direct-kinematics engine in the two wider formats the
// design is offered in besides the 32-bit default: 43 bits (11-bit exponent,
// 31-bit mantissa) and 64 bits (11, 52, double precision). Each format gets its
// own engine and 20 random poses (see dk_format_checker). A watchdog ends a stuck
// run.
module tb_dk_formats;
  logic clk = 1'b0, rst_n = 1'b0;
  int   c43, f43, c64, f64;
  logic done43, done64;
  int   checks = 0, failures = 0;

  dk_format_checker #(.EW(11), .MW(31), .RUNS(20)) u43 (
    .clk(clk), .rst_n(rst_n), .checks(c43), .failures(f43), .finished(done43));
  dk_format_checker #(.EW(11), .MW(52), .RUNS(20)) u64 (
    .clk(clk), .rst_n(rst_n), .checks(c64), .failures(f64), .finished(done64));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done43 && done64);
    checks   = c43 + c64;
    failures = f43 + f64;
    $display("43-bit: checks=%0d failures=%0d, 64-bit: checks=%0d failures=%0d", c43, f43, c64, f64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
