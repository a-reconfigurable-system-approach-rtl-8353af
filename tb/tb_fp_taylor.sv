// tb_fp_taylor: self-checking test of the Taylor-series core in the 32-bit format.
// Two cores are tested side by side: one with the default five terms after the
// leading one and one with two. For each, sine, cosine and arctangent of random
// arguments (|x| <= pi/2, |x| <= 0.9 for arctangent) are started and
//   * the result is compared with the same truncated series evaluated here in
//     double precision (absolute error below 2e-6), and, for sin/cos with five
//     terms, with $sin/$cos (absolute error below 2e-6);
//   * the number of clocks from start to ready is checked against 4*N+3
//     (23 for five terms, 11 for two).
// A watchdog ends a stuck run.
module tb_fp_taylor;
  localparam int EW = 8, MW = 23, W = 1 + EW + MW;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  logic               start5, start2;
  fp_pkg::taylor_op_e op;
  logic [W-1:0]       x;
  logic               busy5, ready5, busy2, ready2;
  logic [W-1:0]       y5, y2;
  int checks = 0, failures = 0;

  fp_taylor #(.EW(EW), .MW(MW), .NTERMS(5)) dut5 (
    .clk(clk), .rst_n(rst_n), .start(start5), .op(op), .x(x),
    .busy(busy5), .ready(ready5), .y(y5));
  fp_taylor #(.EW(EW), .MW(MW), .NTERMS(2)) dut2 (
    .clk(clk), .rst_n(rst_n), .start(start2), .op(op), .x(x),
    .busy(busy2), .ready(ready2), .y(y2));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Truncated series: leading term plus nt further terms.
  function automatic real series(fp_pkg::taylor_op_e o, real v, int nt);
    real acc, pw, f;
    int  k;
    acc = (o == fp_pkg::TAYLOR_COS) ? 1.0 : v;
    for (int i = 0; i < nt; i++) begin
      k  = (o == fp_pkg::TAYLOR_COS) ? 2*i + 2 : 2*i + 3;
      pw = 1.0;
      for (int j = 0; j < k; j++) pw = pw * v;
      if (o == fp_pkg::TAYLOR_ATAN) f = real'(k);
      else begin
        f = 1.0;
        for (int j = 2; j <= k; j++) f = f * real'(j);
      end
      acc = (i % 2 == 0) ? acc - pw / f : acc + pw / f;
    end
    return acc;
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic run(bit five, fp_pkg::taylor_op_e o, real v);
    int  cyc, nt;
    real got, want;
    nt = five ? 5 : 2;
    op = o;
    x  = W'(fp_pkg::real_to_fp(v, EW, MW));
    v  = fp_pkg::fp_to_real(64'(x), EW, MW);
    if (five) start5 = 1'b1; else start2 = 1'b1;
    @(posedge clk);
    #1;
    start5 = 1'b0;
    start2 = 1'b0;
    op     = fp_pkg::taylor_op_e'($urandom_range(0, 2));   // op is only sampled with start
    x      = W'($urandom);
    cyc    = 1;
    while (!(five ? ready5 : ready2)) begin
      @(posedge clk);
      #1;
      cyc++;
    end
    checks++;
    if (cyc != 4*nt + 3) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cyc, 4*nt + 3);
    end
    got  = fp_pkg::fp_to_real(64'(five ? y5 : y2), EW, MW);
    want = series(o, v, nt);
    checks++;
    if (absr(got - want) > 2.0e-6) begin
      failures++;
      $display("FAIL op=%0d terms=%0d x=%f: %f, series gives %f", o, nt, v, got, want);
    end
    if (five && o != fp_pkg::TAYLOR_ATAN) begin
      want = (o == fp_pkg::TAYLOR_SIN) ? $sin(v) : $cos(v);
      checks++;
      if (absr(got - want) > 2.0e-6) begin
        failures++;
        $display("FAIL op=%0d x=%f: %f, library gives %f", o, v, got, want);
      end
    end
  endtask

  initial begin
    start5 = 1'b0;
    start2 = 1'b0;
    op     = fp_pkg::TAYLOR_SIN;
    x      = '0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    run(1'b1, fp_pkg::TAYLOR_SIN, 0.0);
    run(1'b1, fp_pkg::TAYLOR_COS, 0.0);
    run(1'b1, fp_pkg::TAYLOR_SIN, PI / 2.0);
    run(1'b1, fp_pkg::TAYLOR_COS, -PI / 2.0);
    for (int i = 0; i < 300; i++) begin
      fp_pkg::taylor_op_e o;
      real v;
      o = fp_pkg::taylor_op_e'($urandom_range(0, 2));
      v = (real'($urandom_range(0, 2000000)) / 1000000.0 - 1.0)
          * ((o == fp_pkg::TAYLOR_ATAN) ? 0.9 : PI / 2.0);
      run(i % 4 != 3, o, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
