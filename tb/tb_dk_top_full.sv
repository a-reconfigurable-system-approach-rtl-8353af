// tb_dk_top_full: end-to-end test of the direct-kinematics engine.
// The engine is instantiated with every parameter at its default (32-bit
// format, five Taylor terms, d1 = 106, d2 = 130, l2 = 0 mm), and 100 random poses
// are run, the size of the accuracy evaluation the design was judged by.
//
// Joint values are drawn from the ranges of the reference robot's workspace:
// theta1, theta4, theta5 in [-90, 90] degrees, theta2 in [-35, 20] degrees and
// d3 in [160, 760] mm. The expected transform is obtained independently of the
// engine's equations, by multiplying the five Denavit-Hartenberg link matrices
//   A_n = Rz(theta_n) Tz(d_n) Tx(l_n) Rx(alpha_n)
// of the table (theta, d, l, alpha) = (theta1, d1, 0, 90), (theta2+90, d2, l2, -90),
// (0, d3, 0, 0), (theta4, 0, 0, 90), (theta5, 0, 0, 0) in double precision.
// Checks per run:
//   * orientation entries within 2e-5 and position entries within 5e-3 mm;
//   * each result's valid bit rises at the clock given by its step,
//     24 + 3k clocks after start, three clocks apart from step to step;
//   * done pulses once, busy falls with it, results hold afterwards;
//   * the mean square error of each entry over all runs, printed as a table,
//     stays below 1e-10 (orientation) and 1e-5 mm^2 (position).
// Mechanisms counted (each must occur): completed runs, write-back of each of
// the eleven steps, and a start pulse while busy that the engine must ignore.
module tb_dk_top_full;
  localparam int  EW = 8, MW = 23, W = 1 + EW + MW;
  localparam real D1 = 106.0, D2 = 130.0, L2 = 0.0;
  localparam real DEG = 3.14159265358979 / 180.0;
  localparam int  RUNS = 100;
  // step that produces each result, indexed by dk_pkg::out_e
  localparam int  STEP_OF [12] = '{10, 11, 3, 10, 11, 3, 7, 7, 5, 5, 6, 4};

  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  logic [W-1:0] th1, th2, th4, th5, d3;
  logic busy, done;
  logic [11:0] out_valid;
  logic [W-1:0] res [12];
  int checks = 0, failures = 0;
  int n_runs = 0, n_ignored = 0;
  int n_step [12];
  real sq_err [12];

  dk_top dut (
    .clk(clk), .rst_n(rst_n), .start(start),
    .theta1(th1), .theta2(th2), .theta4(th4), .theta5(th5), .d3(d3),
    .busy(busy), .done(done), .out_valid(out_valid),
    .x_x(res[0]), .x_y(res[1]), .x_z(res[2]),
    .y_x(res[3]), .y_y(res[4]), .y_z(res[5]),
    .z_x(res[6]), .z_y(res[7]), .z_z(res[8]),
    .p_x(res[9]), .p_y(res[10]), .p_z(res[11]));

  always #5 clk = ~clk;

  initial begin
    repeat (RUNS * 80 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef real mat_t [4][4];

  function automatic mat_t dh(real th, real d, real l, real al);
    mat_t a;
    a[0] = '{$cos(th), -$sin(th) * $cos(al),  $sin(th) * $sin(al), l * $cos(th)};
    a[1] = '{$sin(th),  $cos(th) * $cos(al), -$cos(th) * $sin(al), l * $sin(th)};
    a[2] = '{0.0,       $sin(al),             $cos(al),             d};
    a[3] = '{0.0,       0.0,                  0.0,                  1.0};
    return a;
  endfunction

  function automatic mat_t mmul(mat_t a, mat_t b);
    mat_t c;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        c[i][j] = 0.0;
        for (int k = 0; k < 4; k++) c[i][j] = c[i][j] + a[i][k] * b[k][j];
      end
    return c;
  endfunction

  function automatic logic [W-1:0] f(real v);
    return W'(fp_pkg::real_to_fp(v, EW, MW));
  endfunction

  function automatic real r(logic [W-1:0] v);
    return fp_pkg::fp_to_real(64'(v), EW, MW);
  endfunction

  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1000000.0;
  endfunction

  task automatic run_once(real t1d, real t2d, real t4d, real t5d, real dd3, bit poke);
    mat_t t;
    real  want [12];
    real  tol;
    int   cyc;
    int   rise [12];
    th1 = f(t1d * DEG);
    th2 = f(t2d * DEG);
    th4 = f(t4d * DEG);
    th5 = f(t5d * DEG);
    d3  = f(dd3);
    t = dh(r(th1), D1, 0.0, 90.0 * DEG);
    t = mmul(t, dh(r(th2) + 90.0 * DEG, D2, L2, -90.0 * DEG));
    t = mmul(t, dh(0.0, r(d3), 0.0, 0.0));
    t = mmul(t, dh(r(th4), 0.0, 0.0, 90.0 * DEG));
    t = mmul(t, dh(r(th5), 0.0, 0.0, 0.0));
    // dk_pkg::out_e order: x_x x_y x_z y_x y_y y_z z_x z_y z_z p_x p_y p_z
    want = '{t[0][0], t[1][0], t[2][0], t[0][1], t[1][1], t[2][1],
             t[0][2], t[1][2], t[2][2], t[0][3], t[1][3], t[2][3]};
    for (int i = 0; i < 12; i++) rise[i] = -1;
    start = 1'b1;
    @(posedge clk);
    #1;
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      if (poke && cyc == 10) start = 1'b1;          // must be ignored while busy
      if (poke && cyc == 11) begin
        start = 1'b0;
        n_ignored++;
      end
      for (int i = 0; i < 12; i++) if (out_valid[i] && rise[i] < 0) rise[i] = cyc;
      @(posedge clk);
      #1;
      cyc++;
      if (cyc > 200) break;
    end
    for (int i = 0; i < 12; i++) if (out_valid[i] && rise[i] < 0) rise[i] = cyc;
    // done is registered with the last write-back: both are visible at once
    checks++;
    if (!done || busy || out_valid != '1) begin
      failures++;
      $display("FAIL run %0d: done=%b busy=%b valid=%b", n_runs, done, busy, out_valid);
    end
    for (int i = 0; i < 12; i++) begin
      checks++;
      if (rise[i] != 24 + 3 * STEP_OF[i]) begin
        failures++;
        $display("FAIL result %0d valid after %0d clocks, expected %0d", i, rise[i], 24 + 3 * STEP_OF[i]);
      end else begin
        n_step[STEP_OF[i]]++;
      end
      sq_err[i] = sq_err[i] + (r(res[i]) - want[i]) * (r(res[i]) - want[i]);
      tol = (i >= 9) ? 5.0e-3 : 2.0e-5;
      checks++;
      if (r(res[i]) - want[i] > tol || want[i] - r(res[i]) > tol) begin
        failures++;
        $display("FAIL result %0d = %f, expected %f (angles %f %f %f %f, d3 %f)",
                 i, r(res[i]), want[i], t1d, t2d, t4d, t5d, dd3);
      end
    end
    @(posedge clk);
    #1;
    checks++;
    if (done || busy) begin
      failures++;
      $display("FAIL done is not a single pulse or busy stays high");
    end
    n_runs++;
  endtask

  initial begin
    start = 1'b0;
    th1 = '0; th2 = '0; th4 = '0; th5 = '0; d3 = '0;
    for (int i = 0; i < 12; i++) begin
      n_step[i] = 0;
      sq_err[i] = 0.0;
    end
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    run_once(0.0, 0.0, 0.0, 0.0, 160.0, 1'b0);         // zero position
    run_once(90.0, 20.0, -90.0, 90.0, 760.0, 1'b1);    // range corners
    run_once(-90.0, -35.0, 90.0, -90.0, 160.0, 1'b0);
    for (int i = 3; i < RUNS; i++)
      run_once(rnd(-90.0, 90.0), rnd(-35.0, 20.0), rnd(-90.0, 90.0), rnd(-90.0, 90.0),
               rnd(160.0, 760.0), i % 10 == 0);
    checks++;
    if (n_runs != RUNS || n_ignored == 0) begin
      failures++;
      $display("FAIL mechanism missing: runs=%0d ignored starts=%0d", n_runs, n_ignored);
    end
    for (int k = 3; k <= 11; k++) begin
      if (k == 8 || k == 9) continue;                  // these steps produce no result
      checks++;
      if (n_step[k] == 0) begin
        failures++;
        $display("FAIL step %0d never wrote back a result", k);
      end
    end
    // mean square error of each entry over all runs
    $display("MSE       x          y          z          p");
    for (int row = 0; row < 3; row++)
      $display("%s   %9.3e  %9.3e  %9.3e  %9.3e", (row == 0) ? "x" : (row == 1) ? "y" : "z",
               sq_err[row] / n_runs, sq_err[3 + row] / n_runs, sq_err[6 + row] / n_runs,
               sq_err[9 + row] / n_runs);
    for (int i = 0; i < 12; i++) begin
      checks++;
      if (sq_err[i] / n_runs > ((i >= 9) ? 1.0e-5 : 1.0e-10)) begin
        failures++;
        $display("FAIL mean square error of result %0d is %e", i, sq_err[i] / n_runs);
      end
    end
    $display("runs=%0d ignored_starts=%0d", n_runs, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
