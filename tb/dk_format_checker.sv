// dk_format_checker: drives one direct-kinematics engine built for the floating-
// point format (EW, MW) through RUNS random poses and checks every result against
// the product of the five Denavit-Hartenberg link matrices evaluated in double
// precision (orientation within 2e-5, position within 5e-3 mm), and the total
// time from start to done (24 + 33 clocks with five Taylor terms). It reports its
// check and failure counts and raises finished when done. Used by tb_dk_formats.
module dk_format_checker #(
  parameter int EW   = 8,
  parameter int MW   = 23,
  parameter int RUNS = 20
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int  W = 1 + EW + MW;
  localparam real D1 = 106.0, D2 = 130.0;
  localparam real DEG = 3.14159265358979 / 180.0;

  logic start, busy, done;
  logic [W-1:0] th1, th2, th4, th5, d3;
  logic [11:0] out_valid;
  logic [W-1:0] res [12];

  dk_top #(.EW(EW), .MW(MW)) dut (
    .clk(clk), .rst_n(rst_n), .start(start),
    .theta1(th1), .theta2(th2), .theta4(th4), .theta5(th5), .d3(d3),
    .busy(busy), .done(done), .out_valid(out_valid),
    .x_x(res[0]), .x_y(res[1]), .x_z(res[2]),
    .y_x(res[3]), .y_y(res[4]), .y_z(res[5]),
    .z_x(res[6]), .z_y(res[7]), .z_z(res[8]),
    .p_x(res[9]), .p_y(res[10]), .p_z(res[11]));

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

  initial begin
    mat_t t;
    real  want [12];
    real  tol;
    int   cyc;
    checks   = 0;
    failures = 0;
    finished = 1'b0;
    start    = 1'b0;
    th1 = '0; th2 = '0; th4 = '0; th5 = '0; d3 = '0;
    @(posedge rst_n);
    @(posedge clk);
    #1;
    for (int n = 0; n < RUNS; n++) begin
      th1 = f(rnd(-90.0, 90.0) * DEG);
      th2 = f(rnd(-35.0, 20.0) * DEG);
      th4 = f(rnd(-90.0, 90.0) * DEG);
      th5 = f(rnd(-90.0, 90.0) * DEG);
      d3  = f(rnd(160.0, 760.0));
      t = dh(r(th1), D1, 0.0, 90.0 * DEG);
      t = mmul(t, dh(r(th2) + 90.0 * DEG, D2, 0.0, -90.0 * DEG));
      t = mmul(t, dh(0.0, r(d3), 0.0, 0.0));
      t = mmul(t, dh(r(th4), 0.0, 0.0, 90.0 * DEG));
      t = mmul(t, dh(r(th5), 0.0, 0.0, 0.0));
      want = '{t[0][0], t[1][0], t[2][0], t[0][1], t[1][1], t[2][1],
               t[0][2], t[1][2], t[2][2], t[0][3], t[1][3], t[2][3]};
      start = 1'b1;
      @(posedge clk);
      #1;
      start = 1'b0;
      cyc = 1;
      while (!done && cyc < 200) begin
        @(posedge clk);
        #1;
        cyc++;
      end
      checks++;
      if (cyc != 57) begin
        failures++;
        $display("FAIL (%0d,%0d) run took %0d clocks, expected 57", EW, MW, cyc);
      end
      for (int i = 0; i < 12; i++) begin
        tol = (i >= 9) ? 5.0e-3 : 2.0e-5;
        checks++;
        if (r(res[i]) - want[i] > tol || want[i] - r(res[i]) > tol) begin
          failures++;
          $display("FAIL (%0d,%0d) result %0d = %f, expected %f", EW, MW, i, r(res[i]), want[i]);
        end
      end
    end
    finished = 1'b1;
  end
endmodule
