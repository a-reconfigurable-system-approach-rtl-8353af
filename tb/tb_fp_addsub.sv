// tb_fp_addsub: self-checking test of the floating-point adder/subtractor in the
// 32-bit (8, 23) format. Random additions and subtractions with exponent
// differences of up to 28 (where the double-precision sum is exact, so the
// rounded reference is bit-exact), large exponent gaps, cancellation, zero
// operands and overflow are applied one per clock and compared bit for bit one
// clock later with the result computed in double precision and rounded to the
// format. A second unit in the 24-bit (6, 17) format gets random additions and
// subtractions checked the same way. A watchdog ends a stuck run.
module tb_fp_addsub;
  localparam int EW = 8, MW = 23, W = 1 + EW + MW;
  localparam logic [W-1:0] FMAX = {1'b0, 8'hFE, 23'h7FFFFF};

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] a, b, s;
  logic sub;
  int checks = 0, failures = 0;

  fp_addsub #(.EW(EW), .MW(MW)) dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .sub(sub), .s(s));

  logic [23:0] a24, b24, s24;
  logic        sub24;
  fp_addsub #(.EW(6), .MW(17)) dut24 (.clk(clk), .rst_n(rst_n), .a(a24), .b(b24), .sub(sub24), .s(s24));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    for (int i = 0; i < 2000; i++) begin
      logic [23:0] want;
      int ex;
      real rr;
      ex    = int'($urandom_range(12, 50));
      a24   = {1'($urandom), 6'(ex), 17'($urandom)};
      b24   = {1'($urandom), 6'(ex + int'($urandom_range(0, 20)) - 10), 17'($urandom)};
      sub24 = 1'($urandom);
      rr    = sub24 ? fp_pkg::fp_to_real(64'(a24), 6, 17) - fp_pkg::fp_to_real(64'(b24), 6, 17)
                    : fp_pkg::fp_to_real(64'(a24), 6, 17) + fp_pkg::fp_to_real(64'(b24), 6, 17);
      want  = (rr == 0.0) ? '0 : 24'(fp_pkg::real_to_fp(rr, 6, 17));
      @(posedge clk);
      #1;
      checks++;
      if (s24 !== want) begin
        failures++;
        if (failures < 10) $display("FAIL 24-bit %h %s %h = %h, expected %h", a24, sub24 ? "-" : "+", b24, s24, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] ref_add(logic [W-1:0] x, logic [W-1:0] y, logic op);
    real r;
    r = op ? fp_pkg::fp_to_real(64'(x), EW, MW) - fp_pkg::fp_to_real(64'(y), EW, MW)
           : fp_pkg::fp_to_real(64'(x), EW, MW) + fp_pkg::fp_to_real(64'(y), EW, MW);
    if (r == 0.0) return '0;
    return W'(fp_pkg::real_to_fp(r, EW, MW));
  endfunction

  task automatic apply(logic [W-1:0] x, logic [W-1:0] y, logic op, logic [W-1:0] exp_s);
    a   = x;
    b   = y;
    sub = op;
    @(posedge clk);
    #1;
    checks++;
    if (s !== exp_s) begin
      failures++;
      if (failures < 10) $display("FAIL %h %s %h = %h, expected %h", x, op ? "-" : "+", y, s, exp_s);
    end
  endtask

  initial begin
    a   = '0;
    b   = '0;
    sub = 1'b0;
    a24 = '0;
    b24 = '0;
    sub24 = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    apply(32'h3F800000, 32'h3F800000, 1'b0, 32'h40000000);    // 1 + 1 = 2
    apply(32'h3F800000, 32'h3F800000, 1'b1, 32'h00000000);    // 1 - 1 = +0
    apply(32'h40400000, 32'h3F800000, 1'b1, 32'h40000000);    // 3 - 1 = 2
    apply(32'h3F800000, 32'h40400000, 1'b1, 32'hC0000000);    // 1 - 3 = -2
    apply(32'h00000000, 32'hC2C80000, 1'b0, 32'hC2C80000);    // 0 + -100
    apply(32'h42C80000, 32'h00000000, 1'b1, 32'h42C80000);    // 100 - 0
    apply(32'h3F800000, 32'h33800000, 1'b0, 32'h3F800000);    // 1 + 2^-24: tie, stays even
    apply(32'h3F800001, 32'h33800000, 1'b0, 32'h3F800002);    // tie rounds up to even
    apply(32'h3F800000, 32'h2F800000, 1'b1, 32'h3F800000);    // 1 - tiny rounds back to 1
    apply(32'h7F7FFFFF, 32'h7F7FFFFF, 1'b0, FMAX);            // overflow saturates
    apply(32'h3F800001, 32'h3F800000, 1'b1, 32'h34000000);    // cancellation: 2^-23
    for (int i = 0; i < 5000; i++) begin
      logic [W-1:0] x, y;
      logic op;
      int ex, ey;
      ex = int'($urandom_range(40, 200));
      ey = ex + int'($urandom_range(0, 56)) - 28;
      x  = {1'($urandom), 8'(ex), 23'($urandom)};
      y  = {1'($urandom), 8'(ey), 23'($urandom)};
      if ($urandom_range(0, 9) == 0) y = {y[31], x[30:0] ^ 31'($urandom_range(0, 7))};
      op = 1'($urandom);
      apply(x, y, op, ref_add(x, y, op));
    end
    for (int i = 0; i < 2000; i++) begin
      logic [23:0] want;
      int ex;
      real rr;
      ex    = int'($urandom_range(12, 50));
      a24   = {1'($urandom), 6'(ex), 17'($urandom)};
      b24   = {1'($urandom), 6'(ex + int'($urandom_range(0, 20)) - 10), 17'($urandom)};
      sub24 = 1'($urandom);
      rr    = sub24 ? fp_pkg::fp_to_real(64'(a24), 6, 17) - fp_pkg::fp_to_real(64'(b24), 6, 17)
                    : fp_pkg::fp_to_real(64'(a24), 6, 17) + fp_pkg::fp_to_real(64'(b24), 6, 17);
      want  = (rr == 0.0) ? '0 : 24'(fp_pkg::real_to_fp(rr, 6, 17));
      @(posedge clk);
      #1;
      checks++;
      if (s24 !== want) begin
        failures++;
        if (failures < 10) $display("FAIL 24-bit %h %s %h = %h, expected %h", a24, sub24 ? "-" : "+", b24, s24, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
