// tb_fp_mul: self-checking test of the floating-point multiplier in the 32-bit
// (8, 23) format. Random operands over a wide exponent range plus corner cases
// (zero operands, overflow to the saturation value, underflow to zero, rounding
// carries) are applied one per clock; each result is compared bit for bit, one
// clock later, with the product computed in double precision (exact for 24-bit
// significands) and rounded to the format. A second multiplier in the 24-bit
// (6, 17) format gets random operands checked the same way. A watchdog ends a
// stuck run.
module tb_fp_mul;
  localparam int EW = 8, MW = 23, W = 1 + EW + MW;
  localparam logic [W-1:0] FMAX = {1'b0, 8'hFE, 23'h7FFFFF};

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] a, b, p;
  int checks = 0, failures = 0;

  fp_mul #(.EW(EW), .MW(MW)) dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .p(p));

  logic [23:0] a24, b24, p24;
  fp_mul #(.EW(6), .MW(17)) dut24 (.clk(clk), .rst_n(rst_n), .a(a24), .b(b24), .p(p24));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    // 24-bit format: exponents 16..48 around the bias of 31 keep products in range
    for (int i = 0; i < 2000; i++) begin
      logic [23:0] want;
      a24  = {1'($urandom), 6'($urandom_range(16, 48)), 17'($urandom)};
      b24  = {1'($urandom), 6'($urandom_range(16, 48)), 17'($urandom)};
      want = 24'(fp_pkg::real_to_fp(fp_pkg::fp_to_real(64'(a24), 6, 17)
                                    * fp_pkg::fp_to_real(64'(b24), 6, 17), 6, 17));
      @(posedge clk);
      #1;
      checks++;
      if (p24 !== want) begin
        failures++;
        if (failures < 10) $display("FAIL 24-bit %h * %h = %h, expected %h", a24, b24, p24, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd(int emin, int emax);
    logic [W-1:0] v;
    v = {1'($urandom), 8'(emin + int'($urandom_range(0, emax - emin))), 23'($urandom)};
    return v;
  endfunction

  function automatic logic [W-1:0] ref_mul(logic [W-1:0] x, logic [W-1:0] y);
    real r;
    if (x[30:23] == 0 || y[30:23] == 0) return {x[31] ^ y[31], 31'b0};
    r = fp_pkg::fp_to_real(64'(x), EW, MW) * fp_pkg::fp_to_real(64'(y), EW, MW);
    return W'(fp_pkg::real_to_fp(r, EW, MW));
  endfunction

  task automatic apply(logic [W-1:0] x, logic [W-1:0] y, logic [W-1:0] exp_p);
    a = x;
    b = y;
    @(posedge clk);
    #1;
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", x, y, p, exp_p);
    end
  endtask

  initial begin
    a = '0;
    b = '0;
    a24 = '0;
    b24 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // corner cases with hand-worked results
    apply(32'h3F800000, 32'h3F800000, 32'h3F800000);          // 1 * 1
    apply(32'h40000000, 32'hC0400000, 32'hC0C00000);          // 2 * -3 = -6
    apply(32'h3FC00000, 32'h3FC00000, 32'h40100000);          // 1.5 * 1.5 = 2.25
    apply(32'h00000000, 32'h42C80000, 32'h00000000);          // 0 * 100
    apply(32'h80000000, 32'h42C80000, 32'h80000000);          // -0 * 100
    apply(32'h7F000000, 32'h7F000000, FMAX);                  // overflow saturates
    apply(32'h00800000, 32'h00800000, 32'h00000000);          // underflow flushes
    apply(32'h3F7FFFFF, 32'h3F800001, 32'h3F800000);          // rounding carry to 1.0
    apply(32'h3F800001, 32'h3F800001, 32'h3F800002);          // (1+u)^2 rounds to 1+2u
    // random operands whose product stays in range
    for (int i = 0; i < 4000; i++) begin
      logic [W-1:0] x, y;
      x = rnd(64, 190);
      y = rnd(64, 190);
      apply(x, y, ref_mul(x, y));
    end
    // random operands around the range limits
    for (int i = 0; i < 2000; i++) begin
      logic [W-1:0] x, y;
      x = rnd(1, 254);
      y = rnd(1, 254);
      apply(x, y, ref_mul(x, y));
    end
    // 24-bit format: exponents 16..48 around the bias of 31 keep products in range
    for (int i = 0; i < 2000; i++) begin
      logic [23:0] want;
      a24  = {1'($urandom), 6'($urandom_range(16, 48)), 17'($urandom)};
      b24  = {1'($urandom), 6'($urandom_range(16, 48)), 17'($urandom)};
      want = 24'(fp_pkg::real_to_fp(fp_pkg::fp_to_real(64'(a24), 6, 17)
                                    * fp_pkg::fp_to_real(64'(b24), 6, 17), 6, 17));
      @(posedge clk);
      #1;
      checks++;
      if (p24 !== want) begin
        failures++;
        if (failures < 10) $display("FAIL 24-bit %h * %h = %h, expected %h", a24, b24, p24, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
