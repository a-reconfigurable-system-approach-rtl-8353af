// tb_taylor_coef_rom: checks every entry of the three coefficient ROMs against
// 1/(2n+3)!, 1/(2n+2)! and 1/(2n+3) computed here in double precision (relative
// error below one unit in the last place of the 32-bit format), and that an
// index past the last term reads zero.
module tb_taylor_coef_rom;
  localparam int EW = 8, MW = 23, W = 1 + EW + MW, N = 5;

  fp_pkg::taylor_op_e op;
  logic [2:0]   n;
  logic [W-1:0] coef;
  int checks = 0, failures = 0;

  taylor_coef_rom #(.EW(EW), .MW(MW), .NTERMS(N)) dut (.op(op), .n(n), .coef(coef));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real expected(fp_pkg::taylor_op_e o, int k);
    real f = 1.0;
    int  top;
    if (o == fp_pkg::TAYLOR_ATAN) return 1.0 / real'(2*k + 3);
    top = (o == fp_pkg::TAYLOR_SIN) ? 2*k + 3 : 2*k + 2;
    for (int i = 2; i <= top; i++) f = f * real'(i);
    return 1.0 / f;
  endfunction

  initial begin
    for (int o = 0; o < 3; o++) begin
      for (int k = 0; k < N; k++) begin
        real got, want;
        op = fp_pkg::taylor_op_e'(o);
        n  = 3'(k);
        #1;
        got  = fp_pkg::fp_to_real(64'(coef), EW, MW);
        want = expected(op, k);
        checks++;
        if (coef[W-1] || (got - want) / want > 1.0e-7 || (want - got) / want > 1.0e-7) begin
          failures++;
          $display("FAIL op=%0d n=%0d got %g want %g", o, k, got, want);
        end
      end
      n = 3'(N);
      #1;
      checks++;
      if (coef != '0) begin
        failures++;
        $display("FAIL op=%0d: entry past the table is not zero", o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
