// taylor_coef_rom: the three coefficient ROMs of the Taylor core and the
// multiplexer that selects between them.
//
// Entry n (n = 0 .. NTERMS-1) of each ROM holds the factor of the (n+1)-th term
// after the leading one of the series around 0:
//   sin : 1/(2n+3)!     (x^3/3!, x^5/5!, ...)
//   cos : 1/(2n+2)!     (x^2/2!, x^4/4!, ...)
//   atan: 1/(2n+3)      (x^3/3,  x^5/5,  ...)
// Every factor is stored positive; the alternating sign of the series is
// applied by the core's add/subtract unit. The contents are computed at
// elaboration time from these formulas and rounded to the (EW, MW) format, so
// the tables follow any width chosen.
//
// Interface: op selects the ROM (sin, cos, atan) and n the entry; coef is
// combinational (an asynchronous-read ROM). Precomputed factors held in three
// ROMs behind an op-driven multiplexer follow the architecture; the table
// layout and combinational read are this design's choice.
module taylor_coef_rom #(
  parameter int unsigned EW     = fp_pkg::EW_DEFAULT,
  parameter int unsigned MW     = fp_pkg::MW_DEFAULT,
  parameter int unsigned NTERMS = 5,
  localparam int unsigned W  = 1 + EW + MW,
  localparam int unsigned NB = (NTERMS > 1) ? $clog2(NTERMS) : 1
) (
  input  fp_pkg::taylor_op_e op,
  input  logic [NB-1:0]      n,
  output logic [W-1:0]       coef
);

  function automatic real fact(int k);
    real f = 1.0;
    for (int i = 2; i <= k; i++) f = f * real'(i);
    return f;
  endfunction

  logic [W-1:0] sin_rom  [NTERMS];
  logic [W-1:0] cos_rom  [NTERMS];
  logic [W-1:0] atan_rom [NTERMS];

  for (genvar i = 0; i < NTERMS; i++) begin : g_rom
    localparam logic [63:0] SIN_C  = fp_pkg::real_to_fp(1.0 / fact(2*i + 3), EW, MW);
    localparam logic [63:0] COS_C  = fp_pkg::real_to_fp(1.0 / fact(2*i + 2), EW, MW);
    localparam logic [63:0] ATAN_C = fp_pkg::real_to_fp(1.0 / real'(2*i + 3), EW, MW);
    assign sin_rom[i]  = SIN_C[W-1:0];
    assign cos_rom[i]  = COS_C[W-1:0];
    assign atan_rom[i] = ATAN_C[W-1:0];
  end

  always_comb begin
    coef = '0;
    if (32'(n) < NTERMS) begin
      unique case (op)
        fp_pkg::TAYLOR_SIN:  coef = sin_rom[n];
        fp_pkg::TAYLOR_COS:  coef = cos_rom[n];
        fp_pkg::TAYLOR_ATAN: coef = atan_rom[n];
        default:             coef = '0;
      endcase
    end
  end

endmodule
