// fp_mul: floating-point multiplier for the parameterised (EW, MW) format.
//
// The product of the two significands (hidden one included) is formed in full,
// normalised by at most one position, rounded to nearest even and packed; the
// exponent is ea + eb - bias (+1 when the product is 2 or more). A zero operand
// gives a signed zero, an exponent that runs past the top saturates to the
// largest finite magnitude and one that falls to zero or below flushes to zero
// (see fp_pkg for these format rules).
//
// Interface: operands a and b are sampled every clock; the result p appears in
// a register one clock later (latency 1, one new operation per clock). The
// multiplier as a unit, its use of the format of the sign/exponent/mantissa
// fields and the selectable widths follow the architecture; the single pipeline
// register, the rounding mode and the exception handling are this design's
// own choices.
module fp_mul #(
  parameter int unsigned EW = fp_pkg::EW_DEFAULT,
  parameter int unsigned MW = fp_pkg::MW_DEFAULT,
  localparam int unsigned W = 1 + EW + MW
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] p
);

  localparam int BIAS = (1 << (EW - 1)) - 1;
  localparam int EMAX = (1 << EW) - 2;   // largest exponent field of a finite value
  localparam logic signed [EW+2:0] EONE = 1;

  logic              sa, sb, s;
  logic [EW-1:0]     ea, eb;
  logic [MW:0]       ma, mb;
  logic [2*MW+1:0]   prod;
  logic [MW-1:0]     frac;
  logic              g, st, inc;
  logic [MW:0]       frac_r;             // rounded fraction with carry-out
  logic signed [EW+2:0] e;
  logic [W-1:0]      res;

  always_comb begin
    sa   = a[W-1];
    sb   = b[W-1];
    ea   = a[W-2 -: EW];
    eb   = b[W-2 -: EW];
    ma   = {1'b1, a[MW-1:0]};
    mb   = {1'b1, b[MW-1:0]};
    s    = sa ^ sb;
    prod = ma * mb;
    e    = $signed({3'b000, ea}) + $signed({3'b000, eb}) - (EW+3)'(BIAS);
    if (prod[2*MW+1]) begin
      frac = prod[2*MW -: MW];
      g    = prod[MW];
      st   = |prod[MW-1:0];
      e    = e + EONE;
    end else begin
      frac = prod[2*MW-1 -: MW];
      g    = prod[MW-1];
      st   = (MW >= 2) ? |prod[MW-2:0] : 1'b0;
    end
    inc    = g & (st | frac[0]);
    frac_r = {1'b0, frac} + (MW+1)'(inc);
    if (frac_r[MW]) e = e + EONE;       // rounding carried into the next binade
    if (ea == '0 || eb == '0) begin
      res = {s, {(W-1){1'b0}}};
    end else if (e > (EW+3)'(EMAX)) begin
      res = {s, EW'(EMAX), {MW{1'b1}}};
    end else if (e <= 0) begin
      res = {s, {(W-1){1'b0}}};
    end else begin
      res = {s, e[EW-1:0], frac_r[MW-1:0]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p <= '0;
    else        p <= res;
  end

endmodule
