// fp_addsub: floating-point adder/subtractor for the parameterised (EW, MW) format.
//
// Computes a + b (sub = 0) or a - b (sub = 1). Subtraction flips the sign of b.
// The operand of larger magnitude is taken as the base; the other significand is
// shifted right by the exponent difference, keeping guard, round and sticky
// bits. After the add or subtract, the sum is renormalised (one place right on a
// carry, or left by its count of leading zeros after cancellation), rounded to
// nearest even and packed. An exact zero result is +0; overflow saturates and
// underflow flushes to zero as described in fp_pkg.
//
// Interface: a, b and sub are sampled every clock; the result s appears in a
// register one clock later (latency 1). The add/sub unit with an operation
// input is the architecture's; the single pipeline register, the rounding and
// the exception rules are this design's own choices.
module fp_addsub #(
  parameter int unsigned EW = fp_pkg::EW_DEFAULT,
  parameter int unsigned MW = fp_pkg::MW_DEFAULT,
  localparam int unsigned W = 1 + EW + MW
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] s
);

  localparam int EMAX = (1 << EW) - 2;
  localparam logic signed [EW+2:0] EONE = 1;
  localparam int FW   = MW + 4;          // hidden one, fraction, guard, round, sticky
  localparam int LZW  = $clog2(FW + 1);

  logic               sa, sb;
  logic [EW-1:0]      ea, eb;
  logic [W-2:0]       ka, kb;            // magnitude keys, zero when the value is zero
  logic               swap;
  logic               sbig, ssml;
  logic [EW-1:0]      ebig, esml;
  logic [FW-1:0]      mbig, msml, aligned;
  logic [EW:0]        d;
  logic               sticky;
  logic [FW:0]        sum;
  logic [FW-1:0]      n;
  logic [LZW-1:0]     lz;
  logic signed [EW+2:0] e;
  logic               inc;
  logic [MW+1:0]      mr;                // rounded significand with carry-out
  logic [W-1:0]       res;

  // Number of leading zeros of a FW-bit word (FW when it is zero).
  function automatic logic [LZW-1:0] lzc(logic [FW-1:0] v);
    lzc = LZW'(FW);
    for (int i = 0; i < FW; i++) begin
      if (v[i]) lzc = LZW'(FW - 1 - i);
    end
  endfunction

  always_comb begin
    sa   = a[W-1];
    sb   = b[W-1] ^ sub;
    ea   = a[W-2 -: EW];
    eb   = b[W-2 -: EW];
    ka   = (ea == '0) ? '0 : a[W-2:0];
    kb   = (eb == '0) ? '0 : b[W-2:0];
    swap = kb > ka;
    sbig = swap ? sb : sa;
    ssml = swap ? sa : sb;
    ebig = swap ? eb : ea;
    esml = swap ? ea : eb;
    mbig = (swap ? (kb == '0) : (ka == '0)) ? '0
         : {1'b1, (swap ? b[MW-1:0] : a[MW-1:0]), 3'b000};
    msml = (swap ? (ka == '0) : (kb == '0)) ? '0
         : {1'b1, (swap ? a[MW-1:0] : b[MW-1:0]), 3'b000};
    d    = {1'b0, ebig} - {1'b0, esml};
    if (d >= (EW+1)'(FW)) begin
      aligned = '0;
      sticky  = |msml;
    end else begin
      aligned = msml >> d;
      sticky  = |(msml & ((FW'(1) << d) - FW'(1)));
    end
    aligned[0] = aligned[0] | sticky;

    if (sbig == ssml) sum = {1'b0, mbig} + {1'b0, aligned};
    else              sum = {1'b0, mbig} - {1'b0, aligned};

    e  = $signed({3'b000, ebig});
    lz = '0;
    if (sum[FW]) begin
      n = sum[FW:1];
      n[0] = n[0] | sum[0];
      e = e + EONE;
    end else begin
      lz = lzc(sum[FW-1:0]);
      n  = sum[FW-1:0] << lz;
      e  = e - $signed({{(EW+3-LZW){1'b0}}, lz});
    end

    // n = 1.f (MW bits) G R S
    inc = n[2] & (n[1] | n[0] | n[3]);
    mr  = {1'b0, n[FW-1:3]} + (MW+2)'(inc);
    if (mr[MW+1]) e = e + EONE;

    if (sum == '0) begin
      res = '0;
    end else if (e > (EW+3)'(EMAX)) begin
      res = {sbig, EW'(EMAX), {MW{1'b1}}};
    end else if (e <= 0) begin
      res = {sbig, {(W-1){1'b0}}};
    end else begin
      res = {sbig, e[EW-1:0], mr[MW-1:0]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s <= '0;
    else        s <= res;
  end

endmodule
