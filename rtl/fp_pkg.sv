// fp_pkg: shared definitions for the parameterised floating-point format.
//
// A number is {sign, biased exponent (EW bits), fraction (MW bits)} with a hidden
// leading one, bias 2^(EW-1)-1, as in IEEE-754. The default is the 32-bit single
// format (EW=8, MW=23), which is the configuration the design is built around;
// 43-bit (11,31) and 64-bit (11,52) formats are obtained by changing EW/MW.
//
// Simplifications that are this design's own choice and apply to every unit:
//   * an exponent field of zero means the value zero (subnormals flush to zero);
//   * there are no infinities or NaNs: results too large saturate to the largest
//     finite magnitude, results too small become zero;
//   * rounding is round-to-nearest, ties to even.
//
// The real-valued helpers below convert between a double and a format of up to
// 64 bits (EW <= 11, MW <= 52). They are used only at elaboration time (to build
// constant tables) and by testbenches; they never describe hardware.
package fp_pkg;

  localparam int unsigned EW_DEFAULT = 8;
  localparam int unsigned MW_DEFAULT = 23;

  // Operation selector of the Taylor core (the "op" input in its block diagram).
  typedef enum logic [1:0] {
    TAYLOR_SIN  = 2'd0,
    TAYLOR_COS  = 2'd1,
    TAYLOR_ATAN = 2'd2
  } taylor_op_e;

  // Convert a double to the (EW, MW) format, rounding to nearest even.
  // The result is right-aligned in 64 bits.
  function automatic logic [63:0] real_to_fp(real r, int unsigned ew, int unsigned mw);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [52:0] m;      // hidden one + 52 fraction bits
    logic [52:0] q;
    logic [52:0] rem;
    logic [52:0] half;
    int unsigned sh;
    int          bias;
    logic [63:0] res;
    d    = $realtobits(r);
    s    = d[63];
    bias = (1 << (ew - 1)) - 1;
    res  = '0;
    if (d[62:52] == 11'd0) return 64'(s) << (mw + ew);
    e  = int'(d[62:52]) - 1023 + bias;
    m  = {1'b1, d[51:0]};
    sh = 52 - mw;
    q  = m >> sh;
    if (sh > 0) begin
      rem  = m & ((53'd1 << sh) - 53'd1);
      half = 53'd1 << (sh - 1);
      if (rem > half || (rem == half && q[0])) q = q + 53'd1;
      if (q[mw + 1]) begin
        q = q >> 1;
        e = e + 1;
      end
    end
    if (e <= 0) return 64'(s) << (mw + ew);   // flush to a signed zero
    if (e >= (1 << ew) - 1) begin
      res = '0;
      res[mw + ew] = s;
      for (int i = 0; i < int'(mw + ew); i++) res[i] = 1'b1;
      res[mw] = 1'b0;  // exponent field all ones except its LSB: largest finite value
      return res;
    end
    res = 64'(q) & ((64'd1 << mw) - 64'd1);
    res = res | (64'(e) << mw) | (64'(s) << (mw + ew));
    return res;
  endfunction

  // Convert a value of the (EW, MW) format (right-aligned in 64 bits) to a double.
  function automatic real fp_to_real(logic [63:0] f, int unsigned ew, int unsigned mw);
    logic        s;
    int          e;
    logic [63:0] m;
    logic [63:0] d;
    s = f[mw + ew];
    e = int'((f >> mw) & ((64'd1 << ew) - 64'd1));
    m = f & ((64'd1 << mw) - 64'd1);
    if (e == 0) return 0.0;
    e = e - ((1 << (ew - 1)) - 1) + 1023;
    d = {s, 11'(e), 52'(m << (52 - mw))};
    return $bitstoreal(d);
  endfunction

endpackage
