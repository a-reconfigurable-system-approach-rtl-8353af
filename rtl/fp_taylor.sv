// fp_taylor: sine, cosine or arctangent by a truncated Taylor series around 0,
// computed with one floating-point multiplier and one add/subtract unit.
//
// A finite-state machine sequences the two shared units:
//   SQ   : x*x is formed (x was registered with start)
//   INIT : x^2 is kept in a register; the accumulator and the running power are
//          set to the series' first term (x for sin/atan, 1 for cos)
//   then NTERMS iterations of four clocks each:
//   POW  : power <- power * x^2          (x^(2n+1) or x^(2n))
//   COEF : term  <- power * ROM factor    (factor from taylor_coef_rom)
//   ACC  : acc   <- acc -/+ term          (subtract on the first term, then add,
//                                           alternating: the op+/- control)
//   NEXT : accumulator written back, term counter advanced
// With NTERMS terms after the leading one the result is ready 4*NTERMS+3 clocks
// after start: 23 clocks for the default of five, which is the latency printed
// for five powers (11 for two up to 27 for six).
//
// Interface: start (one clock) samples x and op; busy is high while the series
// is being evaluated; ready rises when y holds the result and stays high until
// the next start. The input should lie in [-pi/2, pi/2] for sin/cos; arctangent
// converges only for |x| < 1. The unit structure (one multiplier, one add/sub,
// FSM, x^2 register, three ROMs selected by op, accumulating adder, ready) is the
// architecture's; the exact state split is this design's choice.
module fp_taylor #(
  parameter int unsigned EW     = fp_pkg::EW_DEFAULT,
  parameter int unsigned MW     = fp_pkg::MW_DEFAULT,
  parameter int unsigned NTERMS = 5,
  localparam int unsigned W  = 1 + EW + MW,
  localparam int unsigned NB = (NTERMS > 1) ? $clog2(NTERMS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  fp_pkg::taylor_op_e op,
  input  logic [W-1:0]       x,
  output logic               busy,
  output logic               ready,
  output logic [W-1:0]       y
);

  localparam logic [W-1:0] ONE = {1'b0, 1'b0, {(EW-1){1'b1}}, {MW{1'b0}}};

  typedef enum logic [2:0] {S_IDLE, S_SQ, S_INIT, S_POW, S_COEF, S_ACC, S_NEXT} state_e;

  state_e             state;
  fp_pkg::taylor_op_e op_r;
  logic [W-1:0]       x_r, x2, pw, acc;
  logic [NB-1:0]      n;
  logic [W-1:0]       mul_a, mul_b, mul_p;
  logic [W-1:0]       add_s;
  logic               add_sub;
  logic [W-1:0]       coef;

  taylor_coef_rom #(.EW(EW), .MW(MW), .NTERMS(NTERMS)) u_rom (
    .op(op_r), .n(n), .coef(coef)
  );

  fp_mul #(.EW(EW), .MW(MW)) u_mul (
    .clk(clk), .rst_n(rst_n), .a(mul_a), .b(mul_b), .p(mul_p)
  );

  fp_addsub #(.EW(EW), .MW(MW)) u_add (
    .clk(clk), .rst_n(rst_n), .a(acc), .b(mul_p), .sub(add_sub), .s(add_s)
  );

  // Operand selection for the shared multiplier.
  always_comb begin
    unique case (state)
      S_SQ:    begin mul_a = x_r;   mul_b = x_r;  end
      S_POW:   begin mul_a = pw;    mul_b = x2;   end
      S_COEF:  begin mul_a = mul_p; mul_b = coef; end
      default: begin mul_a = '0;    mul_b = '0;   end
    endcase
  end

  // The first term after the leading one is subtracted, the next added, ...
  assign add_sub = ~n[0];
  assign busy    = (state != S_IDLE);
  assign y       = acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      op_r  <= fp_pkg::TAYLOR_SIN;
      x_r   <= '0;
      x2    <= '0;
      pw    <= '0;
      acc   <= '0;
      n     <= '0;
      ready <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          x_r   <= x;
          op_r  <= op;
          ready <= 1'b0;
          state <= S_SQ;
        end
        S_SQ: state <= S_INIT;
        S_INIT: begin
          x2    <= mul_p;
          acc   <= (op_r == fp_pkg::TAYLOR_COS) ? ONE : x_r;
          pw    <= (op_r == fp_pkg::TAYLOR_COS) ? ONE : x_r;
          n     <= '0;
          state <= S_POW;
        end
        S_POW:  state <= S_COEF;
        S_COEF: begin
          pw    <= mul_p;
          state <= S_ACC;
        end
        S_ACC:  state <= S_NEXT;
        S_NEXT: begin
          acc <= add_s;
          if (32'(n) == NTERMS - 1) begin
            ready <= 1'b1;
            state <= S_IDLE;
          end else begin
            n     <= n + 1'b1;
            state <= S_POW;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
