// dk_top: floating-point direct kinematics of a five-joint spherical manipulator.
//
// From the joint variables theta1, theta2, theta4, theta5 (radians) and the
// prismatic extension d3, the engine computes the twelve non-trivial entries of
// the homogeneous transform from the base to the hand (orientation columns x, y,
// z and position p; equations in dk_pkg). The link geometry of the
// Denavit-Hartenberg table (d1 = 106, d2 = 130, l2 = 0, in millimetres) is set
// by the real parameters D1, D2 and L2; l2 is zero for the reference robot but
// is kept in the datapath so that a calibrated value can be used.
//
// Datapath, as scheduled under a resource constraint:
//   * eight fp_taylor cores, four for sine and four for cosine, started together
//     (step 0);
//   * four fp_mul units (A..D) and two fp_addsub units shared by eleven
//     arithmetic steps that follow dk_pkg::schedule;
//   * one register file holding every input, intermediate and result.
// A controller walks the steps. Each step takes three clocks: LOAD fetches the
// operands of the six units from the register file (applying the optional
// negation of an add/sub's first operand), EXEC lets the units compute into
// their output registers, WB writes the results back. Operations of one step
// only read values written in earlier steps.
//
// Timing: start is sampled in the idle state together with the inputs. With the
// default 5-term Taylor cores (23 clocks) the trigonometric results are written
// after 24 clocks, and the results of step k after 24 + 3k clocks: x_z, y_z at
// 33, p_z 36, z_z and p_x 39, p_y 42, z_x and z_y 45, x_x and y_x 54, x_y and
// y_y 57. The published per-step spacing of three clocks is kept; the published
// absolute figures are ten clocks larger (43 .. 67), an offset before step 1
// that is not described and is not reproduced here. out_valid shows which
// results are ready; done pulses for one clock when the last ones are written,
// and all results then hold until the next start. busy is high from start to
// done; a start while busy is ignored.
//
// The split into eight trigonometric cores, four multipliers and two add/sub
// units, the steps in which each result is produced and the FSM control follow
// the architecture; the register file, the three-clock step and the
// handshake are this design's choices.
module dk_top #(
  parameter int unsigned EW     = fp_pkg::EW_DEFAULT,
  parameter int unsigned MW     = fp_pkg::MW_DEFAULT,
  parameter int unsigned NTERMS = 5,
  parameter real         D1     = 106.0,
  parameter real         D2     = 130.0,
  parameter real         L2     = 0.0,
  localparam int unsigned W = 1 + EW + MW
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] theta1,
  input  logic [W-1:0] theta2,
  input  logic [W-1:0] theta4,
  input  logic [W-1:0] theta5,
  input  logic [W-1:0] d3,
  output logic         busy,
  output logic         done,
  output logic [11:0]  out_valid,   // indexed by dk_pkg::out_e
  output logic [W-1:0] x_x, x_y, x_z,
  output logic [W-1:0] y_x, y_y, y_z,
  output logic [W-1:0] z_x, z_y, z_z,
  output logic [W-1:0] p_x, p_y, p_z
);
  import dk_pkg::*;

  localparam logic [63:0] D1_F = fp_pkg::real_to_fp(D1, EW, MW);
  localparam logic [63:0] D2_F = fp_pkg::real_to_fp(D2, EW, MW);
  localparam logic [63:0] L2_F = fp_pkg::real_to_fp(L2, EW, MW);

  typedef enum logic [2:0] {S_IDLE, S_TRIG, S_LOAD, S_EXEC, S_WB} state_e;

  state_e       state;
  logic [3:0]   step;
  step_t        sch;
  logic [W-1:0] rf [NREGS];

  // ---------------------------------------------------------------- step 0
  // Taylor cores: index 0..3 cosine of theta1,2,4,5; 4..7 sine of the same.
  localparam reg_e TRIG_DST [8] = '{R_C1, R_C2, R_C4, R_C5, R_S1, R_S2, R_S4, R_S5};

  logic [W-1:0] trig_x [4];
  logic [W-1:0] trig_y [8];
  logic [7:0]   trig_rdy;
  logic [7:0]   trig_busy;
  logic         trig_start;

  assign trig_x     = '{theta1, theta2, theta4, theta5};
  assign trig_start = (state == S_IDLE) && start;

  for (genvar i = 0; i < 8; i++) begin : g_trig
    fp_taylor #(.EW(EW), .MW(MW), .NTERMS(NTERMS)) u_taylor (
      .clk(clk), .rst_n(rst_n), .start(trig_start),
      .op((i < 4) ? fp_pkg::TAYLOR_COS : fp_pkg::TAYLOR_SIN),
      .x(trig_x[i % 4]), .busy(trig_busy[i]), .ready(trig_rdy[i]), .y(trig_y[i])
    );
  end

  // ------------------------------------------------------ steps 1 .. NSTEPS
  logic [W-1:0] mul_a [NMUL], mul_b [NMUL], mul_p [NMUL];
  logic [W-1:0] add_a [NADD], add_b [NADD], add_s [NADD];
  logic         add_sub [NADD];

  assign sch = schedule(int'(step));

  for (genvar i = 0; i < NMUL; i++) begin : g_mul
    fp_mul #(.EW(EW), .MW(MW)) u_mul (
      .clk(clk), .rst_n(rst_n), .a(mul_a[i]), .b(mul_b[i]), .p(mul_p[i])
    );
  end

  for (genvar i = 0; i < NADD; i++) begin : g_add
    fp_addsub #(.EW(EW), .MW(MW)) u_add (
      .clk(clk), .rst_n(rst_n), .a(add_a[i]), .b(add_b[i]), .sub(add_sub[i]), .s(add_s[i])
    );
  end

  // Operand registers, loaded in the LOAD clock of each step.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NMUL; i++) begin
        mul_a[i] <= '0;
        mul_b[i] <= '0;
      end
      for (int i = 0; i < NADD; i++) begin
        add_a[i]   <= '0;
        add_b[i]   <= '0;
        add_sub[i] <= 1'b0;
      end
    end else if (state == S_LOAD) begin
      for (int i = 0; i < NMUL; i++) begin
        mul_a[i] <= rf[sch.mul[i].a];
        mul_b[i] <= rf[sch.mul[i].b];
      end
      for (int i = 0; i < NADD; i++) begin
        add_a[i]   <= rf[sch.add[i].a] ^ {sch.add[i].nega, {(W-1){1'b0}}};
        add_b[i]   <= rf[sch.add[i].b];
        add_sub[i] <= sch.add[i].sub;
      end
    end
  end

  // ------------------------------------------------------------ controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      step      <= '0;
      done      <= 1'b0;
      out_valid <= '0;
      for (int i = 0; i < NREGS; i++) rf[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          rf[R_D1]  <= D1_F[W-1:0];
          rf[R_D2]  <= D2_F[W-1:0];
          rf[R_L2]  <= L2_F[W-1:0];
          rf[R_D3]  <= d3;
          out_valid <= '0;
          state     <= S_TRIG;
        end
        S_TRIG: if (&trig_rdy) begin
          for (int i = 0; i < 8; i++) rf[TRIG_DST[i]] <= trig_y[i];
          step  <= 4'd1;
          state <= S_LOAD;
        end
        S_LOAD: state <= S_EXEC;
        S_EXEC: state <= S_WB;
        S_WB: begin
          for (int i = 0; i < NMUL; i++) begin
            if (sch.mul[i].en) begin
              rf[sch.mul[i].d] <= mul_p[i];
              if (sch.mul[i].d >= R_XX) out_valid[out_idx(sch.mul[i].d)] <= 1'b1;
            end
          end
          for (int i = 0; i < NADD; i++) begin
            if (sch.add[i].en) begin
              rf[sch.add[i].d] <= add_s[i];
              if (sch.add[i].d >= R_XX) out_valid[out_idx(sch.add[i].d)] <= 1'b1;
            end
          end
          if (32'(step) == NSTEPS) begin
            done  <= 1'b1;
            step  <= '0;
            state <= S_IDLE;
          end else begin
            step  <= step + 4'd1;
            state <= S_LOAD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  assign x_x = rf[R_XX];
  assign x_y = rf[R_XY];
  assign x_z = rf[R_XZ];
  assign y_x = rf[R_YX];
  assign y_y = rf[R_YY];
  assign y_z = rf[R_YZ];
  assign z_x = rf[R_ZX];
  assign z_y = rf[R_ZY];
  assign z_z = rf[R_ZZ];
  assign p_x = rf[R_PX];
  assign p_y = rf[R_PY];
  assign p_z = rf[R_PZ];

  // A result is written exactly once per run: its valid bit must be clear
  // when a write-back step produces it.
  property p_single_write;
    @(posedge clk) disable iff (!rst_n)
      (state == S_WB && sch.add[0].en && sch.add[0].d >= R_XX) |->
        !out_valid[out_idx(sch.add[0].d)];
  endproperty
  a_single_write: assert property (p_single_write);

  // The eight trigonometric cores run in lock step.
  a_trig_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (trig_busy == '0) || (trig_busy == '1));

endmodule
