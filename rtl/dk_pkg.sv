// dk_pkg: register map and operation schedule of the direct-kinematics engine.
//
// The engine evaluates the twelve entries of the homogeneous transform
//   T = [x_x y_x z_x p_x; x_y y_y z_y p_y; x_z y_z z_z p_z; 0 0 0 1]
// of a five-joint spherical manipulator (two revolute base joints, one
// prismatic joint d3, two revolute wrist joints) from the sines and cosines of
// theta1, theta2, theta4 and theta5. With Ci = cos(theta_i), Si = sin(theta_i),
//   A   = -C1 S2 C4 - S1 S4          B   = -S1 S2 C4 + C1 S4
//   x_x =  A C5 - C1 C2 S5           y_x = -A S5 - C1 C2 C5
//   x_y =  B C5 - S1 C2 S5           y_y = -B S5 - S1 C2 C5
//   x_z =  C2 C4 C5 - S2 S5          y_z = -C2 C4 S5 - S2 C5
//   z_x = -C1 S2 S4 + S1 C4          z_y = -S1 S2 S4 - C1 C4      z_z = C2 S4
//   p_x = -C1 C2 d3 - C1 S2 l2 + S1 d2
//   p_y = -S1 C2 d3 - S1 S2 l2 - C1 d2
//   p_z = -S2 d3 + l2 C2 + d1
// Every value, input, intermediate or result, has a slot in one register file
// (reg_e). The schedule gives, for each of the eleven arithmetic steps, what
// the four multipliers (A..D) and the two add/subtract units (0, 1) do. Each
// add/sub can negate its first operand (nega) and add or subtract the second
// (sub), so a - b, -a - b, -a + b and a + b need no extra unit. The step in
// which each result and intermediate is formed, and which multiplier forms it,
// follow the published schedule diagram; the register map and its encoding are this
// design's encoding.
package dk_pkg;

  typedef enum logic [5:0] {
    // inputs: trigonometric results and geometry
    R_C1, R_S1, R_C2, R_S2, R_C4, R_S4, R_C5, R_S5,
    R_D1, R_D2, R_D3, R_L2,
    // intermediates
    R_C1C2, R_C2C4, R_L2C2,
    R_C2C4C5, R_S2S5, R_C2C4S5, R_S2C5, R_PZ0,
    R_S2D3, R_S2L2, R_S1D2, R_C1C2D3,
    R_C1S2L2, R_S1S2L2, R_C1D2, R_S1C2, R_PX0,
    R_S1C2D3, R_S2S4, R_S2C4, R_PY0,
    R_S1C4, R_C1S2S4, R_S1S2S4, R_C1C4,
    R_C1S2C4, R_S1S4, R_C1S4, R_S1S2C4,
    R_A, R_B,
    R_AC5, R_AS5, R_C1C2S5, R_C1C2C5,
    R_BC5, R_BS5, R_S1C2S5, R_S1C2C5,
    // results
    R_XX, R_XY, R_XZ, R_YX, R_YY, R_YZ, R_ZX, R_ZY, R_ZZ, R_PX, R_PY, R_PZ
  } reg_e;

  localparam int unsigned NREGS  = int'(R_PZ) + 1;
  localparam int unsigned NSTEPS = 11;
  localparam int unsigned NMUL   = 4;
  localparam int unsigned NADD   = 2;

  typedef struct packed {
    logic en;
    reg_e a;
    reg_e b;
    reg_e d;
  } mul_op_t;

  typedef struct packed {
    logic en;
    reg_e a;
    logic nega;
    reg_e b;
    logic sub;
    reg_e d;
  } add_op_t;

  typedef struct packed {
    mul_op_t [NMUL-1:0] mul;   // index 0 = multiplier A ... 3 = multiplier D
    add_op_t [NADD-1:0] add;
  } step_t;

  // Index of each result in the engine's result-valid vector.
  typedef enum logic [3:0] {
    O_XX, O_XY, O_XZ, O_YX, O_YY, O_YZ, O_ZX, O_ZY, O_ZZ, O_PX, O_PY, O_PZ
  } out_e;

  // Position of a result register in the result-valid vector.
  function automatic logic [3:0] out_idx(reg_e r);
    return 4'(6'(r) - 6'(R_XX));
  endfunction

  function automatic mul_op_t m(reg_e a, reg_e b, reg_e d);
    return '{en: 1'b1, a: a, b: b, d: d};
  endfunction

  function automatic add_op_t ad(logic nega, reg_e a, logic sub, reg_e b, reg_e d);
    return '{en: 1'b1, a: a, nega: nega, b: b, sub: sub, d: d};
  endfunction

  // Operations of step k (1 .. NSTEPS).
  function automatic step_t schedule(int k);
    step_t s;
    s = '0;
    case (k)
      1: begin
        s.mul[0] = m(R_C1, R_C2, R_C1C2);
        s.mul[1] = m(R_C2, R_C4, R_C2C4);
        s.mul[2] = m(R_L2, R_C2, R_L2C2);
      end
      2: begin
        s.mul[0] = m(R_C2C4, R_C5, R_C2C4C5);
        s.mul[1] = m(R_S2,   R_S5, R_S2S5);
        s.mul[2] = m(R_C2C4, R_S5, R_C2C4S5);
        s.mul[3] = m(R_S2,   R_C5, R_S2C5);
        s.add[0] = ad(1'b0, R_L2C2, 1'b0, R_D1, R_PZ0);          // l2 C2 + d1
      end
      3: begin
        s.mul[0] = m(R_S2,   R_D3, R_S2D3);
        s.mul[1] = m(R_S2,   R_L2, R_S2L2);
        s.mul[2] = m(R_S1,   R_D2, R_S1D2);
        s.mul[3] = m(R_C1C2, R_D3, R_C1C2D3);
        s.add[0] = ad(1'b0, R_C2C4C5, 1'b1, R_S2S5, R_XZ);       // x_z
        s.add[1] = ad(1'b1, R_C2C4S5, 1'b1, R_S2C5, R_YZ);       // y_z
      end
      4: begin
        s.mul[0] = m(R_C1, R_S2L2, R_C1S2L2);
        s.mul[1] = m(R_S1, R_S2L2, R_S1S2L2);
        s.mul[2] = m(R_C1, R_D2,   R_C1D2);
        s.mul[3] = m(R_S1, R_C2,   R_S1C2);
        s.add[0] = ad(1'b0, R_PZ0,  1'b1, R_S2D3,   R_PZ);       // p_z
        s.add[1] = ad(1'b0, R_S1D2, 1'b1, R_C1C2D3, R_PX0);      // S1 d2 - C1 C2 d3
      end
      5: begin
        s.mul[0] = m(R_S1C2, R_D3, R_S1C2D3);
        s.mul[1] = m(R_C2,   R_S4, R_ZZ);                        // z_z
        s.mul[2] = m(R_S2,   R_S4, R_S2S4);
        s.mul[3] = m(R_S2,   R_C4, R_S2C4);
        s.add[0] = ad(1'b0, R_PX0,    1'b1, R_C1S2L2, R_PX);     // p_x
        s.add[1] = ad(1'b1, R_S1S2L2, 1'b1, R_C1D2,   R_PY0);    // -S1 S2 l2 - C1 d2
      end
      6: begin
        s.mul[0] = m(R_S1, R_C4,   R_S1C4);
        s.mul[1] = m(R_C1, R_S2S4, R_C1S2S4);
        s.mul[2] = m(R_S1, R_S2S4, R_S1S2S4);
        s.mul[3] = m(R_C1, R_C4,   R_C1C4);
        s.add[0] = ad(1'b0, R_PY0, 1'b1, R_S1C2D3, R_PY);        // p_y
      end
      7: begin
        s.mul[0] = m(R_C1, R_S2C4, R_C1S2C4);
        s.mul[1] = m(R_S1, R_S4,   R_S1S4);
        s.mul[2] = m(R_C1, R_S4,   R_C1S4);
        s.mul[3] = m(R_S1, R_S2C4, R_S1S2C4);
        s.add[0] = ad(1'b1, R_C1S2S4, 1'b0, R_S1C4, R_ZX);       // z_x
        s.add[1] = ad(1'b1, R_S1S2S4, 1'b1, R_C1C4, R_ZY);       // z_y
      end
      8: begin
        s.add[0] = ad(1'b1, R_C1S2C4, 1'b1, R_S1S4, R_A);        // A
        s.add[1] = ad(1'b1, R_S1S2C4, 1'b0, R_C1S4, R_B);        // B
      end
      9: begin
        s.mul[0] = m(R_A,    R_C5, R_AC5);
        s.mul[1] = m(R_A,    R_S5, R_AS5);
        s.mul[2] = m(R_C1C2, R_S5, R_C1C2S5);
        s.mul[3] = m(R_C1C2, R_C5, R_C1C2C5);
      end
      10: begin
        s.mul[0] = m(R_B,    R_C5, R_BC5);
        s.mul[1] = m(R_B,    R_S5, R_BS5);
        s.mul[2] = m(R_S1C2, R_S5, R_S1C2S5);
        s.mul[3] = m(R_S1C2, R_C5, R_S1C2C5);
        s.add[0] = ad(1'b0, R_AC5, 1'b1, R_C1C2S5, R_XX);        // x_x
        s.add[1] = ad(1'b1, R_AS5, 1'b1, R_C1C2C5, R_YX);        // y_x
      end
      11: begin
        s.add[0] = ad(1'b0, R_BC5, 1'b1, R_S1C2S5, R_XY);        // x_y
        s.add[1] = ad(1'b1, R_BS5, 1'b1, R_S1C2C5, R_YY);        // y_y
      end
      default: s = '0;
    endcase
    return s;
  endfunction

endpackage
