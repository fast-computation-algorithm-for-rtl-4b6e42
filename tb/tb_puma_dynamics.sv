// tb_puma_dynamics: recursive Newton-Euler inverse dynamics of a six-joint
// PUMA 560-type arm, with every vector operation done on the array
// processor by a host program.
//
// The recursion (modified Denavit-Hartenberg frames, all joints revolute,
// R = rotation of frame i+1 in frame i, P its origin, z = (0,0,1)):
//   outward  w'   = R^T w + qd z
//            wd'  = R^T wd + (R^T w) x (qd z) + qdd z
//            vd'  = R^T (wd x P + w x (w x P) + vd)
//            vdc  = wd' x Pc + w' x (w' x Pc) + vd'
//            F    = m vdc,   N = I wd' + w' x (I w')
//   inward   f    = R f' + F
//            n    = N + R n' + Pc x F + P x (R f')
//            tau  = n . z
// Gravity enters as vd = (0, 0, g) at the base. Each operation (R^T v as
// vector times matrix, I v and R v as matrix times vector, cross product,
// vector addition, vector times scalar, inner product) runs on the array
// through the host bus. The algorithm is written once and evaluated with
// three back ends: the array, a bit-exact software model of the array's
// roundings (fp_ref_pkg), and plain double precision. The array must match
// the model bit for bit and the double result within a relative tolerance.
// Kinematic values are the commonly published PUMA 560 table; masses,
// centres of mass and inertias are illustrative values of the right size.
module tb_puma_dynamics;
  import ap_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned N  = 3;
  localparam int unsigned RB = 2;
  localparam int unsigned CASES = 3;

  localparam int BE_HW = 0, BE_REF = 1, BE_DBL = 2;

  logic            clk = 1'b0;
  logic            reset, sync, hold, hlda, finish, rd, wr, sys_rdata_oe;
  logic [2*RB+1:0] reg_sel;
  fp32_t           sys_wdata, sys_rdata;
  int              checks = 0, failures = 0;
  int              ops = 0, op_cyc = 0;
  int              hw_mul_steps = 0, hw_add_steps = 0;

  array_processor dut (.*);

  always #5 clk = ~clk;

  typedef real vec_t [3];
  typedef real mat_t [3][3];

  task automatic check(string what, logic [31:0] got, logic [31:0] expect_v);
    checks++;
    if (got !== expect_v) begin
      failures++;
      if (failures < 20) $display("FAIL: %s = %h, expected %h", what, got, expect_v);
    end
  endtask

  // ---------------- host driver ----------------
  task automatic host_wr(int i, int j, pe_reg_e r, real v);
    reg_sel = {RB'(i), RB'(j), r}; sys_wdata = r2f(v); wr = 1'b1;
    @(negedge clk);
    wr = 1'b0;
  endtask

  task automatic host_rd(int i, int j, output real v);
    reg_sel = {RB'(i), RB'(j), REG_CR}; rd = 1'b1;
    #1 v = f2r(sys_rdata);
    @(negedge clk);
    rd = 1'b0;
  endtask

  task automatic run(opcode_e op, int mul_steps, int add_steps);
    int c;
    reg_sel = {RB'(N), RB'(0), SEQ_OPCODE}; sys_wdata = 32'(op); wr = 1'b1;
    @(negedge clk);
    wr = 1'b0; hold = 1'b0;
    @(negedge clk);
    sync = 1'b1;
    @(negedge clk);
    sync = 1'b0;
    c = 1;
    while (!finish) begin
      @(negedge clk);
      c++;
    end
    hold = 1'b1;
    while (!hlda) @(negedge clk);
    ops++;
    op_cyc += c;
    hw_mul_steps += mul_steps;
    hw_add_steps += add_steps;
  endtask

  // ---------------- scalar helpers of the software back ends ----------------
  function automatic real s_mul(int be, real a, real b);
    return (be == BE_DBL) ? a * b : f2r(ref_mul(r2f(a), r2f(b)));
  endfunction

  function automatic real s_add(int be, real a, real b);
    return (be == BE_DBL) ? a + b : f2r(ref_add(r2f(a), r2f(b)));
  endfunction

  function automatic real s_sub(int be, real a, real b);
    return (be == BE_DBL) ? a - b : s_add(be, a, -b);
  endfunction

  // ---------------- vector operations, three back ends ----------------
  // c = R^T v  (array: vector times matrix, v in AR(i,0), R in BR)
  task automatic op_vmat(int be, input vec_t v, input mat_t m, output vec_t c);
    if (be == BE_HW) begin
      for (int i = 0; i < 3; i++) begin
        host_wr(i, 0, REG_AR, v[i]);
        for (int j = 0; j < 3; j++) host_wr(i, j, REG_BR, m[i][j]);
      end
      run(OP_VEC_MAT, 1, 2);
      for (int j = 0; j < 3; j++) host_rd(0, j, c[j]);
    end else
      for (int j = 0; j < 3; j++)
        c[j] = s_add(be, s_add(be, s_mul(be, v[0], m[0][j]), s_mul(be, v[1], m[1][j])),
                     s_mul(be, v[2], m[2][j]));
  endtask

  // c = M v  (array: matrix times vector, M in AR, v in BR(0,j))
  task automatic op_mvec(int be, input mat_t m, input vec_t v, output vec_t c);
    if (be == BE_HW) begin
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) host_wr(i, j, REG_AR, m[i][j]);
      for (int j = 0; j < 3; j++) host_wr(0, j, REG_BR, v[j]);
      run(OP_MAT_VEC, 1, 2);
      for (int i = 0; i < 3; i++) host_rd(i, 0, c[i]);
    end else
      for (int i = 0; i < 3; i++)
        c[i] = s_add(be, s_add(be, s_mul(be, m[i][0], v[0]), s_mul(be, m[i][1], v[1])),
                     s_mul(be, m[i][2], v[2]));
  endtask

  // c = a + b  (array: vector addition in row 0)
  task automatic op_vadd(int be, input vec_t a, input vec_t b, output vec_t c);
    if (be == BE_HW) begin
      for (int j = 0; j < 3; j++) begin
        host_wr(0, j, REG_AR, a[j]);
        host_wr(0, j, REG_BR, b[j]);
      end
      run(OP_VEC_ADD, 0, 1);
      for (int j = 0; j < 3; j++) host_rd(0, j, c[j]);
    end else
      for (int j = 0; j < 3; j++) c[j] = s_add(be, a[j], b[j]);
  endtask

  // c = a * s  (array: vector times scalar, scalar in BR(0,0))
  task automatic op_vscale(int be, input vec_t a, input real s, output vec_t c);
    if (be == BE_HW) begin
      for (int j = 0; j < 3; j++) host_wr(0, j, REG_AR, a[j]);
      host_wr(0, 0, REG_BR, s);
      run(OP_VEC_SCALE, 1, 0);
      for (int j = 0; j < 3; j++) host_rd(0, j, c[j]);
    end else
      for (int j = 0; j < 3; j++) c[j] = s_mul(be, a[j], s);
  endtask

  // c = a x b  (array: cross product, operands spread over columns 0, 1)
  task automatic op_cross(int be, input vec_t a, input vec_t b, output vec_t c);
    if (be == BE_HW) begin
      host_wr(0, 0, REG_AR, a[1]); host_wr(0, 0, REG_BR, b[2]);
      host_wr(0, 1, REG_AR, a[2]); host_wr(0, 1, REG_BR, b[1]);
      host_wr(1, 0, REG_AR, a[2]); host_wr(1, 0, REG_BR, b[0]);
      host_wr(1, 1, REG_AR, a[0]); host_wr(1, 1, REG_BR, b[2]);
      host_wr(2, 0, REG_AR, a[0]); host_wr(2, 0, REG_BR, b[1]);
      host_wr(2, 1, REG_AR, a[1]); host_wr(2, 1, REG_BR, b[0]);
      run(OP_CROSS, 1, 1);
      for (int i = 0; i < 3; i++) host_rd(i, 0, c[i]);
    end else begin
      c[0] = s_sub(be, s_mul(be, a[1], b[2]), s_mul(be, a[2], b[1]));
      c[1] = s_sub(be, s_mul(be, a[2], b[0]), s_mul(be, a[0], b[2]));
      c[2] = s_sub(be, s_mul(be, a[0], b[1]), s_mul(be, a[1], b[0]));
    end
  endtask

  // c = a . b  (array: inner product in row 0, result in CR(0,0))
  task automatic op_dot(int be, input vec_t a, input vec_t b, output real c);
    if (be == BE_HW) begin
      for (int j = 0; j < 3; j++) begin
        host_wr(0, j, REG_AR, a[j]);
        host_wr(0, j, REG_BR, b[j]);
      end
      run(OP_DOT, 1, 2);
      host_rd(0, 0, c);
    end else
      c = s_add(be, s_add(be, s_mul(be, a[0], b[0]), s_mul(be, a[1], b[1])),
                s_mul(be, a[2], b[2]));
  endtask

  // ---------------- the arm ----------------
  // Modified DH (alpha_{i-1}, a_{i-1}, d_i) of the PUMA 560, metres.
  localparam int  ALPHA_Q [6] = '{0, -1, 0, -1, 1, -1};
  localparam real A_LEN  [6] = '{0.0, 0.0, 0.4318, 0.0203, 0.0, 0.0};
  localparam real D_LEN  [6] = '{0.0, 0.2435, -0.0934, 0.4331, 0.0, 0.0};
  // Illustrative link masses (kg), centres of mass (m), principal inertias.
  localparam real MASS   [6] = '{0.0, 17.4, 4.8, 0.82, 0.34, 0.09};
  localparam real PC     [6][3] = '{'{0.0, 0.0, 0.0}, '{0.068, 0.006, -0.016},
                                   '{0.0, -0.07, 0.014}, '{0.0, 0.0, -0.019},
                                   '{0.0, 0.0, 0.0}, '{0.0, 0.0, 0.032}};
  localparam real INER   [6][3] = '{'{0.0, 0.0, 0.35}, '{0.13, 0.524, 0.539},
                                   '{0.066, 0.086, 0.0125}, '{0.0018, 0.0013, 0.0018},
                                   '{0.0003, 0.0004, 0.0003}, '{0.00015, 0.00015, 0.00004}};
  localparam real G  = 9.81;
  localparam real PI = 3.14159265358979323846;

  // Inputs of one case, already rounded to the array's number format.
  mat_t Rm [7];        // Rm[i] = rotation of frame i+1 in frame i (Rm[6] = I)
  vec_t Pv [7];        // Pv[i] = origin of frame i+1 in frame i (Pv[6] = 0)
  real  qd [6], qdd [6];

  function automatic real q32(real x);
    return f2r(r2f(x));
  endfunction

  task automatic make_case();
    for (int i = 0; i < 6; i++) begin
      real th, c, s, ca, sa;
      th = (real'($urandom_range(36000, 0)) / 100.0 - 180.0) * PI / 180.0;
      c = $cos(th); s = $sin(th);
      ca = (ALPHA_Q[i] == 0) ? 1.0 : 0.0;
      sa = real'(ALPHA_Q[i]);
      // modified DH: R = Rx(alpha_{i-1}) Rz(theta_i)
      Rm[i] = '{'{q32(c), q32(-s), 0.0},
                '{q32(s * ca), q32(c * ca), q32(-sa)},
                '{q32(s * sa), q32(c * sa), q32(ca)}};
      Pv[i] = '{q32(A_LEN[i]), q32(-sa * D_LEN[i]), q32(ca * D_LEN[i])};
      qd[i]  = q32(real'(int'($urandom_range(400, 0)) - 200) / 100.0);
      qdd[i] = q32(real'(int'($urandom_range(400, 0)) - 200) / 100.0);
    end
    Rm[6] = '{'{1.0, 0.0, 0.0}, '{0.0, 1.0, 0.0}, '{0.0, 0.0, 1.0}};
    Pv[6] = '{0.0, 0.0, 0.0};
  endtask

  // Joint torques of the current case with back end be.
  task automatic newton_euler(int be, output real tau [6]);
    vec_t w, wd, vd, z, t1, t2, t3, t4, w_old, vdc;
    vec_t F [6], Nn [6], f, n;
    mat_t I;
    z  = '{0.0, 0.0, 1.0};
    w  = '{0.0, 0.0, 0.0};
    wd = '{0.0, 0.0, 0.0};
    vd = '{0.0, 0.0, q32(G)};
    // Rm[i] maps frame i+1 to frame i; frame 0 is the base, so link i
    // (0-based) uses Rm[i] and Pv[i] from the previous frame.
    for (int i = 0; i < 6; i++) begin
      vec_t qz, qddz, pc;
      qz   = '{0.0, 0.0, qd[i]};
      qddz = '{0.0, 0.0, qdd[i]};
      pc   = '{q32(PC[i][0]), q32(PC[i][1]), q32(PC[i][2])};
      // vd' = R^T (wd x P + w x (w x P) + vd)
      op_cross(be, wd, Pv[i], t1);
      op_cross(be, w, Pv[i], t2);
      op_cross(be, w, t2, t3);
      op_vadd(be, t1, t3, t4);
      op_vadd(be, t4, vd, t4);
      op_vmat(be, t4, Rm[i], vd);
      // w' = R^T w + qd z ; wd' = R^T wd + (R^T w) x qd z + qdd z
      op_vmat(be, w, Rm[i], w_old);
      op_vadd(be, w_old, qz, w);
      op_vmat(be, wd, Rm[i], t1);
      op_cross(be, w_old, qz, t2);
      op_vadd(be, t1, t2, t1);
      op_vadd(be, t1, qddz, wd);
      // vdc = wd x pc + w x (w x pc) + vd ; F = m vdc
      op_cross(be, wd, pc, t1);
      op_cross(be, w, pc, t2);
      op_cross(be, w, t2, t3);
      op_vadd(be, t1, t3, t4);
      op_vadd(be, t4, vd, vdc);
      op_vscale(be, vdc, q32(MASS[i]), F[i]);
      // N = I wd + w x (I w)
      I = '{'{q32(INER[i][0]), 0.0, 0.0}, '{0.0, q32(INER[i][1]), 0.0},
            '{0.0, 0.0, q32(INER[i][2])}};
      op_mvec(be, I, wd, t1);
      op_mvec(be, I, w, t2);
      op_cross(be, w, t2, t3);
      op_vadd(be, t1, t3, Nn[i]);
    end
    f = '{0.0, 0.0, 0.0};
    n = '{0.0, 0.0, 0.0};
    for (int i = 5; i >= 0; i--) begin
      vec_t pc, rf;
      pc = '{q32(PC[i][0]), q32(PC[i][1]), q32(PC[i][2])};
      // f = R f' + F ; n = N + R n' + pc x F + P x (R f')
      op_mvec(be, Rm[i + 1], f, rf);
      op_vadd(be, rf, F[i], f);
      op_mvec(be, Rm[i + 1], n, t1);
      op_vadd(be, Nn[i], t1, t1);
      op_cross(be, pc, F[i], t2);
      op_vadd(be, t1, t2, t1);
      op_cross(be, Pv[i + 1], rf, t3);
      op_vadd(be, t1, t3, n);
      op_dot(be, n, z, tau[i]);
    end
  endtask

  initial begin
    real tau_hw [6], tau_ref [6], tau_dbl [6];
    reset = 1'b1; sync = 1'b0; hold = 1'b1; rd = 1'b0; wr = 1'b0;
    reg_sel = '0; sys_wdata = '0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    while (!hlda) @(negedge clk);
    for (int k = 0; k < CASES; k++) begin
      make_case();
      newton_euler(BE_HW, tau_hw);
      newton_euler(BE_REF, tau_ref);
      newton_euler(BE_DBL, tau_dbl);
      for (int i = 0; i < 6; i++) begin
        real e, lim;
        check("joint torque (bit exact)", r2f(tau_hw[i]), r2f(tau_ref[i]));
        e   = tau_hw[i] - tau_dbl[i];
        lim = 1e-4 * (1.0 + ((tau_dbl[i] < 0.0) ? -tau_dbl[i] : tau_dbl[i]));
        check("joint torque (double, relative 1e-4)", 32'(e < lim && e > -lim), 1);
      end
      $display("case %0d torques (N m): %f %f %f %f %f %f", k,
               tau_hw[0], tau_hw[1], tau_hw[2], tau_hw[3], tau_hw[4], tau_hw[5]);
    end
    $display("array operations=%0d (multiply steps=%0d, add steps=%0d) cycles=%0d per case",
             ops / CASES, hw_mul_steps / CASES, hw_add_steps / CASES, op_cyc / CASES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
