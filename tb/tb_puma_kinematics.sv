// tb_puma_kinematics: forward kinematics of a six-joint PUMA 560 arm,
// computed on the array processor by a host program.
//
// The host builds each link's rotation R_i = Rz(theta_i) * Rx(alpha_i) and
// offset p_i = (a_i cos theta_i, a_i sin theta_i, d_i) from the arm's
// Denavit-Hartenberg table, then chains them on the array:
//   t = R * p_i      (matrix times vector)
//   p = p + t        (vector addition)
//   R = R * R_i      (matrix product)
// for i = 2..6, starting from R = R_1, p = p_1. Every intermediate result is
// read back from CR and fed into the next operation through AR/BR, as a
// host driver would. The final pose is checked bit for bit against the same
// sequence of roundings done with fp_ref_pkg, and against a plain
// double-precision evaluation within a small tolerance. The DH table is the
// commonly published one for the PUMA 560 (link lengths in metres).
module tb_puma_kinematics;
  import ap_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned N  = 3;
  localparam int unsigned RB = 2;
  localparam int unsigned POSES = 6;

  logic            clk = 1'b0;
  logic            reset, sync, hold, hlda, finish, rd, wr, sys_rdata_oe;
  logic [2*RB+1:0] reg_sel;
  fp32_t           sys_wdata, sys_rdata;
  int              checks = 0, failures = 0, ops = 0, op_cycles_total = 0;

  array_processor dut (.*);

  always #5 clk = ~clk;

  // PUMA 560 DH table: alpha as multiples of 90 degrees, a and d in metres.
  localparam int  ALPHA_Q [6] = '{1, 0, -1, 1, -1, 0};
  localparam real A_LEN  [6] = '{0.0, 0.4318, 0.0203, 0.0, 0.0, 0.0};
  localparam real D_LEN  [6] = '{0.0, 0.0, 0.15005, 0.4318, 0.0, 0.0};
  localparam real PI = 3.14159265358979323846;

  task automatic check(string what, logic [31:0] got, logic [31:0] expect_v);
    checks++;
    if (got !== expect_v) begin
      failures++;
      if (failures < 20) $display("FAIL: %s = %h, expected %h", what, got, expect_v);
    end
  endtask

  // ---- host driver ----
  task automatic host_wr(int i, int j, pe_reg_e r, fp32_t v);
    reg_sel = {RB'(i), RB'(j), r}; sys_wdata = v; wr = 1'b1;
    @(negedge clk);
    wr = 1'b0;
  endtask

  task automatic host_rd(int i, int j, pe_reg_e r, output fp32_t v);
    reg_sel = {RB'(i), RB'(j), r}; rd = 1'b1;
    #1 v = sys_rdata;
    @(negedge clk);
    rd = 1'b0;
  endtask

  task automatic run(opcode_e op);
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
    op_cycles_total += c;
  endtask

  typedef fp32_t mat_t [3][3];
  typedef fp32_t vec_t [3];

  // Array versions of the three operations used.
  task automatic hw_mat_mul(input mat_t a, input mat_t b, output mat_t c);
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        host_wr(i, j, REG_AR, a[i][j]);
        host_wr(i, j, REG_BR, b[i][j]);
      end
    run(OP_MAT_MUL);
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) host_rd(i, j, REG_CR, c[i][j]);
  endtask

  task automatic hw_mat_vec(input mat_t a, input vec_t b, output vec_t c);
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) host_wr(i, j, REG_AR, a[i][j]);
    for (int j = 0; j < 3; j++) host_wr(0, j, REG_BR, b[j]);
    run(OP_MAT_VEC);
    for (int i = 0; i < 3; i++) host_rd(i, 0, REG_CR, c[i]);
  endtask

  task automatic hw_vec_add(input vec_t a, input vec_t b, output vec_t c);
    for (int j = 0; j < 3; j++) begin
      host_wr(0, j, REG_AR, a[j]);
      host_wr(0, j, REG_BR, b[j]);
    end
    run(OP_VEC_ADD);
    for (int j = 0; j < 3; j++) host_rd(0, j, REG_CR, c[j]);
  endtask

  initial begin
    mat_t R, Rr, Ri;
    vec_t p, pr, pi_v, t;
    real  Rd [3][3], pd [3], Rn [3][3], th;
    reset = 1'b1; sync = 1'b0; hold = 1'b1; rd = 1'b0; wr = 1'b0;
    reg_sel = '0; sys_wdata = '0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    while (!hlda) @(negedge clk);

    for (int pose = 0; pose < POSES; pose++) begin
      for (int l = 0; l < 6; l++) begin
        real c, s, ca, sa;
        mat_t   m;
        vec_t   v;
        real    md [3][3], vd [3];
        th = (real'($urandom_range(36000, 0)) / 100.0 - 180.0) * PI / 180.0;
        c  = $cos(th); s = $sin(th);
        ca = (ALPHA_Q[l] == 0) ? 1.0 : 0.0;
        sa = real'(ALPHA_Q[l]);
        // the host rounds its inputs to the array's format once
        md = '{'{c, -s * ca, s * sa}, '{s, c * ca, -c * sa}, '{0.0, sa, ca}};
        vd = '{A_LEN[l] * c, A_LEN[l] * s, D_LEN[l]};
        for (int i = 0; i < 3; i++) begin
          v[i] = r2f(vd[i]);
          for (int j = 0; j < 3; j++) m[i][j] = r2f(md[i][j]);
        end
        if (l == 0) begin
          R = m; Rr = m; p = v; pr = v;
          for (int i = 0; i < 3; i++) begin
            pd[i] = f2r(v[i]);
            for (int j = 0; j < 3; j++) Rd[i][j] = f2r(m[i][j]);
          end
        end else begin
          // array
          hw_mat_vec(R, v, t);
          hw_vec_add(p, t, p);
          hw_mat_mul(R, m, R);
          // same roundings, in the same order, in the reference
          for (int i = 0; i < 3; i++) begin
            fp32_t acc;
            acc = ref_mul(Rr[i][0], v[0]);
            for (int k = 1; k < 3; k++) acc = ref_add(acc, ref_mul(Rr[i][k], v[k]));
            pr[i] = ref_add(pr[i], acc);
          end
          for (int i = 0; i < 3; i++)
            for (int j = 0; j < 3; j++) begin
              fp32_t acc;
              acc = '0;
              for (int k = 0; k < 3; k++) acc = ref_add(acc, ref_mul(Rr[i][k], m[k][j]));
              Ri[i][j] = acc;
            end
          Rr = Ri;
          // double precision
          for (int i = 0; i < 3; i++)
            for (int k = 0; k < 3; k++) pd[i] += Rd[i][k] * f2r(v[k]);
          for (int i = 0; i < 3; i++)
            for (int j = 0; j < 3; j++) begin
              Rn[i][j] = 0.0;
              for (int k = 0; k < 3; k++) Rn[i][j] += Rd[i][k] * f2r(m[k][j]);
            end
          Rd = Rn;
        end
      end
      for (int i = 0; i < 3; i++) begin
        real e;
        check("end-effector position (bit exact)", p[i], pr[i]);
        e = f2r(p[i]) - pd[i];
        check("end-effector position (double, 1e-5 m)", 32'(e < 1e-5 && e > -1e-5), 1);
        for (int j = 0; j < 3; j++) begin
          check("end-effector orientation (bit exact)", R[i][j], Rr[i][j]);
          e = f2r(R[i][j]) - Rd[i][j];
          check("end-effector orientation (double, 1e-5)", 32'(e < 1e-5 && e > -1e-5), 1);
        end
      end
    end
    $display("poses=%0d array operations=%0d array cycles=%0d", POSES, ops, op_cycles_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
