// tb_array_processor: end-to-end test of the array processor, at its
// default size (3 x 3), driven only through the host bus.
//
// For each operation the test acts as the host: it takes the bus
// (hold/hlda), places the operands in AR/BR as the operation's memory
// allocation prescribes, writes the opcode, releases the bus, pulses sync,
// waits for finish and reads the results back from CR. Results are checked
// against fp_ref_pkg, applying the same sequence of roundings as the
// algorithm (so the order of the accumulation matters), and the cycle count
// from sync to finish against 1 + sum over steps of (2 + latency of the
// slowest unit used in the step). The test counts the mechanisms of the
// design and fails if one never happened: X-bus and Y-bus broadcasts,
// steps where a PE multiplies and adds at once (pipelining), subtraction
// by sign flip, and a hold granted in the middle of an operation. Every
// third round runs its operations one step at a time under hold and reads
// each step's commands back from the PEs' command registers; those rounds
// feed the mechanism counts.
module tb_array_processor;
  import ap_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned N  = 3;
  localparam int unsigned RB = 2;
  localparam int unsigned ROUNDS = 12;

  logic            clk = 1'b0;
  logic            reset, sync, hold, hlda, finish, rd, wr, sys_rdata_oe;
  logic [2*RB+1:0] reg_sel;
  fp32_t           sys_wdata, sys_rdata;
  int              checks = 0, failures = 0;
  int              n_xbus = 0, n_ybus = 0, n_overlap = 0, n_neg = 0, n_hold_mid = 0;

  array_processor dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] expect_v);
    checks++;
    if (got !== expect_v) begin
      failures++;
      if (failures < 20) $display("FAIL: %s = %h, expected %h", what, got, expect_v);
    end
  endtask

  // ---- host bus functional model ----
  task automatic take_bus();
    hold = 1'b1;
    do @(negedge clk); while (!hlda);
  endtask

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

  // Count the mechanisms visible in one step's commands, read back from
  // every PE's CMR over the host bus.
  task automatic count_step();
    fp32_t w;
    pe_cmd_t c;
    host_rd(N, 0, pe_reg_e'(SEQ_STATUS), w);
    if (w[0] && w[2]) n_hold_mid++;       // hlda while running
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        host_rd(i, j, REG_CMR, w);
        c = pe_cmd_t'(w[CMD_W-1:0]);
        if (c.x_drive) n_xbus++;
        if (c.y_drive) n_ybus++;
        if (c.mul_en && c.add_en) n_overlap++;
        if (c.add_en && c.add_neg) n_neg++;
      end
  endtask

  // Run op. Normal mode returns the cycles from the sync cycle up to the
  // first cycle finish is seen. Stepped mode keeps hold raised, lets one
  // step run at a time and inspects the commands of each step while the
  // operation is suspended.
  task automatic run(opcode_e op, bit stepped, output int cycles);
    bit first;
    reg_sel = {RB'(N), RB'(0), SEQ_OPCODE}; sys_wdata = 32'(op); wr = 1'b1;
    @(negedge clk);
    wr = 1'b0; hold = 1'b0;
    @(negedge clk);
    sync = 1'b1;
    @(negedge clk);
    sync = 1'b0;
    cycles = 1;
    if (stepped) begin
      hold  = 1'b1;
      first = 1'b1;
      forever begin
        while (!hlda) @(negedge clk);
        if (!first) count_step();
        first = 1'b0;
        if (finish) break;
        hold = 1'b0;
        repeat (2) @(negedge clk);
        hold = 1'b1;
      end
    end else begin
      while (!finish) begin
        @(negedge clk);
        cycles++;
      end
      take_bus();
    end
  endtask

  function automatic int op_cycles(int mul_steps, int add_steps);
    return 1 + mul_steps * (2 + MUL_LAT) + add_steps * (2 + ADD_LAT);
  endfunction

  fp32_t a [N][N], b [N][N], v, acc;
  int    cyc;

  function automatic fp32_t fsub(fp32_t x, fp32_t y);
    return ref_add(x, {~y[31], y[30:0]});
  endfunction

  initial begin
    reset = 1'b1; sync = 1'b0; hold = 1'b0; rd = 1'b0; wr = 1'b0;
    reg_sel = '0; sys_wdata = '0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    take_bus();

    for (int r = 0; r < ROUNDS; r++) begin
      bit mh;
      mh = (r % 3 == 1);
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          a[i][j] = rand_f32(7);
          b[i][j] = rand_f32(7);
        end

      // ---- matrix product: AR = A, BR = B, C in CR ----
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          host_wr(i, j, REG_AR, a[i][j]);
          host_wr(i, j, REG_BR, b[i][j]);
        end
      run(OP_MAT_MUL, mh, cyc);
      if (!mh) check("matrix product cycles", 32'(cyc), 32'(op_cycles(1, N)));
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          acc = '0;
          for (int k = 0; k < N; k++) acc = ref_add(acc, ref_mul(a[i][k], b[k][j]));
          host_rd(i, j, REG_CR, v);
          check("matrix product", v, acc);
        end

      // ---- matrix addition (same operands still loaded) ----
      run(OP_MAT_ADD, 1'b0, cyc);
      check("matrix addition cycles", 32'(cyc), 32'(op_cycles(0, 1)));
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          host_rd(i, j, REG_CR, v);
          check("matrix addition", v, ref_add(a[i][j], b[i][j]));
        end

      // ---- scalar products: scalars in every PE ----
      run(OP_SCA_MUL, 1'b0, cyc);
      check("scalar product cycles", 32'(cyc), 32'(op_cycles(1, 0)));
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          host_rd(i, j, REG_CR, v);
          check("scalar multiply", v, ref_mul(a[i][j], b[i][j]));
        end

      // ---- vector addition: three vector pairs, one per row ----
      run(OP_VEC_ADD, 1'b0, cyc);
      check("vector addition cycles", 32'(cyc), 32'(op_cycles(0, 1)));
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          host_rd(i, j, REG_CR, v);
          check("vector addition", v, ref_add(a[i][j], b[i][j]));
        end

      // ---- inner products: row i holds a_i, b_i; result in CR(i,0) ----
      run(OP_DOT, mh, cyc);
      if (!mh) check("inner product cycles", 32'(cyc), 32'(op_cycles(1, N - 1)));
      for (int i = 0; i < N; i++) begin
        acc = ref_mul(a[i][0], b[i][0]);
        for (int j = 1; j < N; j++) acc = ref_add(acc, ref_mul(a[i][j], b[i][j]));
        host_rd(i, 0, REG_CR, v);
        check("inner product", v, acc);
      end

      // ---- vector times scalar: row i holds a_i, scalar in BR(i,0) ----
      run(OP_VEC_SCALE, 1'b0, cyc);
      check("vector scaling cycles", 32'(cyc), 32'(op_cycles(1, 0)));
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          host_rd(i, j, REG_CR, v);
          check("vector scaling", v, ref_mul(a[i][j], b[i][0]));
        end

      // ---- matrix times vector: A in AR, b_j in BR(0,j); c_i in CR(i,0) ----
      run(OP_MAT_VEC, mh, cyc);
      if (!mh) check("matrix-vector cycles", 32'(cyc), 32'(op_cycles(1, N - 1)));
      for (int i = 0; i < N; i++) begin
        acc = ref_mul(a[i][0], b[0][0]);
        for (int j = 1; j < N; j++) acc = ref_add(acc, ref_mul(a[i][j], b[0][j]));
        host_rd(i, 0, REG_CR, v);
        check("matrix times vector", v, acc);
      end

      // ---- vector times matrix: a_i in AR(i,0), B in BR; c_j in CR(0,j) ----
      run(OP_VEC_MAT, mh, cyc);
      if (!mh) check("vector-matrix cycles", 32'(cyc), 32'(op_cycles(1, N - 1)));
      for (int j = 0; j < N; j++) begin
        acc = ref_mul(a[0][0], b[0][j]);
        for (int i = 1; i < N; i++) acc = ref_add(acc, ref_mul(a[i][0], b[i][j]));
        host_rd(0, j, REG_CR, v);
        check("vector times matrix", v, acc);
      end

      // ---- cross product c = x * y, operands laid out over columns 0, 1 ----
      begin
        fp32_t x [3], y [3];
        for (int k = 0; k < 3; k++) begin x[k] = a[0][k]; y[k] = b[0][k]; end
        host_wr(0, 0, REG_AR, x[1]); host_wr(0, 0, REG_BR, y[2]);
        host_wr(0, 1, REG_AR, x[2]); host_wr(0, 1, REG_BR, y[1]);
        host_wr(1, 0, REG_AR, x[2]); host_wr(1, 0, REG_BR, y[0]);
        host_wr(1, 1, REG_AR, x[0]); host_wr(1, 1, REG_BR, y[2]);
        host_wr(2, 0, REG_AR, x[0]); host_wr(2, 0, REG_BR, y[1]);
        host_wr(2, 1, REG_AR, x[1]); host_wr(2, 1, REG_BR, y[0]);
        run(OP_CROSS, mh, cyc);
        if (!mh) check("cross product cycles", 32'(cyc), 32'(op_cycles(1, 1)));
        host_rd(0, 0, REG_CR, v);
        check("cross product x", v, fsub(ref_mul(x[1], y[2]), ref_mul(x[2], y[1])));
        host_rd(1, 0, REG_CR, v);
        check("cross product y", v, fsub(ref_mul(x[2], y[0]), ref_mul(x[0], y[2])));
        host_rd(2, 0, REG_CR, v);
        check("cross product z", v, fsub(ref_mul(x[0], y[1]), ref_mul(x[1], y[0])));
      end
    end

    // status word: finish set, idle, hlda granted, last opcode
    host_rd(N, 0, pe_reg_e'(SEQ_STATUS), v);
    check("status word", v, {24'd0, OP_CROSS, 4'b0011});

    check("X-bus broadcasts happened",      32'(n_xbus > 0),     1);
    check("Y-bus broadcasts happened",      32'(n_ybus > 0),     1);
    check("multiply/add overlap happened",  32'(n_overlap > 0),  1);
    check("sign-flip subtraction happened", 32'(n_neg > 0),      1);
    check("hold during an operation",       32'(n_hold_mid > 0), 1);
    $display("mechanisms: xbus=%0d ybus=%0d overlap=%0d negate=%0d hold_mid=%0d",
             n_xbus, n_ybus, n_overlap, n_neg, n_hold_mid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
