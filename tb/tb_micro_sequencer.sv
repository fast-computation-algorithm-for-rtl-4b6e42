// tb_micro_sequencer: self-checking test of the control unit.
//
// A small model of the PE array answers go with busy for MUL_LAT or
// ADD_LAT cycles, depending on the units the step's commands use. For
// every operation the test checks the number of steps (from a table
// written out by hand), that each bus has exactly one talker whenever a PE
// reads it, that the matrix product's talkers in step k are column k (X)
// and row k (Y), the cycle count from sync to finish, and hold/hlda: a
// hold raised mid-operation is granted between steps, no step starts while
// it is granted, and the operation completes after hold falls.
module tb_micro_sequencer;
  import ap_pkg::*;

  localparam int unsigned N = 3;

  logic    clk = 1'b0;
  logic    reset;
  logic    op_we;
  opcode_e op_wdata;
  logic    sync, hold, hlda, finish, running;
  opcode_e opcode;
  logic    busy_any;
  logic    cmd_load, go;
  pe_cmd_t cmd [N][N];
  int      checks = 0, failures = 0;
  int      steps_seen, busy_left, cycles, held_grants, loads_in_hold;
  int      exp_cycles;
  logic    seen_hold;

  micro_sequencer #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int expect_v);
    checks++;
    if (got != expect_v) begin
      failures++;
      $display("FAIL: %s = %0d, expected %0d", what, got, expect_v);
    end
  endtask

  function automatic int step_lat(pe_cmd_t c [N][N]);
    int l;
    l = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        if (c[i][j].mul_en && l < MUL_LAT) l = MUL_LAT;
        if (c[i][j].add_en) l = ADD_LAT;
      end
    return l;
  endfunction

  // PE array model and per-step checks
  pe_cmd_t cur [N][N];
  always @(posedge clk) begin
    if (cmd_load) begin
      cur = cmd;
      steps_seen++;
      if (hlda) loads_in_hold++;
    end
    if (go) begin
      int xt [N], yt [N];
      for (int k = 0; k < N; k++) begin xt[k] = 0; yt[k] = 0; end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          if (cur[i][j].x_drive) xt[i]++;
          if (cur[i][j].y_drive) yt[j]++;
        end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          pe_cmd_t c;
          c = cur[i][j];
          if ((c.mul_en && (c.mul_a == MA_XBUS || c.mul_b == MB_XBUS)) ||
              (c.add_en && c.add_b == AB_XBUS))
            check("talkers on a read X bus", xt[i], 1);
          if ((c.mul_en && (c.mul_a == MA_YBUS || c.mul_b == MB_YBUS)) ||
              (c.add_en && c.add_b == AB_YBUS))
            check("talkers on a read Y bus", yt[j], 1);
          if (xt[i] > 1 || yt[j] > 1) check("bus conflict", 1, 0);
          if (opcode == OP_MAT_MUL && steps_seen <= N) begin
            check("X talker of a matrix product",
                  int'(cur[i][j].x_drive), int'(j == steps_seen - 1));
            check("Y talker of a matrix product",
                  int'(cur[i][j].y_drive), int'(i == steps_seen - 1));
          end
        end
      exp_cycles += 2 + step_lat(cur);
      busy_left <= step_lat(cur) - 1;
    end else if (busy_left > 0) begin
      busy_left <= busy_left - 1;
    end
    if (hlda && running) held_grants++;
  end
  assign busy_any = (busy_left > 0);

  task automatic run_op(opcode_e op, int want_steps, bit with_hold);
    int hold_at;
    hold = 1'b1;
    @(negedge clk);
    check("hlda when idle", int'(hlda), 1);
    op_we = 1'b1; op_wdata = op;
    @(negedge clk);
    op_we = 1'b0; hold = 1'b0;
    check("opcode register", int'(opcode), int'(op));
    steps_seen = 0; exp_cycles = 1; held_grants = 0; loads_in_hold = 0;
    sync = 1'b1;
    @(negedge clk);
    sync = 1'b0;
    cycles = 1;
    hold_at = with_hold ? 7 : -1;
    while (!finish) begin
      if (cycles == hold_at) hold = 1'b1;
      if (cycles == hold_at + 20) hold = 1'b0;
      @(negedge clk);
      cycles++;
    end
    hold = 1'b0;
    check("steps", steps_seen, want_steps);
    if (!with_hold) check("cycles from sync to finish", cycles, exp_cycles);
    else begin
      check("hold granted between steps", int'(held_grants > 0), 1);
      check("no step loaded while held", loads_in_hold, 0);
    end
    @(negedge clk);
  endtask

  initial begin
    reset = 1'b1; op_we = 1'b0; op_wdata = OP_NOP; sync = 1'b0; hold = 1'b0;
    busy_left = 0; steps_seen = 0; exp_cycles = 0; held_grants = 0; loads_in_hold = 0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    check("finish low after reset", int'(finish), 0);
    for (int pass = 0; pass < 2; pass++) begin
      run_op(OP_MAT_MUL,   N + 1, pass == 1);
      run_op(OP_MAT_ADD,   1, 1'b0);
      run_op(OP_VEC_ADD,   1, 1'b0);
      run_op(OP_DOT,       3, pass == 1);
      run_op(OP_CROSS,     2, 1'b0);
      run_op(OP_VEC_MAT,   3, pass == 1);
      run_op(OP_MAT_VEC,   3, pass == 1);
      run_op(OP_VEC_SCALE, 1, 1'b0);
      run_op(OP_SCA_MUL,   1, 1'b0);
    end
    // sync while hold is high is ignored
    hold = 1'b1; sync = 1'b1;
    @(negedge clk);
    sync = 1'b0;
    @(negedge clk);
    check("sync ignored under hold", int'(running), 0);
    hold = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
