// tb_processor_element: self-checking test of one processor element.
//
// Loads registers through the host port, then runs single steps the way
// the micro-sequencer does (load CMR, pulse go, wait for busy to fall) and
// checks CR / PR against fp_ref_pkg: element-wise multiply and add, a
// pipelined multiply-accumulate over n+1 steps fed from the X and Y buses,
// subtraction by sign flip, each bus talker source, and the number of
// cycles busy stays high (MUL_LAT or ADD_LAT) in a step.
module tb_processor_element;
  import ap_pkg::*;
  import fp_ref_pkg::*;

  logic    clk = 1'b0;
  logic    reset;
  logic    host_we;
  pe_reg_e host_reg;
  fp32_t   host_wdata;
  logic    cmd_load;
  pe_cmd_t cmd_in;
  logic    go;
  logic    busy;
  fp32_t   x_in, y_in, x_out, y_out, ar, br, cr, pr;
  logic    x_drive, y_drive;
  pe_cmd_t cmr;
  int      checks = 0, failures = 0;

  processor_element dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] expect_v);
    checks++;
    if (got !== expect_v) begin
      failures++;
      $display("FAIL: %s = %h, expected %h", what, got, expect_v);
    end
  endtask

  task automatic host_write(pe_reg_e r, fp32_t v);
    host_we = 1'b1; host_reg = r; host_wdata = v;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  // One step; returns the number of cycles busy was high after go.
  task automatic step(pe_cmd_t c, fp32_t x, fp32_t y, output int busy_cycles);
    cmd_load = 1'b1; cmd_in = c;
    @(negedge clk);
    cmd_load = 1'b0; go = 1'b1; x_in = x; y_in = y;
    @(negedge clk);
    go = 1'b0; x_in = $urandom; y_in = $urandom;   // bus values are gone
    busy_cycles = 1;
    while (busy) begin
      busy_cycles++;
      @(negedge clk);
    end
    @(negedge clk);
  endtask

  initial begin
    pe_cmd_t c;
    fp32_t   a, b, acc, xa [3], yb [3];
    int      bc;
    reset = 1'b1; host_we = 1'b0; host_reg = REG_AR; host_wdata = '0;
    cmd_load = 1'b0; cmd_in = '0; go = 1'b0; x_in = '0; y_in = '0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);

    repeat (50) begin
      a = rand_f32(14); b = rand_f32(14);
      host_write(REG_AR, a);
      host_write(REG_BR, b);
      check("AR", ar, a);
      check("BR", br, b);
      // CR = AR * BR
      c = '0; c.mul_en = 1'b1; c.mul_a = MA_AR; c.mul_b = MB_BR; c.mul_dst = MD_CR;
      step(c, '0, '0, bc);
      check("AR*BR", cr, ref_mul(a, b));
      check("busy cycles of a product", 32'(bc), MUL_LAT);
      // CR = AR + BR
      c = '0; c.add_en = 1'b1; c.add_a = AA_AR; c.add_b = AB_BR;
      step(c, '0, '0, bc);
      check("AR+BR", cr, ref_add(a, b));
      check("busy cycles of a sum", 32'(bc), ADD_LAT);
      // CR = CR - X  (sign flip of the bus operand)
      acc = cr;
      xa[0] = rand_f32(14);
      c = '0; c.add_en = 1'b1; c.add_a = AA_CR; c.add_b = AB_XBUS; c.add_neg = 1'b1;
      step(c, xa[0], '0, bc);
      check("CR-X", cr, ref_add(acc, {~xa[0][31], xa[0][30:0]}));
      // pipelined multiply-accumulate, as in a matrix product
      for (int k = 0; k < 3; k++) begin
        xa[k] = rand_f32(7); yb[k] = rand_f32(7);
      end
      acc = '0;
      for (int k = 0; k <= 3; k++) begin
        c = '0;
        if (k < 3) begin
          c.mul_en = 1'b1; c.mul_a = MA_XBUS; c.mul_b = MB_YBUS; c.mul_dst = MD_PR;
        end
        if (k == 0) c.clr = 1'b1;
        else begin
          c.add_en = 1'b1; c.add_a = AA_CR; c.add_b = AB_PR;
        end
        step(c, (k < 3) ? xa[k] : '0, (k < 3) ? yb[k] : '0, bc);
        if (k < 3) check("PR", pr, ref_mul(xa[k], yb[k]));
        if (k > 0) acc = ref_add(acc, ref_mul(xa[k-1], yb[k-1]));
        check("CR accumulate", cr, acc);
        check("busy cycles of a MAC step", 32'(bc), (k == 0) ? MUL_LAT : ADD_LAT);
      end
      // operands from the buses: CR = Y * BR, then X * Y
      c = '0; c.mul_en = 1'b1; c.mul_a = MA_YBUS; c.mul_b = MB_BR; c.mul_dst = MD_CR;
      step(c, '0, yb[0], bc);
      check("Y*BR", cr, ref_mul(yb[0], b));
      c = '0; c.mul_en = 1'b1; c.mul_a = MA_AR; c.mul_b = MB_XBUS; c.mul_dst = MD_CR;
      step(c, xa[1], '0, bc);
      check("AR*X", cr, ref_mul(a, xa[1]));
      c = '0; c.add_en = 1'b1; c.add_a = AA_CR; c.add_b = AB_YBUS;
      acc = cr;
      step(c, '0, yb[2], bc);
      check("CR+Y", cr, ref_add(acc, yb[2]));
      // bus talkers
      c = '0; c.x_drive = 1'b1; c.x_src = SRC_AR; c.y_drive = 1'b1; c.y_src = SRC_CR;
      step(c, '0, '0, bc);
      check("X talker", {31'd0, x_drive}, 1); check("X <- AR", x_out, a);
      check("Y talker", {31'd0, y_drive}, 1); check("Y <- CR", y_out, cr);
      c = '0; c.x_drive = 1'b1; c.x_src = SRC_CR; c.y_src = SRC_BR;
      step(c, '0, '0, bc);
      check("X <- CR", x_out, cr);
      check("Y silent", {31'd0, y_drive}, 0); check("Y src BR", y_out, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
