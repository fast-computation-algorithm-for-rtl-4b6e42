// tb_fp_multiplier: self-checking test of the three-stage floating-point multiplier.
//
// Feeds one operand pair per cycle (directed corner cases, then random
// pairs, with bubbles), checks every sum against the double-precision
// reference of fp_ref_pkg, and checks that each result leaves exactly
// MUL_LAT cycles after its operands entered.
module tb_fp_multiplier;
  import ap_pkg::*;
  import fp_ref_pkg::*;

  logic  clk = 1'b0;
  logic  reset;
  logic  in_valid;
  fp32_t a, b, y;
  logic  out_valid;
  int    checks = 0, failures = 0;
  int    cycle = 0;

  fp_multiplier dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) cycle <= cycle + 1;

  typedef struct { fp32_t exp_y; int t_in; fp32_t a, b; } item_t;
  item_t q[$];

  // Record each issued pair; compare each result against the queue head.
  always @(posedge clk) begin
    if (!reset && in_valid) q.push_back('{ref_mul(a, b), cycle, a, b});
    if (!reset && out_valid) begin
      item_t it;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: result with nothing outstanding");
      end else begin
        it = q.pop_front();
        if (y !== it.exp_y || cycle - it.t_in != MUL_LAT) begin
          failures++;
          if (failures < 10)
            $display("FAIL: %h * %h = %h, expected %h, latency %0d",
                     it.a, it.b, y, it.exp_y, cycle - it.t_in);
        end
      end
    end
  end

  // Inputs change on the falling edge, away from the sampling edge.
  task automatic issue(fp32_t x, fp32_t z);
    a = x; b = z; in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    reset = 1'b1; in_valid = 1'b0; a = '0; b = '0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    issue(32'h3F80_0000, 32'h4000_0000);  // 1 * 2
    issue(32'h3FC0_0000, 32'h3FC0_0000);  // 1.5 * 1.5: product in [2, 4)
    issue(32'h0000_0000, 32'hC049_0FDB);  // 0 * -pi = -0
    issue(32'hC049_0FDB, 32'h4049_0FDB);  // -pi * pi
    issue(32'h3F7F_FFFF, 32'h3F7F_FFFF);  // (1-ulp)^2: rounding
    issue(32'h3F80_0001, 32'h3F80_0001);  // (1+ulp)^2
    issue(32'h3FFF_FFFF, 32'h3FFF_FFFF);  // rounding carries into exponent
    issue(32'h7F00_0000, 32'h4080_0000);  // overflow to infinity
    issue(32'h0080_0000, 32'h3E80_0000);  // underflow to zero
    issue(32'h2000_0000, 32'h5F00_0000);  // exponents far apart
    issue(32'h3F80_0000, 32'h3F80_0000);  // 1 * 1
    repeat (2000) begin
      if ($urandom_range(3, 0) == 0) @(negedge clk);
      issue(rand_f32(14), rand_f32(14));
    end
    // back-to-back stream over a wide exponent range
    repeat (500) issue(rand_f32(60), rand_f32(60));
    repeat (MUL_LAT + 2) @(negedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results never came out", q.size());
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
