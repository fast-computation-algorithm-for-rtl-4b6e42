// tb_shared_bus: checks that the bus carries the value of its single
// talker, reads zero when idle, and that all N sources can talk.
module tb_shared_bus;
  import ap_pkg::*;

  localparam int unsigned N = 3;
  logic         clk = 1'b0;
  logic         reset = 1'b0;
  logic [N-1:0] drive;
  fp32_t        data [N];
  fp32_t        bus;
  int           checks = 0, failures = 0;

  shared_bus #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(fp32_t expect_v);
    #1;
    checks++;
    if (bus !== expect_v) begin
      failures++;
      $display("FAIL: drive=%b bus=%h expected %h", drive, bus, expect_v);
    end
  endtask

  initial begin
    drive = '0;
    for (int k = 0; k < N; k++) data[k] = '0;
    repeat (200) begin
      @(negedge clk);
      for (int k = 0; k < N; k++) data[k] = $urandom;
      drive = '0;
      check('0);
      for (int k = 0; k < N; k++) begin
        drive = N'(1) << k;
        check(data[k]);
      end
      drive = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
