// tb_host_interface: self-checking test of the register selector decode.
//
// Fills the PE register arrays with random words and reads every address
// back, checks the status word, that each write strobes exactly the
// addressed PE (and nothing while hlda is low or for CMR), and that the
// opcode register write is decoded from row N.
module tb_host_interface;
  import ap_pkg::*;

  localparam int unsigned N  = 3;
  localparam int unsigned RB = 2;

  logic [2*RB+1:0] sel;
  logic            rd, wr, rdata_oe, hlda, finish, running, op_we;
  fp32_t           wdata, rdata, pe_wdata;
  opcode_e         opcode, op_wdata;
  logic [N-1:0]    pe_we [N];
  pe_reg_e         pe_reg;
  fp32_t           ar [N][N], br [N][N], cr [N][N];
  pe_cmd_t         cmr [N][N];
  int              checks = 0, failures = 0;

  host_interface #(.N(N)) dut (.*);

  task automatic check(string what, logic [31:0] got, logic [31:0] expect_v);
    checks++;
    if (got !== expect_v) begin
      failures++;
      $display("FAIL: %s (sel=%b) = %h, expected %h", what, sel, got, expect_v);
    end
  endtask

  function automatic logic [2*RB+1:0] addr(int r, int c, int g);
    return {RB'(r), RB'(c), 2'(g)};
  endfunction

  initial begin
    rd = 0; wr = 0; wdata = '0; hlda = 0; finish = 0; running = 0; opcode = OP_NOP;
    sel = '0;
    repeat (20) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          ar[i][j] = $urandom; br[i][j] = $urandom; cr[i][j] = $urandom;
          cmr[i][j] = pe_cmd_t'($urandom);
        end
      // reads
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          sel = addr(i, j, 0); rd = 1; #1 check("AR read", rdata, ar[i][j]);
          check("output enable", {31'd0, rdata_oe}, 1);
          sel = addr(i, j, 1); #1 check("BR read", rdata, br[i][j]);
          sel = addr(i, j, 2); #1 check("CR read", rdata, cr[i][j]);
          sel = addr(i, j, 3); #1 check("CMR read", rdata, 32'(cmr[i][j]));
          rd = 0; #1 check("no read, no data", rdata, 0);
          check("output enable off", {31'd0, rdata_oe}, 0);
        end
      finish = 1'($urandom); running = 1'($urandom); hlda = 1'($urandom);
      opcode = opcode_e'($urandom_range(9, 0));
      sel = addr(N, 0, 1); rd = 1;
      #1 check("status", rdata, {24'd0, opcode, 1'b0, running, finish, hlda});
      rd = 0;
      // writes
      for (int g = 0; g < 4; g++) begin
        int ti, tj;
        ti = $urandom_range(N - 1, 0); tj = $urandom_range(N - 1, 0);
        wdata = $urandom;
        sel = addr(ti, tj, g);
        for (int h = 0; h < 2; h++) begin
          hlda = 1'(h); wr = 1;
          #1;
          for (int i = 0; i < N; i++)
            for (int j = 0; j < N; j++)
              check("PE write strobe", {31'd0, pe_we[i][j]},
                    {31'd0, h == 1 && i == ti && j == tj && g != 3});
          check("write data", pe_wdata, wdata);
          check("register code", {30'd0, pe_reg}, g);
          check("no opcode write", {31'd0, op_we}, 0);
          wr = 0;
        end
      end
      wdata = $urandom_range(9, 0);
      sel = addr(N, 0, 0); hlda = 1; wr = 1;
      #1 check("opcode write", {31'd0, op_we}, 1);
      check("opcode data", {28'd0, op_wdata}, wdata);
      hlda = 0; #1 check("opcode write needs hlda", {31'd0, op_we}, 0);
      wr = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
