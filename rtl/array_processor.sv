// array_processor: n x n floating-point array processor for the matrix and
// vector operations of robot dynamics (top level).
//
// N*N processor elements PE(i,j) sit on a grid of 2N buses: all PEs of row
// i share bus X_i and all PEs of column j share bus Y_j. In each step one
// PE per bus may talk and every PE on the bus can use the value in the same
// cycle, so operands reach all their users without extra transfer steps.
// With this, an N x N matrix product takes N+1 steps (N multiplications
// overlapped with N additions), matrix/vector additions one step, and the
// other vector operations one multiplication plus one or two additions.
// A micro-sequencer loads each PE's command register for every step.
//
// Host side (signal names after the system block diagram): the host raises
// hold and waits for hlda, writes operands into the PEs' AR/BR (and CR)
// registers and the operation code through reg_sel / wr / sys_wdata, drops
// hold, pulses sync and waits for finish; it then takes the bus again and
// reads the results from CR with rd / sys_rdata. Register map and where
// each operation expects its operands: see host_interface and the
// operation micro-programs in ap_pkg. The bidirectional system data bus is
// split into sys_wdata, sys_rdata and sys_rdata_oe.
// Clock: single clock clk; reset: synchronous, active high.
module array_processor
  import ap_pkg::*;
#(
  parameter int unsigned N  = 3,
  parameter int unsigned RB = $clog2(N + 1)
) (
  input  logic            clk,
  input  logic            reset,
  input  logic            sync,
  input  logic            hold,
  output logic            hlda,
  output logic            finish,
  input  logic            rd,
  input  logic            wr,
  input  logic [2*RB+1:0] reg_sel,
  input  fp32_t           sys_wdata,
  output fp32_t           sys_rdata,
  output logic            sys_rdata_oe
);

  // PE array signals
  fp32_t        ar [N][N], br [N][N], cr [N][N];
  pe_cmd_t      cmr [N][N], cmd [N][N];
  logic [N-1:0] pe_we [N];
  logic [N-1:0] busy [N];
  logic [N-1:0] x_drv [N];           // x_drv[i][j]: PE(i,j) talks on X_i
  logic [N-1:0] y_drv [N];           // y_drv[j][i]: PE(i,j) talks on Y_j
  fp32_t        x_dat [N][N];        // x_dat[i][j]: PE(i,j) value for X_i
  fp32_t        y_dat [N][N];        // y_dat[j][i]: PE(i,j) value for Y_j
  fp32_t        x_bus [N], y_bus [N];

  pe_reg_e      pe_reg;
  fp32_t        pe_wdata;
  logic         op_we, cmd_load, go, running, busy_any;
  opcode_e      op_wdata, opcode;

  micro_sequencer #(.N(N)) u_seq (
    .clk, .reset,
    .op_we, .op_wdata, .sync, .hold, .hlda, .finish, .running, .opcode,
    .busy_any, .cmd_load, .cmd, .go
  );

  host_interface #(.N(N), .RB(RB)) u_host (
    .sel(reg_sel), .rd, .wr, .wdata(sys_wdata),
    .rdata(sys_rdata), .rdata_oe(sys_rdata_oe),
    .hlda, .finish, .running, .opcode, .op_we, .op_wdata,
    .pe_we, .pe_reg, .pe_wdata, .ar, .br, .cr, .cmr
  );

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      processor_element u_pe (
        .clk, .reset,
        .host_we   (pe_we[i][j]),
        .host_reg  (pe_reg),
        .host_wdata(pe_wdata),
        .cmd_load,
        .cmd_in    (cmd[i][j]),
        .go,
        .busy      (busy[i][j]),
        .x_in      (x_bus[i]),
        .y_in      (y_bus[j]),
        .x_drive   (x_drv[i][j]),
        .x_out     (x_dat[i][j]),
        .y_drive   (y_drv[j][i]),
        .y_out     (y_dat[j][i]),
        .ar        (ar[i][j]),
        .br        (br[i][j]),
        .cr        (cr[i][j]),
        .pr        (),               // PR is internal to the PE
        .cmr       (cmr[i][j])
      );
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_bus
    shared_bus #(.N(N)) u_xbus (.clk, .reset, .drive(x_drv[k]), .data(x_dat[k]), .bus(x_bus[k]));
    shared_bus #(.N(N)) u_ybus (.clk, .reset, .drive(y_drv[k]), .data(y_dat[k]), .bus(y_bus[k]));
  end

  always_comb begin
    busy_any = 1'b0;
    for (int i = 0; i < N; i++) busy_any = busy_any | (|busy[i]);
  end

endmodule
