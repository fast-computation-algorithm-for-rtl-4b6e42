// host_interface: the array's port to the host system bus.
//
// The host addresses one register at a time with the register selector:
//   sel = {row, col, reg}, row and col each RB = clog2(N+1) bits, reg 2 bits.
// Rows 0..N-1 select PE(row, col) and reg picks AR, BR, CR or CMR
// (ap_pkg::pe_reg_e). Row N selects the sequencer: reg SEQ_OPCODE is the
// operation-code register (write), reg SEQ_STATUS the status word (read:
// bit 0 hlda, bit 1 finish, bit 2 running, bits 7:4 the opcode).
// Writes (wr) are honoured only while hlda grants the host the bus, so
// they never disturb a running step; AR/BR/CR writes go to the PE, CMR is
// read-only (the sequencer loads it). Reads (rd) are combinational: rdata
// carries the selected register in the same cycle and rdata_oe tells a
// board-level driver to turn the bidirectional data bus around.
// Unselected or unused addresses read as zero.
module host_interface
  import ap_pkg::*;
#(
  parameter int unsigned N  = 3,
  parameter int unsigned RB = $clog2(N + 1)
) (
  // system bus
  input  logic [2*RB+1:0] sel,
  input  logic            rd,
  input  logic            wr,
  input  fp32_t           wdata,
  output fp32_t           rdata,
  output logic            rdata_oe,
  // sequencer
  input  logic            hlda,
  input  logic            finish,
  input  logic            running,
  input  opcode_e         opcode,
  output logic            op_we,
  output opcode_e         op_wdata,
  // PE array
  output logic [N-1:0]    pe_we [N],
  output pe_reg_e         pe_reg,
  output fp32_t           pe_wdata,
  input  fp32_t           ar [N][N],
  input  fp32_t           br [N][N],
  input  fp32_t           cr [N][N],
  input  pe_cmd_t         cmr [N][N]
);

  logic [RB-1:0] row, col;
  logic [1:0]    rsel;

  assign row      = sel[2*RB+1 -: RB];
  assign col      = sel[RB+1 -: RB];
  assign rsel     = sel[1:0];
  assign pe_reg   = pe_reg_e'(rsel);
  assign pe_wdata = wdata;
  assign op_wdata = opcode_e'(wdata[3:0]);
  assign op_we    = wr && hlda && (int'(row) == N) && (rsel == SEQ_OPCODE);

  always_comb begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        pe_we[i][j] = wr && hlda && (int'(row) == i) && (int'(col) == j)
                      && (pe_reg_e'(rsel) != REG_CMR);
  end

  always_comb begin
    rdata = '0;
    if (rd) begin
      if (int'(row) == N) begin
        if (rsel == SEQ_STATUS)
          rdata = {24'd0, opcode, 1'b0, running, finish, hlda};
      end else if (int'(row) < N && int'(col) < N) begin
        case (pe_reg_e'(rsel))
          REG_AR:  rdata = ar[row][col];
          REG_BR:  rdata = br[row][col];
          REG_CR:  rdata = cr[row][col];
          default: rdata = 32'(cmr[row][col]);
        endcase
      end
    end
  end

  assign rdata_oe = rd;

endmodule
