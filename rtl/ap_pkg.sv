// ap_pkg: types and constants shared by the matrix/vector array processor.
//
// Number format: 32-bit floating point with the binary32 field layout
// (1 sign, 8 exponent bits biased by 127, 23 fraction bits and a hidden
// leading one). The 32-bit data width follows the PE block diagram; the
// field layout, round-to-nearest-even, flushing of tiny results to zero and
// saturation of huge results to infinity are this design's own choices.
// NaN and infinity inputs are not given special treatment.
//
// The package also holds the per-PE command word kept in each PE's command
// register (CMR), the operation codes the micro-sequencer understands, and
// the micro-programs of those operations (op_steps / op_cmd). Each
// micro-program is the parallel algorithm for that operation, one entry per
// "step"; in a step a PE can drive its row (X) bus and/or column (Y) bus,
// start one multiplication and start one addition.
package ap_pkg;

  localparam int unsigned FP_W   = 32;
  localparam int unsigned BIAS   = 127;

  // Pipeline depths of the two arithmetic units (stages in their diagrams).
  localparam int unsigned ADD_LAT = 4;
  localparam int unsigned MUL_LAT = 3;

  typedef logic [FP_W-1:0] fp32_t;

  // Operation codes written by the host into the sequencer.
  typedef enum logic [3:0] {
    OP_NOP       = 4'd0,
    OP_MAT_MUL   = 4'd1,   // C = A * B          (n x n)
    OP_MAT_ADD   = 4'd2,   // C = A + B          (n x n)
    OP_VEC_ADD   = 4'd3,   // c = a + b          (one vector per row)
    OP_DOT       = 4'd4,   // c = a . b          (one vector pair per row)
    OP_CROSS     = 4'd5,   // c = a x b          (3-vectors)
    OP_VEC_MAT   = 4'd6,   // c^T = a^T * B
    OP_MAT_VEC   = 4'd7,   // c = A * b
    OP_VEC_SCALE = 4'd8,   // c = a * s          (one vector per row)
    OP_SCA_MUL   = 4'd9    // c = a * b          (every PE, scalars)
  } opcode_e;

  // Register selector codes within one PE.
  typedef enum logic [1:0] {
    REG_AR  = 2'd0,
    REG_BR  = 2'd1,
    REG_CR  = 2'd2,
    REG_CMR = 2'd3
  } pe_reg_e;

  // Register selector codes in the sequencer "row" (row index == n).
  localparam logic [1:0] SEQ_OPCODE = 2'd0;
  localparam logic [1:0] SEQ_STATUS = 2'd1;

  typedef enum logic [1:0] {SRC_AR = 2'd0, SRC_BR = 2'd1, SRC_CR = 2'd2} bus_src_e;
  typedef enum logic [1:0] {MA_AR = 2'd0, MA_XBUS = 2'd1, MA_YBUS = 2'd2} mul_a_e;
  typedef enum logic [1:0] {MB_BR = 2'd0, MB_XBUS = 2'd1, MB_YBUS = 2'd2} mul_b_e;
  typedef enum logic      {MD_PR = 1'b0, MD_CR = 1'b1} mul_dst_e;
  typedef enum logic [1:0] {AA_CR = 2'd0, AA_AR = 2'd1} add_a_e;
  typedef enum logic [1:0] {AB_PR = 2'd0, AB_BR = 2'd1, AB_XBUS = 2'd2, AB_YBUS = 2'd3} add_b_e;

  // One PE command (contents of CMR) for one step.
  typedef struct packed {
    logic     x_drive;   // put x_src on this PE's row bus
    bus_src_e x_src;
    logic     y_drive;   // put y_src on this PE's column bus
    bus_src_e y_src;
    logic     mul_en;    // start a multiplication
    mul_a_e   mul_a;
    mul_b_e   mul_b;
    mul_dst_e mul_dst;   // product goes to PR or straight to CR
    logic     add_en;    // start an addition, result goes to CR
    add_a_e   add_a;
    add_b_e   add_b;
    logic     add_neg;   // subtract: flip the sign bit of operand b
    logic     clr;       // clear CR when the step starts
  } pe_cmd_t;

  localparam int unsigned CMD_W = $bits(pe_cmd_t);

  // Number of steps of an operation on an n x n array.
  function automatic int unsigned op_steps(opcode_e op, int unsigned n);
    case (op)
      OP_MAT_MUL:                                   return n + 1;
      OP_MAT_ADD, OP_VEC_ADD, OP_VEC_SCALE, OP_SCA_MUL: return 1;
      OP_DOT, OP_VEC_MAT, OP_MAT_VEC:               return n;
      OP_CROSS:                                     return 2;
      default:                                      return 0;
    endcase
  endfunction

  // Command of PE (i, j) in step s of operation op.
  function automatic pe_cmd_t op_cmd(opcode_e op, int unsigned s,
                                     int unsigned i, int unsigned j,
                                     int unsigned n);
    pe_cmd_t c;
    c = '0;
    case (op)
      // Step k < n: a(i,k) on X_i from PE(i,k), b(k,j) on Y_j from PE(k,j),
      // every PE forms PR = X*Y. Step k >= 1 also adds the previous product
      // into CR, so multiply and add overlap (n+1 steps in all).
      OP_MAT_MUL: begin
        if (s < n) begin
          if (j == s) begin c.x_drive = 1'b1; c.x_src = SRC_AR; end
          if (i == s) begin c.y_drive = 1'b1; c.y_src = SRC_BR; end
          c.mul_en  = 1'b1;
          c.mul_a   = MA_XBUS;
          c.mul_b   = MB_YBUS;
          c.mul_dst = MD_PR;
        end
        if (s == 0) c.clr = 1'b1;
        else begin
          c.add_en = 1'b1;
          c.add_a  = AA_CR;
          c.add_b  = AB_PR;
        end
      end
      // Every PE: CR = AR + BR.
      OP_MAT_ADD, OP_VEC_ADD: begin
        c.add_en = 1'b1;
        c.add_a  = AA_AR;
        c.add_b  = AB_BR;
      end
      // Every PE: CR = AR * BR.
      OP_SCA_MUL: begin
        c.mul_en  = 1'b1;
        c.mul_a   = MA_AR;
        c.mul_b   = MB_BR;
        c.mul_dst = MD_CR;
      end
      // PE(i,0) puts the scalar (its BR) on X_i; row i: CR = AR * X_i.
      OP_VEC_SCALE: begin
        if (j == 0) begin c.x_drive = 1'b1; c.x_src = SRC_BR; end
        c.mul_en  = 1'b1;
        c.mul_a   = MA_AR;
        c.mul_b   = MB_XBUS;
        c.mul_dst = MD_CR;
      end
      // Step 0: CR = AR * BR. Step s: PE(i,s) puts CR on X_i, PE(i,0) adds it.
      OP_DOT: begin
        if (s == 0) begin
          c.mul_en  = 1'b1;
          c.mul_a   = MA_AR;
          c.mul_b   = MB_BR;
          c.mul_dst = MD_CR;
        end else begin
          if (j == s) begin c.x_drive = 1'b1; c.x_src = SRC_CR; end
          if (j == 0) begin c.add_en = 1'b1; c.add_a = AA_CR; c.add_b = AB_XBUS; end
        end
      end
      // Columns 0 and 1 hold the operand pairs of the six partial products.
      // Step 0: CR = AR * BR. Step 1: PE(i,1) puts CR on X_i, PE(i,0)
      // subtracts it (sign flip), leaving component i in CR of PE(i,0).
      OP_CROSS: begin
        if (i < 3 && j < 2) begin
          if (s == 0) begin
            c.mul_en  = 1'b1;
            c.mul_a   = MA_AR;
            c.mul_b   = MB_BR;
            c.mul_dst = MD_CR;
          end else if (j == 1) begin
            c.x_drive = 1'b1;
            c.x_src   = SRC_CR;
          end else begin
            c.add_en  = 1'b1;
            c.add_a   = AA_CR;
            c.add_b   = AB_XBUS;
            c.add_neg = 1'b1;
          end
        end
      end
      // Step 0: PE(i,0) puts a(i) on X_i, every PE: CR = X_i * b(i,j).
      // Step s: row s puts CR on the Y buses, row 0 adds them up.
      OP_VEC_MAT: begin
        if (s == 0) begin
          if (j == 0) begin c.x_drive = 1'b1; c.x_src = SRC_AR; end
          c.mul_en  = 1'b1;
          c.mul_a   = MA_XBUS;
          c.mul_b   = MB_BR;
          c.mul_dst = MD_CR;
        end else begin
          if (i == s) begin c.y_drive = 1'b1; c.y_src = SRC_CR; end
          if (i == 0) begin c.add_en = 1'b1; c.add_a = AA_CR; c.add_b = AB_YBUS; end
        end
      end
      // Step 0: PE(0,j) puts b(j) on Y_j, every PE: CR = a(i,j) * Y_j.
      // Step s: column s puts CR on the X buses, column 0 adds them up.
      OP_MAT_VEC: begin
        if (s == 0) begin
          if (i == 0) begin c.y_drive = 1'b1; c.y_src = SRC_BR; end
          c.mul_en  = 1'b1;
          c.mul_a   = MA_AR;
          c.mul_b   = MB_YBUS;
          c.mul_dst = MD_CR;
        end else begin
          if (j == s) begin c.x_drive = 1'b1; c.x_src = SRC_CR; end
          if (j == 0) begin c.add_en = 1'b1; c.add_a = AA_CR; c.add_b = AB_XBUS; end
        end
      end
      default: c = '0;
    endcase
    return c;
  endfunction

endpackage
