// processor_element: one PE of the n x n array.
//
// Registers: AR (operand A), BR (operand B), CR (result / accumulator),
// PR (product register between multiplier and adder) and CMR (the command
// for the current step, loaded by the micro-sequencer). Arithmetic: one
// fp_multiplier and one fp_adder that work at the same time, so a step can
// form a new product while it adds the previous one into CR.
//
// Data paths, chosen per step by the command in CMR (see ap_pkg::pe_cmd_t):
//   row bus X, column bus Y  <- AR, BR or CR (when this PE is the talker)
//   multiplier operand a     <- AR, X or Y
//   multiplier operand b     <- BR, X or Y
//   multiplier result        -> PR or CR
//   adder operand a          <- CR or AR
//   adder operand b          <- PR, BR, X or Y, sign bit optionally flipped
//   adder result             -> CR
// Timing: cmd_load copies cmd_in into CMR; a one-cycle go pulse then
// starts the units with operands taken in that cycle (the bus values are
// read in the go cycle). Results are written MUL_LAT / ADD_LAT cycles later;
// busy stays high until the last result of the step is being written, so
// busy low means "CR/PR hold this step's results from the next cycle on".
// The host writes AR, BR or CR through host_we / host_reg while the array
// is idle. Synchronous active-high reset clears all registers.
module processor_element
  import ap_pkg::*;
(
  input  logic     clk,
  input  logic     reset,
  // host access
  input  logic     host_we,
  input  pe_reg_e  host_reg,
  input  fp32_t    host_wdata,
  // micro-sequencer
  input  logic     cmd_load,
  input  pe_cmd_t  cmd_in,
  input  logic     go,
  output logic     busy,
  // buses
  input  fp32_t    x_in,
  input  fp32_t    y_in,
  output logic     x_drive,
  output fp32_t    x_out,
  output logic     y_drive,
  output fp32_t    y_out,
  // register contents
  output fp32_t    ar,
  output fp32_t    br,
  output fp32_t    cr,
  output fp32_t    pr,
  output pe_cmd_t  cmr
);

  fp32_t    ar_q, br_q, cr_q, pr_q;
  pe_cmd_t  cmr_q;
  fp32_t    mul_a, mul_b, mul_y, add_a, add_b, add_y;
  logic     mul_start, add_start, mul_done, add_done;
  logic     mul_pend, add_pend;
  mul_dst_e mul_dst_q;

  function automatic fp32_t bus_src(bus_src_e s, fp32_t a_r, fp32_t b_r, fp32_t c_r);
    case (s)
      SRC_AR:  return a_r;
      SRC_BR:  return b_r;
      default: return c_r;
    endcase
  endfunction

  // Bus talkers
  assign x_drive = cmr_q.x_drive;
  assign y_drive = cmr_q.y_drive;
  assign x_out   = bus_src(cmr_q.x_src, ar_q, br_q, cr_q);
  assign y_out   = bus_src(cmr_q.y_src, ar_q, br_q, cr_q);

  // Operand selection
  always_comb begin
    case (cmr_q.mul_a)
      MA_XBUS: mul_a = x_in;
      MA_YBUS: mul_a = y_in;
      default: mul_a = ar_q;
    endcase
    case (cmr_q.mul_b)
      MB_XBUS: mul_b = x_in;
      MB_YBUS: mul_b = y_in;
      default: mul_b = br_q;
    endcase
    add_a = (cmr_q.add_a == AA_AR) ? ar_q : cr_q;
    case (cmr_q.add_b)
      AB_BR:   add_b = br_q;
      AB_XBUS: add_b = x_in;
      AB_YBUS: add_b = y_in;
      default: add_b = pr_q;
    endcase
    add_b[31] = add_b[31] ^ cmr_q.add_neg;
  end

  assign mul_start = go && cmr_q.mul_en;
  assign add_start = go && cmr_q.add_en;

  fp_multiplier u_mul (
    .clk, .reset,
    .in_valid (mul_start),
    .a        (mul_a),
    .b        (mul_b),
    .out_valid(mul_done),
    .y        (mul_y)
  );

  fp_adder u_add (
    .clk, .reset,
    .in_valid (add_start),
    .a        (add_a),
    .b        (add_b),
    .out_valid(add_done),
    .y        (add_y)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      ar_q      <= '0;
      br_q      <= '0;
      cr_q      <= '0;
      pr_q      <= '0;
      cmr_q     <= '0;
      mul_pend  <= 1'b0;
      add_pend  <= 1'b0;
      mul_dst_q <= MD_PR;
    end else begin
      if (cmd_load) cmr_q <= cmd_in;
      if (host_we) begin
        case (host_reg)
          REG_AR:  ar_q <= host_wdata;
          REG_BR:  br_q <= host_wdata;
          REG_CR:  cr_q <= host_wdata;
          default: ;
        endcase
      end
      if (go && cmr_q.clr) cr_q <= '0;
      if (mul_start) begin
        mul_pend  <= 1'b1;
        mul_dst_q <= cmr_q.mul_dst;
      end else if (mul_done) begin
        mul_pend  <= 1'b0;
      end
      if (add_start)     add_pend <= 1'b1;
      else if (add_done) add_pend <= 1'b0;
      if (mul_done) begin
        if (mul_dst_q == MD_CR) cr_q <= mul_y;
        else                    pr_q <= mul_y;
      end
      if (add_done) cr_q <= add_y;
    end
  end

  assign busy = (mul_pend && !mul_done) || (add_pend && !add_done);

  assign ar  = ar_q;
  assign br  = br_q;
  assign cr  = cr_q;
  assign pr  = pr_q;
  assign cmr = cmr_q;

  // A step may not send a product and a sum to CR in the same cycle.
  a_cr_one_writer: assert property (@(posedge clk) disable iff (reset)
      !(mul_done && mul_dst_q == MD_CR && add_done))
    else $error("processor_element: two results for CR in one cycle");

endmodule
