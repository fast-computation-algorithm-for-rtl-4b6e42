// micro_sequencer: control unit of the array processor.
//
// The host writes an operation code (ap_pkg::opcode_e) and pulses sync.
// The sequencer then walks through the operation's micro-program: for each
// step it loads every PE's command register with that PE's command
// (cmd_load, cmd), pulses go one cycle later, and waits until no PE is busy.
// After the last step it raises finish, which stays high until the next
// sync. Step length is therefore 2 cycles plus the latency of the slowest
// unit used in the step (MUL_LAT or ADD_LAT).
//
// Bus hand-over: the host raises hold to get access to the PE registers.
// hlda answers it when the sequencer is idle or, during an operation,
// between two steps; the operation is then suspended until hold falls. Host
// register writes are only honoured while hlda is high. sync is ignored
// while hold is high or an operation is running.
//
// The micro-programs are the parallel algorithms of each operation, held in
// ap_pkg::op_cmd and expanded here into a table for every step and PE.
// Synchronous active-high reset returns to idle with opcode OP_NOP.
module micro_sequencer
  import ap_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic    clk,
  input  logic    reset,
  // host control
  input  logic    op_we,
  input  opcode_e op_wdata,
  input  logic    sync,
  input  logic    hold,
  output logic    hlda,
  output logic    finish,
  output logic    running,
  output opcode_e opcode,
  // PE array
  input  logic    busy_any,
  output logic    cmd_load,
  output pe_cmd_t cmd [N][N],
  output logic    go
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_GO, S_WAIT, S_HELD} state_e;

  localparam int unsigned STEP_W = $clog2(N + 2);

  state_e              state;
  opcode_e             op_q;
  logic [STEP_W-1:0]   step;
  logic [STEP_W-1:0]   nsteps;
  logic                finish_q;

  assign nsteps = STEP_W'(op_steps(op_q, N));

  always_ff @(posedge clk) begin
    if (reset) begin
      state    <= S_IDLE;
      op_q     <= OP_NOP;
      step     <= '0;
      finish_q <= 1'b0;
    end else begin
      case (state)
        S_IDLE: begin
          if (op_we && hold) op_q <= op_wdata;
          if (sync && !hold) begin
            finish_q <= (nsteps == '0);
            step     <= '0;
            if (nsteps != '0) state <= S_LOAD;
          end
        end
        S_LOAD: if (!hold) state <= S_GO;
                else       state <= S_HELD;
        S_GO:   state <= S_WAIT;
        S_WAIT: begin
          if (!busy_any) begin
            if (step == nsteps - 1'b1) begin
              finish_q <= 1'b1;
              state    <= S_IDLE;
            end else begin
              step  <= step + 1'b1;
              state <= S_LOAD;
            end
          end
        end
        S_HELD: if (!hold) state <= S_LOAD;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Commands of the current step for every PE.
  always_comb begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        cmd[i][j] = op_cmd(op_q, int'(step), i, j, N);
  end

  assign cmd_load = (state == S_LOAD) && !hold;
  assign go       = (state == S_GO);
  assign hlda     = hold && (state == S_IDLE || state == S_HELD);
  assign finish   = finish_q;
  assign running  = (state != S_IDLE);
  assign opcode   = op_q;

endmodule
