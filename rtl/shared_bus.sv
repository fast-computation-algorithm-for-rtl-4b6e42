// shared_bus: one X (row) or Y (column) bus of the array.
//
// N processor elements sit on a bus; every one of them reads it, but in any
// step only one may put data on it. The bus is modelled as an AND-OR
// multiplexer: each talker's value is gated by its drive enable and the
// gated values are ORed, which is what a tri-state bus carries when exactly
// one driver is enabled. An idle bus reads as zero. An assertion flags two
// talkers at once. Purely combinational: a value put on the bus is seen by
// all readers in the same cycle (the "zero-time" data transfer).
module shared_bus
  import ap_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic          clk,     // clk and reset serve the one-talker
  input  logic          reset,   // assertion only
  input  logic [N-1:0]  drive,
  input  fp32_t         data [N],
  output fp32_t         bus
);

  always_comb begin
    bus = '0;
    for (int k = 0; k < N; k++) begin
      if (drive[k]) bus = bus | data[k];
    end
  end

  // Only one PE on a bus may have outgoing data.
  a_one_talker: assert property (@(posedge clk) disable iff (reset) $onehot0(drive))
    else $error("shared_bus: more than one talker");

endmodule
