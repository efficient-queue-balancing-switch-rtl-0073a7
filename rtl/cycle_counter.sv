// cycle_counter: free-running modulo-N cycle counter.
//
// The count advances by one on every clock edge and wraps from N-1 to 0. Its
// bits drive the select lines of the barrel-shifter stages of the input
// rotator (bit k selects stage k), so the rotation applied to the inputs
// walks through all N positions in N consecutive cycles. That the rotation
// is driven by a cycle counter is taken from the switch description; the
// synchronous active-high reset to zero is this design's choice.
//
// Interface: clk, rst (synchronous, active high), count (idx_w(N) bits).
// Timing: count is a register; it is 0 in the first cycle after reset.
module cycle_counter
  import qbs_pkg::*;
#(
  parameter int unsigned N = DEFAULT_NUM_IN
) (
  input  logic                clk,
  input  logic                rst,
  output logic [idx_w(N)-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst || count == idx_w(N)'(N - 1)) count <= '0;
    else                                    count <= count + 1'b1;
  end

endmodule
