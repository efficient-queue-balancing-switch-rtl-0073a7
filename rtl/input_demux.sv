// input_demux: destination demultiplexer of one queue group.
//
// Each (rotated) input lane owns one group of NUM_OUT output queues, one
// queue per output port, as in an output-queued switch without memory
// sharing. This block turns the lane's valid bit and destination field into
// the enqueue (push) strobe of exactly one queue of the group. The packet
// payload is wired to all queues of the group; only the strobed one stores
// it. When the addressed queue is full, or the destination is not a port of
// the switch, the packet is discarded and `drop` pulses: the switch is lossy,
// as assumed by the packet-loss study, and has no back-pressure towards the
// inputs (this design's choice).
//
// Interface: valid, dest (idx_w(NUM_OUT) bits), full[NUM_OUT] from the queues;
// push[NUM_OUT] to the queues, drop.
// Timing: purely combinational.
module input_demux
  import qbs_pkg::*;
#(
  parameter int unsigned NUM_OUT = DEFAULT_NUM_OUT
) (
  input  logic                      valid,
  input  logic [idx_w(NUM_OUT)-1:0] dest,
  input  logic [NUM_OUT-1:0]        full,
  output logic [NUM_OUT-1:0]        push,
  output logic                      drop
);

  logic [NUM_OUT-1:0] sel;

  always_comb begin
    sel = '0;
    for (int d = 0; d < NUM_OUT; d++) sel[d] = valid && (dest == idx_w(NUM_OUT)'(d));
    push = sel & ~full;
    drop = valid && ((sel & ~full) == '0);
  end

endmodule
