// valid_bit_queue: arrival-order queue of one output port.
//
// Because the input rotator spreads the packets of one source over several
// queue groups, the output scheduler needs to know which queued packets
// arrived together. For its output port, this block receives the P_I push
// strobes (one per queue group) of the cycle and, if at least one of them is
// set, stores the whole P_I-bit vector as one entry. Cycles in which no
// packet for this port was stored leave no entry, so every entry has at
// least one bit set and idle cycles cost no space. The depth is
// P_I * FIFO_DEPTH entries, enough for the worst case in which every packet
// queued for the port arrived in a different cycle; with that depth the
// queue can never overflow (checked by an assertion). All of this follows
// the switch description; the storage is an output_queue instance.
//
// Interface: enq_bits[NUM_IN] (push strobes of this port's queues), pop;
// head vector (valid when !empty), empty.
// Timing: an entry stored at a clock edge is at the head after that edge if
// the queue was empty. Reset is synchronous, active high.
module valid_bit_queue
  import qbs_pkg::*;
#(
  parameter int unsigned NUM_IN     = DEFAULT_NUM_IN,
  parameter int unsigned FIFO_DEPTH = DEFAULT_FIFO_DEPTH
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [NUM_IN-1:0] enq_bits,
  input  logic              pop,
  output logic [NUM_IN-1:0] head,
  output logic              empty
);

  localparam int unsigned DEPTH = NUM_IN * FIFO_DEPTH;

  logic push, full;
  logic [idx_w(DEPTH+1)-1:0] count;

  assign push = |enq_bits;

  output_queue #(.W(NUM_IN), .DEPTH(DEPTH)) u_q (
    .clk, .rst,
    .push, .push_data(enq_bits),
    .pop,
    .head, .empty, .full, .count
  );

  // With P_I * FIFO_DEPTH entries and at least one packet per entry, the
  // queue can only fill up if every packet queue of the port is full.
  a_never_overflows: assert property (@(posedge clk) disable iff (rst) !(push && full && !pop));
  a_count_in_range:  assert property (@(posedge clk) disable iff (rst)
                                      count <= idx_w(DEPTH+1)'(DEPTH));

endmodule
