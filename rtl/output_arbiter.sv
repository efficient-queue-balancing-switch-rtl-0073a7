// output_arbiter: scheduler and multiplexer of one output port.
//
// The arbiter of output port d chooses, each cycle, one packet among the P_I
// queues (one per queue group) that hold packets for d, and registers it on
// the port. Its choice is steered by the valid-bit queue of the port: the
// head entry marks which queues received a packet for d in the oldest
// cycle not yet fully served. The arbiter keeps that entry at the head until
// it has extracted every packet the entry marks, one per cycle, and then
// pops it; so packets leave in arrival-cycle order and the order of packets
// from one source to one destination is kept. Inside one entry the lowest
// marked queue group goes first (this design's choice: the packets of one
// entry all arrived in the same cycle, so any order is correct). A `served`
// mask remembers which bits of the head entry were already taken, and the
// last packet of an entry is sent in the same cycle as the entry is popped,
// so back-to-back entries give one packet per cycle without bubbles.
//
// Interface: vq_head/vq_empty/vq_pop to the valid-bit queue; q_head[NUM_IN]
// (head packets of this port's queues) and q_pop[NUM_IN] to the packet
// queues; out_valid/out_data, the registered output port.
// Timing: grant and pops are combinational from the queue heads; the output
// is registered, one cycle after the head became visible. Reset is
// synchronous, active high.
module output_arbiter
  import qbs_pkg::*;
#(
  parameter int unsigned NUM_IN = DEFAULT_NUM_IN,
  parameter int unsigned W      = DEFAULT_DATA_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [NUM_IN-1:0] vq_head,
  input  logic              vq_empty,
  output logic              vq_pop,
  input  logic [W-1:0]      q_head [NUM_IN],
  output logic [NUM_IN-1:0] q_pop,
  output logic              out_valid,
  output logic [W-1:0]      out_data
);

  logic [NUM_IN-1:0] served;
  logic [NUM_IN-1:0] pending;
  logic [NUM_IN-1:0] grant;
  logic              last;
  logic [W-1:0]      sel_data;

  always_comb begin
    pending = vq_empty ? '0 : (vq_head & ~served);
    grant   = pending & (~pending + 1'b1);   // lowest set bit
    last    = (pending & ~grant) == '0;
    vq_pop  = (pending != '0) && last;
    q_pop   = grant;
    // P_I-to-1 multiplexer driven by the one-hot grant.
    sel_data = '0;
    for (int i = 0; i < NUM_IN; i++) sel_data |= q_head[i] & {W{grant[i]}};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      served    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= (pending != '0);
      if (vq_pop)              served <= '0;
      else if (pending != '0)  served <= served | grant;
    end
  end

  always_ff @(posedge clk) out_data <= sel_data;

  a_grant_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(grant));
  a_head_nonzero: assert property (@(posedge clk) disable iff (rst)
                                   !vq_empty |-> (vq_head != '0));

endmodule
