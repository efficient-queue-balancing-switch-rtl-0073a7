// qbs_switch: output-queued switch with input rotation for queue balancing.
//
// NUM_IN input ports send fixed-size packets (DATA_W bits plus a destination
// port number) to NUM_OUT output ports; every port may send and receive one
// packet per cycle. The switch is output-queued without memory sharing: each
// packet is written into one of NUM_IN x NUM_OUT FIFOs, chosen by the lane it
// arrives on and its destination, and each output port has its own scheduler
// that drains the NUM_IN FIFOs holding packets for it. Because the
// schedulers never compete for a crossbar, their decisions are independent
// and no speedup is needed.
//
// Bursts from one source would fill a single FIFO while the others stay
// empty. To spread them, the inputs first pass a rotator: a pipelined barrel
// shifter that rotates all lanes by the value of a cycle counter, so a source
// lands on a different queue group every cycle. This balances the queues but
// scatters a flow over several FIFOs, so per output port a valid-bit queue
// records, for every cycle that stored packets for the port, which queue
// groups received one; the port's arbiter serves the entries in order, which
// restores the arrival order. A packet whose FIFO is full is dropped and
// reported on `drop` (indexed by queue group, i.e. by rotated lane).
//
// Datapath and latency (input sampled in cycle c):
//   cycles c .. c+S-1   rotator, S = log2(NUM_IN) pipeline stages
//   cycle  c+S          demultiplex and enqueue into the FIFO + valid-bit queue
//   cycle  c+S+1        scheduling and multiplexing, output register
//   cycle  c+S+2        packet on out_valid/out_data (no contention)
// i.e. log2(NUM_IN) + 2 cycles port to port.
//
// Follows the switch description: the rotator, its cycle counter and
// pipelined barrel-shifter form, the per-output valid-bit queues of
// NUM_IN bits with depth NUM_IN * FIFO_DEPTH, the hold-until-served arbiter,
// the sizes (16 ports, 256-bit packets, depth-8 FIFOs). This design's own
// choices: the port format, a synchronous active-high reset, dropping on a
// full FIFO instead of back-pressure, no ready signal on the outputs, and
// lowest-index-first service inside one valid-bit entry.
module qbs_switch
  import qbs_pkg::*;
#(
  parameter int unsigned NUM_IN     = DEFAULT_NUM_IN,
  parameter int unsigned NUM_OUT    = DEFAULT_NUM_OUT,
  parameter int unsigned DATA_W     = DEFAULT_DATA_W,
  parameter int unsigned FIFO_DEPTH = DEFAULT_FIFO_DEPTH
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      in_valid [NUM_IN],
  input  logic [idx_w(NUM_OUT)-1:0] in_dest  [NUM_IN],
  input  logic [DATA_W-1:0]         in_data  [NUM_IN],
  output logic                      out_valid[NUM_OUT],
  output logic [DATA_W-1:0]         out_data [NUM_OUT],
  output logic [NUM_IN-1:0]         drop
);

  localparam int unsigned DW   = idx_w(NUM_OUT);
  localparam int unsigned LW   = DW + DATA_W;          // rotator lane width
  localparam int unsigned CW   = idx_w(FIFO_DEPTH + 1);

  // ---------------------------------------------------------------- rotator
  logic [idx_w(NUM_IN)-1:0] rot_amt;
  logic [LW-1:0]            in_lane  [NUM_IN];
  logic                     rot_valid[NUM_IN];
  logic [LW-1:0]            rot_lane [NUM_IN];

  cycle_counter #(.N(NUM_IN)) u_counter (.clk, .rst, .count(rot_amt));

  for (genvar i = 0; i < NUM_IN; i++) begin : g_pack
    assign in_lane[i] = {in_dest[i], in_data[i]};
  end

  barrel_rotator #(.N(NUM_IN), .W(LW)) u_rotator (
    .clk, .rst,
    .shift(rot_amt),
    .in_valid, .in_lane,
    .out_valid(rot_valid), .out_lane(rot_lane)
  );

  // ------------------------------------------- demultiplexers and FIFOs
  // push[i][d] / full[i][d] / q_head[d][i]: queue of group i for output d.
  logic [NUM_OUT-1:0] push    [NUM_IN];
  logic [NUM_OUT-1:0] full    [NUM_IN];
  logic [NUM_OUT-1:0] pop     [NUM_IN];
  logic [DATA_W-1:0]  q_head  [NUM_OUT][NUM_IN];
  logic [NUM_IN-1:0]  enq_bits[NUM_OUT];
  logic [NUM_IN-1:0]  q_pop   [NUM_OUT];

  for (genvar i = 0; i < NUM_IN; i++) begin : g_group
    input_demux #(.NUM_OUT(NUM_OUT)) u_demux (
      .valid(rot_valid[i]),
      .dest (rot_lane[i][LW-1 -: DW]),
      .full (full[i]),
      .push (push[i]),
      .drop (drop[i])
    );

    for (genvar d = 0; d < NUM_OUT; d++) begin : g_queue
      logic          empty_unused;
      logic [CW-1:0] count_unused;

      assign pop[i][d] = q_pop[d][i];

      output_queue #(.W(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
        .clk, .rst,
        .push     (push[i][d]),
        .push_data(rot_lane[i][DATA_W-1:0]),
        .pop      (pop[i][d]),
        .head     (q_head[d][i]),
        .empty    (empty_unused),
        .full     (full[i][d]),
        .count    (count_unused)
      );
    end
  end

  // ------------------------------------ valid-bit queues and schedulers
  for (genvar d = 0; d < NUM_OUT; d++) begin : g_port
    logic [NUM_IN-1:0] vq_head;
    logic              vq_empty, vq_pop;

    for (genvar i = 0; i < NUM_IN; i++) begin : g_bits
      assign enq_bits[d][i] = push[i][d];
    end

    valid_bit_queue #(.NUM_IN(NUM_IN), .FIFO_DEPTH(FIFO_DEPTH)) u_vq (
      .clk, .rst,
      .enq_bits(enq_bits[d]),
      .pop     (vq_pop),
      .head    (vq_head),
      .empty   (vq_empty)
    );

    output_arbiter #(.NUM_IN(NUM_IN), .W(DATA_W)) u_arb (
      .clk, .rst,
      .vq_head, .vq_empty, .vq_pop,
      .q_head   (q_head[d]),
      .q_pop    (q_pop[d]),
      .out_valid(out_valid[d]),
      .out_data (out_data[d])
    );
  end

endmodule
