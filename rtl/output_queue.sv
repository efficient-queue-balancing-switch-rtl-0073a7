// output_queue: synchronous FIFO with an asynchronously readable head.
//
// One of the P_I x P_O packet queues of the switch; it is also the storage
// inside each valid-bit queue. The storage is a plain array with a
// combinational read of the head entry, the shape FPGA tools map to
// distributed (LUT) RAM, which matches the LUT-RAM FIFOs of depth 8 used for
// the switch. Read and write pointers wrap at DEPTH, so DEPTH need not be a
// power of two. A push and a pop may happen in the same cycle, also when the
// queue is full. A pop of an empty queue, and a push into a full queue
// without a pop, are illegal and are flagged by assertions.
//
// Interface: push/push_data, pop; head (valid when !empty), empty, full,
// count (number of stored entries). Reset (synchronous, active high) empties
// the queue; the array itself is not reset.
// Timing: an entry pushed at a clock edge is visible at `head` right after
// that edge if the queue was empty (one cycle write-to-read).
module output_queue
  import qbs_pkg::*;
#(
  parameter int unsigned W     = DEFAULT_DATA_W,
  parameter int unsigned DEPTH = DEFAULT_FIFO_DEPTH
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    push,
  input  logic [W-1:0]            push_data,
  input  logic                    pop,
  output logic [W-1:0]            head,
  output logic                    empty,
  output logic                    full,
  output logic [idx_w(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = idx_w(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign head  = mem[rd_ptr];
  assign empty = (count == '0);
  assign full  = (count == idx_w(DEPTH+1)'(DEPTH));

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= push_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + idx_w(DEPTH+1)'(push) - idx_w(DEPTH+1)'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(pop && empty));

endmodule
