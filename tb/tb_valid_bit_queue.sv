// tb_valid_bit_queue: a valid-bit queue for 4 queue groups and FIFO depth 2
// (so 8 entries) receives random enqueue vectors, many of them all-zero, and
// random pops. A software queue that stores only the non-zero vectors gives
// the expected head and empty flag after every cycle.
module tb_valid_bit_queue;
  import qbs_pkg::*;
  localparam int NUM_IN = 4, FIFO_DEPTH = 2, DEPTH = NUM_IN * FIFO_DEPTH;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NUM_IN-1:0] enq_bits, head;
  logic              pop, empty;

  valid_bit_queue #(.NUM_IN(NUM_IN), .FIFO_DEPTH(FIFO_DEPTH)) dut (.*);

  logic [NUM_IN-1:0] m[$];
  int zero_cycles = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enq_bits = '0; pop = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (empty != (m.size() == 0) || (m.size() != 0 && head != m[0])) begin
        failures++;
        $display("t=%0d size %0d head %b exp %b empty %0d", t, m.size(), head,
                 (m.size() != 0) ? m[0] : '0, empty);
      end
      pop = !empty && ($urandom_range(2) != 0);
      // never offer more entries than the design guarantees room for
      if (m.size() - (pop ? 1 : 0) < DEPTH) enq_bits = NUM_IN'($urandom_range(2) == 0 ? 0 : $urandom);
      else                                   enq_bits = '0;
      if (enq_bits == '0) zero_cycles++;
      @(posedge clk);
      if (pop) void'(m.pop_front());
      if (enq_bits != '0) m.push_back(enq_bits);
    end
    checks++;
    if (zero_cycles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
