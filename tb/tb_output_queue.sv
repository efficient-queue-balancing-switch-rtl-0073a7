// tb_output_queue: random legal pushes and pops (pushes only when not full,
// pops only when not empty, both in the same cycle allowed) on a depth-8 and
// a depth-5 FIFO, checked against a software queue: head, empty, full and
// count after every cycle. It also checks that a pushed entry is readable
// at the head one cycle after the push into an empty queue.
module tb_output_queue;
  import qbs_pkg::*;
  localparam int W = 12;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic         push8, pop8, push5, pop5;
  logic [W-1:0] din8, din5, head8, head5;
  logic         empty8, full8, empty5, full5;
  logic [idx_w(9)-1:0] count8;
  logic [idx_w(6)-1:0] count5;

  output_queue #(.W(W), .DEPTH(8)) dut8 (.clk, .rst, .push(push8), .push_data(din8), .pop(pop8),
    .head(head8), .empty(empty8), .full(full8), .count(count8));
  output_queue #(.W(W), .DEPTH(5)) dut5 (.clk, .rst, .push(push5), .push_data(din5), .pop(pop5),
    .head(head5), .empty(empty5), .full(full5), .count(count5));

  logic [W-1:0] m8[$], m5[$];

  task automatic check(string name, logic [W-1:0] m[$], int depth, logic [W-1:0] head,
                       logic empty, logic full, int count);
    checks++;
    if (empty != (m.size() == 0) || full != (m.size() == depth) || count != m.size() ||
        (m.size() != 0 && head != m[0])) begin
      failures++;
      $display("%s: size %0d head %h/%h empty %0d full %0d count %0d", name, m.size(),
               head, (m.size() != 0) ? m[0] : '0, empty, full, count);
    end
  endtask

  initial begin
    push8 = 0; pop8 = 0; push5 = 0; pop5 = 0; din8 = '0; din5 = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 4000; t++) begin
      int bias;
      @(negedge clk);
      check("d8", m8, 8, head8, empty8, full8, int'(count8));
      check("d5", m5, 5, head5, empty5, full5, int'(count5));
      // alternate phases biased towards filling and draining
      bias  = ((t / 200) % 2 == 0) ? 3 : 1;
      push8 = !full8 && ($urandom_range(3) < bias);
      pop8  = !empty8 && ($urandom_range(3) >= bias);
      push5 = !full5 && ($urandom_range(3) < bias);
      pop5  = !empty5 && ($urandom_range(3) >= bias);
      din8  = W'($urandom);
      din5  = W'($urandom);
      @(posedge clk);
      if (pop8) void'(m8.pop_front());
      if (push8) m8.push_back(din8);
      if (pop5) void'(m5.pop_front());
      if (push5) m5.push_back(din5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
