// tb_output_arbiter: the arbiter of one output port, with 4 queue groups, is
// connected to software models of its valid-bit queue and its 4 packet
// queues. Random arrival vectors are generated; each marked group receives a
// packet tagged with its arrival number. The test checks that the port sends
// exactly one packet per cycle while work is pending, that all packets of
// one arrival vector leave before any of the next one (lowest group first),
// that the output is registered one cycle after the head is visible, and
// that the head vector is popped exactly when its last packet leaves.
module tb_output_arbiter;
  import qbs_pkg::*;
  localparam int NUM_IN = 4, W = 16;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NUM_IN-1:0] vq_head, q_pop;
  logic              vq_empty, vq_pop, out_valid;
  logic [W-1:0]      q_head [NUM_IN];
  logic [W-1:0]      out_data;

  output_arbiter #(.NUM_IN(NUM_IN), .W(W)) dut (.*);

  logic [NUM_IN-1:0] vq[$];
  logic [W-1:0]      pq[NUM_IN][$];
  logic [W-1:0]      expected[$];   // software order of departure
  int                multi_entries = 0, idle_cycles = 0;

  // present the heads of the software queues to the arbiter
  task automatic drive_heads();
    vq_empty = (vq.size() == 0);
    vq_head  = vq_empty ? '0 : vq[0];
    for (int i = 0; i < NUM_IN; i++) q_head[i] = (pq[i].size() != 0) ? pq[i][0] : '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int arrival = 0;
    int expect_out = 0;           // packet expected on the output this cycle
    logic [W-1:0] exp_word;
    drive_heads();
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      logic [NUM_IN-1:0] v, gpop;
      logic              vpop;
      @(negedge clk);
      // output check: registered result of the previous cycle's grant
      checks++;
      if (out_valid != (expect_out != 0) || (out_valid && out_data != exp_word)) begin
        failures++;
        $display("t=%0d out v=%0d d=%h exp v=%0d d=%h", t, out_valid, out_data, expect_out, exp_word);
      end
      // what the arbiter should do now
      expect_out = (vq.size() != 0);
      if (vq.size() == 0) idle_cycles++;
      if (expect_out != 0) begin
        exp_word = expected[0];
        checks++;
        if (q_pop == '0 || !$onehot(q_pop) || pq[$clog2(q_pop)].size() == 0 ||
            pq[$clog2(q_pop)][0] != exp_word) begin
          failures++;
          $display("t=%0d wrong grant %b", t, q_pop);
        end
        // pop of the head vector exactly when one packet of it remains
        checks++;
        if (vq_pop != (expected.size() > 0 && remaining_of_head() == 1)) begin
          failures++;
          $display("t=%0d vq_pop=%0d remaining=%0d", t, vq_pop, remaining_of_head());
        end
      end else begin
        checks++;
        if (q_pop != '0 || vq_pop) begin failures++; $display("t=%0d pop while idle", t); end
      end
      // new arrivals for the next cycle (not during the final drain)
      v = (t < 2500 && $urandom_range(2) == 0) ? NUM_IN'($urandom) : '0;
      gpop = q_pop;
      vpop = vq_pop;
      @(posedge clk);
      #1;
      // apply the design's pops to the models
      for (int i = 0; i < NUM_IN; i++) if (gpop[i] && pq[i].size() != 0) void'(pq[i].pop_front());
      if (vpop && vq.size() != 0) begin
        void'(vq.pop_front());
        served_in_head = 0;
      end else if (gpop != '0) served_in_head++;
      if (expect_out != 0) void'(expected.pop_front());
      if (v != '0) begin
        if ($countones(v) > 1) multi_entries++;
        vq.push_back(v);
        for (int i = 0; i < NUM_IN; i++) if (v[i]) begin
          logic [W-1:0] word = W'({arrival[11:0], 4'(i)});
          pq[i].push_back(word);
          expected.push_back(word);
        end
        arrival++;
      end
      drive_heads();
    end
    checks += 2;
    if (multi_entries == 0) failures++;
    if (idle_cycles == 0) failures++;
    $display("multi-packet entries %0d, idle cycles %0d", multi_entries, idle_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int served_in_head = 0;
  function automatic int remaining_of_head();
    return (vq.size() == 0) ? 0 : $countones(vq[0]) - served_in_head;
  endfunction
endmodule
