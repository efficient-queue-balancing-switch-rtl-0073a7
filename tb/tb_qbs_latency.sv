// tb_qbs_latency: the average-latency experiment: 16x16 ports, uniform
// bursty traffic with a mean burst of 32 packets at 100% load, 25000 cycles,
// with FIFOs so deep (1024 entries) that nothing is dropped, standing in for
// unbounded queues. The run is checked cycle by cycle by qbs_switch_checker,
// which also reports the average port-to-port latency; the test requires
// that no packet was lost, so the FIFOs really acted as unbounded.
module tb_qbs_latency;
  import qbs_pkg::*;
  localparam int N = 16, DATA_W = 32, FIFO_DEPTH = 1024;

  logic                clk, rst, done;
  logic                in_valid [N];
  logic [idx_w(N)-1:0] in_dest  [N];
  logic [DATA_W-1:0]   in_data  [N];
  logic                out_valid[N];
  logic [DATA_W-1:0]   out_data [N];
  logic [N-1:0]        drop;

  qbs_switch #(.NUM_IN(N), .NUM_OUT(N), .DATA_W(DATA_W), .FIFO_DEPTH(FIFO_DEPTH)) dut (.*);

  qbs_switch_checker #(.NUM_IN(N), .NUM_OUT(N), .DATA_W(DATA_W), .FIFO_DEPTH(FIFO_DEPTH),
                       .CYCLES(25000), .RATE_PCT(100), .MEAN_BURST(32),
                       .STANDALONE(1'b0), .EXPECT_DROPS(1'b0)) chk (.*);

  initial begin
    int failures;
    #1 wait (done);
    failures = chk.failures;
    if (chk.dropped != 0) begin
      failures++;
      $display("%0d packets dropped: the FIFOs were not deep enough", chk.dropped);
    end
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks + 1, failures);
    $finish;
  end

  initial begin
    repeat (25000 + N * FIFO_DEPTH * 2 + 1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks, chk.failures + 1);
    $finish;
  end
endmodule
