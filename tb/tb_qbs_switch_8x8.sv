// tb_qbs_switch_8x8: the smaller of the two FPGA configurations, 8x8 ports
// with 256-bit packets and FIFOs of depth 8, under bursty traffic (mean
// burst 32, 80% load). Besides the cycle-by-cycle comparison with the
// reference model, the checker measures the port-to-port latency, which
// must be log2(8) + 2 = 5 cycles.
module tb_qbs_switch_8x8;
  import qbs_pkg::*;
  localparam int NUM_IN = 8, NUM_OUT = 8, DATA_W = 256, FIFO_DEPTH = 8;

  logic                      clk, rst, done;
  logic                      in_valid [NUM_IN];
  logic [idx_w(NUM_OUT)-1:0] in_dest  [NUM_IN];
  logic [DATA_W-1:0]         in_data  [NUM_IN];
  logic                      out_valid[NUM_OUT];
  logic [DATA_W-1:0]         out_data [NUM_OUT];
  logic [NUM_IN-1:0]         drop;

  qbs_switch #(.NUM_IN(NUM_IN), .NUM_OUT(NUM_OUT), .DATA_W(DATA_W), .FIFO_DEPTH(FIFO_DEPTH)) dut (.*);

  qbs_switch_checker #(.NUM_IN(NUM_IN), .NUM_OUT(NUM_OUT), .DATA_W(DATA_W),
                       .FIFO_DEPTH(FIFO_DEPTH), .CYCLES(5000), .RATE_PCT(80),
                       .MEAN_BURST(32), .STANDALONE(1'b0)) chk (.*);

  initial begin
    #1 wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks, chk.failures);
    $finish;
  end

  // the checker's own watchdog counts a failure but does not stop the run
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks, chk.failures + 1);
    $finish;
  end
endmodule
