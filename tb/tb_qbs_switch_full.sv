// tb_qbs_switch_full: the switch at its default size (16x16 ports, 256-bit
// packets, FIFO depth 8) under uniform bursty traffic with a mean burst of 32
// packets at 80% load, checked cycle by cycle by qbs_switch_checker.
module tb_qbs_switch_full;
  import qbs_pkg::*;
  localparam int NUM_IN = DEFAULT_NUM_IN, NUM_OUT = DEFAULT_NUM_OUT;
  localparam int DATA_W = DEFAULT_DATA_W, FIFO_DEPTH = DEFAULT_FIFO_DEPTH;

  logic                      clk, rst, done;
  logic                      in_valid [NUM_IN];
  logic [idx_w(NUM_OUT)-1:0] in_dest  [NUM_IN];
  logic [DATA_W-1:0]         in_data  [NUM_IN];
  logic                      out_valid[NUM_OUT];
  logic [DATA_W-1:0]         out_data [NUM_OUT];
  logic [NUM_IN-1:0]         drop;

  qbs_switch dut (.*);

  qbs_switch_checker #(.NUM_IN(NUM_IN), .NUM_OUT(NUM_OUT), .DATA_W(DATA_W),
                       .FIFO_DEPTH(FIFO_DEPTH), .CYCLES(3000), .RATE_PCT(80),
                       .MEAN_BURST(32)) chk (.*);
endmodule
