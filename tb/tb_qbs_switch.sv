// tb_qbs_switch: end-to-end test of a 4x4 switch with 32-bit packets and
// FIFOs of depth 2, under bursty traffic at 80% load (mean burst 8), checked
// cycle by cycle by qbs_switch_checker.
module tb_qbs_switch;
  import qbs_pkg::*;
  localparam int NUM_IN = 4, NUM_OUT = 4, DATA_W = 32, FIFO_DEPTH = 2;

  logic                      clk, rst, done;
  logic                      in_valid [NUM_IN];
  logic [idx_w(NUM_OUT)-1:0] in_dest  [NUM_IN];
  logic [DATA_W-1:0]         in_data  [NUM_IN];
  logic                      out_valid[NUM_OUT];
  logic [DATA_W-1:0]         out_data [NUM_OUT];
  logic [NUM_IN-1:0]         drop;

  qbs_switch #(.NUM_IN(NUM_IN), .NUM_OUT(NUM_OUT), .DATA_W(DATA_W), .FIFO_DEPTH(FIFO_DEPTH)) dut (.*);

  qbs_switch_checker #(.NUM_IN(NUM_IN), .NUM_OUT(NUM_OUT), .DATA_W(DATA_W),
                       .FIFO_DEPTH(FIFO_DEPTH), .CYCLES(3000), .RATE_PCT(80),
                       .MEAN_BURST(8)) chk (.*);
endmodule
