// tb_qbs_packet_loss: the packet-loss experiment on the switch with rotator:
// 16x16 ports, uniform bursty traffic with a mean burst of 32 packets at 80%
// load, 25000 cycles, once with FIFOs of depth 7 and once with depth 32.
// Both runs are checked cycle by cycle by qbs_switch_checker; the test then
// reports the loss of each and requires that the deeper FIFOs lose fewer
// packets. Payloads are 32 bits wide, since the packet width does not
// change which packets are dropped.
module tb_qbs_packet_loss;
  import qbs_pkg::*;
  localparam int N = 16, DATA_W = 32, CYCLES = 25000;
  localparam int NC = 3;
  localparam int DEPTHS[NC] = '{1, 7, 32};

  int checks = 0, failures = 0;
  int sent[NC], dropped[NC];
  logic done_all[NC];

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    logic                clk, rst, done;
    logic                in_valid [N];
    logic [idx_w(N)-1:0] in_dest  [N];
    logic [DATA_W-1:0]   in_data  [N];
    logic                out_valid[N];
    logic [DATA_W-1:0]   out_data [N];
    logic [N-1:0]        drop;

    qbs_switch #(.NUM_IN(N), .NUM_OUT(N), .DATA_W(DATA_W), .FIFO_DEPTH(DEPTHS[c])) dut (.*);

    qbs_switch_checker #(.NUM_IN(N), .NUM_OUT(N), .DATA_W(DATA_W), .FIFO_DEPTH(DEPTHS[c]),
                         .CYCLES(CYCLES), .RATE_PCT(80), .MEAN_BURST(32),
                         .STANDALONE(1'b0)) chk (.*);

    assign done_all[c] = done;
  end

  initial begin
    #(10 * (CYCLES + 2000) * 10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 wait (done_all[0] && done_all[1] && done_all[2]);
    checks   = g_cfg[0].chk.checks + g_cfg[1].chk.checks + g_cfg[2].chk.checks;
    failures = g_cfg[0].chk.failures + g_cfg[1].chk.failures + g_cfg[2].chk.failures;
    sent[0] = g_cfg[0].chk.sent;  dropped[0] = g_cfg[0].chk.dropped;
    sent[1] = g_cfg[1].chk.sent;  dropped[1] = g_cfg[1].chk.dropped;
    sent[2] = g_cfg[2].chk.sent;  dropped[2] = g_cfg[2].chk.dropped;
    for (int c = 0; c < NC; c++)
      $display("FIFO depth %0d: sent %0d dropped %0d, loss %0d.%02d%%", DEPTHS[c], sent[c], dropped[c],
               dropped[c] * 100 / sent[c], (dropped[c] * 10000 / sent[c]) % 100);
    // loss must fall with depth, compared as cross products
    for (int c = 0; c + 1 < NC; c++) begin
      checks++;
      if (longint'(dropped[c]) * sent[c+1] <= longint'(dropped[c+1]) * sent[c]) begin
        failures++;
        $display("depth %0d did not lose less than depth %0d", DEPTHS[c+1], DEPTHS[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
