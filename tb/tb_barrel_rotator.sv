// tb_barrel_rotator: drives random packets and random shift amounts into an
// 8-lane rotator every cycle and checks that, exactly log2(8) = 3 cycles
// later, the packet of input lane s appears on lane (s + shift) mod 8 with
// its valid bit.
module tb_barrel_rotator;
  import qbs_pkg::*;
  localparam int N = 8, W = 16, LAT = 3;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [idx_w(N)-1:0] shift;
  logic         in_valid [N], out_valid[N];
  logic [W-1:0] in_lane  [N], out_lane [N];
  int checks = 0, failures = 0;

  barrel_rotator #(.N(N), .W(W)) dut (.*);

  // expected outputs, indexed by cycle of appearance
  logic         exp_v [int][N];
  logic [W-1:0] exp_d [int][N];

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc = 0;
    shift = '0;
    foreach (in_valid[i]) begin in_valid[i] = 0; in_lane[i] = '0; end
    repeat (3) @(posedge clk);
    rst = 0;
    for (cyc = 0; cyc < 600; cyc++) begin
      @(negedge clk);
      // check what must appear now
      if (exp_v.exists(cyc)) begin
        for (int j = 0; j < N; j++) begin
          checks++;
          if (out_valid[j] != exp_v[cyc][j] ||
              (exp_v[cyc][j] && out_lane[j] != exp_d[cyc][j])) begin
            failures++;
            $display("cyc %0d lane %0d: got v=%0d d=%h exp v=%0d d=%h", cyc, j,
                     out_valid[j], out_lane[j], exp_v[cyc][j], exp_d[cyc][j]);
          end
        end
      end
      // drive new inputs (after cycle 550 only idle, to drain)
      shift = idx_w(N)'($urandom_range(N - 1));
      for (int s = 0; s < N; s++) begin
        in_valid[s] = (cyc < 550) && ($urandom_range(3) != 0);
        in_lane[s]  = W'($urandom);
        exp_v[cyc + LAT][(s + shift) % N] = in_valid[s];
        exp_d[cyc + LAT][(s + shift) % N] = in_lane[s];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
