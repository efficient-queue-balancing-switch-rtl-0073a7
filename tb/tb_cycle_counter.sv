// tb_cycle_counter: checks the modulo-N cycle counter against a software
// count, for a power-of-two N (16, the switch default) and a non-power-of-two
// N (5), including a reset in the middle of the run.
module tb_cycle_counter;
  import qbs_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [idx_w(16)-1:0] cnt16;
  logic [idx_w(5)-1:0]  cnt5;
  int checks = 0, failures = 0;

  cycle_counter #(.N(16)) dut16 (.clk, .rst, .count(cnt16));
  cycle_counter #(.N(5))  dut5  (.clk, .rst, .count(cnt5));

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp16, exp5;
    repeat (2) @(posedge clk);
    rst <= 0;
    exp16 = 0; exp5 = 0;
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      checks += 2;
      if (cnt16 != exp16) begin failures++; $display("N=16 t=%0d got %0d exp %0d", t, cnt16, exp16); end
      if (cnt5  != exp5)  begin failures++; $display("N=5 t=%0d got %0d exp %0d",  t, cnt5,  exp5);  end
      if (t == 60) begin
        rst = 1; @(posedge clk); #1 rst = 0;
        exp16 = 0; exp5 = 0;
      end else begin
        exp16 = (exp16 + 1) % 16;
        exp5  = (exp5 + 1) % 5;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
