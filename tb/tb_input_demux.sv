// tb_input_demux: applies random valid/destination/full combinations to a
// 16-output demultiplexer and checks the push strobes and the drop flag
// against a direct computation.
module tb_input_demux;
  import qbs_pkg::*;
  localparam int NUM_OUT = 16;

  logic                      valid, drop;
  logic [idx_w(NUM_OUT)-1:0] dest;
  logic [NUM_OUT-1:0]        full, push;
  int checks = 0, failures = 0;

  input_demux #(.NUM_OUT(NUM_OUT)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [NUM_OUT-1:0] exp_push;
      logic               exp_drop;
      valid = $urandom_range(3) != 0;
      dest  = idx_w(NUM_OUT)'($urandom);
      full  = (t % 3 == 0) ? '0 : NUM_OUT'($urandom);
      #1;
      exp_push = '0;
      exp_drop = 0;
      if (valid) begin
        if (full[dest]) exp_drop = 1;
        else            exp_push[dest] = 1'b1;
      end
      checks++;
      if (push != exp_push || drop != exp_drop) begin
        failures++;
        $display("v=%0d dest=%0d full=%h: push=%h drop=%0d exp %h %0d",
                 valid, dest, full, push, drop, exp_push, exp_drop);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
