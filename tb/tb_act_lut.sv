// tb_act_lut: reads every entry of both tables (one-cycle read latency)
// and compares it with round(1024*sigmoid(i/256)) and
// round(1024*tanh(i/256)) evaluated here.
module tb_act_lut;
  import mgu_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 0; act_func_t func = ACT_SIG; logic [10:0] addr = 0; logic [10:0] q;
  act_lut dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int f = 0; f < 2; f++) for (int i = 0; i < 2048; i++) begin
      int e;
      real xv;
      xv = real'(i) / 256.0;
      if (f == 0) e = $rtoi(1024.0 / (1.0 + $exp(-xv)) + 0.5);
      else        e = $rtoi(1024.0 * (1.0 - 2.0 / ($exp(2.0 * xv) + 1.0)) + 0.5);
      @(negedge clk); en = 1; func = act_func_t'(f); addr = 11'(i);
      @(negedge clk); en = 0;
      checks++;
      if (int'(q) != e) begin failures++; if (failures < 10) $display("FAIL f=%0d i=%0d q=%0d exp=%0d", f, i, q, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
