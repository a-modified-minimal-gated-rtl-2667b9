// tb_ctrl_regs: register write/read-back, the reset value of the step
// count, start -> busy, the result counter, completion (busy falls, done
// and irq rise exactly at the STEPS-th result), interrupt clear, and that
// STEPS cannot be changed while busy.
module tb_ctrl_regs;
  import mgu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic reg_we = 0; logic [3:0] reg_addr = 0; logic [31:0] reg_wdata = 0, reg_rdata;
  logic out_push = 0, run, irq; logic [7:0] num_steps; data_t [1:0] loc;
  ctrl_regs #(.NUM_STEPS(9)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d exp %0d", what, got, exp); end
  endtask
  task automatic wr(int a, int d);
    @(negedge clk); reg_we = 1; reg_addr = 4'(a); reg_wdata = 32'(d);
    @(negedge clk); reg_we = 0;
  endtask
  task automatic chkrd(string what, int a, longint exp);
    reg_addr = 4'(a);
    #1;
    chk(what, longint'($signed(reg_rdata)), exp);
  endtask
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    chkrd("reset steps", 1, 9);
    chkrd("reset status", 0, 0);
    wr(1, 5); wr(2, 32'hffff_fc00); wr(3, 300);
    chkrd("steps", 1, 5); chk("num_steps", num_steps, 5);
    chk("loc x", $signed(loc[0]), -1024); chk("loc y", $signed(loc[1]), 300);
    chkrd("loc x rd", 2, -1024);
    wr(0, 1);
    chk("busy", run, 1); chkrd("status busy", 0, 1);
    wr(1, 7);
    chk("steps locked", num_steps, 5);
    for (int i = 0; i < 5; i++) begin
      chk("irq before end", irq, 0);
      chkrd("count", 4, i);
      @(negedge clk); out_push = 1; @(negedge clk); out_push = 0;
      repeat ($urandom_range(3)) @(negedge clk);
    end
    chk("irq", irq, 1); chk("run after", run, 0); chkrd("status done", 0, 6);
    chkrd("count wrapped", 4, 0);
    wr(0, 2);
    chk("irq cleared", irq, 0); chkrd("status after clear", 0, 2);
    wr(0, 1);
    chk("restart", run, 1); chkrd("done cleared", 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
