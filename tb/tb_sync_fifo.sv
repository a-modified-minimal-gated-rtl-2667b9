// tb_sync_fifo: random push/pop traffic against a queue model; checks the
// show-ahead head, empty, full and count every cycle, including push and
// pop in the same cycle when full.
module tb_sync_fifo;
  localparam int W = 16, D = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0; logic [W-1:0] wr_data = 0, rd_data; logic empty, full;
  logic [$clog2(D+1)-1:0] count;
  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [W-1:0] q[$];
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks++;
      if (count != q.size() || empty != (q.size() == 0) || full != (q.size() == D) ||
          (q.size() > 0 && rd_data != q[0])) begin
        failures++; if (failures < 10) $display("FAIL at %0d: count=%0d model=%0d", i, count, q.size());
      end
      pop  = (q.size() > 0) && ($urandom_range(2) != 0);
      push = ($urandom_range(2) != 0) && (q.size() < D || pop);
      wr_data = W'($urandom);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wr_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
