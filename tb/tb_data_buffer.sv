// tb_data_buffer: streams 8 groups of 11 random readings word by word
// (with gaps) and checks that each assembled vector is
// {location x, location y, reading 0..10} in elements 0..12, that no
// vector appears early, and that back-pressure from the consumer holds a
// vector until it is taken.
module tb_data_buffer;
  import mgu_pkg::*;
  localparam int R = 11, L = 2, NV = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready; data_t in_data = 0;
  data_t [L-1:0] loc;
  logic x_valid, x_ready = 0; data_t [L+R-1:0] x_vec;
  data_buffer #(.RSSI_DIM(R), .LOC_DIM(L)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int rs[NV][R];
  initial begin
    loc[0] = 16'sd1234; loc[1] = -16'sd777;
    for (int v = 0; v < NV; v++) for (int i = 0; i < R; i++) rs[v][i] = int'($urandom_range(60000)) - 30000;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    fork
      for (int v = 0; v < NV; v++) for (int i = 0; i < R; i++) begin
        @(negedge clk);
        in_valid = ($urandom_range(3) != 0);
        in_data = data_t'(rs[v][i]);
        while (!(in_valid && in_ready)) begin
          @(negedge clk); in_valid = 1;
        end
        @(negedge clk); in_valid = 0;
      end
      for (int v = 0; v < NV; v++) begin
        int done;
        done = 0;
        while (!done) begin
          @(negedge clk);
          x_ready = ($urandom_range(3) == 0);
          #1;
          if (x_valid && x_ready) begin
            done = 1;
            for (int i = 0; i < L + R; i++) begin
              int e;
              e = (i < L) ? int'(loc[i]) : rs[v][i-L];
              checks++;
              if (int'($signed(x_vec[i])) != e) begin
                failures++; $display("FAIL v%0d e%0d: %0d exp %0d", v, i, $signed(x_vec[i]), e);
              end
            end
          end
        end
      end
    join
    @(negedge clk); x_ready = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (x_valid) begin failures++; $display("FAIL spurious vector"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
