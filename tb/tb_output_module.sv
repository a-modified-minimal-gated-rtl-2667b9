// tb_output_module: loads a random 32x2 weight matrix and bias, sends
// 12 random hidden-state vectors (more than fit in the output buffer at
// once is not needed; the consumer pops after a delay) and compares each
// result with sat((sum h*W + (b << W_FL)) >>> W_FL). Also checks that a
// result is written HID+3 cycles (counted inclusively) after the vector
// is taken, and that y_push pulses once per result.
module tb_output_module;
  import mgu_pkg::*;
  localparam int N = 32, O = 2, WFL = 12, NV = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic h_valid = 0, h_ready; data_t [N-1:0] h_vec = '0;
  logic y_valid, y_pop = 0, y_push; data_t [O-1:0] y_vec;
  logic wr_en = 0; logic [7:0] wr_row = 0, wr_col = 0; data_t wr_data = 0;
  output_module #(.HID(N), .OUT_DIM(O)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic int sat(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction
  int w[N+1][O];
  int hs[NV][N];
  int cyc = 0, t_take = 0, n_push = 0;
  always @(negedge clk) begin
    cyc++;
    if (h_valid && h_ready) t_take = cyc;
    if (y_push) begin
      n_push++;
      checks++;
      if (cyc - t_take != N + 3) begin failures++; $display("FAIL latency %0d", cyc - t_take); end
    end
  end
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r <= N; r++) for (int l = 0; l < O; l++) begin
      w[r][l] = int'($urandom_range(8000)) - 4000;
      @(negedge clk); wr_en = 1; wr_row = 8'(r); wr_col = 8'(l); wr_data = data_t'(w[r][l]);
    end
    @(negedge clk); wr_en = 0;
    for (int v = 0; v < NV; v++) for (int k = 0; k < N; k++) hs[v][k] = int'($urandom_range(2048)) - 1024;
    fork
      for (int v = 0; v < NV; v++) begin
        @(negedge clk);
        for (int k = 0; k < N; k++) h_vec[k] = data_t'(hs[v][k]);
        h_valid = 1;
        while (!h_ready) @(negedge clk);
        @(negedge clk); h_valid = 0;
      end
      begin
        repeat (200) @(negedge clk);
        for (int v = 0; v < NV; v++) begin
          while (!y_valid) @(negedge clk);
          for (int l = 0; l < O; l++) begin
            longint a;
            a = longint'(w[N][l]) <<< WFL;
            for (int k = 0; k < N; k++) a += longint'(hs[v][k]) * w[k][l];
            checks++;
            if (int'($signed(y_vec[l])) != sat(a >>> WFL)) begin
              failures++; $display("FAIL v%0d y[%0d]=%0d exp %0d", v, l, $signed(y_vec[l]), sat(a >>> WFL));
            end
          end
          y_pop = 1; @(negedge clk); y_pop = 0;
        end
      end
    join
    checks++;
    if (n_push != NV) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
