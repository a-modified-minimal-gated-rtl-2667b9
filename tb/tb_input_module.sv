// tb_input_module: loads random Wxf, Wxh, b_f, b_h, pushes several input
// vectors back to back and compares every xf_t and xh_t with
// sat((sum x*W + (b << SH)) >>> SH), SH = IN_FL + W_FL - DATA_FL. Checks
// the schedule: xf_t is written in the (IN_DIM+3)-th cycle counted from its
// first MAC issue and xh_t IN_DIM cycles after xf_t. The outputs are popped slowly at
// first so the output buffers fill and the module must wait.
module tb_input_module;
  import mgu_pkg::*;
  localparam int P = 13, N = 32, WFL = 12, SH = DATA_FL + WFL - DATA_FL, NV = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic x_valid = 0, x_ready; data_t [P-1:0] x_vec = '0;
  logic wr_en = 0; logic [7:0] wr_row = 0, wr_col = 0; data_t wr_data = 0;
  logic xf_valid, xh_valid, xf_pop = 0, xh_pop = 0; data_t [N-1:0] xf_vec, xh_vec;
  input_module #(.IN_DIM(P), .HID(N)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic int sat(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction
  int w[2*P+2][N];
  int xs[NV][P];
  int cyc = 0, t_issue = -1, t_f = -1;
  always @(negedge clk) begin
    cyc++;
    if (dut.state == 2'd1 && dut.k == 0) t_issue = cyc;
    if (dut.xf_push) begin
      t_f = cyc; checks++;
      if (t_f - t_issue != P + 2) begin failures++; $display("FAIL xf timing %0d", t_f - t_issue); end
    end
    if (dut.xh_push) begin
      checks++;
      if (cyc - t_f != P) begin failures++; $display("FAIL xh timing %0d", cyc - t_f); end
    end
  end
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < 2*P+2; r++) for (int j = 0; j < N; j++) begin
      w[r][j] = int'($urandom_range(4000)) - 2000;
      @(negedge clk); wr_en = 1; wr_row = 8'(r); wr_col = 8'(j); wr_data = data_t'(w[r][j]);
    end
    @(negedge clk); wr_en = 0;
    fork
      for (int v = 0; v < NV; v++) begin
        for (int k = 0; k < P; k++) xs[v][k] = int'($urandom_range(6000)) - 3000;
        @(negedge clk);
        for (int k = 0; k < P; k++) x_vec[k] = data_t'(xs[v][k]);
        x_valid = 1;
        while (!x_ready) @(negedge clk);
        @(negedge clk); x_valid = 0;
      end
      begin
        repeat (300) @(negedge clk);   // let the output buffers fill
        for (int v = 0; v < NV; v++) begin
          while (!(xf_valid && xh_valid)) @(negedge clk);
          for (int j = 0; j < N; j++) begin
            longint af, ah;
            af = longint'(w[2*P][j]) <<< SH;
            ah = longint'(w[2*P+1][j]) <<< SH;
            for (int k = 0; k < P; k++) begin
              af += longint'(xs[v][k]) * w[k][j];
              ah += longint'(xs[v][k]) * w[P+k][j];
            end
            checks += 2;
            if (int'(xf_vec[j]) != sat(af >>> SH)) begin failures++; $display("FAIL xf v%0d j%0d got %0d exp %0d t=%0t", v, j, xf_vec[j], sat(af >>> SH), $time); end
            if (int'(xh_vec[j]) != sat(ah >>> SH)) begin failures++; $display("FAIL xh v%0d j%0d", v, j); end
          end
          xf_pop = 1; xh_pop = 1; @(negedge clk); xf_pop = 0; xh_pop = 0;
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
