// tb_mgu_layer: one MGU_1 layer (13 inputs, 32 hidden units) driven with
// random weights and inputs, served by an activation module instance.
// Two sequences of 4 steps are run and every h_t is compared with a
// fixed-point reference of the layer computed here:
//   f = sigma(xf + Whf h), h* = xh + f (.) (Whh h), h = f h + (1-f) tanh(h*)
// with the same truncation, saturation and table rules. The consumer of
// h_t is randomly not ready.
module tb_mgu_layer;
  import mgu_pkg::*;
  localparam int P = 13, N = 32, WFL = 12, T = 4, S = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic run = 0; logic [7:0] num_steps = 8'(T);
  logic x_valid = 0, x_ready; data_t [P-1:0] x_vec = '0;
  logic act_valid, act_ready; act_req_t act_req;
  logic resp_valid; act_resp_t resp;
  logic h_out_valid, h_out_ready = 0; data_t [N-1:0] h_out;
  logic wr_en = 0; logic [1:0] wr_sel = 0; logic [7:0] wr_row = 0, wr_col = 0; data_t wr_data = 0;
  mgu_layer #(.IN_DIM(P), .HID(N), .LAYER(1'b0)) dut (.*);
  logic rv [1]; act_req_t rq [1]; logic rr [1];
  assign rv[0] = act_valid; assign rq[0] = act_req; assign act_ready = rr[0];
  activation_module #(.NUM_REQ(1)) u_act (.clk, .rst_n, .req_valid(rv), .req(rq), .req_ready(rr), .resp_valid, .resp);

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic int sat(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction
  function automatic int idx_of(int x);
    int m;
    m = ((x < 0) ? -x : x) >>> 2;
    return (m > 2047) ? 2047 : m;
  endfunction
  function automatic int sig_pos(int i);
    return $rtoi(1024.0 / (1.0 + $exp(-real'(i) / 256.0)) + 0.5);
  endfunction
  function automatic int tanh_pos(int i);
    real e2;
    e2 = $exp(2.0 * real'(i) / 256.0);
    return $rtoi(1024.0 * (e2 - 1.0) / (e2 + 1.0) + 0.5);
  endfunction

  int wxf[P][N], wxh[P][N], bf[N], bh[N], whf[N][N], whh[N][N];
  int xs[S*T][P];
  int exph[S*T][N];

  task automatic model();
    int h[N], hn[N];
    for (int s = 0; s < S; s++) begin
      for (int j = 0; j < N; j++) h[j] = 0;
      for (int t = 0; t < T; t++) begin
        for (int j = 0; j < N; j++) begin
          longint axf, axh, ahf, ahh;
          int xf, xh, fs, f, fc, hs, ht, sg;
          axf = longint'(bf[j]) <<< WFL; axh = longint'(bh[j]) <<< WFL; ahf = 0; ahh = 0;
          for (int k = 0; k < P; k++) begin
            axf += longint'(xs[s*T+t][k]) * wxf[k][j];
            axh += longint'(xs[s*T+t][k]) * wxh[k][j];
          end
          for (int k = 0; k < N; k++) begin
            ahf += longint'(h[k]) * whf[k][j];
            ahh += longint'(h[k]) * whh[k][j];
          end
          xf = sat(axf >>> WFL); xh = sat(axh >>> WFL);
          fs = sat(longint'(xf) + sat(ahf >>> WFL));
          sg = sig_pos(idx_of(fs));
          f  = (fs < 0) ? 1024 - sg : sg;
          fc = 1024 - f;
          hs = sat((longint'(f) * sat(ahh >>> WFL) + (longint'(xh) <<< DATA_FL)) >>> DATA_FL);
          ht = tanh_pos(idx_of(hs));
          if (hs < 0) ht = -ht;
          hn[j] = sat((longint'(f) * h[j] + longint'(fc) * ht) >>> DATA_FL);
        end
        h = hn;
        for (int j = 0; j < N; j++) exph[s*T+t][j] = h[j];
      end
    end
  endtask

  task automatic wword(int sel, int row, int col, int v);
    @(negedge clk); wr_en = 1; wr_sel = 2'(sel); wr_row = 8'(row); wr_col = 8'(col); wr_data = data_t'(v);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < P; k++) for (int j = 0; j < N; j++) begin
      wxf[k][j] = int'($urandom_range(2400)) - 1200; wxh[k][j] = int'($urandom_range(2400)) - 1200;
      wword(0, k, j, wxf[k][j]); wword(0, P + k, j, wxh[k][j]);
    end
    for (int j = 0; j < N; j++) begin
      bf[j] = int'($urandom_range(1200)) - 600; bh[j] = int'($urandom_range(1200)) - 600;
      wword(0, 2*P, j, bf[j]); wword(0, 2*P+1, j, bh[j]);
    end
    for (int k = 0; k < N; k++) for (int j = 0; j < N; j++) begin
      whf[k][j] = int'($urandom_range(1800)) - 900; whh[k][j] = int'($urandom_range(1800)) - 900;
      wword(1, k, j, whf[k][j]); wword(2, k, j, whh[k][j]);
    end
    @(negedge clk); wr_en = 0;
    for (int v = 0; v < S*T; v++) for (int k = 0; k < P; k++) xs[v][k] = int'($urandom_range(4000)) - 2000;
    model();
    run = 1;
    fork
      for (int v = 0; v < S*T; v++) begin
        @(negedge clk);
        for (int k = 0; k < P; k++) x_vec[k] = data_t'(xs[v][k]);
        x_valid = 1;
        while (!x_ready) @(negedge clk);
        @(negedge clk); x_valid = 0;
      end
      for (int v = 0; v < S*T; v++) begin
        int done;
        done = 0;
        while (!done) begin
          @(negedge clk);
          h_out_ready = ($urandom_range(2) != 0);
          #1;
          if (h_out_valid && h_out_ready) begin
            done = 1;
            for (int j = 0; j < N; j++) begin
              checks++;
              if (int'($signed(h_out[j])) != exph[v][j]) begin
                failures++; $display("FAIL step %0d h[%0d]=%0d exp %0d", v, j, $signed(h_out[j]), exph[v][j]);
              end
            end
          end
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
