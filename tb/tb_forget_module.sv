// tb_forget_module: plays the input module (a queue of xf_t vectors), the
// hidden state module (h_{t-1}, h_done, f_free) and the activation module
// (act_ready, randomly withheld) around the forget module. Two sequences
// of 3 steps are run with all xf_t buffered, so the controller must take
// the direct last-step SIG -> ADD path into the second sequence. Every
// streamed f*_t element is compared with sat(xf + sat(Whf h >>> W_FL))
// (h = 0 in the first step of a sequence), and the recurrent product must
// be ready HID+4 cycles after it starts (ADD in the (HID+4)-th cycle).
module tb_forget_module;
  import mgu_pkg::*;
  localparam int N = 32, WFL = 12, T = 3, S = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic run = 0; logic [7:0] num_steps = 8'(T);
  logic xf_valid; data_t [N-1:0] xf_vec; logic xf_pop;
  data_t [N-1:0] h_prev = '0; logic h_done = 0, f_free = 1;
  logic act_valid; act_req_t act_req; logic act_ready = 0;
  logic wr_en = 0; logic [7:0] wr_row = 0, wr_col = 0; data_t wr_data = 0; logic busy;
  forget_module #(.HID(N)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic int sat(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction
  int w[N][N];
  int xf[S*T][N];
  int hv[N];
  int qi = 0;    // index of xf at the queue head
  assign xf_valid = (qi < S*T);
  always_comb for (int j = 0; j < N; j++) xf_vec[j] = data_t'(xf[(qi < S*T) ? qi : 0][j]);

  int cyc = 0, t_wh = 0, n_direct = 0;
  always @(posedge clk) if (xf_pop) qi <= qi + 1;
  always @(negedge clk) begin
    cyc++;
    if (dut.state == 3'(2) && dut.sent_all && dut.last && xf_valid) n_direct++;
    if (dut.state == 3'(3) && dut.k == 0) t_wh = cyc;
    if (dut.state == 3'(1) && t_wh != 0) begin
      checks++;
      if (cyc - t_wh != N + 3) begin failures++; $display("FAIL WH->ADD %0d cycles", cyc - t_wh); end
      t_wh = 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < N; r++) for (int j = 0; j < N; j++) begin
      w[r][j] = int'($urandom_range(4000)) - 2000;
      @(negedge clk); wr_en = 1; wr_row = 8'(r); wr_col = 8'(j); wr_data = data_t'(w[r][j]);
    end
    for (int v = 0; v < S*T; v++) for (int j = 0; j < N; j++) xf[v][j] = int'($urandom_range(8000)) - 4000;
    @(negedge clk); wr_en = 0; run = 1;
    for (int s = 0; s < S; s++) begin
      for (int j = 0; j < N; j++) hv[j] = 0;
      for (int t = 0; t < T; t++) begin
        int got;
        got = 0;
        while (got < N) begin
          @(negedge clk);
          act_ready = ($urandom_range(3) != 0);
          #1;
          if (act_valid && act_ready) begin
            longint acc;
            int e;
            acc = 0;
            for (int k = 0; k < N; k++) acc += longint'(hv[k]) * w[k][act_req.idx];
            e = sat(longint'(xf[s*T+t][act_req.idx]) + sat(acc >>> WFL));
            checks++;
            if (act_req.func != ACT_SIG || int'(act_req.idx) != got || int'($signed(act_req.x)) != e) begin
              failures++; $display("FAIL s%0d t%0d idx %0d: x=%0d exp %0d", s, t, act_req.idx, act_req.x, e);
            end
            got++;
          end
        end
        // act as the hidden state module: f_t in use, then h_t ready
        @(negedge clk); f_free = 0; act_ready = 0;
        repeat ($urandom_range(20) + 3) @(negedge clk);
        for (int j = 0; j < N; j++) begin
          hv[j] = (t == T-1) ? 0 : int'($urandom_range(2000)) - 1000;
          h_prev[j] = data_t'(hv[j]);
        end
        h_done = 1; f_free = 1;
        @(negedge clk); h_done = 0;
      end
    end
    checks++;
    if (n_direct == 0) begin failures++; $display("FAIL direct last-step transition not taken"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
