// tb_hidden_module: plays the input module (queue of xh_t), the forget
// path and the activation module around the hidden state module. For each
// step it delivers random f_t / 1-f_t values as sigmoid responses, answers
// each tanh request (randomly delayed acceptance, response 4 cycles later
// from the table rebuilt here), and compares the requested h*_t with
// sat((f*(sat(Whh h >>> W_FL)) + (xh << DATA_FL)) >>> DATA_FL) and h_t
// with sat((f*h_{t-1} + (1-f)*htilde) >>> DATA_FL). Two sequences of
// 3 steps check that the state returns to zero after the last step;
// h_out_ready is withheld at times. Also checks that h_t is offered 7
// cycles after the last tanh value arrives (store, state change, two
// element-wise MAC issues, 3-cycle MAC latency).
module tb_hidden_module;
  import mgu_pkg::*;
  localparam int N = 32, WFL = 12, T = 3, S = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] num_steps = 8'(T);
  logic xh_valid; data_t [N-1:0] xh_vec; logic xh_pop;
  logic act_valid; act_req_t act_req; logic act_ready = 0;
  logic resp_valid = 0; act_resp_t resp = '0;
  logic h_out_valid; data_t [N-1:0] h_out; logic h_out_ready = 0;
  data_t [N-1:0] h_prev; logic h_done, f_free;
  logic wr_en = 0; logic [7:0] wr_row = 0, wr_col = 0; data_t wr_data = 0;
  hidden_module #(.HID(N), .LAYER(1'b0)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
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
  function automatic int tanh_ref(int x);
    real e2;
    int t;
    e2 = $exp(2.0 * real'(idx_of(x)) / 256.0);
    t = $rtoi(1024.0 * (e2 - 1.0) / (e2 + 1.0) + 0.5);
    return (x < 0) ? -t : t;
  endfunction

  int w[N][N];
  int xh[S*T][N];
  int qi = 0;
  assign xh_valid = (qi < S*T);
  always_comb for (int j = 0; j < N; j++) xh_vec[j] = data_t'(xh[(qi < S*T) ? qi : 0][j]);
  always @(posedge clk) if (xh_pop) qi <= qi + 1;

  // tanh responder: accepted requests answered 4 cycles later
  act_resp_t tq [int];
  int cyc = 0, t_last_tanh = 0;
  int hp[N], f[N], fc[N], whh[N], hs[N], ht[N];

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < N; r++) for (int j = 0; j < N; j++) begin
      w[r][j] = int'($urandom_range(4000)) - 2000;
      @(negedge clk); wr_en = 1; wr_row = 8'(r); wr_col = 8'(j); wr_data = data_t'(w[r][j]);
    end
    for (int v = 0; v < S*T; v++) for (int j = 0; j < N; j++) xh[v][j] = int'($urandom_range(6000)) - 3000;
    @(negedge clk); wr_en = 0;
    for (int s = 0; s < S; s++) begin
      for (int j = 0; j < N; j++) hp[j] = 0;
      for (int t = 0; t < T; t++) begin
        int sent, got_h;
        // reference for this step
        for (int j = 0; j < N; j++) begin
          longint a;
          a = 0;
          for (int k = 0; k < N; k++) a += longint'(hp[k]) * w[k][j];
          whh[j] = sat(a >>> WFL);
          f[j]  = int'($urandom_range(1024));
          fc[j] = 1024 - f[j];
          hs[j] = sat((longint'(f[j]) * whh[j] + (longint'(xh[s*T+t][j]) <<< DATA_FL)) >>> DATA_FL);
          ht[j] = tanh_ref(hs[j]);
        end
        // deliver f_t once the storage is free
        while (!f_free) @(negedge clk);
        for (int j = 0; j < N; j++) begin
          resp_valid = 1; resp = '{port: 1'b0, func: ACT_SIG, idx: IDX_W'(j), y: data_t'(f[j]), yc: data_t'(fc[j])};
          @(negedge clk);
        end
        // a response for the other layer must be ignored
        resp = '{port: 1'b1, func: ACT_SIG, idx: 8'd0, y: 16'sd77, yc: 16'sd77};
        @(negedge clk);
        resp_valid = 0;
        sent = 0; got_h = 0;
        while (!got_h) begin
          cyc++;
          // tanh responses due now
          if (tq.exists(cyc)) begin
            resp_valid = 1; resp = tq[cyc]; tq.delete(cyc);
            if (int'(resp.idx) == N-1) t_last_tanh = cyc;
          end else resp_valid = 0;
          act_ready = ($urandom_range(3) != 0);
          h_out_ready = ($urandom_range(1) != 0);
          #1;
          if (act_valid && act_ready) begin
            int i;
            i = int'(act_req.idx);
            checks++;
            if (act_req.func != ACT_TANH || i != sent || int'($signed(act_req.x)) != hs[i]) begin
              failures++; $display("FAIL s%0d t%0d h* idx %0d: %0d exp %0d", s, t, i, $signed(act_req.x), hs[i]);
            end
            tq[cyc + 4] = '{port: 1'b0, func: ACT_TANH, idx: act_req.idx, y: data_t'(ht[i]), yc: '0};
            sent++;
          end
          if (h_out_valid && h_out_ready) begin
            for (int j = 0; j < N; j++) begin
              int e;
              e = sat((longint'(f[j]) * hp[j] + longint'(fc[j]) * ht[j]) >>> DATA_FL);
              checks++;
              if (int'($signed(h_out[j])) != e) begin
                failures++; $display("FAIL s%0d t%0d h[%0d]=%0d exp %0d", s, t, j, $signed(h_out[j]), e);
              end
              hp[j] = (t == T-1) ? 0 : e;
            end
            got_h = 1;
          end
          @(negedge clk);
          if (got_h) begin
            checks++;
            if (!h_done) begin failures++; $display("FAIL h_done"); end
          end
        end
        h_out_ready = 0; act_ready = 0; resp_valid = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // h_t first offered 7 cycles after the last tanh value arrives
  int c2 = 0, last_t = -100;
  always @(negedge clk) begin
    c2++;
    if (resp_valid && resp.func == ACT_TANH && int'(resp.idx) == N-1) last_t = c2;
    if (h_out_valid && !$past(h_out_valid)) begin
      checks++;
      if (c2 - last_t != 7) begin failures++; $display("FAIL h_t latency %0d", c2 - last_t); end
    end
  end
endmodule
