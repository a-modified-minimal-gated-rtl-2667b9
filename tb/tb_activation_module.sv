// tb_activation_module: two requesters issue random sigmoid / tanh
// requests. Checks the priority rule (port 1 wins a simultaneous request,
// port 0 waits), that each accepted element returns exactly 4 cycles later
// with its tag, and the values: y = sigmoid or tanh of x via the
// 11-bit table rebuilt here (index min(|x|>>2, 2047)), yc = 1 - sigmoid.
module tb_activation_module;
  import mgu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid [2]; act_req_t req [2]; logic req_ready [2];
  logic resp_valid; act_resp_t resp;
  activation_module #(.NUM_REQ(2)) dut (.*);
  int checks = 0, failures = 0, conflicts = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic int sig_pos(int i);
    return $rtoi(1024.0 / (1.0 + $exp(-real'(i) / 256.0)) + 0.5);
  endfunction
  function automatic int tanh_pos(int i);
    real e2 = $exp(2.0 * real'(i) / 256.0);
    return $rtoi(1024.0 * (e2 - 1.0) / (e2 + 1.0) + 0.5);
  endfunction
  function automatic act_resp_t model(logic port, act_req_t r);
    act_resp_t o;
    int x = int'(r.x);
    int m = ((x < 0) ? -x : x) >>> 2;
    if (m > 2047) m = 2047;
    o.port = port; o.func = r.func; o.idx = r.idx;
    if (r.func == ACT_SIG) begin
      int s = sig_pos(m);
      o.y  = data_t'((x < 0) ? 1024 - s : s);
      o.yc = data_t'((x < 0) ? s : 1024 - s);
    end else begin
      int t = tanh_pos(m);
      o.y  = data_t'((x < 0) ? -t : t);
      o.yc = '0;
    end
    return o;
  endfunction
  act_resp_t expq [int];   // expected response by due cycle
  int cyc = 0;
  initial begin
    for (int i = 0; i < 2; i++) begin req_valid[i] = 0; req[i] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      cyc++;
      // response due this cycle
      checks++;
      if (expq.exists(cyc)) begin
        if (!resp_valid || resp != expq[cyc]) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d: got %p exp %p", cyc, resp, expq[cyc]);
        end
      end else if (resp_valid) begin
        failures++; $display("FAIL unexpected response at %0d", cyc);
      end
      for (int p = 0; p < 2; p++) begin
        req_valid[p] = ($urandom_range(1) == 1);
        req[p].func  = act_func_t'($urandom_range(1));
        req[p].idx   = IDX_W'($urandom);
        req[p].x     = ($urandom_range(3) == 0) ? data_t'($urandom) : data_t'($urandom_range(8000) - 4000);
      end
      #1;
      checks++;
      if (req_valid[1] && (req_ready[0] || !req_ready[1])) begin failures++; $display("FAIL priority"); end
      if (req_valid[0] && !req_valid[1] && !req_ready[0]) begin failures++; $display("FAIL grant 0"); end
      if (req_valid[0] && req_valid[1]) conflicts++;
      for (int p = 0; p < 2; p++)
        if (req_valid[p] && req_ready[p]) expq[cyc + 4] = model(p[0], req[p]);
    end
    checks++;
    if (conflicts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
