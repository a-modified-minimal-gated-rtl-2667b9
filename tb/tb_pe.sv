// tb_pe: checks a 16-lane processing element in both modes.
// Matrix mode: a random M-element input vector times a random M x 16
// weight matrix plus bias, one element per cycle; every lane must hold its
// dot product exactly M+3 cycles after the first issue (and not one cycle
// earlier). Element-wise mode: p[i] = a[i]*b[i] (MAC_AB) then + a'[i]*b'[i]
// (MAC_ABP), each lane with its own input.
module tb_pe;
  import mgu_pkg::*;
  localparam int L = 16, M = 13;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 0, lane_mode = 0; mac_cmd_t cmd = MAC_AB; data_t a_shared = 0;
  data_t a_lane [L]; data_t b [L]; acc_t c [L]; acc_t p [L];
  pe #(.LANES(L)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int x[M]; int w[M][L]; int bias[L]; longint expv[L];
  initial begin
    for (int i = 0; i < L; i++) begin a_lane[i] = 0; b[i] = 0; c[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int rep = 0; rep < 20; rep++) begin
      for (int i = 0; i < L; i++) begin bias[i] = $urandom_range(20000) - 10000; expv[i] = longint'(bias[i]) <<< 12; end
      for (int k = 0; k < M; k++) begin
        x[k] = int'($urandom_range(65535)) - 32768;
        for (int i = 0; i < L; i++) begin
          w[k][i] = int'($urandom_range(65535)) - 32768;
          expv[i] += longint'(x[k]) * w[k][i];
        end
      end
      for (int k = 0; k < M; k++) begin
        @(negedge clk);
        en = 1; lane_mode = 0; cmd = (k == 0) ? MAC_ABC : MAC_ABP; a_shared = data_t'(x[k]);
        for (int i = 0; i < L; i++) begin b[i] = data_t'(w[k][i]); c[i] = acc_t'(bias[i]) <<< 12; end
      end
      @(negedge clk); en = 0;
      @(negedge clk);
      // one cycle before the result is due: lane 0 must not be final yet
      // (cycle M+2 after the first issue)
      checks++;
      if (p[0] == acc_t'(expv[0]) && rep > 0) begin
        failures++; $display("FAIL result early");
      end
      @(negedge clk);
      for (int i = 0; i < L; i++) begin
        checks++;
        if (p[i] != acc_t'(expv[i])) begin failures++; $display("FAIL lane %0d got %0d exp %0d", i, p[i], expv[i]); end
      end
      // element-wise mode
      for (int i = 0; i < L; i++) expv[i] = 0;
      for (int s = 0; s < 2; s++) begin
        @(negedge clk);
        en = 1; lane_mode = 1; cmd = (s == 0) ? MAC_AB : MAC_ABP; a_shared = 16'sh7fff;
        for (int i = 0; i < L; i++) begin
          a_lane[i] = data_t'($urandom); b[i] = data_t'($urandom);
          expv[i] += longint'(a_lane[i]) * longint'(b[i]);
        end
      end
      @(negedge clk); en = 0;
      repeat (2) @(negedge clk);
      for (int i = 0; i < L; i++) begin
        checks++;
        if (p[i] != acc_t'(expv[i])) begin failures++; $display("FAIL ew lane %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
