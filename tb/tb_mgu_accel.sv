// tb_mgu_accel: end-to-end test of the two-layer MGU_1 accelerator at its
// default size (13 inputs, 32 hidden units, 2 outputs, 9 steps).
//
// Loads random weights, queues the RSSI readings of a sequence, starts it
// through the control registers, waits for the interrupt and compares each
// predicted location with a bit-accurate fixed-point reference model of
// the network computed here (same truncation and saturation rules, sigmoid
// and tanh tables rebuilt from their formulas). Two sequences are run,
// with different start locations, to cover the restart of the recurrent
// state. It also counts the design's mechanisms: activation-request
// conflicts between the layers, input products computed ahead of the
// recurrent part, the forget controller's direct last-step and WH->ADD
// transitions, and the interrupt; each must occur at least once. The cycle
// count of a sequence is checked against a bound built from the module
// latencies.
module tb_mgu_accel;
  import mgu_pkg::*;

  localparam int RSSI = 11, LOC = 2, IN = 13, H = 32, T = 9, WFL = 12;
  // Cycle budget of one sequence, from the module schedules: per step and
  // layer Whf h (H+4) + sigmoid pass (H+5) + f product (4) + tanh pass
  // (H+5) + h_t (5) + hand-over (2); layer 2 trails layer 1 by one step,
  // plus input products (2*IN+3) and the output layer (H+3). The shared
  // activation unit serves the other layer first, so each of the two
  // activation passes may wait up to one full pass (H) of the other layer.
  localparam int STEP    = (H+4) + (H+5) + 4 + (H+5) + 5 + 2 + 2*H;
  localparam int LAT_MAX = (T+1)*STEP + 2*IN+3 + H+3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic reg_we = 0; logic [3:0] reg_addr = 0; logic [31:0] reg_wdata = 0, reg_rdata;
  logic irq;
  logic wr_en = 0; logic [3:0] wr_unit = 0; logic [7:0] wr_row = 0, wr_col = 0; data_t wr_data = 0;
  logic in_valid = 0, in_ready; data_t in_data = 0;
  logic y_valid, y_pop = 0; data_t [LOC-1:0] y_vec;

  mgu_accel dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model
  int w1xf[IN][H], w1xh[IN][H], b1f[H], b1h[H], w1hf[H][H], w1hh[H][H];
  int w2xf[H][H],  w2xh[H][H],  b2f[H], b2h[H], w2hf[H][H], w2hh[H][H];
  int wo[H][LOC], bo[LOC];

  function automatic int sat(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction
  function automatic int idx_of(int x);
    int m = (x < 0) ? -x : x;
    m = m >>> 2;
    return (m > 2047) ? 2047 : m;
  endfunction
  function automatic int sig_pos(int i);
    return $rtoi(1024.0 / (1.0 + $exp(-real'(i) / 256.0)) + 0.5);
  endfunction
  function automatic int tanh_pos(int i);
    real e2 = $exp(2.0 * real'(i) / 256.0);
    return $rtoi(1024.0 * (e2 - 1.0) / (e2 + 1.0) + 0.5);
  endfunction

  // one MGU_1 step of a layer; x has n elements
  task automatic layer_step(input int n, input int x[], input int wxf[][], input int wxh[][],
                            input int bf[], input int bh[], input int whf[][], input int whh[][],
                            input int xfl, inout int h[H]);
    int sh = xfl + WFL - DATA_FL;
    int hn[H];
    for (int j = 0; j < H; j++) begin
      longint axf = longint'(bf[j]) <<< sh, axh = longint'(bh[j]) <<< sh, ahf = 0, ahh = 0;
      int xf, xh, fs, f, fc, hs, ht, s;
      for (int k = 0; k < n; k++) begin
        axf += longint'(x[k]) * wxf[k][j];
        axh += longint'(x[k]) * wxh[k][j];
      end
      for (int k = 0; k < H; k++) begin
        ahf += longint'(h[k]) * whf[k][j];
        ahh += longint'(h[k]) * whh[k][j];
      end
      xf = sat(axf >>> sh); xh = sat(axh >>> sh);
      fs = sat(longint'(xf) + sat(ahf >>> WFL));
      s  = sig_pos(idx_of(fs));
      f  = (fs < 0) ? 1024 - s : s;
      fc = 1024 - f;
      hs = sat((longint'(f) * sat(ahh >>> WFL) + (longint'(xh) <<< DATA_FL)) >>> DATA_FL);
      ht = tanh_pos(idx_of(hs));
      if (hs < 0) ht = -ht;
      hn[j] = sat((longint'(f) * h[j] + longint'(fc) * ht) >>> DATA_FL);
    end
    h = hn;
  endtask

  int rssi[3][T][RSSI];
  int locs[3][LOC];
  int expy[3][T][LOC];

  task automatic run_model(int s);
    int h1[H], h2[H];
    int x1[], x2[];
    int w1xf_d[][], w1xh_d[][], w1hf_d[][], w1hh_d[][], w2xf_d[][], w2xh_d[][], w2hf_d[][], w2hh_d[][];
    int b1f_d[], b1h_d[], b2f_d[], b2h_d[];
    w1xf_d = new[IN]; w1xh_d = new[IN]; w1hf_d = new[H]; w1hh_d = new[H];
    w2xf_d = new[H];  w2xh_d = new[H];  w2hf_d = new[H]; w2hh_d = new[H];
    b1f_d = new[H]; b1h_d = new[H]; b2f_d = new[H]; b2h_d = new[H];
    for (int k = 0; k < IN; k++) begin
      w1xf_d[k] = new[H]; w1xh_d[k] = new[H];
      for (int j = 0; j < H; j++) begin w1xf_d[k][j] = w1xf[k][j]; w1xh_d[k][j] = w1xh[k][j]; end
    end
    for (int k = 0; k < H; k++) begin
      w1hf_d[k] = new[H]; w1hh_d[k] = new[H]; w2xf_d[k] = new[H]; w2xh_d[k] = new[H];
      w2hf_d[k] = new[H]; w2hh_d[k] = new[H];
      for (int j = 0; j < H; j++) begin
        w1hf_d[k][j] = w1hf[k][j]; w1hh_d[k][j] = w1hh[k][j];
        w2xf_d[k][j] = w2xf[k][j]; w2xh_d[k][j] = w2xh[k][j];
        w2hf_d[k][j] = w2hf[k][j]; w2hh_d[k][j] = w2hh[k][j];
      end
    end
    for (int j = 0; j < H; j++) begin
      b1f_d[j] = b1f[j]; b1h_d[j] = b1h[j]; b2f_d[j] = b2f[j]; b2h_d[j] = b2h[j];
      h1[j] = 0; h2[j] = 0;
    end
    x1 = new[IN]; x2 = new[H];
    for (int t = 0; t < T; t++) begin
      for (int i = 0; i < LOC; i++) x1[i] = locs[s][i];
      for (int i = 0; i < RSSI; i++) x1[LOC+i] = rssi[s][t][i];
      layer_step(IN, x1, w1xf_d, w1xh_d, b1f_d, b1h_d, w1hf_d, w1hh_d, DATA_FL, h1);
      for (int i = 0; i < H; i++) x2[i] = h1[i];
      layer_step(H, x2, w2xf_d, w2xh_d, b2f_d, b2h_d, w2hf_d, w2hh_d, DATA_FL, h2);
      for (int l = 0; l < LOC; l++) begin
        longint a = longint'(bo[l]) <<< WFL;
        for (int k = 0; k < H; k++) a += longint'(h2[k]) * wo[k][l];
        expy[s][t][l] = sat(a >>> WFL);
      end
    end
  endtask

  // ---------------- bus helpers
  task automatic wreg(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask
  task automatic wword(input int unit, input int row, input int col, input int v);
    @(negedge clk); wr_en = 1; wr_unit = 4'(unit); wr_row = 8'(row); wr_col = 8'(col); wr_data = data_t'(v);
  endtask
  function automatic int rnd(int range);
    return int'($urandom_range(2*range)) - range;
  endfunction

  task automatic load_weights();
    for (int k = 0; k < IN; k++) for (int j = 0; j < H; j++) begin
      w1xf[k][j] = rnd(1200); w1xh[k][j] = rnd(1200);
      wword(0, k, j, w1xf[k][j]); wword(0, IN + k, j, w1xh[k][j]);
    end
    for (int j = 0; j < H; j++) begin
      b1f[j] = rnd(600); b1h[j] = rnd(600); b2f[j] = rnd(600); b2h[j] = rnd(600);
      wword(0, 2*IN, j, b1f[j]); wword(0, 2*IN+1, j, b1h[j]);
      wword(4, 2*H, j, b2f[j]);  wword(4, 2*H+1, j, b2h[j]);
    end
    for (int k = 0; k < H; k++) for (int j = 0; j < H; j++) begin
      w1hf[k][j] = rnd(900); w1hh[k][j] = rnd(900);
      w2xf[k][j] = rnd(900); w2xh[k][j] = rnd(900);
      w2hf[k][j] = rnd(900); w2hh[k][j] = rnd(900);
      wword(1, k, j, w1hf[k][j]); wword(2, k, j, w1hh[k][j]);
      wword(4, k, j, w2xf[k][j]); wword(4, H + k, j, w2xh[k][j]);
      wword(5, k, j, w2hf[k][j]); wword(6, k, j, w2hh[k][j]);
    end
    for (int k = 0; k < H; k++) for (int l = 0; l < LOC; l++) begin
      wo[k][l] = rnd(3000); wword(8, k, l, wo[k][l]);
    end
    for (int l = 0; l < LOC; l++) begin bo[l] = rnd(2000); wword(8, H, l, bo[l]); end
    @(negedge clk); wr_en = 0;
  endtask

  task automatic push_rssi(int s);
    for (int t = 0; t < T; t++) for (int i = 0; i < RSSI; i++) begin
      @(negedge clk);
      in_valid = 1; in_data = data_t'(rssi[s][t][i]);
      while (!in_ready) @(negedge clk);
    end
    @(negedge clk); in_valid = 0;
  endtask

  // ---------------- mechanism counters (observed inside the design)
  int n_conflict = 0, n_runahead = 0, n_sig_to_add = 0, n_wh_to_add = 0, n_irq = 0;
  always @(negedge clk) if (rst_n) begin
    if (dut.act_valid[0] && dut.act_valid[1]) n_conflict++;
    if (dut.u_layer1.u_input.u_xfbuf.count >= 2 || dut.u_layer2.u_input.u_xfbuf.count >= 2) n_runahead++;
    if (dut.u_layer1.u_forget.state == 3'd2 && dut.u_layer1.u_forget.sent_all &&
        dut.u_layer1.u_forget.last && dut.u_layer1.u_forget.xf_valid) n_sig_to_add++;
    if (dut.u_layer1.u_forget.state == 3'd4 && dut.u_layer1.u_forget.tag[2] &&
        dut.u_layer1.u_forget.xf_valid) n_wh_to_add++;
  end
  always @(posedge irq) n_irq++;

  initial begin
    int t0, lat;
    for (int s = 0; s < 3; s++) begin
      for (int i = 0; i < LOC; i++) locs[s][i] = (s == 1) ? locs[0][i] : rnd(3000);
      for (int t = 0; t < T; t++) for (int i = 0; i < RSSI; i++) rssi[s][t][i] = rnd(2000);
    end
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    load_weights();
    for (int s = 0; s < 3; s++) run_model(s);
    wreg(4'd1, T);
    for (int s = 0; s < 3; s++) begin
      // sequences 0 and 1 share a start location and are both buffered
      // before the first start, so sequence 1 follows sequence 0 directly;
      // sequence 2 gets a new location and its readings arrive after start
      if (s != 1) begin
        wreg(4'd2, 32'(locs[s][0]));
        wreg(4'd3, 32'(locs[s][1]));
      end
      if (s == 0) begin push_rssi(0); push_rssi(1); end
      wreg(4'd0, 32'd1);
      t0 = cyc;
      if (s == 2) push_rssi(s);
      while (!irq) @(posedge clk);
      lat = cyc - t0;
      $display("sequence %0d: %0d cycles for %0d steps", s, lat, T);
      checks++;
      if (s != 1 && lat > LAT_MAX) begin
        failures++; $display("FAIL latency %0d above %0d", lat, LAT_MAX);
      end
      for (int t = 0; t < T; t++) begin
        @(negedge clk);
        checks++;
        if (!y_valid) begin
          failures++; $display("FAIL seq %0d step %0d: no output", s, t);
        end else begin
          for (int l = 0; l < LOC; l++) begin
            checks++;
            if (int'(y_vec[l]) != expy[s][t][l]) begin
              failures++;
              $display("FAIL seq %0d step %0d out %0d: got %0d expected %0d", s, t, l, y_vec[l], expy[s][t][l]);
            end
          end
        end
        y_pop = 1; @(negedge clk); y_pop = 0;
      end
      if (s == 2) begin
        checks++;
        if (y_valid) begin failures++; $display("FAIL extra output"); end
      end
      wreg(4'd0, 32'd2);  // clear interrupt
      checks++;
      if (irq) begin failures++; $display("FAIL irq not cleared"); end
    end
    $display("mechanisms: conflicts=%0d runahead=%0d sig->add=%0d wh->add=%0d irq=%0d",
             n_conflict, n_runahead, n_sig_to_add, n_wh_to_add, n_irq);
    checks += 5;
    if (n_conflict == 0)   begin failures++; $display("FAIL no activation conflict"); end
    if (n_runahead == 0)   begin failures++; $display("FAIL no run-ahead"); end
    if (n_sig_to_add == 0) begin failures++; $display("FAIL no last-step SIG->ADD"); end
    if (n_wh_to_add == 0)  begin failures++; $display("FAIL no WH->ADD"); end
    if (n_irq != 3)        begin failures++; $display("FAIL irq count %0d", n_irq); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
