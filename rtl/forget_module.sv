// forget_module: forget-gate pre-activation f*_t = xf_t + Whf h_{t-1}.
//
// A four-state controller, after the original design's forget-module state chart:
//   IDLE  - wait for run and a buffered xf_t.
//   ADD   - one cycle: f*_t = xf_t + (Whf h_{t-1}) element by element
//           (the recurrent term is zero in the first step of a sequence).
//   SIG   - stream the HID elements of f*_t to the activation module, one
//           per accepted cycle, then: on the last step of the sequence
//           go to ADD if the next xf is already buffered, else IDLE; on
//           any other step wait until the hidden state module reports
//           h_t registered, then go to WH.
//   WH    - run Whf h_{t-1} on the MAC array (HID cycles plus the 3-cycle
//           MAC latency), then go to ADD if xf is buffered, else IDLE.
// So f*_t is ready HID+4 cycles after h_{t-1}. Before streaming a new f*
// the module waits for f_free, i.e. until the hidden state module has
// finished with the previous f_t (an interlock this design adds so the
// shared storage for f_t is never overwritten early).
// Weight memory: HID rows of Whf (row k = column weights of h[k]), W_FL
// fractional bits, loaded through wr_*. The step count per sequence is
// num_steps; the step counter restarts after the last step.
//
// Lint notes: the 8-bit wr_row/wr_col and the step index address arrays
// with fewer entries; every access is range-checked, so the width
// truncation is harmless.
module forget_module
  import mgu_pkg::*;
#(
  parameter int HID      = 32,
  parameter int PE_LANES = 16,
  parameter int W_FL     = 12
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  input  logic [7:0]      num_steps,
  // xf_t buffer
  input  logic            xf_valid,
  input  data_t [HID-1:0] xf_vec,
  output logic            xf_pop,
  // previous hidden state, from the hidden state module
  input  data_t [HID-1:0] h_prev,
  input  logic            h_done,
  input  logic            f_free,
  // activation requests
  output logic            act_valid,
  output act_req_t        act_req,
  input  logic            act_ready,
  // weight load
  input  logic            wr_en,
  input  logic [7:0]      wr_row,
  input  logic [7:0]      wr_col,
  input  data_t           wr_data,
  output logic            busy
);

  localparam int NUM_PE = HID / PE_LANES;
  localparam int KW     = $clog2(HID + 1);

  data_t wmem [HID][HID];
  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_row) < HID && int'(wr_col) < HID)
      wmem[wr_row][wr_col] <= wr_data;
  end

  typedef enum logic [2:0] {S_IDLE, S_ADD, S_SIG, S_WH, S_WHD} state_t;
  state_t           state;
  logic [7:0]       step;
  logic             last;       // current step is the last of the sequence
  logic             sending, sent_all, h_rdy;
  logic [KW-1:0]    k;
  logic [IDX_W-1:0] idx;
  logic [2:0]       tag;
  data_t [HID-1:0]  whf_h;      // Whf h_{t-1} in DATA_FL
  data_t [HID-1:0]  fstar;

  acc_t p_out [HID];
  logic issue;
  assign issue = (state == S_WH);

  assign xf_pop    = (state == S_ADD);
  assign act_valid = (state == S_SIG) && sending;
  assign act_req   = '{func: ACT_SIG, idx: idx, x: fstar[idx[KW-1:0]]};
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; step <= '0; last <= 1'b0; sending <= 1'b0;
      sent_all <= 1'b0; h_rdy <= 1'b0; k <= '0; idx <= '0; tag <= '0;
      whf_h <= '0; fstar <= '0;
    end else begin
      tag <= {tag[1:0], issue && (k == KW'(HID-1))};
      if (h_done) h_rdy <= 1'b1;
      unique case (state)
        S_IDLE: if (run && xf_valid) state <= S_ADD;
        S_ADD: begin
          for (int j = 0; j < HID; j++)
            fstar[j] <= sat16(acc_t'(xf_vec[j]) + acc_t'(whf_h[j]));
          last     <= (step == num_steps - 8'd1);
          step     <= (step == num_steps - 8'd1) ? '0 : step + 8'd1;
          idx      <= '0;
          sending  <= 1'b0;
          sent_all <= 1'b0;
          state    <= S_SIG;
        end
        S_SIG: begin
          if (!sending && !sent_all && f_free) begin
            sending <= 1'b1;
            h_rdy   <= 1'b0;   // only an h_t reported after f_t counts
          end
          if (act_valid && act_ready) begin
            idx <= idx + 1'b1;
            if (idx == IDX_W'(HID-1)) begin
              sending  <= 1'b0;
              sent_all <= 1'b1;
            end
          end
          if (sent_all) begin
            if (last) begin
              whf_h <= '0;
              state <= xf_valid ? S_ADD : S_IDLE;
            end else if (h_rdy) begin
              h_rdy <= 1'b0;
              k     <= '0;
              state <= S_WH;
            end
          end
        end
        S_WH: begin
          k <= k + 1'b1;
          if (k == KW'(HID-1)) state <= S_WHD;
        end
        S_WHD: if (tag[2]) begin
          for (int j = 0; j < HID; j++) whf_h[j] <= rescale(p_out[j], W_FL);
          state <= xf_valid ? S_ADD : S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- MAC array: Whf h_{t-1}
  data_t a_in;
  assign a_in = h_prev[k[KW-1:0] < KW'(HID) ? k : '0];

  for (genvar g = 0; g < NUM_PE; g++) begin : g_pe
    data_t b_pe [PE_LANES];
    acc_t  c_pe [PE_LANES];
    acc_t  p_pe [PE_LANES];
    data_t a_ln [PE_LANES];
    for (genvar l = 0; l < PE_LANES; l++) begin : g_l
      assign b_pe[l] = wmem[k < KW'(HID) ? k : '0][g*PE_LANES+l];
      assign c_pe[l] = '0;
      assign a_ln[l] = '0;
      assign p_out[g*PE_LANES+l] = p_pe[l];
    end
    pe #(.LANES(PE_LANES)) u_pe (
      .clk, .rst_n, .en(issue), .cmd(k == '0 ? MAC_AB : MAC_ABP),
      .lane_mode(1'b0), .a_shared(a_in), .a_lane(a_ln), .b(b_pe), .c(c_pe),
      .p(p_pe)
    );
  end

  initial assert (HID % PE_LANES == 0) else $error("HID must be a multiple of PE_LANES");

endmodule
