// hidden_module: hidden state h_t of one MGU_1 layer.
//
// Computes, with one MAC array (HID/PE_LANES processing elements):
//   WH    Whh h_{t-1}                       HID cycles + 3 (matrix mode)
//   MULF  h*_t = xh_t + f_t (.) (Whh h_{t-1}) 1 cycle + 3   (element-wise,
//         MAC_ABC with xh_t on the C input)
//   TANH  stream h*_t to the activation module and collect tanh values
//   CALC  h_t = f_t (.) h_{t-1} + (1 - f_t) (.) htilde_t
//         2 cycles + 3 (element-wise, MAC_AB then MAC_ABP)
// The recurrent product Whh h_{t-1} is computed while the forget gate is
// still being evaluated, which is why the candidate state multiplies f_t
// after the matrix product (f_t (.) (Whh h_{t-1})). f_t, 1 - f_t and
// htilde_t arrive from the shared activation module on resp (only entries
// tagged with this module's LAYER are taken) and are kept here; f_free
// tells the forget module when the f_t storage may be refilled.
// When h_t is ready it is offered on h_out (valid/ready); once taken it
// becomes h_{t-1}, h_done pulses for one cycle and, unless that was the
// last of num_steps steps, Whh h_t is started at once. After the last step
// h_{t-1} and the recurrent product return to zero for the next sequence.
// Weight memory: HID rows of Whh, W_FL fractional bits, loaded via wr_*.
// Equations follow the original design; the phase sequencing and handshakes are
// this design's.
//
// Lint notes: the 8-bit wr_row/wr_col and the step index address arrays
// with fewer entries; every access is range-checked, so the width
// truncation is harmless.
module hidden_module
  import mgu_pkg::*;
#(
  parameter int   HID      = 32,
  parameter int   PE_LANES = 16,
  parameter int   W_FL     = 12,
  parameter logic LAYER    = 1'b0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [7:0]      num_steps,
  // xh_t buffer
  input  logic            xh_valid,
  input  data_t [HID-1:0] xh_vec,
  output logic            xh_pop,
  // activation module
  output logic            act_valid,
  output act_req_t        act_req,
  input  logic            act_ready,
  input  logic            resp_valid,
  input  act_resp_t       resp,
  // hidden state
  output logic            h_out_valid,
  output data_t [HID-1:0] h_out,
  input  logic            h_out_ready,
  output data_t [HID-1:0] h_prev,
  output logic            h_done,
  output logic            f_free,
  // weight load
  input  logic            wr_en,
  input  logic [7:0]      wr_row,
  input  logic [7:0]      wr_col,
  input  data_t           wr_data
);

  localparam int NUM_PE = HID / PE_LANES;
  localparam int KW     = $clog2(HID + 1);

  data_t wmem [HID][HID];
  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_row) < HID && int'(wr_col) < HID)
      wmem[wr_row][wr_col] <= wr_data;
  end

  typedef enum logic [3:0] {
    S_WH, S_WHD, S_WAIT, S_MULF, S_MULFD, S_TANH, S_CALC0, S_CALC1, S_CALCD, S_OUT
  } state_t;
  state_t           state;
  logic [7:0]       step;
  logic [KW-1:0]    k;
  logic [IDX_W-1:0] idx;
  logic             sending;
  logic [2:0]       tag;
  logic [KW-1:0]    f_cnt, t_cnt;
  data_t [HID-1:0]  whh_h, hstar, f, fc, ht;

  acc_t p_out [HID];

  assign xh_pop      = (state == S_MULF);
  assign act_valid   = (state == S_TANH) && sending;
  assign act_req     = '{func: ACT_TANH, idx: idx, x: hstar[idx[KW-1:0]]};
  assign h_out_valid = (state == S_OUT);
  assign f_free      = (f_cnt == '0);

  logic issue, issue_last;
  always_comb begin
    issue      = (state == S_WH) || (state == S_MULF) ||
                 (state == S_CALC0) || (state == S_CALC1);
    issue_last = ((state == S_WH) && (k == KW'(HID-1))) ||
                 (state == S_MULF) || (state == S_CALC1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_WAIT; step <= '0; k <= '0; idx <= '0; sending <= 1'b0;
      tag <= '0; f_cnt <= '0; t_cnt <= '0; h_done <= 1'b0;
      whh_h <= '0; hstar <= '0; f <= '0; fc <= '0; ht <= '0;
      h_out <= '0; h_prev <= '0;
    end else begin
      tag    <= {tag[1:0], issue_last};
      h_done <= 1'b0;
      // results of the activation module
      if (resp_valid && resp.port == LAYER) begin
        if (resp.func == ACT_SIG) begin
          f [resp.idx[KW-1:0]] <= resp.y;
          fc[resp.idx[KW-1:0]] <= resp.yc;
          f_cnt <= f_cnt + 1'b1;
        end else begin
          ht[resp.idx[KW-1:0]] <= resp.y;
          t_cnt <= t_cnt + 1'b1;
        end
      end
      unique case (state)
        S_WH: begin
          k <= k + 1'b1;
          if (k == KW'(HID-1)) state <= S_WHD;
        end
        S_WHD: if (tag[2]) begin
          for (int j = 0; j < HID; j++) whh_h[j] <= rescale(p_out[j], W_FL);
          state <= S_WAIT;
        end
        S_WAIT: if (f_cnt == KW'(HID) && xh_valid) state <= S_MULF;
        S_MULF: state <= S_MULFD;
        S_MULFD: if (tag[2]) begin
          for (int j = 0; j < HID; j++) hstar[j] <= rescale(p_out[j], DATA_FL);
          idx     <= '0;
          sending <= 1'b1;
          state   <= S_TANH;
        end
        S_TANH: begin
          if (act_valid && act_ready) begin
            idx <= idx + 1'b1;
            if (idx == IDX_W'(HID-1)) sending <= 1'b0;
          end
          if (!sending && t_cnt == KW'(HID)) state <= S_CALC0;
        end
        S_CALC0: state <= S_CALC1;
        S_CALC1: state <= S_CALCD;
        S_CALCD: if (tag[2]) begin
          for (int j = 0; j < HID; j++) h_out[j] <= rescale(p_out[j], DATA_FL);
          state <= S_OUT;
        end
        S_OUT: if (h_out_ready) begin
          h_done <= 1'b1;
          f_cnt  <= '0;
          t_cnt  <= '0;
          k      <= '0;
          if (step == num_steps - 8'd1) begin
            step   <= '0;
            h_prev <= '0;
            whh_h  <= '0;
            state  <= S_WAIT;
          end else begin
            step   <= step + 8'd1;
            h_prev <= h_out;
            state  <= S_WH;
          end
        end
        default: state <= S_WAIT;
      endcase
    end
  end

  // ---------------- MAC array, matrix mode in WH, element-wise otherwise
  logic     lane_mode;
  mac_cmd_t cmd;
  data_t    a_sh;
  always_comb begin
    lane_mode = (state != S_WH);
    a_sh      = h_prev[k < KW'(HID) ? k : '0];
    unique case (state)
      S_WH:    cmd = (k == '0) ? MAC_AB : MAC_ABP;
      S_MULF:  cmd = MAC_ABC;
      S_CALC0: cmd = MAC_AB;
      default: cmd = MAC_ABP;
    endcase
  end

  for (genvar g = 0; g < NUM_PE; g++) begin : g_pe
    data_t a_ln [PE_LANES];
    data_t b_pe [PE_LANES];
    acc_t  c_pe [PE_LANES];
    acc_t  p_pe [PE_LANES];
    for (genvar l = 0; l < PE_LANES; l++) begin : g_l
      localparam int J = g*PE_LANES + l;
      always_comb begin
        unique case (state)
          S_MULF:  begin a_ln[l] = f[J];  b_pe[l] = whh_h[J]; end
          S_CALC0: begin a_ln[l] = f[J];  b_pe[l] = h_prev[J]; end
          S_CALC1: begin a_ln[l] = fc[J]; b_pe[l] = ht[J]; end
          default: begin a_ln[l] = '0;    b_pe[l] = wmem[k < KW'(HID) ? k : '0][J]; end
        endcase
        c_pe[l] = acc_t'(xh_vec[J]) <<< DATA_FL;
      end
      assign p_out[J] = p_pe[l];
    end
    pe #(.LANES(PE_LANES)) u_pe (
      .clk, .rst_n, .en(issue), .cmd, .lane_mode, .a_shared(a_sh),
      .a_lane(a_ln), .b(b_pe), .c(c_pe), .p(p_pe)
    );
  end

  initial assert (HID % PE_LANES == 0) else $error("HID must be a multiple of PE_LANES");

endmodule
