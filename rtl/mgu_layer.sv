// mgu_layer: one MGU_1 recurrent layer without its activation unit.
//
// Connects the three compute modules of a layer:
//   input_module   xf_t = Wxf x_t + b_f, xh_t = Wxh x_t + b_h  (runs ahead)
//   forget_module  f*_t = xf_t + Whf h_{t-1}                   -> sigmoid
//   hidden_module  h*_t = xh_t + f_t (.) (Whh h_{t-1})         -> tanh,
//                  h_t  = f_t (.) h_{t-1} + (1 - f_t) (.) htilde_t
// The forget and hidden state modules share this layer's port to the
// activation module (they never request at the same time; the hidden
// state module's request is taken first if they did). Results come back
// on resp and are picked up by the hidden state module when tagged LAYER.
// Input vectors enter through x_* (valid/ready), hidden states leave
// through h_out_* (valid/ready), one vector per time step; num_steps is
// the sequence length after which the recurrent state returns to zero.
// Weight load: wr_sel selects 0 input module (rows: Wxf, Wxh, b_f, b_h),
// 1 forget module (Whf), 2 hidden state module (Whh).
//
// Lint note: the forget module's busy flag is a status output that
// nothing in the layer uses; it is kept for observation in simulation.
module mgu_layer
  import mgu_pkg::*;
#(
  parameter int   IN_DIM   = 13,
  parameter int   HID      = 32,
  parameter int   PE_LANES = 16,
  parameter int   IN_FL    = 10,
  parameter int   W_FL     = 12,
  parameter logic LAYER    = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               run,
  input  logic [7:0]         num_steps,
  input  logic               x_valid,
  output logic               x_ready,
  input  data_t [IN_DIM-1:0] x_vec,
  output logic               act_valid,
  output act_req_t           act_req,
  input  logic               act_ready,
  input  logic               resp_valid,
  input  act_resp_t          resp,
  output logic               h_out_valid,
  output data_t [HID-1:0]    h_out,
  input  logic               h_out_ready,
  input  logic               wr_en,
  input  logic [1:0]         wr_sel,
  input  logic [7:0]         wr_row,
  input  logic [7:0]         wr_col,
  input  data_t              wr_data
);

  logic            xf_valid, xf_pop, xh_valid, xh_pop;
  data_t [HID-1:0] xf_vec, xh_vec, h_prev;
  logic            h_done, f_free, fg_busy;
  logic            fg_valid, hd_valid, fg_ready, hd_ready;
  act_req_t        fg_req, hd_req;

  input_module #(
    .IN_DIM(IN_DIM), .HID(HID), .PE_LANES(PE_LANES), .IN_FL(IN_FL), .W_FL(W_FL)
  ) u_input (
    .clk, .rst_n, .x_valid, .x_ready, .x_vec,
    .wr_en(wr_en && wr_sel == 2'd0), .wr_row, .wr_col, .wr_data,
    .xf_valid, .xf_vec, .xf_pop, .xh_valid, .xh_vec, .xh_pop
  );

  forget_module #(.HID(HID), .PE_LANES(PE_LANES), .W_FL(W_FL)) u_forget (
    .clk, .rst_n, .run, .num_steps,
    .xf_valid, .xf_vec, .xf_pop, .h_prev, .h_done, .f_free,
    .act_valid(fg_valid), .act_req(fg_req), .act_ready(fg_ready),
    .wr_en(wr_en && wr_sel == 2'd1), .wr_row, .wr_col, .wr_data,
    .busy(fg_busy)
  );

  hidden_module #(.HID(HID), .PE_LANES(PE_LANES), .W_FL(W_FL), .LAYER(LAYER)) u_hidden (
    .clk, .rst_n, .num_steps,
    .xh_valid, .xh_vec, .xh_pop,
    .act_valid(hd_valid), .act_req(hd_req), .act_ready(hd_ready),
    .resp_valid, .resp,
    .h_out_valid, .h_out, .h_out_ready, .h_prev, .h_done, .f_free,
    .wr_en(wr_en && wr_sel == 2'd2), .wr_row, .wr_col, .wr_data
  );

  assign act_valid = fg_valid || hd_valid;
  assign act_req   = hd_valid ? hd_req : fg_req;
  assign hd_ready  = act_ready && hd_valid;
  assign fg_ready  = act_ready && !hd_valid;

endmodule
