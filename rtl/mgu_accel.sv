// mgu_accel: two-layer MGU_1 inference accelerator for RSSI indoor
// localisation.
//
// Data flow for one sequence of num_steps time steps:
//   DMA words -> data_buffer -> x_t = {start location, 11 RSSI readings}
//   -> layer 1 (MGU_1, HID units) -> layer 2 (MGU_1, HID units)
//   -> output_module (fully connected, OUT_DIM outputs) -> output buffer
// Both layers share a single activation_module (sigmoid / tanh look-up
// table); layer 2 has priority. Each layer's input products run ahead of
// its recurrent part, so consecutive time steps overlap.
// Host side: ctrl_regs (start, step count, start location, status, result
// count) and irq, raised when all num_steps results are in the output
// buffer. Weights are loaded word by word through wr_*; wr_unit selects
//   0/1/2 layer 1 input / forget / hidden state module,
//   4/5/6 layer 2 input / forget / hidden state module,
//   8     output module.
// Interfaces: in_* (RSSI words, valid/ready), y_* (one location per
// result, show-ahead FIFO, y_pop removes it), reg_* and irq.
// Sizes default to the original design's model: 13 inputs (2 location + 11
// RSSI), 32 hidden units per layer, 16-lane processing elements. The
// processor, the DMA engine and the external memory are outside.
module mgu_accel
  import mgu_pkg::*;
#(
  parameter int RSSI_DIM = 11,
  parameter int LOC_DIM  = 2,
  parameter int HID      = 32,
  parameter int PE_LANES = 16,
  parameter int IN_FL    = 10,
  parameter int W_FL     = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  // host registers and interrupt
  input  logic                reg_we,
  input  logic [3:0]          reg_addr,
  input  logic [31:0]         reg_wdata,
  output logic [31:0]         reg_rdata,
  output logic                irq,
  // weight load
  input  logic                wr_en,
  input  logic [3:0]          wr_unit,
  input  logic [7:0]          wr_row,
  input  logic [7:0]          wr_col,
  input  data_t               wr_data,
  // input stream (RSSI readings)
  input  logic                in_valid,
  output logic                in_ready,
  input  data_t               in_data,
  // output buffer (predicted locations)
  output logic                y_valid,
  output data_t [LOC_DIM-1:0] y_vec,
  input  logic                y_pop
);

  localparam int IN_DIM = LOC_DIM + RSSI_DIM;

  logic run, y_push;
  logic [7:0] num_steps;
  data_t [1:0] loc_reg;
  data_t [LOC_DIM-1:0] loc;

  ctrl_regs u_ctrl (
    .clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .out_push(y_push), .run, .num_steps, .loc(loc_reg), .irq
  );
  for (genvar i = 0; i < LOC_DIM; i++) begin : g_loc
    assign loc[i] = (i < 2) ? loc_reg[i % 2] : '0;
  end

  logic x1_valid, x1_ready;
  data_t [IN_DIM-1:0] x1_vec;
  data_buffer #(.RSSI_DIM(RSSI_DIM), .LOC_DIM(LOC_DIM)) u_buf (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .loc,
    .x_valid(x1_valid), .x_ready(x1_ready), .x_vec(x1_vec)
  );

  // shared activation module
  logic      act_valid [2];
  act_req_t  act_req   [2];
  logic      act_ready [2];
  logic      resp_valid;
  act_resp_t resp;
  activation_module #(.NUM_REQ(2)) u_act (
    .clk, .rst_n, .req_valid(act_valid), .req(act_req), .req_ready(act_ready),
    .resp_valid, .resp
  );

  logic h1_valid, h1_ready, h2_valid, h2_ready;
  data_t [HID-1:0] h1, h2;

  mgu_layer #(
    .IN_DIM(IN_DIM), .HID(HID), .PE_LANES(PE_LANES), .IN_FL(IN_FL),
    .W_FL(W_FL), .LAYER(1'b0)
  ) u_layer1 (
    .clk, .rst_n, .run, .num_steps,
    .x_valid(x1_valid), .x_ready(x1_ready), .x_vec(x1_vec),
    .act_valid(act_valid[0]), .act_req(act_req[0]), .act_ready(act_ready[0]),
    .resp_valid, .resp,
    .h_out_valid(h1_valid), .h_out(h1), .h_out_ready(h1_ready),
    .wr_en(wr_en && wr_unit[3:2] == 2'd0), .wr_sel(wr_unit[1:0]),
    .wr_row, .wr_col, .wr_data
  );

  mgu_layer #(
    .IN_DIM(HID), .HID(HID), .PE_LANES(PE_LANES), .IN_FL(DATA_FL),
    .W_FL(W_FL), .LAYER(1'b1)
  ) u_layer2 (
    .clk, .rst_n, .run, .num_steps,
    .x_valid(h1_valid), .x_ready(h1_ready), .x_vec(h1),
    .act_valid(act_valid[1]), .act_req(act_req[1]), .act_ready(act_ready[1]),
    .resp_valid, .resp,
    .h_out_valid(h2_valid), .h_out(h2), .h_out_ready(h2_ready),
    .wr_en(wr_en && wr_unit[3:2] == 2'd1), .wr_sel(wr_unit[1:0]),
    .wr_row, .wr_col, .wr_data
  );

  output_module #(.HID(HID), .OUT_DIM(LOC_DIM), .W_FL(W_FL)) u_out (
    .clk, .rst_n, .h_valid(h2_valid), .h_ready(h2_ready), .h_vec(h2),
    .y_valid, .y_vec, .y_pop, .y_push,
    .wr_en(wr_en && wr_unit == 4'd8), .wr_row, .wr_col, .wr_data
  );

endmodule
