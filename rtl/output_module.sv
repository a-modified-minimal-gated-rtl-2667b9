// output_module: fully connected output layer, y_t = Wo h_t + b_o.
//
// Takes the hidden state of the last MGU_1 layer (valid/ready), feeds its
// HID elements one per cycle with the matching weight rows to a MAC
// processing element with OUT_DIM lanes (the first with MAC_ABC to add the
// bias), and after HID+3 cycles pushes the OUT_DIM results (the predicted
// location) into the output buffer, a FIFO deep enough for a whole
// sequence, from which the host fetches them through y_*. y_push pulses
// for every result written, for the completion counter.
// Weight memory: rows 0..HID-1 hold Wo (row k = weights of h[k]), row HID
// the bias; W_FL fractional bits for weights, DATA_FL for bias and output.
// The original design names the output module and the fully connected output
// layer; the sizes (OUT_DIM = 2 for an x/y location) and the internals are
// this design's.
//
// Lint notes: the 8-bit wr_row/wr_col index arrays with fewer rows or
// columns; writes are range-checked first, so the width truncation is
// harmless. The output FIFO's count output is not needed and left open.
module output_module
  import mgu_pkg::*;
#(
  parameter int HID     = 32,
  parameter int OUT_DIM = 2,
  parameter int W_FL    = 12,
  parameter int Y_DEPTH = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                h_valid,
  output logic                h_ready,
  input  data_t [HID-1:0]     h_vec,
  output logic                y_valid,
  output data_t [OUT_DIM-1:0] y_vec,
  input  logic                y_pop,
  output logic                y_push,
  input  logic                wr_en,
  input  logic [7:0]          wr_row,
  input  logic [7:0]          wr_col,
  input  data_t               wr_data
);

  localparam int KW = $clog2(HID + 1);

  data_t wmem [HID+1][OUT_DIM];
  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_row) <= HID && int'(wr_col) < OUT_DIM)
      wmem[wr_row][wr_col] <= wr_data;
  end

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_DRAIN} state_t;
  state_t        state;
  logic [KW-1:0] k;
  logic [2:0]    tag;
  logic          issue, y_full, y_empty;
  data_t [HID-1:0]     h_cur;
  data_t [OUT_DIM-1:0] res;

  assign issue   = (state == S_ISSUE);
  assign h_ready = (state == S_IDLE) && !y_full;
  assign y_push  = (state == S_DRAIN) && tag[2];
  assign y_valid = !y_empty;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; k <= '0; tag <= '0; h_cur <= '0;
    end else begin
      tag <= {tag[1:0], issue && (k == KW'(HID-1))};
      unique case (state)
        S_IDLE:  if (h_valid && h_ready) begin
                   h_cur <= h_vec; k <= '0; state <= S_ISSUE;
                 end
        S_ISSUE: begin
                   k <= k + 1'b1;
                   if (k == KW'(HID-1)) state <= S_DRAIN;
                 end
        S_DRAIN: if (tag[2]) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  data_t a_ln [OUT_DIM];
  data_t b_pe [OUT_DIM];
  acc_t  c_pe [OUT_DIM];
  acc_t  p_pe [OUT_DIM];
  for (genvar l = 0; l < OUT_DIM; l++) begin : g_l
    assign a_ln[l] = '0;
    assign b_pe[l] = wmem[k < KW'(HID) ? k : '0][l];
    assign c_pe[l] = acc_t'(wmem[HID][l]) <<< W_FL;
    assign res[l]  = rescale(p_pe[l], W_FL);
  end

  pe #(.LANES(OUT_DIM)) u_pe (
    .clk, .rst_n, .en(issue), .cmd(k == '0 ? MAC_ABC : MAC_ABP),
    .lane_mode(1'b0), .a_shared(h_cur[k < KW'(HID) ? k : '0]), .a_lane(a_ln),
    .b(b_pe), .c(c_pe), .p(p_pe)
  );

  sync_fifo #(.WIDTH(OUT_DIM*DATA_W), .DEPTH(Y_DEPTH)) u_ybuf (
    .clk, .rst_n, .push(y_push), .wr_data(res), .pop(y_pop),
    .rd_data(y_vec), .empty(y_empty), .full(y_full), .count()
  );

endmodule
