// input_module: input products xf_t = Wxf x_t + b_f and xh_t = Wxh x_t + b_h.
//
// The part of an MGU_1 step that depends only on the input, so it runs
// ahead of the recurrent part whenever an input vector is buffered.
// Input vectors wait in an input FIFO. For each vector the MAC array
// (HID/PE_LANES processing elements, one lane per hidden unit) is fed one
// input element per cycle together with the matching weight row: first
// the IN_DIM rows of Wxf (the first with MAC_ABC to add b_f), then the
// IN_DIM rows of Wxh (b_h). Each result is rescaled to DATA_FL and pushed
// into its own output FIFO (xf or xh), which the forget and hidden state
// modules pop. Timing: xf_t is ready IN_DIM+3 cycles after the first
// issue, xh_t IN_DIM cycles later (2*IN_DIM+3 in all).
// Weight memory: one row per input element, HID words per row:
//   rows 0..IN_DIM-1 Wxf, rows IN_DIM..2*IN_DIM-1 Wxh, row 2*IN_DIM b_f,
//   row 2*IN_DIM+1 b_h; written one word at a time through wr_*.
// Weights have W_FL fractional bits, inputs IN_FL, biases and outputs
// DATA_FL. The row order, FIFO depths and the load port are this design's.
//
// Lint notes: the 8-bit wr_row/wr_col index arrays with fewer rows or
// columns; writes are range-checked first, so the width truncation is
// harmless. The FIFOs' count outputs are not needed and left open.
module input_module
  import mgu_pkg::*;
#(
  parameter int IN_DIM   = 13,
  parameter int HID      = 32,
  parameter int PE_LANES = 16,
  parameter int IN_FL    = 10,
  parameter int W_FL     = 12,
  parameter int X_DEPTH  = 2,
  parameter int O_DEPTH  = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // input vectors
  input  logic                     x_valid,
  output logic                     x_ready,
  input  data_t [IN_DIM-1:0]       x_vec,
  // weight load
  input  logic                     wr_en,
  input  logic [7:0]               wr_row,
  input  logic [7:0]               wr_col,
  input  data_t                    wr_data,
  // xf_t and xh_t buffers
  output logic                     xf_valid,
  output data_t [HID-1:0]          xf_vec,
  input  logic                     xf_pop,
  output logic                     xh_valid,
  output data_t [HID-1:0]          xh_vec,
  input  logic                     xh_pop
);

  localparam int ROWS   = 2*IN_DIM + 2;
  localparam int NUM_PE = HID / PE_LANES;
  localparam int SH     = IN_FL + W_FL - DATA_FL;
  localparam int KW     = $clog2(2*IN_DIM + 1);

  // ---------------- weight memory
  data_t wmem [ROWS][HID];
  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_row) < ROWS && int'(wr_col) < HID)
      wmem[wr_row][wr_col] <= wr_data;
  end

  // ---------------- buffers
  logic x_empty, x_full, x_pop;
  data_t [IN_DIM-1:0] x_cur;
  sync_fifo #(.WIDTH(IN_DIM*DATA_W), .DEPTH(X_DEPTH)) u_xbuf (
    .clk, .rst_n, .push(x_valid && !x_full), .wr_data(x_vec), .pop(x_pop),
    .rd_data(x_cur), .empty(x_empty), .full(x_full), .count()
  );
  assign x_ready = !x_full;

  logic xf_full, xh_full, xf_empty, xh_empty, xf_push, xh_push;
  data_t [HID-1:0] res_vec;
  sync_fifo #(.WIDTH(HID*DATA_W), .DEPTH(O_DEPTH)) u_xfbuf (
    .clk, .rst_n, .push(xf_push), .wr_data(res_vec), .pop(xf_pop),
    .rd_data(xf_vec), .empty(xf_empty), .full(xf_full), .count()
  );
  sync_fifo #(.WIDTH(HID*DATA_W), .DEPTH(O_DEPTH)) u_xhbuf (
    .clk, .rst_n, .push(xh_push), .wr_data(res_vec), .pop(xh_pop),
    .rd_data(xh_vec), .empty(xh_empty), .full(xh_full), .count()
  );
  assign xf_valid = !xf_empty;
  assign xh_valid = !xh_empty;

  // ---------------- control
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_DRAIN} state_t;
  state_t        state;
  logic [KW-1:0] k;          // 0..2*IN_DIM-1
  logic          issue, sel_h, first;
  logic [KW-1:0] elem;
  // tag pipeline aligned with the MAC latency: {last-of-xf, last-of-xh}
  logic [2:0]    tag_f, tag_h;

  assign issue = (state == S_ISSUE);
  assign sel_h = (k >= KW'(IN_DIM));
  assign elem  = sel_h ? k - KW'(IN_DIM) : k;
  assign first = (elem == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; k <= '0; tag_f <= '0; tag_h <= '0;
    end else begin
      tag_f <= {tag_f[1:0], issue && (k == KW'(IN_DIM-1))};
      tag_h <= {tag_h[1:0], issue && (k == KW'(2*IN_DIM-1))};
      unique case (state)
        S_IDLE:  if (!x_empty && !xf_full && !xh_full) begin
                   state <= S_ISSUE; k <= '0;
                 end
        S_ISSUE: begin
                   k <= k + 1'b1;
                   if (k == KW'(2*IN_DIM-1)) state <= S_DRAIN;
                 end
        S_DRAIN: if (tag_h[2]) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign xf_push = tag_f[2];
  assign xh_push = tag_h[2];
  assign x_pop   = tag_h[2];

  // ---------------- MAC array
  data_t a_in;
  data_t b_in [HID];
  acc_t  c_in [HID];
  acc_t  p_out[HID];
  assign a_in = x_cur[elem[$clog2(IN_DIM+1)-1:0]];
  always_comb begin
    for (int j = 0; j < HID; j++) begin
      b_in[j] = wmem[k][j];
      c_in[j] = acc_t'(wmem[sel_h ? 2*IN_DIM+1 : 2*IN_DIM][j]) <<< SH;
    end
  end

  for (genvar g = 0; g < NUM_PE; g++) begin : g_pe
    data_t b_pe [PE_LANES];
    acc_t  c_pe [PE_LANES];
    acc_t  p_pe [PE_LANES];
    data_t a_ln [PE_LANES];
    for (genvar l = 0; l < PE_LANES; l++) begin : g_l
      assign b_pe[l] = b_in[g*PE_LANES+l];
      assign c_pe[l] = c_in[g*PE_LANES+l];
      assign a_ln[l] = '0;
      assign p_out[g*PE_LANES+l] = p_pe[l];
    end
    pe #(.LANES(PE_LANES)) u_pe (
      .clk, .rst_n, .en(issue), .cmd(first ? MAC_ABC : MAC_ABP),
      .lane_mode(1'b0), .a_shared(a_in), .a_lane(a_ln), .b(b_pe), .c(c_pe),
      .p(p_pe)
    );
  end

  always_comb begin
    for (int j = 0; j < HID; j++) res_vec[j] = rescale(p_out[j], SH);
  end

  initial begin
    assert (HID % PE_LANES == 0) else $error("HID must be a multiple of PE_LANES");
    assert (SH >= 0) else $error("IN_FL + W_FL must be at least DATA_FL");
  end

endmodule
