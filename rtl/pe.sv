// pe: processing element, a row of LANES multiply-accumulate slices.
//
// In matrix mode (lane_mode=0) every slice receives the same input value
// a_shared and its own weight b[i]: issuing x[k] with row k of a weight
// matrix for k = 0..m-1 (MAC_ABC or MAC_AB first, MAC_ABP after) leaves
// one element of the vector-matrix product in each lane, m+3 cycles after
// the first issue. In element-wise mode (lane_mode=1) lane i multiplies its
// own a_lane[i] by b[i], which lets the same slices compute f (.) v products
// without a dedicated multiplier. The original design's PE has 16 slices and one
// shared input; the per-lane input select is this design's addition for
// element-wise products, which the original design runs on the same PE.
// Timing: that of dsp_mac (3 cycles), all lanes in lock step.
module pe
  import mgu_pkg::*;
#(
  parameter int LANES = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  mac_cmd_t cmd,
  input  logic     lane_mode,
  input  data_t    a_shared,
  input  data_t    a_lane [LANES],
  input  data_t    b      [LANES],
  input  acc_t     c      [LANES],
  output acc_t     p      [LANES]
);

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    data_t a_sel;
    assign a_sel = lane_mode ? a_lane[i] : a_shared;
    dsp_mac u_mac (
      .clk, .rst_n, .en, .cmd,
      .a(a_sel), .b(b[i]), .c(c[i]), .p(p[i])
    );
  end

endmodule
