// act_lut: sigmoid / tanh look-up table for non-negative inputs.
//
// The table is indexed by the magnitude of the pre-activation, an 11-bit
// unsigned number with LUT_IN_FL = 8 fractional bits (so it spans [0, 8)),
// and returns an 11-bit unsigned value with LUT_OUT_FL = 10 fractional
// bits. Only the positive half of each function is stored; the activation
// module recovers negative inputs from sigma(-x) = 1 - sigma(x) and
// tanh(-x) = -tanh(x). Contents (integer arithmetic at elaboration):
//   sig[i]  = round(1024 / (1 + exp(-i/256)))
//   tanh[i] = round(1024 * tanh(i/256))
// The read is synchronous (one cycle, block-RAM style); func selects the
// table. The 11-bit widths follow the original design; the input range and the
// rounding are this design's choices.
module act_lut
  import mgu_pkg::*;
(
  input  logic                 clk,
  input  logic                 en,
  input  act_func_t            func,
  input  logic [LUT_IN_W-1:0]  addr,
  output logic [LUT_OUT_W-1:0] q
);

  localparam int ENTRIES = 1 << LUT_IN_W;

  typedef logic [LUT_OUT_W-1:0] rom_t [2*ENTRIES];

  // Table contents, worked out at elaboration in integer arithmetic so
  // the ROM holds plain constants. e = exp(-i/256) is kept as a Q60
  // fraction and advanced by one multiplication per entry; then
  //   sigma(x) = 1 / (1 + e),  tanh(x) = (1 - e^2) / (1 + e^2),
  // scaled by 2^LUT_OUT_FL and rounded to nearest. The step constant
  // assumes LUT_IN_FL = 8.
  localparam int          QF     = 60;
  localparam logic [63:0] E_STEP = 64'h0ff007fd55ffdde4;  // exp(-1/256) * 2^60

  function automatic rom_t make_rom();
    rom_t         t;
    logic [127:0] e, e2, d, one;
    one = 128'(1) << QF;
    e   = one;
    for (int i = 0; i < ENTRIES; i++) begin
      d              = one + e;
      t[i]           = LUT_OUT_W'(((one << (LUT_OUT_FL + 1)) + d) / (d << 1));
      e2             = (e * e) >> QF;
      d              = one + e2;
      t[ENTRIES + i] = LUT_OUT_W'((((one - e2) << (LUT_OUT_FL + 1)) + d) / (d << 1));
      e              = (e * 128'(E_STEP)) >> QF;
    end
    return t;
  endfunction

  localparam rom_t ROM = make_rom();

  if (LUT_IN_FL != 8) begin : g_step_check
    $error("act_lut: E_STEP is exp(-1/256) and needs LUT_IN_FL = 8");
  end

  always_ff @(posedge clk) begin
    if (en) q <= ROM[{func == ACT_TANH, addr}];
  end

endmodule
