// mgu_pkg: types and constants shared by the MGU_1 accelerator.
//
// Number formats (dynamic fixed point): every value is a 16-bit two's
// complement word whose binary point position ("fl", fractional length)
// depends on the group it belongs to. Layer activations (x of layer 2,
// f_t, h_t, pre-activations) use DATA_FL fractional bits; weights carry
// their own fractional length, a parameter of each compute module, and
// products are brought back to DATA_FL by an arithmetic right shift
// (truncation) followed by saturation to 16 bits. DATA_FL = 10 and the
// accumulator width are this design's choices; the 16-bit word, the MAC
// command encoding and the 11-bit activation table follow the original design.
package mgu_pkg;

  localparam int DATA_W  = 16;   // int16 inputs, weights and biases
  localparam int ACC_W   = 48;   // DSP48E1-style accumulator width
  localparam int DATA_FL = 10;   // fractional bits of activations
  localparam int IDX_W   = 8;    // element index inside a vector (<= 256)

  // Activation look-up table: 11-bit magnitude in, 11-bit value out.
  localparam int LUT_IN_W   = 11;
  localparam int LUT_IN_FL  = 8;   // table input covers |x| in [0, 8)
  localparam int LUT_OUT_W  = 11;
  localparam int LUT_OUT_FL = DATA_FL; // table output already in DATA_FL

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // MAC slice modes (cmd[1:0]).
  typedef enum logic [1:0] {
    MAC_ABC = 2'b00,   // P = A*B + C  (first term with bias)
    MAC_AB  = 2'b01,   // P = A*B
    MAC_ABP = 2'b10    // P = A*B + P  (accumulate)
  } mac_cmd_t;

  typedef enum logic {
    ACT_SIG  = 1'b0,
    ACT_TANH = 1'b1
  } act_func_t;

  // One element sent to the activation module.
  typedef struct packed {
    act_func_t        func;
    logic [IDX_W-1:0] idx;
    data_t            x;
  } act_req_t;

  // One element returned by the activation module.
  // y = sigmoid(x) or tanh(x); yc = 1 - sigmoid(x) (only for ACT_SIG).
  typedef struct packed {
    logic             port;   // requesting layer (0 = layer 1)
    act_func_t        func;
    logic [IDX_W-1:0] idx;
    data_t            y;
    data_t            yc;
  } act_resp_t;

  // Saturate a wide signed value to a 16-bit word.
  function automatic data_t sat16(input acc_t v);
    if (v > acc_t'(32767))       return data_t'(16'sh7fff);
    else if (v < -acc_t'(32768)) return data_t'(-16'sh8000);
    else                         return data_t'(v[DATA_W-1:0]);
  endfunction

  // Scale an accumulator down by sh fractional bits and saturate.
  function automatic data_t rescale(input acc_t v, input int sh);
    return sat16(v >>> sh);
  endfunction

endpackage
