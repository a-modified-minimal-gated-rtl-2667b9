// activation_module: shared, pipelined sigmoid / tanh unit.
//
// Serves NUM_REQ requesters (one per MGU_1 layer), one element per cycle.
// When several request in the same cycle the highest-numbered port (the
// layer closest to the output) wins and the others wait; req_ready tells
// a requester its element was taken. Four register stages, as in the
// original design: (1) cache the granted request, (2) take the absolute value and
// form the table address, (3) read the look-up table, (4) restore the sign
// using sigma(-x) = 1 - sigma(x), tanh(-x) = -tanh(x). An element accepted
// in cycle t appears on resp in cycle t+4 with resp_valid high for one
// cycle; the pipeline never stalls. For the sigmoid both sigma(x) (y) and
// 1 - sigma(x) (yc) are returned, since h_t needs both.
// Input and output are DATA_FL fixed point; inputs with |x| >= 8 saturate
// to the last table entry. Fixed priority and one shared unit for both
// layers follow the original design; the port-per-layer handshake is this design's.
module activation_module
  import mgu_pkg::*;
#(
  parameter int NUM_REQ = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      req_valid [NUM_REQ],
  input  act_req_t  req       [NUM_REQ],
  output logic      req_ready [NUM_REQ],
  output logic      resp_valid,
  output act_resp_t resp
);

  localparam int ONE = 1 << LUT_OUT_FL;
  localparam int SH  = DATA_FL - LUT_IN_FL;
  localparam int PW  = (NUM_REQ > 1) ? $clog2(NUM_REQ) : 1;

  // ---- arbitration: highest port index first
  logic          any_req;
  logic [PW-1:0] gnt;
  always_comb begin
    any_req = 1'b0;
    gnt     = '0;
    for (int i = 0; i < NUM_REQ; i++) begin
      if (req_valid[i]) begin
        any_req = 1'b1;
        gnt     = PW'(i);
      end
    end
    for (int i = 0; i < NUM_REQ; i++)
      req_ready[i] = any_req && (gnt == PW'(i));
  end

  // ---- stage 1: cache request
  logic          v1;
  act_req_t      r1;
  logic [PW-1:0] p1;
  // ---- stage 2: magnitude and address
  logic          v2, neg2;
  act_func_t     f2;
  logic [IDX_W-1:0] i2;
  logic [PW-1:0] p2;
  logic [LUT_IN_W-1:0] addr2;
  // ---- stage 3: table read
  logic          v3, neg3;
  act_func_t     f3;
  logic [IDX_W-1:0] i3;
  logic [PW-1:0] p3;
  logic [LUT_OUT_W-1:0] q3;

  logic [DATA_W:0] mag1;
  logic [DATA_W:0] sh1;
  assign mag1 = r1.x[DATA_W-1] ? -{r1.x[DATA_W-1], r1.x} : {1'b0, r1.x};
  assign sh1  = mag1 >> SH;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; resp_valid <= 1'b0;
      r1 <= '0; p1 <= '0;
      neg2 <= 1'b0; f2 <= ACT_SIG; i2 <= '0; p2 <= '0; addr2 <= '0;
      neg3 <= 1'b0; f3 <= ACT_SIG; i3 <= '0; p3 <= '0;
      resp <= '0;
    end else begin
      v1 <= any_req;
      if (any_req) begin
        r1 <= req[gnt];
        p1 <= gnt;
      end
      v2 <= v1;
      if (v1) begin
        neg2  <= r1.x[DATA_W-1];
        f2    <= r1.func;
        i2    <= r1.idx;
        p2    <= p1;
        addr2 <= (sh1 > (DATA_W+1)'((1 << LUT_IN_W) - 1)) ? '1 : sh1[LUT_IN_W-1:0];
      end
      v3 <= v2;
      if (v2) begin
        neg3 <= neg2; f3 <= f2; i3 <= i2; p3 <= p2;
      end
      resp_valid <= v3;
      if (v3) begin
        resp.port <= p3[0];
        resp.func <= f3;
        resp.idx  <= i3;
        if (f3 == ACT_SIG) begin
          resp.y  <= neg3 ? data_t'(ONE) - data_t'(q3) : data_t'(q3);
          resp.yc <= neg3 ? data_t'(q3) : data_t'(ONE) - data_t'(q3);
        end else begin
          resp.y  <= neg3 ? -data_t'(q3) : data_t'(q3);
          resp.yc <= '0;
        end
      end
    end
  end

  act_lut u_lut (
    .clk, .en(v2), .func(f2), .addr(addr2), .q(q3)
  );

endmodule
