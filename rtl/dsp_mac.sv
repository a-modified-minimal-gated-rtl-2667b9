// dsp_mac: one multiply-accumulate slice modelled on a DSP48E1.
//
// Three operating modes, selected per operation by cmd (encoding as in the
// original design's DSP mode table): MAC_ABC P = A*B + C, MAC_AB P = A*B,
// MAC_ABP P = A*B + P. Using A*B+C for the first term of a dot product
// loads the bias for free; MAC_AB followed by MAC_ABP gives the two-term
// element-wise sum used for h_t.
//
// Timing: three register stages (input registers, multiplier register,
// accumulator register), so the result of an operation issued with
// en=1 in cycle t is on p in cycle t+3. p only changes when an operation
// reaches the last stage; between operations it holds its value.
// The register structure mirrors the DSP48E1 AREG/MREG/PREG pipeline; the
// reset (synchronous, active low, to zero) is this design's choice.
module dsp_mac
  import mgu_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,     // issue an operation this cycle
  input  mac_cmd_t cmd,
  input  data_t    a,
  input  data_t    b,
  input  acc_t     c,
  output acc_t     p
);

  // stage 1: input registers
  logic     v1;
  mac_cmd_t cmd1;
  data_t    a1, b1;
  acc_t     c1;
  // stage 2: multiplier register
  logic     v2;
  mac_cmd_t cmd2;
  acc_t     m2, c2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0;
      cmd1 <= MAC_AB; cmd2 <= MAC_AB;
      a1 <= '0; b1 <= '0; c1 <= '0; m2 <= '0; c2 <= '0;
      p <= '0;
    end else begin
      v1 <= en;
      if (en) begin
        cmd1 <= cmd; a1 <= a; b1 <= b; c1 <= c;
      end
      v2 <= v1;
      if (v1) begin
        cmd2 <= cmd1;
        m2   <= acc_t'(a1) * acc_t'(b1);
        c2   <= c1;
      end
      if (v2) begin
        unique case (cmd2)
          MAC_ABC: p <= m2 + c2;
          MAC_AB:  p <= m2;
          MAC_ABP: p <= m2 + p;
          default: p <= m2;
        endcase
      end
    end
  end

endmodule
