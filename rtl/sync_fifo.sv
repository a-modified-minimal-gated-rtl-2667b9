// sync_fifo: single-clock first-in first-out buffer.
//
// Used for the input and output buffers of the compute modules, which the
// original design describes as FIFOs that tell neighbouring modules when they are
// empty or full. Show-ahead: rd_data is the oldest entry whenever empty is
// low, and pop removes it. push when full and pop when empty are ignored
// (and flagged by assertions). count gives the fill level. Depth and the
// circular-buffer implementation are this design's choices.
module sync_fifo #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             pop,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;

  logic do_push, do_pop;
  assign do_push = push && (!full || do_pop);
  assign do_pop  = pop && !empty;

  assign empty   = (count == 0);
  assign full    = (count == CW'(DEPTH));
  assign rd_data = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] v);
    return (v == AW'(DEPTH-1)) ? '0 : v + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_push) wp <= inc(wp);
      if (do_pop)  rp <= inc(rp);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wr_data;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !(pop && !empty)));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
