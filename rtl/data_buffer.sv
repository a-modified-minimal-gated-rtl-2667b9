// data_buffer: input buffer between the DMA stream and the first layer.
//
// RSSI readings arrive one 16-bit word per transfer (in_valid/in_ready)
// and are queued in a FIFO of DEPTH words (enough for a whole sequence of
// readings). The assembler takes RSSI_DIM words at a time and offers the
// layer-1 input vector x_t = {start location, RSSI readings}, with the
// LOC_DIM words of the start location (held in a control register) in
// elements 0..LOC_DIM-1 and the readings after them; every time step of a
// sequence reuses the same start location. The original design describes the
// buffer, the 11 readings and the shared start location; the element
// order, the word-serial stream and the depth are this design's choices.
//
// Lint note: the FIFO's count output is not needed and left open.
module data_buffer
  import mgu_pkg::*;
#(
  parameter int RSSI_DIM = 11,
  parameter int LOC_DIM  = 2,
  parameter int DEPTH    = 128
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  data_t                         in_data,
  input  data_t [LOC_DIM-1:0]           loc,
  output logic                          x_valid,
  input  logic                          x_ready,
  output data_t [LOC_DIM+RSSI_DIM-1:0]  x_vec
);

  localparam int CW = $clog2(RSSI_DIM + 1);

  logic  empty, full, pop;
  data_t head;
  logic [CW-1:0] cnt;
  data_t [RSSI_DIM-1:0] rssi;

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .push(in_valid), .wr_data(in_data), .pop,
    .rd_data(head), .empty, .full, .count()
  );
  assign in_ready = !full;

  assign x_valid = (cnt == CW'(RSSI_DIM));
  assign pop     = !x_valid && !empty;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0; rssi <= '0;
    end else if (pop) begin
      rssi[cnt] <= head;
      cnt       <= cnt + 1'b1;
    end else if (x_valid && x_ready) begin
      cnt <= '0;
    end
  end

  assign x_vec = {rssi, loc};

endmodule
