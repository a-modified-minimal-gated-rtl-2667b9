// ctrl_regs: host control/status registers and completion interrupt.
//
// A simple word-addressed register port (reg_we/reg_addr/reg_wdata, with
// reg_rdata a combinational read) stands in for the processor-side bus.
//   addr 0 CTRL   write: bit0 = start a sequence, bit1 = clear interrupt
//                 read:  bit0 = busy, bit1 = done, bit2 = irq
//   addr 1 STEPS  number of time steps per sequence (reset value 9)
//   addr 2 LOC_X  start location, x (DATA_FL fixed point)
//   addr 3 LOC_Y  start location, y
//   addr 4 COUNT  results produced in the current sequence (read only)
// start sets busy (run); each out_push adds one to the result count; when
// the count reaches STEPS it restarts from zero, busy falls, done rises and
// irq is raised until cleared. Results are counted even while not busy,
// because a sequence whose inputs are already buffered may follow the
// previous one without waiting (see forget_module). Registers set before start and an interrupt at the
// end of a calculation follow the original design; the map is this design's.
//
// Lint note: all registers are at most 16 bits wide, so reg_wdata[31:16]
// is ignored.
module ctrl_regs
  import mgu_pkg::*;
#(
  parameter int NUM_STEPS = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        reg_we,
  input  logic [3:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  input  logic        out_push,
  output logic        run,
  output logic [7:0]  num_steps,
  output data_t [1:0] loc,
  output logic        irq
);

  logic       done;
  logic [7:0] count;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0; done <= 1'b0; irq <= 1'b0; count <= '0;
      num_steps <= 8'(NUM_STEPS); loc <= '0;
    end else begin
      if (out_push) begin
        count <= count + 8'd1;
        if (count + 8'd1 == num_steps) begin
          count <= '0;
          run   <= 1'b0;
          done  <= 1'b1;
          irq   <= 1'b1;
        end
      end
      if (reg_we) begin
        unique case (reg_addr)
          4'd0: begin
            if (reg_wdata[0] && !run) begin
              run <= 1'b1; done <= 1'b0;
            end
            if (reg_wdata[1]) irq <= 1'b0;
          end
          4'd1: if (!run) num_steps <= reg_wdata[7:0];
          4'd2: loc[0] <= reg_wdata[15:0];
          4'd3: loc[1] <= reg_wdata[15:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (reg_addr)
      4'd0:    reg_rdata = {29'd0, irq, done, run};
      4'd1:    reg_rdata = {24'd0, num_steps};
      4'd2:    reg_rdata = {{16{loc[0][15]}}, loc[0]};
      4'd3:    reg_rdata = {{16{loc[1][15]}}, loc[1]};
      4'd4:    reg_rdata = {24'd0, count};
      default: reg_rdata = '0;
    endcase
  end

endmodule
