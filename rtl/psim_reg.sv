// psim_reg: parallel-load register of the PSIM processor.
//
// One module serves all of PSIM's plain registers: the address, data,
// instruction, input and output registers (each with its own LD_x control)
// and the accumulator and carry register (load tied high, fed by the ALU).
// On a rising clock edge the register takes d when ld is high and keeps its
// value otherwise. A synchronous active-high reset clears it to zero; the
// reset is this design's choice, the PSIM description does not define one.
module psim_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ld,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (ld) q <= d;
  end

endmodule
