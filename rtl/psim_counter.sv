// psim_counter: counter with clear, parallel load and increment.
//
// Serves as PSIM's program counter (INC_PC: PC <- PC+1, LD_PC: PC <- DR; clr
// tied low) and its timing counter (INC_TC: TC <- TC+1, RST_TC: TC <- 0; ld
// tied low). Changes on the rising clock edge; wraps around modulo 2**W. The
// control logic never raises two of clr, ld and inc at once; should it, clr
// wins over ld and ld over inc (this design's choice). A synchronous
// active-high reset clears the count to zero.
module psim_counter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clr,
  input  logic         ld,
  input  logic         inc,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst || clr) q <= '0;
    else if (ld)    q <= d;
    else if (inc)   q <= q + 1'b1;
  end

endmodule
