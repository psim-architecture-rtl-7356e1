// psim_mux2: data register input multiplexer (MUX2) of the PSIM processor.
//
// Chooses what the data register loads: memory read data when neither select
// is active, the accumulator when M2S-AC = 1, the input register when
// M2S-IN = 1. Each bit is the sum of products
//   MEM_i & ~M2S-AC & ~M2S-IN  |  AC_i & M2S-AC  |  IN_i & M2S-IN
// as in the PSIM description. Both selects active is a don't-care there; this
// sum of products then gives AC_i | IN_i, and the control logic never asks for
// it. Purely combinational.
module psim_mux2 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] mem,
  input  logic [W-1:0] ac,
  input  logic [W-1:0] in_r,
  input  logic         m2s_ac,
  input  logic         m2s_in,
  output logic [W-1:0] z
);

  logic sel_mem;

  always_comb begin
    sel_mem = ~m2s_ac & ~m2s_in;
    for (int i = 0; i < W; i++) begin
      z[i] = (mem[i] & sel_mem) | (ac[i] & m2s_ac) | (in_r[i] & m2s_in);
    end
  end

endmodule
