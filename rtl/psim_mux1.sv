// psim_mux1: memory address multiplexer (MUX1) of the PSIM processor.
//
// Chooses the memory address MA from the program counter (M1S-AR = 0) or the
// address register (M1S-AR = 1). It is W two-to-one multiplexers sharing one
// select line, each bit being PC_i & ~M1S-AR | AR_i & M1S-AR, as the PSIM
// description draws it. Purely combinational.
module psim_mux1 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] pc,
  input  logic [W-1:0] ar,
  input  logic         m1s_ar,
  output logic [W-1:0] ma
);

  always_comb begin
    for (int i = 0; i < W; i++) begin
      ma[i] = (pc[i] & ~m1s_ar) | (ar[i] & m1s_ar);
    end
  end

endmodule
