// psim_alu: arithmetic/logic unit of the PSIM processor.
//
// Produces the next value of the accumulator (AC) and of the carry register
// (C) from AC, the data register DR, C and the 3-bit operation AC_C2-0. AC and
// C load the ALU result on every clock, so operation 000 (hold) is how they
// keep their value.
//
// As in the PSIM description, one W-bit adder serves both increment and add:
// its second operand is DR & ~AC_C1 and its carry-in is AC_C1, so code 011
// gives AC+1 and code 100 gives AC+DR. An 8-to-1 multiplexer per bit picks the
// AC result, a second one picks the C result:
//   000 hold      AC          C
//   001 load      DR          0
//   010 compl.    ~AC         ~C
//   011 incr.     AC+1        carry-out
//   100 add       AC+DR       carry-out
//   101 and       AC&DR       NAND of all bits of AC
//   110 nor       ~(AC|DR)    NOR of all bits of AC
//   111 xor       AC^DR       OR of all bits of AC
// The reductions for C read the accumulator register as it is before the
// operation, as the figure for the C multiplexer draws them. Combinational.
module psim_alu
  import psim_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  alu_op_e      op,
  input  logic [W-1:0] ac,
  input  logic [W-1:0] dr,
  input  logic         c,
  output logic [W-1:0] ac_next,
  output logic         c_next
);

  logic         cin;
  logic [W-1:0] addend;
  logic [W-1:0] sum;
  logic         cout;

  always_comb begin
    cin           = op[1];
    addend        = dr & {W{~op[1]}};
    {cout, sum}   = {1'b0, ac} + {1'b0, addend} + {{W{1'b0}}, cin};

    unique case (op)
      ALU_HOLD: begin ac_next = ac;           c_next = c;     end
      ALU_LOAD: begin ac_next = dr;           c_next = 1'b0;  end
      ALU_CMA:  begin ac_next = ~ac;          c_next = ~c;    end
      ALU_INC:  begin ac_next = sum;          c_next = cout;  end
      ALU_ADD:  begin ac_next = sum;          c_next = cout;  end
      ALU_AND:  begin ac_next = ac & dr;      c_next = ~&ac;  end
      ALU_NOR:  begin ac_next = ~(ac | dr);   c_next = ~|ac;  end
      ALU_XOR:  begin ac_next = ac ^ dr;      c_next = |ac;   end
      default:  begin ac_next = ac;           c_next = c;     end
    endcase
  end

endmodule
