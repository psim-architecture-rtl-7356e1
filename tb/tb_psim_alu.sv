// tb_psim_alu: self-checking testbench for the PSIM ALU.
//
// Drives every operation code with corner values and random operands and
// compares the next AC and next C with a reference computed here from the
// operation table: wide integer arithmetic for increment and add (carry-out
// is bit 8 of the 9-bit result) and bitwise operators for the logic codes,
// with C taken from the NAND, NOR or OR of all bits of the current AC.
module tb_psim_alu;
  import psim_pkg::*;

  alu_op_e    op;
  logic [7:0] ac, dr, ac_next;
  logic       c, c_next;

  int checks = 0, failures = 0;

  psim_alu #(.W(8)) dut (.op, .ac, .dr, .c, .ac_next, .c_next);

  task automatic check_one(input logic [2:0] o, input logic [7:0] a,
                           input logic [7:0] d, input logic ci);
    int unsigned wide;
    logic [7:0]  e_ac;
    logic        e_c;
    op = alu_op_e'(o); ac = a; dr = d; c = ci;
    #1;
    case (o)
      3'd0: begin e_ac = a;         e_c = ci;  end
      3'd1: begin e_ac = d;         e_c = 0;   end
      3'd2: begin e_ac = 8'hFF - a; e_c = !ci; end
      3'd3: begin wide = 32'(a) + 1;    e_ac = wide[7:0]; e_c = wide[8]; end
      3'd4: begin wide = 32'(a) + 32'(d);    e_ac = wide[7:0]; e_c = wide[8]; end
      3'd5: begin e_ac = a & d;     e_c = (a != 8'hFF); end
      3'd6: begin e_ac = ~(a | d);  e_c = (a == 8'h00); end
      default: begin e_ac = a ^ d;  e_c = (a != 8'h00); end
    endcase
    checks++;
    if (ac_next !== e_ac || c_next !== e_c) begin
      failures++;
      $display("FAIL op=%0d ac=%h dr=%h c=%b: got %h/%b expected %h/%b",
               o, a, d, ci, ac_next, c_next, e_ac, e_c);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [7:0] corner [6] = '{8'h00, 8'h01, 8'h7F, 8'h80, 8'hFE, 8'hFF};
    for (int o = 0; o < 8; o++)
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++)
          for (int k = 0; k < 2; k++)
            check_one(o[2:0], corner[i], corner[j], k[0]);
    for (int n = 0; n < 4000; n++)
      check_one(3'($urandom_range(7, 0)), 8'($urandom), 8'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
