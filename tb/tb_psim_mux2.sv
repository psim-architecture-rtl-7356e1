// tb_psim_mux2: self-checking testbench for MUX2, the data register input
// multiplexer. Checks the three legal select settings of its truth table
// (neither select: MEM; M2S-AC: AC; M2S-IN: IN) with distinct random inputs,
// plus the don't-care setting, where the sum-of-products form gives AC | IN.
module tb_psim_mux2;

  logic [7:0] mem, ac, in_r, z;
  logic       m2s_ac, m2s_in;

  int checks = 0, failures = 0;

  psim_mux2 #(.W(8)) dut (.mem, .ac, .in_r, .m2s_ac, .m2s_in, .z);

  task automatic check_one(input logic [7:0] m, input logic [7:0] a,
                           input logic [7:0] i, input logic sa, input logic si);
    logic [7:0] e;
    mem = m; ac = a; in_r = i; m2s_ac = sa; m2s_in = si;
    #1;
    if (sa && si) e = a | i;
    else if (sa)  e = a;
    else if (si)  e = i;
    else          e = m;
    checks++;
    if (z !== e) begin
      failures++;
      $display("FAIL mem=%h ac=%h in=%h sel=%b%b: z=%h expected %h", m, a, i, si, sa, z, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 3; s++) begin
      check_one(8'hFF, 8'h00, 8'h00, s == 1, s == 2);
      check_one(8'h00, 8'hFF, 8'h00, s == 1, s == 2);
      check_one(8'h00, 8'h00, 8'hFF, s == 1, s == 2);
    end
    for (int n = 0; n < 600; n++)
      check_one(8'($urandom), 8'($urandom), 8'($urandom), n % 3 == 1, n % 3 == 2);
    check_one(8'h0F, 8'h30, 8'h06, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
