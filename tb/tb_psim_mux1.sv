// tb_psim_mux1: self-checking testbench for MUX1, the memory address
// multiplexer. With M1S-AR low the address must be PC, with it high AR; the
// test uses complementary and random PC/AR pairs so that every bit of both
// inputs is seen passing and being blocked.
module tb_psim_mux1;

  logic [7:0] pc, ar, ma;
  logic       m1s_ar;

  int checks = 0, failures = 0;

  psim_mux1 #(.W(8)) dut (.pc, .ar, .m1s_ar, .ma);

  task automatic check_one(input logic [7:0] p, input logic [7:0] a, input logic s);
    pc = p; ar = a; m1s_ar = s;
    #1;
    checks++;
    if (ma !== (s ? a : p)) begin
      failures++;
      $display("FAIL pc=%h ar=%h sel=%b: ma=%h", p, a, s, ma);
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
    check_one(8'h00, 8'hFF, 0);
    check_one(8'h00, 8'hFF, 1);
    check_one(8'hFF, 8'h00, 0);
    check_one(8'hFF, 8'h00, 1);
    check_one(8'hA5, 8'h5A, 0);
    check_one(8'hA5, 8'h5A, 1);
    for (int n = 0; n < 500; n++) check_one(8'($urandom), 8'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
