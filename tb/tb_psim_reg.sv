// tb_psim_reg: self-checking testbench for the parallel-load register used
// for AR, DR, IR, OR, IN, AC and C. An 8-bit and a 1-bit instance get random
// load enables and data for many clocks; a model register kept here predicts
// each output. Reset must clear both to zero.
module tb_psim_reg;

  logic       clk = 0, rst;
  logic       ld8, ld1;
  logic [7:0] d8, q8, m8;
  logic       d1, q1, m1;

  int checks = 0, failures = 0, cycles = 0;

  psim_reg #(.W(8)) dut8 (.clk, .rst, .ld(ld8), .d(d8), .q(q8));
  psim_reg #(.W(1)) dut1 (.clk, .rst, .ld(ld1), .d(d1), .q(q1));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (q8 !== m8 || q1 !== m1) begin
      failures++;
      $display("FAIL q8=%h expected %h, q1=%b expected %b", q8, m8, q1, m1);
    end
  endtask

  initial begin
    rst = 1; ld8 = 0; ld1 = 0; d8 = 8'hAA; d1 = 1;
    @(posedge clk); #1;
    m8 = 0; m1 = 0;
    compare();
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      ld8 = 1'($urandom); ld1 = 1'($urandom); d8 = 8'($urandom); d1 = 1'($urandom);
      if (n == 1000) rst = 1;
      @(posedge clk); #1;
      if (rst) begin m8 = 0; m1 = 0; end
      else begin
        if (ld8) m8 = d8;
        if (ld1) m1 = d1;
      end
      rst = 0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
