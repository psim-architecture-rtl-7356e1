// tb_psim_counter: self-checking testbench for the counter used as the PSIM
// program counter (increment, parallel load) and timing counter (increment,
// clear). An 8-bit and a 3-bit instance get random control combinations; a
// model kept here predicts each count, including the wrap from the largest
// value to zero and the priority clear > load > increment.
module tb_psim_counter;

  logic       clk = 0, rst;
  logic       clr, ld, inc;
  logic [7:0] d, q8, m8;
  logic [2:0] q3, m3;
  int         wraps = 0;

  int checks = 0, failures = 0, cycles = 0;

  psim_counter #(.W(8)) dut8 (.clk, .rst, .clr, .ld, .inc, .d, .q(q8));
  psim_counter #(.W(3)) dut3 (.clk, .rst, .clr, .ld, .inc, .d(d[2:0]), .q(q3));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; clr = 0; ld = 0; inc = 0; d = 0;
    @(posedge clk); #1;
    m8 = 0; m3 = 0;
    rst = 0;
    for (int n = 0; n < 10000; n++) begin
      automatic int r = $urandom_range(15, 0);
      clr = (r == 0); ld = (r == 1) || (r == 2 && n[0]); inc = (r >= 2); d = 8'($urandom);
      if (n % 1000 == 0) begin clr = 0; ld = 1; d = 8'hFE; end  // steer towards a wrap
      if (n % 1000 == 1 || n % 1000 == 2) begin clr = 0; ld = 0; inc = 1; end
      @(posedge clk); #1;
      if (clr)      begin m8 = 0; m3 = 0; end
      else if (ld)  begin m8 = d; m3 = d[2:0]; end
      else if (inc) begin
        if (m8 == 8'hFF) wraps++;
        m8 = m8 + 1; m3 = m3 + 1;
      end
      checks++;
      if (q8 !== m8 || q3 !== m3) begin
        failures++;
        $display("FAIL cycle %0d: q8=%h expected %h, q3=%0d expected %0d", n, q8, m8, q3, m3);
      end
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL the 8-bit count never wrapped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
