// tb_psim_mem: self-checking testbench for the 256 x 8 PSIM program memory.
// Fills every word through the program-load port, reads all back through the
// combinational read port (data valid in the same cycle as the address), then
// mixes random WR_MEM writes, program-load writes (which win when both are
// active) and reads against a model array kept here.
module tb_psim_mem;

  logic       clk = 0;
  logic [7:0] ma, wdata, rdata, prog_addr, prog_data;
  logic       wr_mem, prog_we;
  logic [7:0] model [256];

  int checks = 0, failures = 0, cycles = 0;

  psim_mem #(.AW(8), .W(8)) dut (.clk, .ma, .wr_mem, .wdata, .rdata,
                                 .prog_we, .prog_addr, .prog_data);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(input logic [7:0] a);
    ma = a;
    #1;
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      $display("FAIL read %h: got %h expected %h", a, rdata, model[a]);
    end
  endtask

  initial begin
    wr_mem = 0; prog_we = 0; ma = 0; wdata = 0; prog_addr = 0; prog_data = 0;
    for (int a = 0; a < 256; a++) begin
      prog_we = 1; prog_addr = a[7:0]; prog_data = 8'(a * 37 + 11);
      model[a] = prog_data;
      @(posedge clk); #1;
    end
    prog_we = 0;
    for (int a = 0; a < 256; a++) check_read(a[7:0]);
    for (int n = 0; n < 3000; n++) begin
      automatic logic [7:0] a = 8'($urandom);
      ma = a; wdata = 8'($urandom); wr_mem = 1'($urandom);
      prog_we = ($urandom_range(3, 0) == 0); prog_addr = 8'($urandom); prog_data = 8'($urandom);
      @(posedge clk); #1;
      if (prog_we)     model[prog_addr] = prog_data;
      else if (wr_mem) model[a] = wdata;
      wr_mem = 0; prog_we = 0;
      check_read(a);
      check_read(8'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
