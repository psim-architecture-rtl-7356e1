// psim_mem: program memory (MEM) of the PSIM processor.
//
// 2**AW words of W bits holding both program and data. Reading is
// combinational: rdata follows MEM[ma] in the same cycle, so the data
// register can load the addressed byte on the next clock edge (DR <- MEM
// during fetch). Writing is synchronous: with WR_MEM high, MEM[ma] <- wdata
// (the data register) on the rising clock edge.
//
// The PSIM description does not say how a program enters the memory. This
// design adds a second write port (prog_we, prog_addr, prog_data) for loading
// a program, used while the processor is held in reset; it takes precedence
// over WR_MEM. The contents are not reset.
module psim_mem #(
  parameter int unsigned AW = 8,
  parameter int unsigned W  = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] ma,
  input  logic          wr_mem,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata,
  input  logic          prog_we,
  input  logic [AW-1:0] prog_addr,
  input  logic [W-1:0]  prog_data
);

  logic [W-1:0] mem [2**AW];

  assign rdata = mem[ma];

  always_ff @(posedge clk) begin
    if (prog_we)     mem[prog_addr] <= prog_data;
    else if (wr_mem) mem[ma]        <= wdata;
  end

endmodule
