// psim_top: the PSIM 8-bit accumulator processor.
//
// Datapath: program counter PC and address register AR feed MUX1, whose output
// MA addresses the 256-byte program memory. MUX2 picks the memory read data,
// the accumulator AC or the input register IN as the next value of the data
// register DR. DR is the machine's internal bus: it loads PC (jumps), IR, AR,
// the output register OR, the memory write data and the ALU's second operand.
// The ALU updates AC and the carry register C on every clock, holding them
// unless the control logic asks for an operation. The control logic decodes
// IR3-0, the timing counter TC and C into the fifteen control signals; an
// instruction takes 3 to 7 clocks (see psim_control).
//
// The block structure and every connection follow the PSIM description. What
// it leaves open is this design's own: a synchronous active-high reset that
// clears every register to 0 (so execution starts with a fetch from address
// 0), the program-load port into the memory (prog_we/prog_addr/prog_data, for
// use while rst is high), the in_ld strobe that loads IN from in_data, and the
// halted flag and the dbg register snapshot, which are for observation only.
//
// Interface: out_data is the OR register. halted is high while a HLT
// instruction is being executed (TC=2 with IR3-0 = 0000); only a reset leaves
// that state.
module psim_top
  import psim_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              in_ld,
  input  logic [DATA_W-1:0] in_data,
  input  logic              prog_we,
  input  logic [ADDR_W-1:0] prog_addr,
  input  logic [DATA_W-1:0] prog_data,
  output logic [DATA_W-1:0] out_data,
  output logic              halted,
  output psim_state_t       dbg
);

  ctrl_t             ctl;
  logic [ADDR_W-1:0] pc, ar, ma;
  logic [DATA_W-1:0] dr, ir, ac, in_r, or_r;
  logic [DATA_W-1:0] mem_rdata, mux2_z, ac_next;
  logic              c, c_next;
  logic [TC_W-1:0]   tc;

  // ---- sequential logic -------------------------------------------------
  psim_counter #(.W(ADDR_W)) u_pc (
    .clk, .rst, .clr(1'b0), .ld(ctl.ld_pc), .inc(ctl.inc_pc), .d(dr), .q(pc)
  );

  psim_counter #(.W(TC_W)) u_tc (
    .clk, .rst, .clr(ctl.rst_tc), .ld(1'b0), .inc(ctl.inc_tc), .d('0), .q(tc)
  );

  psim_reg #(.W(ADDR_W)) u_ar (.clk, .rst, .ld(ctl.ld_ar), .d(dr),      .q(ar));
  psim_reg #(.W(DATA_W)) u_dr (.clk, .rst, .ld(ctl.ld_dr), .d(mux2_z),  .q(dr));
  psim_reg #(.W(DATA_W)) u_ir (.clk, .rst, .ld(ctl.ld_ir), .d(dr),      .q(ir));
  psim_reg #(.W(DATA_W)) u_or (.clk, .rst, .ld(ctl.ld_or), .d(dr),      .q(or_r));
  psim_reg #(.W(DATA_W)) u_in (.clk, .rst, .ld(in_ld),     .d(in_data), .q(in_r));
  psim_reg #(.W(DATA_W)) u_ac (.clk, .rst, .ld(1'b1),      .d(ac_next), .q(ac));
  psim_reg #(.W(1))      u_c  (.clk, .rst, .ld(1'b1),      .d(c_next),  .q(c));

  psim_mem #(.AW(ADDR_W), .W(DATA_W)) u_mem (
    .clk, .ma, .wr_mem(ctl.wr_mem), .wdata(dr), .rdata(mem_rdata),
    .prog_we, .prog_addr, .prog_data
  );

  // ---- combinational logic ----------------------------------------------
  psim_mux1 #(.W(ADDR_W)) u_mux1 (.pc, .ar, .m1s_ar(ctl.m1s_ar), .ma);

  psim_mux2 #(.W(DATA_W)) u_mux2 (
    .mem(mem_rdata), .ac, .in_r, .m2s_ac(ctl.m2s_ac), .m2s_in(ctl.m2s_in), .z(mux2_z)
  );

  psim_alu #(.W(DATA_W)) u_alu (
    .op(ctl.ac_c), .ac, .dr, .c, .ac_next, .c_next
  );

  psim_control u_ctl (.ir(opcode_e'(ir[3:0])), .tc, .c, .ctl);

  // ---- outputs ----------------------------------------------------------
  assign out_data = or_r;
  assign halted   = (opcode_e'(ir[3:0]) == OP_HLT) && (tc == 3'd2);
  assign dbg      = '{pc: pc, ar: ar, dr: dr, ir: ir, ac: ac, c: c, tc: tc, in_r: in_r};

  // ---- rules of the micro-operation sequence ----------------------------
  // The two MUX2 selects are never raised together, and the PC never gets
  // both a load and an increment in one clock.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!(ctl.m2s_ac && ctl.m2s_in)) else $error("MUX2 selects both AC and IN");
      assert (!(ctl.ld_pc && ctl.inc_pc))  else $error("PC load and increment together");
      assert (!(ctl.rst_tc && ctl.inc_tc)) else $error("TC reset and increment together");
    end
  end

endmodule
