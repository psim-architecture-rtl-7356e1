// tb_psim_control: self-checking testbench for the PSIM control logic.
//
// Applies every combination of opcode IR3-0, timing step TC2-0 and carry C.
// For each (opcode, step, C) that an instruction actually reaches, the fifteen
// control signals must equal the reference table below. Each entry is the
// 15-bit control word, bit 14 RST_TC down to bit 0 M2S_IN in ctrl_t order,
// that PSIM's published gate-level control equations give for that input;
// the comment on each line names the signals that are high. Steps 0 and 1
// are the fetch, the same for every opcode. Steps that no instruction reaches
// must raise RST_TC (this design's choice for the don't-care cells). It then
// walks each opcode through its steps using the decoder's own INC_TC/RST_TC
// and checks the step at which the instruction ends: step 2 for NOP, INA and CMA, 3 for ISZ, LDI, ADI and BUN,
// 5 for LDA to XOR, 6 for STA and STI, never for HLT.
module tb_psim_control;
  import psim_pkg::*;

  opcode_e    ir;
  logic [2:0] tc;
  logic       c;
  ctrl_t      ctl;

  int checks = 0, failures = 0;

  psim_control dut (.ir, .tc, .c, .ctl);

  // Reference values: returns 1 and the expected word for a reached state.
  function automatic bit ref_ctl(input logic [3:0] op, input logic [2:0] t,
                                 input logic cc, output logic [14:0] exp);
    logic c;
    c   = cc;
    exp = '0;
    if (t == 3'd0) begin exp = 15'h2100; return 1; end  // INC_TC LD_DR
    if (t == 3'd1) begin exp = 15'h3400; return 1; end  // INC_TC INC_PC LD_IR
    unique case ({op, t})
      {4'd0, 3'd2}: exp = 15'h0000;  // nothing
      {4'd1, 3'd2}: exp = 15'h4000;  // RST_TC
      {4'd2, 3'd2}: exp = 15'h4030;  // RST_TC AC_C1 AC_C0
      {4'd3, 3'd2}: exp = 15'h4020;  // RST_TC AC_C1
      {4'd4, 3'd2}: exp = c ? 15'h2000 : 15'h3000;  // C=1: INC_TC; C=0: INC_TC INC_PC
      {4'd4, 3'd3}: exp = c ? 15'h4000 : 15'h5000;  // C=1: RST_TC; C=0: RST_TC INC_PC
      {4'd5, 3'd2}: exp = 15'h2100;  // INC_TC LD_DR
      {4'd5, 3'd3}: exp = 15'h5010;  // RST_TC INC_PC AC_C0
      {4'd6, 3'd2}: exp = 15'h2100;  // INC_TC LD_DR
      {4'd6, 3'd3}: exp = 15'h5040;  // RST_TC INC_PC AC_C2
      {4'd7, 3'd2}: exp = 15'h2100;  // INC_TC LD_DR
      {4'd7, 3'd3}: exp = 15'h4800;  // RST_TC LD_PC
      {4'd8, 3'd2}: exp = 15'h2100;  // INC_TC LD_DR
      {4'd8, 3'd3}: exp = 15'h3200;  // INC_TC INC_PC LD_AR
      {4'd8, 3'd4}: exp = 15'h2106;  // INC_TC LD_DR M1S_AR M2S_AC
      {4'd8, 3'd5}: exp = 15'h200e;  // INC_TC WR_MEM M1S_AR M2S_AC
      {4'd8, 3'd6}: exp = 15'h4006;  // RST_TC M1S_AR M2S_AC
      {4'd9, 3'd2}: exp = 15'h2100;  // INC_TC LD_DR
      {4'd9, 3'd3}: exp = 15'h3200;  // INC_TC INC_PC LD_AR
      {4'd9, 3'd4}: exp = 15'h2105;  // INC_TC LD_DR M1S_AR M2S_IN
      {4'd9, 3'd5}: exp = 15'h200d;  // INC_TC WR_MEM M1S_AR M2S_IN
      {4'd9, 3'd6}: exp = 15'h4005;  // RST_TC M1S_AR M2S_IN
      {4'd10, 3'd2}: exp = 15'h2100;  // INC_TC LD_DR
      {4'd10, 3'd3}: exp = 15'h3200;  // INC_TC INC_PC LD_AR
      {4'd10, 3'd4}: exp = 15'h2104;  // INC_TC LD_DR M1S_AR
      {4'd10, 3'd5}: exp = 15'h4014;  // RST_TC AC_C0 M1S_AR
      {4'd11, 3'd2}: exp = 15'h2100;  // INC_TC LD_DR
      {4'd11, 3'd3}: exp = 15'h3200;  // INC_TC INC_PC LD_AR
      {4'd11, 3'd4}: exp = 15'h2104;  // INC_TC LD_DR M1S_AR
      {4'd11, 3'd5}: exp = 15'h4084;  // RST_TC LD_OR M1S_AR
      {4'd12, 3'd2}: exp = 15'h2100;  // INC_TC LD_DR
      {4'd12, 3'd3}: exp = 15'h3200;  // INC_TC INC_PC LD_AR
      {4'd12, 3'd4}: exp = 15'h2104;  // INC_TC LD_DR M1S_AR
      {4'd12, 3'd5}: exp = 15'h4044;  // RST_TC AC_C2 M1S_AR
      {4'd13, 3'd2}: exp = 15'h2100;  // INC_TC LD_DR
      {4'd13, 3'd3}: exp = 15'h3200;  // INC_TC INC_PC LD_AR
      {4'd13, 3'd4}: exp = 15'h2104;  // INC_TC LD_DR M1S_AR
      {4'd13, 3'd5}: exp = 15'h4054;  // RST_TC AC_C2 AC_C0 M1S_AR
      {4'd14, 3'd2}: exp = 15'h2100;  // INC_TC LD_DR
      {4'd14, 3'd3}: exp = 15'h3200;  // INC_TC INC_PC LD_AR
      {4'd14, 3'd4}: exp = 15'h2104;  // INC_TC LD_DR M1S_AR
      {4'd14, 3'd5}: exp = 15'h4064;  // RST_TC AC_C2 AC_C1 M1S_AR
      {4'd15, 3'd2}: exp = 15'h2100;  // INC_TC LD_DR
      {4'd15, 3'd3}: exp = 15'h3200;  // INC_TC INC_PC LD_AR
      {4'd15, 3'd4}: exp = 15'h2104;  // INC_TC LD_DR M1S_AR
      {4'd15, 3'd5}: exp = 15'h4074;  // RST_TC AC_C2 AC_C1 AC_C0 M1S_AR
      default: return 0;
    endcase
    return 1;
  endfunction

  function automatic int end_step(input logic [3:0] op);
    if (op == 4'd0)      return -1;
    else if (op <= 4'd3) return 2;
    else if (op <= 4'd7) return 3;
    else if (op <= 4'd9) return 6;
    else                 return 5;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [14:0] exp;
    // exhaustive table comparison
    for (int o = 0; o < 16; o++) begin
      for (int t = 0; t < 8; t++) begin
        for (int k = 0; k < 2; k++) begin
          ir = opcode_e'(o[3:0]); tc = t[2:0]; c = k[0];
          #1;
          checks++;
          if (ref_ctl(o[3:0], t[2:0], k[0], exp)) begin
            if (ctl !== exp) begin
              failures++;
              $display("FAIL ir=%0d tc=%0d c=%0d: got %h expected %h", o, t, k, ctl, exp);
            end
          end else if (!ctl.rst_tc) begin
            failures++;
            $display("FAIL ir=%0d tc=%0d c=%0d: unreached step without RST_TC", o, t, k);
          end
        end
      end
    end
    // length of each instruction, stepped by the decoder itself
    for (int o = 0; o < 16; o++) begin
      for (int k = 0; k < 2; k++) begin
        int last;
        ir = opcode_e'(o[3:0]); c = k[0]; tc = 3'd0; last = -1;
        for (int n = 0; n < 8; n++) begin
          #1;
          if (ctl.rst_tc) begin last = int'(tc); break; end
          if (!ctl.inc_tc) break;  // held (HLT)
          tc = tc + 3'd1;
        end
        checks++;
        if (last != end_step(o[3:0])) begin
          failures++;
          $display("FAIL ir=%0d c=%0d: ends at step %0d, expected %0d", o, k, last, end_step(o[3:0]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
