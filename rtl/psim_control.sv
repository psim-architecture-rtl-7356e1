// psim_control: control logic of the PSIM processor.
//
// A decoder from the opcode IR3-0, the timing counter TC2-0 and the carry C to
// the fifteen active-high control signals (ctrl_t). Each instruction is a
// sequence of micro-operations, one per clock, stepped by TC; the last step of
// an instruction raises RST_TC so that the next clock starts a new fetch.
//
//   TC=0  all      DR <- MEM[PC]                       (fetch)
//   TC=1  all      IR <- DR, PC <- PC+1                (fetch)
//   TC=2  HLT      nothing; TC stays at 2 (halted)
//         NOP      end
//         INA/CMA  AC <- AC+1 / AC <- AC', end
//         ISZ      if C=0: PC <- PC+1
//         LDI,ADI,BUN and all memory instructions:  DR <- MEM[PC]
//   TC=3  ISZ      if C=0: PC <- PC+1, end             (skips two bytes)
//         LDI/ADI  AC <- DR / AC <- AC+DR, PC <- PC+1, end
//         BUN      PC <- DR, end
//         memory instructions (IR3=1): AR <- DR, PC <- PC+1
//   TC=4  IR3=1    DR <- MEM[AR] (STA: DR <- AC, STI: DR <- IN)
//   TC=5  STA/STI  MEM[AR] <- DR
//         LDA      AC <- DR, end
//         LDO      OR <- DR, end
//         ADA/AND/NOR/XOR  AC <- AC op DR, end
//   TC=6  STA/STI  end
//
// MUX1 selects AR in every step with TC2=1, and STA/STI keep their MUX2
// select raised in steps 4 to 6, which is what the gate-level control of the
// PSIM description produces in those steps. The sequences above are read from
// that description's control equations and its RST_TC table; writing them as
// a step table rather than as minimised gates is this design's choice. In the
// (IR, TC) pairs that no instruction reaches, which the description leaves as
// don't-cares, this decoder raises only RST_TC. Purely combinational.
module psim_control
  import psim_pkg::*;
(
  input  opcode_e   ir,
  input  logic [2:0] tc,
  input  logic       c,
  output ctrl_t      ctl
);

  logic mem_instr;  // IR3 = 1: instructions with a memory-address operand
  logic store;      // STA or STI

  always_comb begin
    mem_instr = ir[3];
    store     = (ir == OP_STA) || (ir == OP_STI);
    ctl       = '0;
    ctl.ac_c  = ALU_HOLD;

    unique case (tc)
      3'd0: begin
        ctl.ld_dr  = 1'b1;
        ctl.inc_tc = 1'b1;
      end
      3'd1: begin
        ctl.ld_ir  = 1'b1;
        ctl.inc_pc = 1'b1;
        ctl.inc_tc = 1'b1;
      end
      3'd2: begin
        unique case (ir)
          OP_HLT: ;
          OP_NOP: ctl.rst_tc = 1'b1;
          OP_INA: begin ctl.ac_c = ALU_INC; ctl.rst_tc = 1'b1; end
          OP_CMA: begin ctl.ac_c = ALU_CMA; ctl.rst_tc = 1'b1; end
          OP_ISZ: begin ctl.inc_pc = ~c;    ctl.inc_tc = 1'b1; end
          default: begin  // LDI, ADI, BUN and the memory instructions
            ctl.ld_dr  = 1'b1;
            ctl.inc_tc = 1'b1;
          end
        endcase
      end
      3'd3: begin
        if (mem_instr) begin
          ctl.ld_ar  = 1'b1;
          ctl.inc_pc = 1'b1;
          ctl.inc_tc = 1'b1;
        end else begin
          ctl.rst_tc = 1'b1;
          unique case (ir)
            OP_ISZ: ctl.inc_pc = ~c;
            OP_LDI: begin ctl.ac_c = ALU_LOAD; ctl.inc_pc = 1'b1; end
            OP_ADI: begin ctl.ac_c = ALU_ADD;  ctl.inc_pc = 1'b1; end
            OP_BUN: ctl.ld_pc = 1'b1;
            default: ;  // not reached
          endcase
        end
      end
      3'd4: begin
        if (mem_instr) begin
          ctl.m1s_ar = 1'b1;
          ctl.ld_dr  = 1'b1;
          ctl.m2s_ac = (ir == OP_STA);
          ctl.m2s_in = (ir == OP_STI);
          ctl.inc_tc = 1'b1;
        end else begin
          ctl.rst_tc = 1'b1;
        end
      end
      3'd5: begin
        if (mem_instr) begin
          ctl.m1s_ar = 1'b1;
          ctl.m2s_ac = (ir == OP_STA);
          ctl.m2s_in = (ir == OP_STI);
          if (store) begin
            ctl.wr_mem = 1'b1;
            ctl.inc_tc = 1'b1;
          end else begin
            ctl.rst_tc = 1'b1;
            unique case (ir)
              OP_LDA:  ctl.ac_c  = ALU_LOAD;
              OP_LDO:  ctl.ld_or = 1'b1;
              OP_ADA:  ctl.ac_c  = ALU_ADD;
              OP_AND:  ctl.ac_c  = ALU_AND;
              OP_NOR:  ctl.ac_c  = ALU_NOR;
              OP_XOR:  ctl.ac_c  = ALU_XOR;
              default: ;  // not reached
            endcase
          end
        end else begin
          ctl.rst_tc = 1'b1;
        end
      end
      3'd6: begin
        ctl.rst_tc = 1'b1;
        if (store) begin
          ctl.m1s_ar = 1'b1;
          ctl.m2s_ac = (ir == OP_STA);
          ctl.m2s_in = (ir == OP_STI);
        end
      end
      default: ctl.rst_tc = 1'b1;  // TC=7 is never reached
    endcase
  end

endmodule
