// psim_pkg: types and constants shared by the PSIM processor.
//
// PSIM is an 8-bit accumulator machine. An instruction byte is fetched into
// the instruction register; only its low four bits (IR3-0) select one of the
// sixteen operations below. The control logic produces fifteen active-high
// control signals (ctrl_t) per clock from IR3-0, the timing counter TC2-0 and
// the carry register C. The opcode numbering, the ALU operation codes and the
// list and order of control signals follow the PSIM description; the enum and
// struct names are this design's own.
package psim_pkg;

  localparam int unsigned DATA_W = 8;  // data path width
  localparam int unsigned ADDR_W = 8;  // memory address width (MUX1 output)
  localparam int unsigned TC_W   = 3;  // timing counter width

  // Instruction opcodes, IR3-0.
  typedef enum logic [3:0] {
    OP_HLT = 4'b0000,  // halt: stay in step 2 forever
    OP_NOP = 4'b0001,  // no operation
    OP_INA = 4'b0010,  // AC <- AC+1
    OP_CMA = 4'b0011,  // AC <- AC'
    OP_ISZ = 4'b0100,  // skip the next two bytes if C = 0
    OP_LDI = 4'b0101,  // AC <- immediate byte
    OP_ADI = 4'b0110,  // AC <- AC + immediate byte
    OP_BUN = 4'b0111,  // PC <- immediate byte
    OP_STA = 4'b1000,  // MEM[addr] <- AC
    OP_STI = 4'b1001,  // MEM[addr] <- IN
    OP_LDA = 4'b1010,  // AC <- MEM[addr]
    OP_LDO = 4'b1011,  // OR <- MEM[addr]
    OP_ADA = 4'b1100,  // AC <- AC + MEM[addr]
    OP_AND = 4'b1101,  // AC <- AC & MEM[addr]
    OP_NOR = 4'b1110,  // AC <- ~(AC | MEM[addr])
    OP_XOR = 4'b1111   // AC <- AC ^ MEM[addr]
  } opcode_e;

  // ALU / accumulator control AC_C2-0.
  typedef enum logic [2:0] {
    ALU_HOLD = 3'b000,  // AC <- AC,       C <- C
    ALU_LOAD = 3'b001,  // AC <- DR,       C <- 0
    ALU_CMA  = 3'b010,  // AC <- AC',      C <- C'
    ALU_INC  = 3'b011,  // AC <- AC+1,     C <- carry-out
    ALU_ADD  = 3'b100,  // AC <- AC+DR,    C <- carry-out
    ALU_AND  = 3'b101,  // AC <- AC&DR,    C <- NAND of AC
    ALU_NOR  = 3'b110,  // AC <- (AC|DR)', C <- NOR of AC
    ALU_XOR  = 3'b111   // AC <- AC^DR,    C <- OR of AC
  } alu_op_e;

  // The fifteen control signals, in the order of the control-output table.
  typedef struct packed {
    logic    rst_tc;  // TC <- 0
    logic    inc_tc;  // TC <- TC+1
    logic    inc_pc;  // PC <- PC+1
    logic    ld_pc;   // PC <- DR
    logic    ld_ir;   // IR <- DR
    logic    ld_ar;   // AR <- DR
    logic    ld_dr;   // DR <- MUX2
    logic    ld_or;   // OR <- DR
    alu_op_e ac_c;    // ALU operation
    logic    wr_mem;  // MEM[MUX1] <- DR
    logic    m1s_ar;  // MUX1 selects AR (else PC)
    logic    m2s_ac;  // MUX2 selects AC
    logic    m2s_in;  // MUX2 selects IN
  } ctrl_t;

  // Snapshot of the architectural registers, brought out for observation.
  typedef struct packed {
    logic [ADDR_W-1:0] pc;
    logic [ADDR_W-1:0] ar;
    logic [DATA_W-1:0] dr;
    logic [DATA_W-1:0] ir;
    logic [DATA_W-1:0] ac;
    logic              c;
    logic [TC_W-1:0]   tc;
    logic [DATA_W-1:0] in_r;
  } psim_state_t;

endpackage
