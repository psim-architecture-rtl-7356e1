// tb_psim_top: end-to-end self-checking testbench for the PSIM processor.
//
// Each run loads a program into memory through the program-load port while
// reset is held, releases reset and lets the processor execute. An
// instruction-level model kept here executes the same memory image. At every
// instruction boundary (the clock at which TC returns to 0) the processor's
// PC, AC, C, OR and all 256 memory bytes must equal the model's, and the
// instruction must have taken its number of clocks: 3 for NOP, INA and CMA,
// 4 for ISZ, LDI, ADI and BUN, 6 for LDA, LDO, ADA, AND, NOR and XOR, 7 for STA
// and STI. On HLT the processor must reach and keep the halted state.
//
// The first run is a small counting loop; the rest are random memory images
// (HLT made rare so that programs run for a while), which mix code and data
// and so also exercise self-modifying code. The IN register is loaded at
// random instruction boundaries. Every opcode, both outcomes of ISZ, a carry
// out of ADD/ADI/INA, an IN load and a halt must each happen at least once.
// The processor is used at its default (and only) size.
module tb_psim_top;
  import psim_pkg::*;

  localparam int RUNS      = 400;
  localparam int MAX_INSTR = 300;

  logic        clk = 0, rst = 1;
  logic        in_ld = 0;
  logic [7:0]  in_data = 0;
  logic        prog_we = 0;
  logic [7:0]  prog_addr = 0, prog_data = 0;
  logic [7:0]  out_data;
  logic        halted;
  psim_state_t dbg;

  psim_top dut (.clk, .rst, .in_ld, .in_data, .prog_we, .prog_addr, .prog_data,
                .out_data, .halted, .dbg);

  // instruction-level model
  logic [7:0] m_mem [256];
  logic [7:0] m_pc, m_ac, m_or, m_in;
  logic       m_c;

  int checks = 0, failures = 0, cycles = 0;
  int op_count [16];
  int isz_skip = 0, isz_noskip = 0, carry_outs = 0, in_loads = 0, halts = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 2_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int instr_clocks(input logic [3:0] op);
    if (op >= 4'd1 && op <= 4'd3) return 3;
    if (op >= 4'd4 && op <= 4'd7) return 4;
    if (op == 4'd8 || op == 4'd9) return 7;
    return 6;
  endfunction

  // Executes one instruction on the model; returns its opcode.
  function automatic logic [3:0] model_step();
    logic [3:0] op;
    logic [7:0] a, v;
    logic [8:0] s;
    op   = m_mem[m_pc][3:0];
    m_pc = m_pc + 1;
    if (op == 4'd0) begin
      return op;
    end
    if (op >= 4'd8) begin  // memory instructions: address byte, then operand
      a    = m_mem[m_pc];
      m_pc = m_pc + 1;
      v    = m_mem[a];
    end
    case (op)
      4'd1: ;
      4'd2: begin s = {1'b0, m_ac} + 9'd1; m_ac = s[7:0]; m_c = s[8]; end
      4'd3: begin m_ac = ~m_ac; m_c = ~m_c; end
      4'd4: begin
        if (!m_c) begin m_pc = m_pc + 2; isz_skip++; end
        else isz_noskip++;
      end
      4'd5: begin m_ac = m_mem[m_pc]; m_c = 0; m_pc = m_pc + 1; end
      4'd6: begin s = m_ac + m_mem[m_pc]; m_ac = s[7:0]; m_c = s[8]; m_pc = m_pc + 1; end
      4'd7: m_pc = m_mem[m_pc];
      4'd8: m_mem[a] = m_ac;
      4'd9: m_mem[a] = m_in;
      4'd10: begin m_ac = v; m_c = 0; end
      4'd11: m_or = v;
      4'd12: begin s = m_ac + v; m_ac = s[7:0]; m_c = s[8]; end
      4'd13: begin m_c = (m_ac != 8'hFF); m_ac = m_ac & v; end
      4'd14: begin m_c = (m_ac == 8'h00); m_ac = ~(m_ac | v); end
      default: begin m_c = (m_ac != 8'h00); m_ac = m_ac ^ v; end
    endcase
    if ((op == 4'd2 || op == 4'd6 || op == 4'd12) && m_c) carry_outs++;
    return op;
  endfunction

  task automatic compare_state(input int run, input int n);
    bit bad;
    bad = (dbg.pc !== m_pc) || (dbg.ac !== m_ac) || (dbg.c !== m_c) || (out_data !== m_or);
    for (int a = 0; a < 256; a++) if (dut.u_mem.mem[a] !== m_mem[a]) bad = 1;
    checks++;
    if (bad) begin
      failures++;
      if (failures < 10)
        $display("FAIL run %0d instr %0d: pc=%h/%h ac=%h/%h c=%b/%b or=%h/%h",
                 run, n, dbg.pc, m_pc, dbg.ac, m_ac, dbg.c, m_c, out_data, m_or);
    end
  endtask

  task automatic load_program(input int run);
    rst = 1;
    for (int a = 0; a < 256; a++) begin
      logic [7:0] b;
      if (run == 0) begin
        // counting loop: AC counts up from 0xFD until INA carries out, then
        // the result is stored, copied to OR, and the program halts.
        case (a[7:0])
          8'h00: b = 8'h05;  8'h01: b = 8'hFD;  // LDI 0xFD
          8'h02: b = 8'h02;                     // INA
          8'h03: b = 8'h04;                     // ISZ (C=0: skip the BUN to 0x08)
          8'h04: b = 8'h07;  8'h05: b = 8'h08;  // BUN 0x08
          8'h06: b = 8'h07;  8'h07: b = 8'h02;  // BUN 0x02
          8'h08: b = 8'h08;  8'h09: b = 8'h90;  // STA 0x90
          8'h0A: b = 8'h1B;  8'h0B: b = 8'h91;  // LDO 0x91 (upper nibble ignored)
          8'h0C: b = 8'h00;                     // HLT
          8'h91: b = 8'h5C;
          default: b = 8'h01;                   // NOP
        endcase
      end else begin
        b = 8'($urandom);
        if (b[3:0] == 4'd0 && $urandom_range(7, 0) != 0) b[3:0] = 4'd1 + 4'($urandom_range(14, 0));
      end
      prog_we = 1; prog_addr = a[7:0]; prog_data = b; m_mem[a] = b;
      @(posedge clk); #1;
    end
    prog_we = 0;
    @(posedge clk); #1;
    rst = 0;
    m_pc = 0; m_ac = 0; m_c = 0; m_or = 0; m_in = 0;
  endtask

  initial begin
    foreach (op_count[i]) op_count[i] = 0;
    for (int run = 0; run < RUNS; run++) begin
      load_program(run);
      // now just after a clock edge with TC=0: first instruction starts
      for (int n = 0; n < MAX_INSTR; n++) begin
        logic [3:0] op;
        int         t;
        compare_state(run, n);
        if ($urandom_range(3, 0) == 0) begin
          in_ld = 1; in_data = 8'($urandom); m_in = in_data; in_loads++;
        end
        op = model_step();
        op_count[op]++;
        if (op == 4'd0) begin
          repeat (2) begin @(posedge clk); #1; in_ld = 0; end
          checks++;
          if (!halted || dbg.pc !== m_pc) begin
            failures++;
            $display("FAIL run %0d: HLT not reached (tc=%0d pc=%h/%h)", run, dbg.tc, dbg.pc, m_pc);
          end
          repeat (5) @(posedge clk);
          #1;
          checks++;
          if (!halted || dbg.tc != 3'd2 || dbg.pc !== m_pc) begin
            failures++;
            $display("FAIL run %0d: halted state not kept", run);
          end
          compare_state(run, n);
          halts++;
          break;
        end
        t = 0;
        do begin
          @(posedge clk); #1;
          in_ld = 0;
          t++;
        end while (dbg.tc != 3'd0 && t < 10);
        checks++;
        if (t != instr_clocks(op)) begin
          failures++;
          $display("FAIL run %0d instr %0d: opcode %0d took %0d clocks, expected %0d",
                   run, n, op, t, instr_clocks(op));
        end
      end
      if (run == 0) begin
        checks++;
        if (out_data !== 8'h5C || dut.u_mem.mem[8'h90] !== 8'h00 || !halted) begin
          failures++;
          $display("FAIL counting loop: or=%h mem[90]=%h", out_data, dut.u_mem.mem[8'h90]);
        end
      end
    end
    // every mechanism must have happened
    for (int o = 0; o < 16; o++) begin
      checks++;
      if (op_count[o] == 0) begin failures++; $display("FAIL opcode %0d never executed", o); end
    end
    checks += 5;
    if (isz_skip == 0)   begin failures++; $display("FAIL ISZ never skipped"); end
    if (isz_noskip == 0) begin failures++; $display("FAIL ISZ never fell through"); end
    if (carry_outs == 0) begin failures++; $display("FAIL no carry out"); end
    if (in_loads == 0)   begin failures++; $display("FAIL IN never loaded"); end
    if (halts == 0)      begin failures++; $display("FAIL never halted"); end
    $display("opcodes executed:");
    for (int o = 0; o < 16; o++) $display("  %s %0d", opcode_e'(o[3:0]), op_count[o]);
    $display("ISZ skip %0d, no skip %0d, carry outs %0d, IN loads %0d, halts %0d",
             isz_skip, isz_noskip, carry_outs, in_loads, halts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
