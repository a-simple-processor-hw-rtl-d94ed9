// tb_hw_cpu: end-to-end self-checking test of the single-cycle processor at
// its default size (64 KiB instruction and data memories).
//
// Part 1 runs three small example programs and checks their final state and
// cycle counts (one instruction per clock):
//   - ADD then SW of the result (R2 = 2, M[4..5] = 02 00, HALT at 0x4);
//   - two LWs, AND, SW (R3 = 0x000F, R4 = 0x0104, R5 = 0x0004);
//   - a multiply loop with BEQ, ADD, SUB and JMP that computes R8 = 3 * 2
//     and leaves the loop by a taken BEQ to the HALT at 0xA.
// It also runs a three-instruction ADD/SUB/OR example and the raw
// instruction words 0x2368 (ADD R3,R6,R8), 0x1368 (SW R6,-8(R3)) and 0x712E
// (BEQ R1,R2,-2, not taken), checking that the encodings decode as the ISA
// table says, and an ADD and a SUB that overflow, checking the ALU's
// overflow output.
// Part 2 runs random programs in lockstep with an instruction-level model of
// the ISA written here from the instruction table: after every clock the PC,
// the halted flag, all 16 registers and the last stored word must match.
// Each mechanism (every opcode, taken and untaken branches, jumps, ALU
// overflow, undefined opcodes as no-operations, halt) is counted and must
// occur at least once.
module tb_hw_cpu;
  import hw_isa_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        imem_load_we = 0, dmem_load_we = 0;
  logic [15:0] imem_load_addr = 0, imem_load_data = 0, dmem_load_addr = 0, dmem_load_data = 0;
  logic [3:0]  dbg_reg_addr = 0;
  logic [15:0] dbg_reg_data, dbg_mem_addr = 0, dbg_mem_data, pc, instr;
  logic        halted, alu_overflow, alu_zero;

  hw_cpu dut (
    .clk, .rst_n, .imem_load_we, .imem_load_addr, .imem_load_data,
    .dmem_load_we, .dmem_load_addr, .dmem_load_data,
    .dbg_reg_addr, .dbg_reg_data, .dbg_mem_addr, .dbg_mem_data,
    .pc, .instr, .halted, .alu_overflow, .alu_zero
  );

  always #50 clk = ~clk;   // wide period: a full state compare fits between edges

  int checks = 0, failures = 0;

  // ---------------- reference model of the ISA ----------------
  logic [15:0] m_r [16];
  logic [7:0]  m_d [65536];
  logic [15:0] m_i [32768];
  logic [15:0] m_pc;
  bit          m_halt;
  logic [15:0] m_last_store;
  bit          m_stored;

  typedef enum int {C_ADD, C_SUB, C_AND, C_OR, C_LW, C_SW, C_BEQ_TAKEN, C_BEQ_NOT,
                    C_JMP, C_HALT, C_OVF, C_NOP, C_N} mech_e;
  int cnt [C_N];

  function automatic logic [15:0] enc(input logic [3:0] op, input int s, input int t, input int d);
    return {op, 4'(s), 4'(t), 4'(d)};
  endfunction

  function automatic logic [15:0] m_word(input logic [15:0] a);
    return {m_d[16'(a + 16'd1)], m_d[a]};
  endfunction

  task automatic model_reset();
    for (int i = 0; i < 16; i++) m_r[i] = (i == 1) ? 16'h0001 : 16'h0000;
    m_pc = '0; m_halt = 0;
  endtask

  task automatic model_step();
    logic [15:0] ins, a, b, res, off, addr;
    logic [3:0]  s, t, d;
    int          full;
    m_stored = 0;
    if (m_halt) return;
    ins = m_i[m_pc[15:1]];
    s = ins[11:8]; t = ins[7:4]; d = ins[3:0];
    a = m_r[s]; b = m_r[t];
    off = {{12{d[3]}}, d};
    m_pc = m_pc + 16'd2;
    case (ins[15:12])
      4'b0010: begin
        full = int'($signed(a)) + int'($signed(b));
        if (full > 32767 || full < -32768) cnt[C_OVF]++;
        m_r[d] = a + b; cnt[C_ADD]++;
      end
      4'b0011: begin
        full = int'($signed(a)) - int'($signed(b));
        if (full > 32767 || full < -32768) cnt[C_OVF]++;
        m_r[d] = a - b; cnt[C_SUB]++;
      end
      4'b0100: begin m_r[d] = a & b; cnt[C_AND]++; end
      4'b0101: begin m_r[d] = a | b; cnt[C_OR]++;  end
      4'b0000: begin addr = a + off; m_r[t] = m_word(addr); cnt[C_LW]++; end
      4'b0001: begin
        addr = a + off;
        m_d[addr] = b[7:0]; m_d[16'(addr + 16'd1)] = b[15:8];
        m_last_store = addr; m_stored = 1; cnt[C_SW]++;
      end
      4'b0111: begin
        if (a == b) begin m_pc = m_pc + (off << 1); cnt[C_BEQ_TAKEN]++; end
        else cnt[C_BEQ_NOT]++;
      end
      4'b1000: begin m_pc = {3'b000, ins[11:0], 1'b0}; cnt[C_JMP]++; end
      4'b1111: begin m_pc = m_pc - 16'd2; m_halt = 1; cnt[C_HALT]++; end
      default: cnt[C_NOP]++;
    endcase
  endtask

  // ---------------- DUT helpers ----------------

  task automatic peek_reg(input int r, output logic [15:0] v);
    dbg_reg_addr = 4'(r); #1; v = dbg_reg_data;
  endtask

  task automatic peek_mem(input logic [15:0] a, output logic [15:0] v);
    dbg_mem_addr = a; #1; v = dbg_mem_data;
  endtask

  task automatic load_imem(input logic [15:0] a, input logic [15:0] w);
    imem_load_we = 1; imem_load_addr = a; imem_load_data = w;
    @(posedge clk); #1;
    imem_load_we = 0;
    m_i[a[15:1]] = w;
  endtask

  task automatic load_dmem(input logic [15:0] a, input logic [15:0] w);
    dmem_load_we = 1; dmem_load_addr = a; dmem_load_data = w;
    @(posedge clk); #1;
    dmem_load_we = 0;
    m_d[a] = w[7:0]; m_d[16'(a + 16'd1)] = w[15:8];
  endtask

  task automatic expect16(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h, expected %h", what, got, exp);
    end
  endtask

  // Compare the whole architectural state with the model.
  task automatic compare_state(input string tag);
    logic [15:0] v;
    expect16(pc, m_pc, {tag, " PC"});
    checks++;
    if (halted !== m_halt) begin failures++; $display("FAIL %s halted=%b", tag, halted); end
    for (int r = 0; r < 16; r++) begin
      peek_reg(r, v);
      expect16(v, m_r[r], $sformatf("%s R%0d", tag, r));
    end
    if (m_stored) begin
      peek_mem(m_last_store, v);
      expect16(v, m_word(m_last_store), $sformatf("%s M[%h]", tag, m_last_store));
    end
  endtask

  // Hold reset, load a program (rest of memory already HALT), release.
  task automatic start_program(input logic [15:0] prog [], input int n);
    rst_n = 0;
    for (int i = 0; i < n; i++) load_imem(16'(2 * i), prog[i]);
    @(posedge clk); #1;
    model_reset();
    rst_n = 1;
  endtask

  // Run until halted; returns the number of clock edges taken.
  task automatic run_to_halt(input int max_cycles, output int cycles);
    cycles = 0;
    while (!halted && cycles < max_cycles) begin
      @(posedge clk); #1;
      model_step();
      cycles++;
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] prog [];
    logic [15:0] v;
    int          cycles;

    // fill both memories: instruction memory with HALT, data memory with a
    // random pattern mirrored in the model, so that every read has a defined value
    rst_n = 0;
    for (int a = 0; a < 65536; a += 2) begin
      imem_load_we = 1; imem_load_addr = 16'(a); imem_load_data = 16'hF000;
      dmem_load_we = 1; dmem_load_addr = 16'(a); dmem_load_data = 16'($urandom);
      @(posedge clk); #1;
      m_i[a / 2] = 16'hF000;
      m_d[a] = dmem_load_data[7:0]; m_d[a + 1] = dmem_load_data[15:8];
    end
    imem_load_we = 0; dmem_load_we = 0;

    // ---- example 0: ADD R1, R1, R2 ; SW R2, 4(R0) ; HALT ----
    load_dmem(16'h0000, 16'h000F);
    load_dmem(16'h0002, 16'h0104);
    load_dmem(16'h0004, 16'h0000);
    prog = '{enc(OP_ADD, 1, 1, 2), enc(OP_SW, 0, 2, 4), 16'hF000};
    start_program(prog, 3);
    run_to_halt(100, cycles);
    expect16(16'(cycles), 16'd3, "ex0 cycles to halt");
    expect16(pc, 16'h0004, "ex0 PC at HALT");
    peek_reg(2, v); expect16(v, 16'h0002, "ex0 R2");
    peek_mem(16'h0004, v); expect16(v, 16'h0002, "ex0 M[4..5]");
    compare_state("ex0");
    // the halted machine stays put
    repeat (5) @(posedge clk); #1;
    expect16(pc, 16'h0004, "ex0 PC stays");
    compare_state("ex0 after halt");

    // ---- example 1: LW R3,0(R0); LW R4,2(R0); AND R3,R4,R5; SW R5,4(R0); HALT ----
    load_dmem(16'h0004, 16'h0000);
    prog = '{enc(OP_LW, 0, 3, 0), enc(OP_LW, 0, 4, 2), enc(OP_AND, 3, 4, 5),
             enc(OP_SW, 0, 5, 4), 16'hF000};
    start_program(prog, 5);
    run_to_halt(100, cycles);
    expect16(16'(cycles), 16'd5, "ex1 cycles to halt");
    peek_reg(3, v); expect16(v, 16'h000F, "ex1 R3");
    peek_reg(4, v); expect16(v, 16'h0104, "ex1 R4");
    peek_reg(5, v); expect16(v, 16'h0004, "ex1 R5");
    peek_mem(16'h0004, v); expect16(v, 16'h0004, "ex1 M[4..5]");
    compare_state("ex1");

    // ---- example 2: R9 = 2, R10 = 3; R8 = R10 * R9 by repeated addition ----
    prog = '{enc(OP_SUB, 8, 8, 8),     // 0x0 SUB R8, R8, R8
             enc(OP_BEQ, 9, 0, 3),     // 0x2 BEQ R9, R0, 3
             enc(OP_ADD, 10, 8, 8),    // 0x4 ADD R10, R8, R8
             enc(OP_SUB, 9, 1, 9),     // 0x6 SUB R9, R1, R9
             {OP_JMP, 12'd1},          // 0x8 JMP 1
             16'hF000};                // 0xA HALT
    start_program(prog, 6);
    // preset R9 and R10 through the datapath-independent register array
    dut.u_rf.regs[9]  = 16'h0002; m_r[9]  = 16'h0002;
    dut.u_rf.regs[10] = 16'h0003; m_r[10] = 16'h0003;
    cycles = 0;
    while (!halted && cycles < 100) begin
      @(posedge clk); #1;
      model_step();
      cycles++;
      compare_state("ex2 step");
    end
    expect16(16'(cycles), 16'd11, "ex2 cycles to halt");
    expect16(pc, 16'h000A, "ex2 PC at HALT");
    peek_reg(8, v);  expect16(v, 16'h0006, "ex2 R8");
    peek_reg(9, v);  expect16(v, 16'h0000, "ex2 R9");
    peek_reg(10, v); expect16(v, 16'h0003, "ex2 R10");

    // ---- instruction-memory example: ADD R0,R1,R2; SUB R2,R1,R3; OR R3,R3,R4 ----
    prog = '{enc(OP_ADD, 0, 1, 2), enc(OP_SUB, 2, 1, 3), enc(OP_OR, 3, 3, 4), 16'hF000};
    start_program(prog, 4);
    run_to_halt(100, cycles);
    expect16(16'(cycles), 16'd4, "im example cycles to halt");
    peek_reg(2, v); expect16(v, 16'h0001, "im example R2");
    peek_reg(3, v); expect16(v, 16'h0000, "im example R3");
    peek_reg(4, v); expect16(v, 16'h0000, "im example R4");
    compare_state("im example");

    // ---- the ISA's printed encoding examples, as raw instruction words ----
    // 0x2368 ADD R3,R6,R8   0x1368 SW R6,-8(R3)   0x712E BEQ R1,R2,-2
    load_dmem(16'h0008, 16'h0000);
    prog = '{16'h2368, 16'h1368, 16'h712E, 16'hF000};
    start_program(prog, 4);
    dut.u_rf.regs[3] = 16'h0010; m_r[3] = 16'h0010;
    dut.u_rf.regs[6] = 16'h0005; m_r[6] = 16'h0005;
    dut.u_rf.regs[2] = 16'h0002; m_r[2] = 16'h0002;
    run_to_halt(100, cycles);
    expect16(16'(cycles), 16'd4, "encoding example cycles to halt");
    peek_reg(8, v); expect16(v, 16'h0015, "encoding example R8 = R3 + R6");
    peek_mem(16'h0008, v); expect16(v, 16'h0005, "encoding example M[0x10 - 8]");
    compare_state("encoding example");

    // ---- ALU overflow: ADD R2,R3,R5 (0x7FFF + 1); SUB R4,R3,R6 (0x8000 - 1) ----
    prog = '{enc(OP_ADD, 2, 3, 5), enc(OP_SUB, 4, 3, 6), enc(OP_AND, 2, 3, 7), 16'hF000};
    start_program(prog, 4);
    dut.u_rf.regs[2] = 16'h7FFF; m_r[2] = 16'h7FFF;
    dut.u_rf.regs[3] = 16'h0001; m_r[3] = 16'h0001;
    dut.u_rf.regs[4] = 16'h8000; m_r[4] = 16'h8000;
    #1;
    checks++; if (alu_overflow !== 1'b1) begin failures++; $display("FAIL overflow flag on ADD"); end
    @(posedge clk); #1; model_step();
    checks++; if (alu_overflow !== 1'b1) begin failures++; $display("FAIL overflow flag on SUB"); end
    @(posedge clk); #1; model_step();
    checks++; if (alu_overflow !== 1'b0) begin failures++; $display("FAIL overflow flag on AND"); end
    run_to_halt(100, cycles);
    peek_reg(5, v); expect16(v, 16'h8000, "overflow ADD result");
    peek_reg(6, v); expect16(v, 16'h7FFF, "overflow SUB result");
    compare_state("overflow");

    // ---- part 2: random programs in lockstep with the model ----
    for (int p = 0; p < 60; p++) begin
      prog = new[32];
      for (int i = 0; i < 32; i++) begin
        logic [3:0] op;
        op = 4'($urandom);
        if (op == OP_HALT && $urandom_range(0, 3) != 0) op = OP_ADD;
        if (op == OP_JMP) prog[i] = {OP_JMP, 12'($urandom_range(0, 31))};
        else if (op == OP_BEQ && $urandom_range(0, 1) == 1) begin
          int r = $urandom_range(0, 15);
          prog[i] = enc(op, r, r, $urandom_range(0, 15));   // always taken
        end
        else prog[i] = 16'({op, 12'($urandom)});
        // start with loads so registers hold large values and ADD/SUB can overflow
        if (i < 6) prog[i] = enc(OP_LW, 0, $urandom_range(2, 15), $urandom_range(0, 15));
      end
      start_program(prog, 32);
      for (int c = 0; c < 80; c++) begin
        @(posedge clk); #1;
        model_step();
        compare_state($sformatf("prog %0d cycle %0d", p, c));
      end
    end

    for (int k = 0; k < C_N; k++) begin
      $display("mechanism %s: %0d", mech_e'(k), cnt[k]);
      checks++;
      if (cnt[k] == 0) begin failures++; $display("FAIL mechanism %s never happened", mech_e'(k)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
