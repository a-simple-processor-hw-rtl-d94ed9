// hw_isa_pkg: types and constants shared by the HW ISA single-cycle processor.
//
// The HW ISA is a 16-bit load/store instruction set with sixteen 16-bit
// registers. Every instruction is one 16-bit word whose top four bits are the
// opcode. Three formats exist:
//   arithmetic     [15:12] opcode  [11:8] Rs  [7:4] Rt  [3:0] Rd
//   memory/branch  [15:12] opcode  [11:8] Rs  [7:4] Rt  [3:0] signed offset
//   jump           [15:12] opcode  [11:0] unsigned offset
// The opcode values and field positions are those of the ISA. The ALU
// operation code, the control-word layout and the treatment of undefined
// opcodes (no operation) are this design's own choices.
package hw_isa_pkg;

  localparam int unsigned XLEN    = 16;  // data, address and instruction width
  localparam int unsigned NREGS   = 16;  // R0..R15
  localparam int unsigned REG_AW  = 4;   // register ID width

  typedef enum logic [3:0] {
    OP_LW   = 4'b0000,
    OP_SW   = 4'b0001,
    OP_ADD  = 4'b0010,
    OP_SUB  = 4'b0011,
    OP_AND  = 4'b0100,
    OP_OR   = 4'b0101,
    OP_BEQ  = 4'b0111,
    OP_JMP  = 4'b1000,
    OP_HALT = 4'b1111
  } opcode_e;

  // ALU operation: deliberately not the instruction opcode, the control unit
  // translates one into the other.
  typedef enum logic [1:0] {
    ALU_ADD = 2'd0,
    ALU_SUB = 2'd1,
    ALU_AND = 2'd2,
    ALU_OR  = 2'd3
  } alu_op_e;

  // Control word produced by the control unit for one instruction.
  typedef struct packed {
    logic    reg_write;    // write the register file
    logic    mem_store;    // write the data memory
    logic    mem_to_reg;   // "Mem" bit: write-back from memory instead of ALU
    logic    alu_src_imm;  // ALU operand B is the sign-extended offset
    logic    wr_addr_rt;   // register write address is Rt instead of Rd
    logic    branch;       // BEQ: take the branch when the ALU result is zero
    logic    jump;         // JMP: PC <- offset*2
    logic    halt;         // HALT: stop execution
    alu_op_e alu_op;       // operation the ALU performs
  } ctrl_t;

  // Instruction word, arithmetic/memory/branch view.
  typedef struct packed {
    logic [3:0] opcode;
    logic [3:0] rs;
    logic [3:0] rt;
    logic [3:0] rd;        // Rd, or the 4-bit signed offset
  } instr_t;

endpackage
