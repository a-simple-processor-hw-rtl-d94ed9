// hw_cpu: single-cycle processor for the 16-bit HW ISA (top level).
//
// Every instruction completes in one clock cycle. During the cycle the PC
// addresses the instruction memory; the instruction's opcode goes to the
// control unit, Rs and Rt to the register file's two read ports. The ALU
// combines Read Data 1 with either Read Data 2 or the sign-extended 4-bit
// offset. Its result is either written back to the register file (ADD, SUB,
// AND, OR) or used as the data-memory address (LW, SW); LW writes the loaded
// word back to Rt instead. BEQ subtracts the two registers and, on a zero
// result, branches to PC + 2 + offset*2; JMP goes to offset*2; HALT stops
// the PC. At the rising edge the register file, the data memory and the PC
// are updated together.
//
// The datapath (units, muxes and their placement) follows the document's
// single-cycle architecture. This design adds: JMP and HALT hardware, load
// ports for both memories, debug read ports for registers and data memory,
// the reset values (PC 0x0, R1 = 0x0001, other registers 0), and undefined
// opcodes executing as no-operations.
//
// Interface and timing:
//   rst_n            synchronous, active low. Hold it low while loading.
//   imem_load_*      writes one instruction word per clock (any time).
//   dmem_load_*      writes one data word per clock; it takes priority over
//                    stores, so use it only while rst_n is low.
//   dbg_reg_*/dbg_mem_* combinational reads of the architectural state.
//   pc, instr        the instruction executing this cycle.
//   halted           high once a HALT has executed; the state then stays.
//   alu_overflow, alu_zero  flags of this cycle's ALU operation.
module hw_cpu
  import hw_isa_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 65536,
  parameter int unsigned DMEM_BYTES = 65536
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              imem_load_we,
  input  logic [XLEN-1:0]   imem_load_addr,
  input  logic [XLEN-1:0]   imem_load_data,
  input  logic              dmem_load_we,
  input  logic [XLEN-1:0]   dmem_load_addr,
  input  logic [XLEN-1:0]   dmem_load_data,
  input  logic [REG_AW-1:0] dbg_reg_addr,
  output logic [XLEN-1:0]   dbg_reg_data,
  input  logic [XLEN-1:0]   dbg_mem_addr,
  output logic [XLEN-1:0]   dbg_mem_data,
  output logic [XLEN-1:0]   pc,
  output logic [XLEN-1:0]   instr,
  output logic              halted,
  output logic              alu_overflow,
  output logic              alu_zero
);

  instr_t            ins;
  ctrl_t             ctrl;
  logic [XLEN-1:0]   pc_next;
  logic [XLEN-1:0]   rdata1, rdata2, sext_off, alu_b, alu_res, mem_rdata, wb_data;
  logic [REG_AW-1:0] wr_addr;
  logic              dm_we;
  logic [XLEN-1:0]   dm_addr, dm_wdata;

  // ---- fetch ----
  pc_reg #(.WIDTH(XLEN)) u_pc (
    .clk, .rst_n, .halt(ctrl.halt), .pc_next, .pc, .halted
  );

  instr_mem #(.BYTES(IMEM_BYTES), .WIDTH(XLEN)) u_imem (
    .clk, .rd_addr(pc), .rd_data(instr),
    .we(imem_load_we), .wr_addr(imem_load_addr), .wr_data(imem_load_data)
  );

  always_comb ins = instr_t'(instr);

  // ---- decode and register access ----
  control_unit u_ctrl (.opcode(ins.opcode), .ctrl);

  mux2 #(.WIDTH(REG_AW)) u_wr_addr_mux (
    .d0(ins.rd), .d1(ins.rt), .sel(ctrl.wr_addr_rt), .y(wr_addr)
  );

  reg_file #(.WIDTH(XLEN), .NREGS(NREGS)) u_rf (
    .clk, .rst_n,
    .rd_addr1(ins.rs), .rd_data1(rdata1),
    .rd_addr2(ins.rt), .rd_data2(rdata2),
    .we(ctrl.reg_write), .wr_addr, .wr_data(wb_data),
    .dbg_addr(dbg_reg_addr), .dbg_data(dbg_reg_data)
  );

  sign_extend #(.IN_W(4), .OUT_W(XLEN)) u_sext (.in_val(ins.rd), .out_val(sext_off));

  // ---- execute ----
  mux2 #(.WIDTH(XLEN)) u_alu_src_mux (
    .d0(rdata2), .d1(sext_off), .sel(ctrl.alu_src_imm), .y(alu_b)
  );

  alu #(.WIDTH(XLEN)) u_alu (
    .a(rdata1), .b(alu_b), .op(ctrl.alu_op),
    .result(alu_res), .zero(alu_zero), .overflow(alu_overflow)
  );

  // ---- memory ----
  always_comb begin
    dm_we    = dmem_load_we | ctrl.mem_store;
    dm_addr  = dmem_load_we ? dmem_load_addr : alu_res;
    dm_wdata = dmem_load_we ? dmem_load_data : rdata2;
  end

  data_mem #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk, .addr(dm_addr), .wr_data(dm_wdata), .we(dm_we), .rd_data(mem_rdata),
    .dbg_addr(dbg_mem_addr), .dbg_data(dbg_mem_data)
  );

  // ---- write back ----
  mux2 #(.WIDTH(XLEN)) u_wb_mux (
    .d0(alu_res), .d1(mem_rdata), .sel(ctrl.mem_to_reg), .y(wb_data)
  );

  // ---- next PC ----
  next_pc #(.WIDTH(XLEN)) u_next_pc (
    .pc, .sext_off, .jmp_off(instr[11:0]),
    .branch(ctrl.branch), .zero(alu_zero), .jump(ctrl.jump), .pc_next
  );

endmodule
