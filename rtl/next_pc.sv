// next_pc: next program counter of the single-cycle processor.
//
// By default the next instruction is PC + 2 (instructions are one 16-bit
// word, memory is byte addressed). For BEQ, the sign-extended offset is
// shifted left by 1 and added to PC + 2; that target is taken when the
// Branch bit is set and the ALU, which subtracted the two registers, reports
// zero. For JMP the next PC is the unsigned 12-bit offset shifted left by 1
// (PC <- offset*2). The adders and the branch mux follow the document's
// datapath; the jump mux placed after the branch mux is this design's own,
// since the document leaves JMP's hardware open. Purely combinational.
// The top bit of sext_off is unused on purpose: shifting left by 1 drops it.
module next_pc #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] pc,
  input  logic [WIDTH-1:0] sext_off,
  input  logic [11:0]      jmp_off,
  input  logic             branch,
  input  logic             zero,
  input  logic             jump,
  output logic [WIDTH-1:0] pc_next
);

  logic [WIDTH-1:0] pc_plus2, off_x2, br_target, seq_or_br, jmp_target;
  logic             take_branch;

  adder #(.WIDTH(WIDTH)) u_pc_plus2 (
    .a(pc), .b(WIDTH'(2)), .sum(pc_plus2)
  );

  // "Shift left by 1"
  always_comb off_x2 = {sext_off[WIDTH-2:0], 1'b0};

  adder #(.WIDTH(WIDTH)) u_branch_adder (
    .a(pc_plus2), .b(off_x2), .sum(br_target)
  );

  always_comb take_branch = branch & zero;

  mux2 #(.WIDTH(WIDTH)) u_branch_mux (
    .d0(pc_plus2), .d1(br_target), .sel(take_branch), .y(seq_or_br)
  );

  always_comb jmp_target = WIDTH'({jmp_off, 1'b0});

  mux2 #(.WIDTH(WIDTH)) u_jump_mux (
    .d0(seq_or_br), .d1(jmp_target), .sel(jump), .y(pc_next)
  );

endmodule
