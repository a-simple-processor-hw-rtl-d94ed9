// reg_file: the processor's register file, NREGS registers of WIDTH bits.
//
// Two combinational read ports (Read Addr 1 / Read Data 1 for Rs, Read Addr
// 2 / Read Data 2 for Rt) and one write port (Write Addr, Write Data, Write
// Enable) that writes at the rising clock edge, so an instruction reads its
// operands and writes its result in the same cycle, the new value becoming
// visible to the next instruction. A third read port (dbg_*) lets a test or
// host observe any register. Synchronous active-low reset sets R1 to 0x0001
// and every other register to 0x0000, the initial state used throughout the
// document's examples; the reset itself and the debug port are this design's.
// R0 is an ordinary register.
module reg_file #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned NREGS = 16,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [AW-1:0]    rd_addr1,
  output logic [WIDTH-1:0] rd_data1,
  input  logic [AW-1:0]    rd_addr2,
  output logic [WIDTH-1:0] rd_data2,
  input  logic             we,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [AW-1:0]    dbg_addr,
  output logic [WIDTH-1:0] dbg_data
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= (i == 1) ? WIDTH'(1) : '0;
    end else if (we) begin
      regs[wr_addr] <= wr_data;
    end
  end

  always_comb begin
    rd_data1 = regs[rd_addr1];
    rd_data2 = regs[rd_addr2];
    dbg_data = regs[dbg_addr];
  end

endmodule
