// instr_mem: instruction memory of the single-cycle processor.
//
// A separate memory for the program, BYTES bytes of byte-addressed space
// holding 16-bit instruction words at even addresses. The read port is
// combinational: rd_data is the word at byte address rd_addr (bit 0 is
// ignored), so the PC selects this cycle's instruction. A synchronous write
// port (we, wr_addr, wr_data) loads the program; it is this design's own
// addition, as is the default size, the whole 16-bit address space.
// Addresses beyond BYTES wrap. Address bit 0 of both ports is unused on
// purpose: instructions are whole words at even addresses.
module instr_mem #(
  parameter int unsigned BYTES = 65536,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned WORDS = BYTES / 2,
  localparam int unsigned WAW   = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] rd_addr,
  output logic [WIDTH-1:0] rd_data,
  input  logic             we,
  input  logic [WIDTH-1:0] wr_addr,
  input  logic [WIDTH-1:0] wr_data
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr[WAW:1]] <= wr_data;
  end

  always_comb rd_data = mem[rd_addr[WAW:1]];

endmodule
