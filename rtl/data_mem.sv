// data_mem: data memory of the single-cycle processor.
//
// BYTES bytes, byte addressed, read and written one 16-bit word at a time in
// little-endian order: the word at address a is {M[a+1], M[a]}, its low byte
// at the lower address. The read (rd_data) is combinational; when we (Mem
// Store) is high the word wr_data is written at the rising clock edge, low
// byte to addr and high byte to addr+1. Any address is allowed; addr+1 wraps
// at the end of memory. A second, read-only port (dbg_addr/dbg_data) lets a
// test or host inspect memory. Byte addressing, word accesses and the byte
// order follow the document; the size (the full 16-bit address space),
// alignment freedom, port timing and debug port are this design's choices.
module data_mem #(
  parameter int unsigned BYTES = 65536,
  localparam int unsigned AW   = $clog2(BYTES)
) (
  input  logic             clk,
  input  logic [15:0] addr,
  input  logic [15:0] wr_data,
  input  logic             we,
  output logic [15:0] rd_data,
  input  logic [15:0] dbg_addr,
  output logic [15:0] dbg_data
);

  logic [7:0]    mem [BYTES];
  logic [AW-1:0] lo, hi, dlo, dhi;

  always_comb begin
    lo       = addr[AW-1:0];
    hi       = lo + 1'b1;
    dlo      = dbg_addr[AW-1:0];
    dhi      = dlo + 1'b1;
    rd_data  = {mem[hi], mem[lo]};
    dbg_data = {mem[dhi], mem[dlo]};
  end

  always_ff @(posedge clk) begin
    if (we) begin
      mem[lo] <= wr_data[7:0];
      mem[hi] <= wr_data[15:8];
    end
  end

endmodule
