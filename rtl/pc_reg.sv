// pc_reg: program counter register with the processor's halt state.
//
// The PC holds the byte address of the instruction being executed. On every
// rising clock edge it loads pc_next, the address chosen by the next-PC
// logic. When the current instruction is HALT the "halted" flag is set and
// from then on the PC no longer changes, so the processor keeps executing
// the HALT at the same address, which writes nothing: program execution has
// stopped. Synchronous active-low reset puts the PC at 0x0 and clears
// halted. The document only notes that HALT "stops the clock"; freezing the
// PC instead of gating the clock, and the reset value, are this design's.
module pc_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             halt,
  input  logic [WIDTH-1:0] pc_next,
  output logic [WIDTH-1:0] pc,
  output logic             halted
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc     <= '0;
      halted <= 1'b0;
    end else if (!halted) begin
      if (halt) halted <= 1'b1;
      else      pc     <= pc_next;
    end
  end

endmodule
