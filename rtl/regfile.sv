// Data register file: NREGS x 64-bit, two combinational read ports, one write
// port, plus a shift operation that moves r[i-1] into r[i] for i = 1..n-1 and
// loads shift_in into r[0] (the "number of registers to be shifted" of the
// general configuration: it rotates a hash's working variables a..h in one
// instruction). A write and a shift in the same cycle: the shift wins, then
// the written register is overwritten only if it lies at or beyond n.
// Synchronous reset clears all registers.
module regfile #(
  parameter int NREGS = 16   // registers
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] ra,        // read address A
  input  logic [$clog2(NREGS)-1:0] rb,        // read address B
  output logic [63:0]              da,        // read data A
  output logic [63:0]              db,        // read data B
  input  logic                     we,        // write enable
  input  logic [$clog2(NREGS)-1:0] wa,        // write address
  input  logic [63:0]              wd,        // write data
  input  logic                     shift,     // shift first shift_n registers
  input  logic [$clog2(NREGS):0]   shift_n,   // number of registers in the shift
  input  logic [63:0]              shift_in,  // value entering r[0]
  output logic [NREGS-1:0][63:0]   regs       // all registers (for wide operand access)
);
  always_ff @(posedge clk) begin
    if (!rst_n) regs <= '0;
    else begin
      if (shift) begin
        if (shift_n != '0) regs[0] <= shift_in;
        for (int i = 1; i < NREGS; i++)
          if (i < 32'(shift_n)) regs[i] <= regs[i-1];
      end
      if (we && !(shift && 32'(wa) < 32'(shift_n))) regs[wa] <= wd;
    end
  end
  assign da = regs[ra];
  assign db = regs[rb];
endmodule
