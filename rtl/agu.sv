// Address generation unit with its address register file (NAREG registers).
// The effective address is areg[sel] + offset. With post-increment the
// selected register then advances by `step` (the access size in bytes).
// Registers are written directly with `ld`. Reset clears them.
module agu #(
  parameter int NAREG = 8,   // address registers
  parameter int AW    = 13   // address width (8 Kbyte data memory)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NAREG)-1:0] sel,      // address register used
  input  logic [AW-1:0]            offset,   // offset added
  output logic [AW-1:0]            ea,       // effective address
  input  logic                     postinc,  // advance the register after use
  input  logic [AW-1:0]            step,     // increment
  input  logic                     ld,       // load register sel with ld_val
  input  logic [AW-1:0]            ld_val    // value loaded
);
  logic [AW-1:0] areg [NAREG];
  assign ea = areg[sel] + offset;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NAREG; i++) areg[i] <= '0;
    end else if (ld) begin
      areg[sel] <= ld_val;
    end else if (postinc) begin
      areg[sel] <= areg[sel] + step;
    end
  end
endmodule
