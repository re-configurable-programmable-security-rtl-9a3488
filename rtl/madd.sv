// Multi-operand adder: adds up to NOPS operands in one cycle (a carry-save
// tree is left to synthesis). In 64-bit mode the sum is modulo 2^64; in 32-bit
// mode the two 32-bit lanes add independently (carries do not cross bit 32),
// which serves the 32-bit hash algorithms. Operands not enabled by `en` count
// as zero. The single-cycle multi-operand 64-bit addition follows the
// authentication engine's feature list; the lane split is this design's.
// Combinational.
module madd #(
  parameter int NOPS = 4   // number of operands
) (
  input  logic [NOPS-1:0][63:0] op,     // operands
  input  logic [NOPS-1:0]       en,     // operand enables
  input  logic                  alg64,  // 1: 64-bit sum, 0: two 32-bit lanes
  output logic [63:0]           sum     // result
);
  logic [63:0] s64;
  logic [31:0] lo, hi;
  always_comb begin
    s64 = '0; lo = '0; hi = '0;
    for (int i = 0; i < NOPS; i++) begin
      if (en[i]) begin
        s64 = s64 + op[i];
        lo  = lo + op[i][31:0];
        hi  = hi + op[i][63:32];
      end
    end
    sum = alg64 ? s64 : {hi, lo};
  end
endmodule
