// 64-bit rotator/shifter: rotate right/left or logical shift right/left by
// 0..63 (0..31 with the low 32 bits only when alg64 = 0).
// Operation encoding (op): 0 rotate right, 1 rotate left, 2 shift right,
// 3 shift left. Combinational.
module rotshift (
  input  logic [63:0] a,      // operand
  input  logic [5:0]  amt,    // amount
  input  logic [1:0]  op,     // operation
  input  logic        alg64,  // 64-bit (1) or 32-bit (0) operand
  output logic [63:0] y       // result
);
  logic [31:0] a32, y32;
  logic [4:0]  n32;
  always_comb begin
    a32 = a[31:0];
    n32 = amt[4:0];
    case (op)
      2'd0: begin y = (a >> amt) | (a << (7'd64 - {1'b0, amt}));
                  y32 = (a32 >> n32) | (a32 << (6'd32 - {1'b0, n32})); end
      2'd1: begin y = (a << amt) | (a >> (7'd64 - {1'b0, amt}));
                  y32 = (a32 << n32) | (a32 >> (6'd32 - {1'b0, n32})); end
      2'd2: begin y = a >> amt; y32 = a32 >> n32; end
      default: begin y = a << amt; y32 = a32 << n32; end
    endcase
    if (!alg64) y = {32'd0, y32};
  end
endmodule
