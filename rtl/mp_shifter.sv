// 64-bit barrel shifter of the key generation engine with multiprecision
// support: a left shift fills the vacated low bits from the top of the
// neighbouring lower word `fill`, a right shift fills the high bits from the
// bottom of the neighbouring higher word, so shifting a long number word by
// word gives the shifted number. dir: 0 left, 1 right. amt 0..63.
// Combinational.
module mp_shifter (
  input  logic [63:0] a,     // word being shifted
  input  logic [63:0] fill,  // neighbouring word supplying the fill bits
  input  logic [5:0]  amt,   // shift amount
  input  logic        dir,   // 0 left, 1 right
  output logic [63:0] y      // result word
);
  logic [127:0] t;
  always_comb begin
    if (!dir) begin
      t = {a, fill} << amt;
      y = t[127:64];
    end else begin
      t = {fill, a} >> amt;
      y = t[63:0];
    end
  end
endmodule
