// 64-bit adder of the key generation engine with carry in/out, used word by
// word for multiprecision addition, subtraction and comparison. op: 0 add,
// 1 add with carry, 2 subtract, 3 subtract with borrow (cin is the borrow).
// For subtraction cout is the borrow out, so a chain of SUB/SBB over the
// words of two numbers gives a < b as the final borrow and a == b when every
// word's `zero` was set. Combinational.
module mp_adder (
  input  logic [63:0] a,     // first operand word
  input  logic [63:0] b,     // second operand word
  input  logic        cin,   // carry or borrow in
  input  logic [1:0]  op,    // operation
  output logic [63:0] y,     // result word
  output logic        cout,  // carry or borrow out
  output logic        zero   // result word is zero
);
  logic [64:0] t;
  always_comb begin
    case (op)
      2'd0: t = {1'b0, a} + {1'b0, b};
      2'd1: t = {1'b0, a} + {1'b0, b} + 65'(cin);
      2'd2: t = {1'b0, a} - {1'b0, b};
      default: t = {1'b0, a} - {1'b0, b} - 65'(cin);
    endcase
    y    = t[63:0];
    cout = t[64];
    zero = (t[63:0] == '0);
  end
endmodule
