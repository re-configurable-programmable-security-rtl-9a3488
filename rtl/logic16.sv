// 16-bit logical unit of the key generation engine. op: 0 AND, 1 OR, 2 XOR,
// 3 NOT a, 4 AND-NOT (a & ~b), 5 pass b, 6 test bit (y = a[b[3:0]]),
// 7 set bit. Combinational. The width follows the engine's feature list;
// the operation set is this design's.
module logic16 (
  input  logic [15:0] a,   // first operand
  input  logic [15:0] b,   // second operand
  input  logic [2:0]  op,  // operation
  output logic [15:0] y    // result
);
  always_comb begin
    case (op)
      3'd0: y = a & b;
      3'd1: y = a | b;
      3'd2: y = a ^ b;
      3'd3: y = ~a;
      3'd4: y = a & ~b;
      3'd5: y = b;
      3'd6: y = {15'd0, a[b[3:0]]};
      default: y = a | (16'd1 << b[3:0]);
    endcase
  end
endmodule
