// Function generator: configurable three-operand Boolean unit of the
// authentication engine. It forms XY, YZ and ZX from the operand pairs, each
// "(!)A op (!)B" with op = pass/AND/OR/XOR and optional inversion of either
// input, then XYYZ = XY op YZ and Fn = XYYZ op ZX, where the second-level ops
// can also pass either side. One 18-bit configuration word selects it all:
//   [0] invert first operand, [1] invert second operand, [3:2] pair function
//   (00 first operand, 01 AND, 10 OR, 11 XOR)   -- applied to XY
//   [14:12] XY?YZ  (000 XY, 001 AND, 010 OR, 011 XOR, 100 YZ)
//   [17:15] XYYZ?ZX (000 XYYZ, 001 AND, 010 OR, 011 XOR, 100 ZX)
// These fields follow the function generator configuration table. The table
// does not print the bit positions of the YZ and ZX pair fields; this design
// places them at [7:4] (YZ) and [11:8] (ZX) in the same layout as XY.
// In 32-bit algorithm mode the caller uses only the low 32 bits.
// Purely combinational.
module func_gen (
  input  logic [63:0] x,    // operand X
  input  logic [63:0] y,    // operand Y
  input  logic [63:0] z,    // operand Z
  input  logic [17:0] cfg,  // configuration word
  output logic [63:0] fn    // result
);
  function automatic logic [63:0] pairf(input logic [63:0] a, input logic [63:0] b, input logic [3:0] c);
    logic [63:0] aa, bb;
    aa = c[0] ? ~a : a;
    bb = c[1] ? ~b : b;
    case (c[3:2])
      2'b00: pairf = aa;
      2'b01: pairf = aa & bb;
      2'b10: pairf = aa | bb;
      default: pairf = aa ^ bb;
    endcase
  endfunction

  function automatic logic [63:0] comb2(input logic [63:0] a, input logic [63:0] b, input logic [2:0] c);
    case (c)
      3'b000: comb2 = a;
      3'b001: comb2 = a & b;
      3'b010: comb2 = a | b;
      3'b011: comb2 = a ^ b;
      3'b100: comb2 = b;
      default: comb2 = a;
    endcase
  endfunction

  logic [63:0] xy, yz, zx, xyyz;
  always_comb begin
    xy   = pairf(x, y, cfg[3:0]);
    yz   = pairf(y, z, cfg[7:4]);
    zx   = pairf(z, x, cfg[11:8]);
    xyyz = comb2(xy, yz, cfg[14:12]);
    fn   = comb2(xyyz, zx, cfg[17:15]);
  end
endmodule
