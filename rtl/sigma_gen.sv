// Sigma generator: rotates/shifts one operand by three configured amounts and
// XORs the three results, as the SHA family's sigma functions need
// (e.g. SHA-256 Sigma0 = ROTR2 ^ ROTR13 ^ ROTR22, sigma0 = ROTR7 ^ ROTR18 ^ SHR3).
// The 18-bit configuration register holds three 6-bit amounts:
// [5:0] first, [11:6] second, [17:12] third. The first two terms are always
// rotations; the instruction chooses whether the third is a rotation or a
// logical right shift (shr3). An amount of 0 contributes the operand itself.
// alg64 = 0 works on the low 32 bits (amounts taken modulo 32, upper half zero).
// Combinational.
module sigma_gen (
  input  logic [63:0] a,      // operand
  input  logic [17:0] cfg,    // three 6-bit rotation indexes
  input  logic        shr3,   // third term is a right shift instead of a rotation
  input  logic        alg64,  // 64-bit (1) or 32-bit (0) algorithm
  output logic [63:0] y       // result
);
  function automatic logic [63:0] rotr(input logic [63:0] v, input logic [5:0] n, input logic w64);
    logic [31:0] lo;
    if (w64) rotr = (v >> n) | (v << (7'd64 - {1'b0, n}));
    else begin
      lo   = (v[31:0] >> n[4:0]) | (v[31:0] << (6'd32 - {1'b0, n[4:0]}));
      rotr = {32'd0, lo};
    end
  endfunction

  logic [63:0] t3;
  always_comb begin
    if (shr3) t3 = alg64 ? (a >> cfg[17:12]) : {32'd0, a[31:0] >> cfg[16:12]};
    else      t3 = rotr(a, cfg[17:12], alg64);
    y = rotr(a, cfg[5:0], alg64) ^ rotr(a, cfg[11:6], alg64) ^ t3;
  end
endmodule
