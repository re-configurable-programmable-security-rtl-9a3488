// Montgomery modular multiplier of the key generation engine: computes
// A * B * 2^-n mod M for n = 160, 512 or 1024 bits (M odd, A, B < M).
// Bit-serial radix-2 algorithm: for each bit a_i of A, S = (S + a_i*B
// [+ M if odd]) / 2, then one final conditional subtraction of M. One bit per
// clock, so a product takes n + 1 clocks after `start`.
// The operand sizes follow the engine's feature list; the radix-2 structure
// is this design's own (the simplest that performs the function).
// Operands are loaded and the result read in 64-bit words: `wsel` 0/1/2
// selects A/B/M, `widx` the word (word 0 least significant).
module mont_mul #(
  parameter int MAXN = 1024   // largest operand width
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr,      // write operand word
  input  logic [1:0]               wsel,    // 0: A, 1: B, 2: M
  input  logic [$clog2(MAXN/64)-1:0] widx,  // word index
  input  logic [63:0]              wdata,   // operand word
  input  logic [1:0]               nsel,    // 0: 160, 1: 512, 2: 1024 bits
  input  logic                     start,   // begin a multiplication
  output logic                     busy,    // multiplication in progress
  output logic                     done,    // one-cycle pulse: result ready
  input  logic [$clog2(MAXN/64)-1:0] ridx,  // result word index
  output logic [63:0]              rdata    // result word
);
  logic [MAXN-1:0] a, b, m, r;
  logic [MAXN+1:0] s, s1, s2;
  logic [$clog2(MAXN+1)-1:0] i, n;
  logic            fin;

  always_comb begin
    s1 = s + (a[0] ? {2'b00, b} : '0);
    s2 = s1 + (s1[0] ? {2'b00, m} : '0);
  end
  assign rdata = r[64*ridx +: 64];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; fin <= 1'b0; s <= '0; r <= '0; i <= '0; n <= '0;
      a <= '0; b <= '0; m <= '0;
    end else begin
      done <= 1'b0;
      if (wr && !busy) begin
        case (wsel)
          2'd0: a[64*widx +: 64] <= wdata;
          2'd1: b[64*widx +: 64] <= wdata;
          default: m[64*widx +: 64] <= wdata;
        endcase
      end
      if (start && !busy) begin
        busy <= 1'b1; fin <= 1'b0; s <= '0; i <= '0;
        n <= (nsel == 2'd0) ? ($bits(n))'(160) : (nsel == 2'd1) ? ($bits(n))'(512) : ($bits(n))'(MAXN);
      end else if (busy && !fin) begin
        s <= s2 >> 1;
        a <= a >> 1;
        i <= i + 1'b1;
        if (i == n - 1'b1) fin <= 1'b1;
      end else if (busy && fin) begin
        r <= (s >= {2'b00, m}) ? MAXN'(s - {2'b00, m}) : MAXN'(s);
        busy <= 1'b0; done <= 1'b1;
      end
    end
  end
endmodule
