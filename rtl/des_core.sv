// DES / Triple-DES block cipher (FIPS 46-3), the configurable DES accelerator
// of the cipher engine and the TDES unit of the key generation engine.
// It computes four Feistel rounds per clock with the round keys generated on
// the fly (left rotations for encryption, right rotations for decryption), so
// one DES pass is six clocks: capture the block, initial permutation and key
// permutation PC-1, four clocks of four rounds, final permutation into the
// output register. Triple DES (EDE with three keys, decryption D-E-D with the
// keys reversed) chains three passes: 18 clocks. These counts are the cycle
// counts given for DES and 3-DES; the round-per-clock split is this design's.
// Interface: pulse `start` with `din`, `key1..3`, `tdes` and `decrypt` valid;
// `busy` is high until `done` pulses with `dout` valid. `dout` holds until the
// next start. Keys are 64-bit with parity bits (ignored).
module des_core (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,    // begin a block
  input  logic        tdes,     // 1: triple DES, 0: single DES with key1
  input  logic        decrypt,  // 1: decrypt
  input  logic [63:0] key1,     // first key
  input  logic [63:0] key2,     // second key (3DES)
  input  logic [63:0] key3,     // third key (3DES)
  input  logic [63:0] din,      // input block
  output logic [63:0] dout,     // output block
  output logic        busy,     // block in progress
  output logic        done      // one-cycle pulse: dout valid
);
  localparam byte IP_T [64] = '{58,50,42,34,26,18,10,2, 60,52,44,36,28,20,12,4,
                                62,54,46,38,30,22,14,6, 64,56,48,40,32,24,16,8,
                                57,49,41,33,25,17,9,1,  59,51,43,35,27,19,11,3,
                                61,53,45,37,29,21,13,5, 63,55,47,39,31,23,15,7};
  localparam byte FP_T [64] = '{40,8,48,16,56,24,64,32, 39,7,47,15,55,23,63,31,
                                38,6,46,14,54,22,62,30, 37,5,45,13,53,21,61,29,
                                36,4,44,12,52,20,60,28, 35,3,43,11,51,19,59,27,
                                34,2,42,10,50,18,58,26, 33,1,41,9,49,17,57,25};
  localparam byte E_T [48] = '{32,1,2,3,4,5, 4,5,6,7,8,9, 8,9,10,11,12,13, 12,13,14,15,16,17,
                               16,17,18,19,20,21, 20,21,22,23,24,25, 24,25,26,27,28,29, 28,29,30,31,32,1};
  localparam byte P_T [32] = '{16,7,20,21,29,12,28,17, 1,15,23,26,5,18,31,10,
                               2,8,24,14,32,27,3,9, 19,13,30,6,22,11,4,25};
  localparam byte PC1_T [56] = '{57,49,41,33,25,17,9, 1,58,50,42,34,26,18,
                                 10,2,59,51,43,35,27, 19,11,3,60,52,44,36,
                                 63,55,47,39,31,23,15, 7,62,54,46,38,30,22,
                                 14,6,61,53,45,37,29, 21,13,5,28,20,12,4};
  localparam byte PC2_T [48] = '{14,17,11,24,1,5, 3,28,15,6,21,10, 23,19,12,4,26,8, 16,7,27,20,13,2,
                                 41,52,31,37,47,55, 30,40,51,45,33,48, 44,49,39,56,34,53, 46,42,50,36,29,32};
  localparam byte SH_T [16] = '{1,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1};
  localparam logic [3:0] SB [8][64] = '{
    '{14,4,13,1,2,15,11,8,3,10,6,12,5,9,0,7, 0,15,7,4,14,2,13,1,10,6,12,11,9,5,3,8,
      4,1,14,8,13,6,2,11,15,12,9,7,3,10,5,0, 15,12,8,2,4,9,1,7,5,11,3,14,10,0,6,13},
    '{15,1,8,14,6,11,3,4,9,7,2,13,12,0,5,10, 3,13,4,7,15,2,8,14,12,0,1,10,6,9,11,5,
      0,14,7,11,10,4,13,1,5,8,12,6,9,3,2,15, 13,8,10,1,3,15,4,2,11,6,7,12,0,5,14,9},
    '{10,0,9,14,6,3,15,5,1,13,12,7,11,4,2,8, 13,7,0,9,3,4,6,10,2,8,5,14,12,11,15,1,
      13,6,4,9,8,15,3,0,11,1,2,12,5,10,14,7, 1,10,13,0,6,9,8,7,4,15,14,3,11,5,2,12},
    '{7,13,14,3,0,6,9,10,1,2,8,5,11,12,4,15, 13,8,11,5,6,15,0,3,4,7,2,12,1,10,14,9,
      10,6,9,0,12,11,7,13,15,1,3,14,5,2,8,4, 3,15,0,6,10,1,13,8,9,4,5,11,12,7,2,14},
    '{2,12,4,1,7,10,11,6,8,5,3,15,13,0,14,9, 14,11,2,12,4,7,13,1,5,0,15,10,3,9,8,6,
      4,2,1,11,10,13,7,8,15,9,12,5,6,3,0,14, 11,8,12,7,1,14,2,13,6,15,0,9,10,4,5,3},
    '{12,1,10,15,9,2,6,8,0,13,3,4,14,7,5,11, 10,15,4,2,7,12,9,5,6,1,13,14,0,11,3,8,
      9,14,15,5,2,8,12,3,7,0,4,10,1,13,11,6, 4,3,2,12,9,5,15,10,11,14,1,7,6,0,8,13},
    '{4,11,2,14,15,0,8,13,3,12,9,7,5,10,6,1, 13,0,11,7,4,9,1,10,14,3,5,12,2,15,8,6,
      1,4,11,13,12,3,7,14,10,15,6,8,0,5,9,2, 6,11,13,8,1,4,10,7,9,5,0,15,14,2,3,12},
    '{13,2,8,4,6,15,11,1,10,9,3,14,5,0,12,7, 1,15,13,8,10,3,7,4,12,5,6,11,0,14,9,2,
      7,11,4,1,9,12,14,2,0,6,10,13,15,3,5,8, 2,1,14,7,4,10,8,13,15,12,9,0,3,5,6,11}};

  // Bits are numbered as in the standard: bit 1 is the most significant.
  function automatic logic [63:0] perm_ip(input logic [63:0] v, input logic fp);
    for (int j = 0; j < 64; j++) perm_ip[63-j] = v[64 - (fp ? FP_T[j] : IP_T[j])];
  endfunction
  function automatic logic [55:0] pc1(input logic [63:0] v);
    for (int j = 0; j < 56; j++) pc1[55-j] = v[64 - PC1_T[j]];
  endfunction
  function automatic logic [47:0] pc2(input logic [55:0] v);
    for (int j = 0; j < 48; j++) pc2[47-j] = v[56 - PC2_T[j]];
  endfunction
  function automatic logic [31:0] feistel(input logic [31:0] r, input logic [47:0] k);
    logic [47:0] e;
    logic [31:0] s;
    logic [5:0]  b;
    for (int j = 0; j < 48; j++) e[47-j] = r[32 - E_T[j]];
    e = e ^ k;
    for (int i = 0; i < 8; i++) begin
      b = e[47-6*i -: 6];
      s[31-4*i -: 4] = SB[i][{b[5], b[0], b[4:1]}];
    end
    for (int j = 0; j < 32; j++) feistel[31-j] = s[32 - P_T[j]];
  endfunction
  function automatic logic [27:0] rotl28(input logic [27:0] v, input int n);
    rotl28 = (n == 1) ? {v[26:0], v[27]} : {v[25:0], v[27:26]};
  endfunction
  function automatic logic [27:0] rotr28(input logic [27:0] v, input int n);
    rotr28 = (n == 1) ? {v[0], v[27:1]} : {v[1:0], v[27:2]};
  endfunction

  typedef enum logic [2:0] {S_IDLE, S_PERM, S_ROUND, S_FINAL} state_e;
  state_e      st;
  logic [63:0] blk;        // block entering the current pass
  logic [31:0] l, r;
  logic [27:0] c, d;
  logic [1:0]  rq;         // round quad 0..3
  logic [1:0]  pass;       // 3DES pass 0..2
  logic        dec_q, tdes_q, pass_dec;
  logic [63:0] k1, k2, k3, pass_key;

  always_comb begin
    if (!tdes_q) begin
      pass_key = k1; pass_dec = dec_q;
    end else if (!dec_q) begin      // E(k1) D(k2) E(k3)
      pass_key = (pass == 2'd0) ? k1 : (pass == 2'd1) ? k2 : k3;
      pass_dec = (pass == 2'd1);
    end else begin                  // D(k3) E(k2) D(k1)
      pass_key = (pass == 2'd0) ? k3 : (pass == 2'd1) ? k2 : k1;
      pass_dec = (pass != 2'd1);
    end
  end

  // Four rounds with on-the-fly key schedule.
  logic [31:0] l4, r4, tmp;
  logic [27:0] c4, d4;
  always_comb begin
    l4 = l; r4 = r; c4 = c; d4 = d;
    for (int i = 0; i < 4; i++) begin
      int rn;
      rn = 4 * int'(rq) + i;
      if (!pass_dec) begin
        c4 = rotl28(c4, int'(SH_T[rn])); d4 = rotl28(d4, int'(SH_T[rn]));
      end else if (rn != 0) begin
        c4 = rotr28(c4, int'(SH_T[16-rn])); d4 = rotr28(d4, int'(SH_T[16-rn]));
      end
      tmp = l4 ^ feistel(r4, pc2({c4, d4}));
      l4  = r4;
      r4  = tmp;
    end
  end

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= S_IDLE; done <= 1'b0; dout <= '0; rq <= '0; pass <= '0;
      dec_q <= 1'b0; tdes_q <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          blk <= din; k1 <= key1; k2 <= key2; k3 <= key3;
          dec_q <= decrypt; tdes_q <= tdes; pass <= '0;
          st <= S_PERM;
        end
        S_PERM: begin
          {l, r} <= perm_ip(blk, 1'b0);
          {c, d} <= pc1(pass_key);
          rq <= '0;
          st <= S_ROUND;
        end
        S_ROUND: begin
          l <= l4; r <= r4; c <= c4; d <= d4;
          rq <= rq + 1'b1;
          if (rq == 2'd3) st <= S_FINAL;
        end
        default: begin  // S_FINAL: undo the last swap, final permutation
          if (tdes_q && pass != 2'd2) begin
            blk  <= perm_ip({r, l}, 1'b1);
            pass <= pass + 1'b1;
            st   <= S_PERM;
          end else begin
            dout <= perm_ip({r, l}, 1'b1);
            done <= 1'b1;
            st   <= S_IDLE;
          end
        end
      endcase
    end
  end
endmodule
