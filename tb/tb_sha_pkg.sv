// Testbench helpers: SHA-256 constants derived from the primes (fractional
// parts of cube and square roots) and an assembler for a one-block SHA-256
// program for the authentication engine. The program reads the 16 message
// words (32-bit, data-memory byte 0..63), keeps the working variables in the
// MCU register file and stores the digest as eight 32-bit words at byte 256.
package tb_sha_pkg;
  import auth_isa_pkg::*;
  function automatic logic [63:0] I(aop_e op, int rd = 0, int ra = 0, int rb = 0, int rc = 0, int re = 0,
                                    int sel = 0, int imm = 0, int cnt = 0, int pinc = 0, int size = 2);
    I = {6'(op), 5'(rd), 5'(ra), 5'(rb), 5'(rc), 5'(re), 3'(sel), 10'(cnt), 1'(pinc), 2'(size), 1'b0, 16'(imm)};
  endfunction
  function automatic logic [31:0] fracbits(real x);
    real f; f = x - $floor(x);
    return 32'(longint'($floor(f * 4294967296.0)));
  endfunction
  // K[0..63] followed by H0[0..7]
  function automatic void constants(output logic [31:0] k [72]);
    int primes [$];
    for (int n = 2; primes.size() < 64; n++) begin
      bit p; p = 1;
      for (int j = 2; j * j <= n; j++) if (n % j == 0) p = 0;
      if (p) primes.push_back(n);
    end
    for (int i = 0; i < 64; i++) k[i] = fracbits(real'(primes[i]) ** (1.0 / 3.0));
    for (int i = 0; i < 8; i++) k[64 + i] = fracbits($sqrt(real'(primes[i])));
  endfunction
  function automatic void sha_program(ref logic [63:0] prog [$]);
    int A, B, rs;
    A = 0; B = 16;
    prog.delete();
    for (int i = 0; i < 8; i++) prog.push_back(I(OP_LDK, .rd(A + i), .sel(3), .imm(64 + i)));
    prog.push_back(I(OP_LDA, .sel(0), .imm(0)));
    prog.push_back(I(OP_LDA, .sel(1), .imm(0)));
    prog.push_back(I(OP_LDA, .sel(2), .imm(256)));
    prog.push_back(I(OP_LOOP, .cnt(16), .imm(prog.size() + 3)));
    prog.push_back(I(OP_LD, .rd(B + 0), .sel(0), .pinc(1), .size(1)));
    prog.push_back(I(OP_MHP, .ra(B + 0)));
    prog.push_back(I(OP_CALL, .imm(0)));
    prog.push_back(I(OP_LOOP, .cnt(48), .imm(prog.size() + 9)));
    prog.push_back(I(OP_MHR, .rd(B + 0), .imm(1)));
    prog.push_back(I(OP_SIG, .rd(B + 0), .ra(B + 0), .sel(3'b111)));
    prog.push_back(I(OP_MHR, .rd(B + 2), .imm(14)));
    prog.push_back(I(OP_SIG, .rd(B + 2), .ra(B + 2), .sel(3'b110)));
    prog.push_back(I(OP_MHR, .rd(B + 3), .imm(6)));
    prog.push_back(I(OP_MHR, .rd(B + 5), .imm(15)));
    prog.push_back(I(OP_ADD, .rd(B + 0), .ra(B + 0), .rb(B + 2), .rc(B + 3), .re(B + 5), .sel(3)));
    prog.push_back(I(OP_MHP, .ra(B + 0)));
    prog.push_back(I(OP_CALL, .imm(0)));
    for (int i = 0; i < 8; i++) begin
      prog.push_back(I(OP_LDK, .rd(B + 1), .sel(3), .imm(64 + i)));
      prog.push_back(I(OP_ADD, .rd(A + i), .ra(A + i), .rb(B + 1)));
      prog.push_back(I(OP_ST, .ra(A + i), .sel(2), .pinc(1), .size(1)));
    end
    prog.push_back(I(OP_HALT));
    rs = prog.size();
    prog[14] = I(OP_CALL, .imm(rs));
    prog[24] = I(OP_CALL, .imm(rs));
    prog.push_back(I(OP_LDK, .rd(B + 1), .sel(1), .pinc(1)));
    prog.push_back(I(OP_SIG, .rd(B + 2), .ra(A + 4), .sel(3'b001)));
    prog.push_back(I(OP_FN,  .rd(B + 3), .ra(A + 4), .rb(A + 5), .rc(A + 6), .sel(0)));
    prog.push_back(I(OP_ADD, .rd(B + 1), .ra(A + 7), .rb(B + 2), .rc(B + 3), .re(B + 1), .sel(3)));
    prog.push_back(I(OP_ADD, .rd(B + 1), .ra(B + 1), .rb(B + 0)));
    prog.push_back(I(OP_SIG, .rd(B + 2), .ra(A + 0), .sel(3'b000)));
    prog.push_back(I(OP_FN,  .rd(B + 3), .ra(A + 0), .rb(A + 1), .rc(A + 2), .sel(1)));
    prog.push_back(I(OP_ADD, .rd(B + 4), .ra(B + 1), .rb(B + 2), .rc(B + 3), .sel(1)));
    prog.push_back(I(OP_SHF, .rd(A), .ra(B + 4)));
    prog.push_back(I(OP_ADD, .rd(A + 4), .ra(A + 4), .rb(B + 1)));
    prog.push_back(I(OP_RET));
  endfunction
  // configuration register values for SHA-256: address, value
  function automatic void config_words(output logic [63:0] v [8]);
    v[0] = {56'd0, 5'd8, 2'd0, 1'b0};
    v[1] = 0;
    v[2] = {46'd0, 6'd22, 6'd13, 6'd2};
    v[3] = {46'd0, 6'd25, 6'd11, 6'd6};
    v[4] = {46'd0, 6'd3, 6'd18, 6'd7};
    v[5] = {46'd0, 6'd10, 6'd19, 6'd17};
    v[6] = {46'd0, 3'b011, 3'b000, 4'b0110, 4'b0000, 4'b0100};
    v[7] = {46'd0, 3'b011, 3'b011, 4'b0100, 4'b0100, 4'b0100};
  endfunction
endpackage
