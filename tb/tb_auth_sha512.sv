// Workload testbench: SHA-512 and SHA-384 on the authentication engine in its
// 64-bit mode. The same program shape as for SHA-256 is used (rounds 0-15 and
// 16-79 in two zero-overhead loops calling one round subroutine), with
// 64-bit loads and stores, 80 rounds and the SHA-512 rotation amounts in the
// sigma configuration registers. The 80 round constants and both initial
// hash values are computed here with exact integer cube and square roots of
// the primes (first 64 fractional bits). Checks: the digest of "abc" for both
// algorithms against the published values, no stack error, and that the
// cycle count is identical for both (same program) and is reported next to
// the 250 cycles the original architecture quotes per 1024-bit block.
module tb_auth_sha512;
  import sp_pkg::*;
  import auth_isa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we = 0, pm_we = 0, cm_we = 0, dm_we = 0, start = 0;
  logic [3:0] cfg_addr = 0; logic [63:0] cfg_wdata = 0, cfg_rdata;
  logic [8:0] pm_addr = 0, start_addr = 0; logic [63:0] pm_wdata = 0;
  logic [7:0] cm_addr = 0; logic [63:0] cm_wdata = 0;
  logic [9:0] dm_addr = 0; logic [63:0] dm_wdata = 0, dm_rdata;
  logic busy, done, cmp_fail, err;
  int checks = 0, failures = 0;
  auth_engine dut (.*);

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  function automatic logic [63:0] I(aop_e op, int rd = 0, int ra = 0, int rb = 0, int rc = 0, int re = 0,
                                    int sel = 0, int imm = 0, int cnt = 0, int pinc = 0, int size = 2);
    I = {6'(op), 5'(rd), 5'(ra), 5'(rb), 5'(rc), 5'(re), 3'(sel), 10'(cnt), 1'(pinc), 2'(size), 1'b0, 16'(imm)};
  endfunction
  // floor(root(p * 2^(64*k))) mod 2^64 by bisection: k = 3 cube, k = 2 square
  function automatic logic [63:0] fracroot(int p, int k);
    logic [271:0] target, lo, hi, mid, pw;
    target = 272'(p) << (64 * k);
    lo = 0; hi = 272'(1) << 70;
    while (hi - lo > 1) begin
      mid = (lo + hi) >> 1;
      pw = (k == 3) ? mid * mid * mid : mid * mid;
      if (pw <= target) lo = mid; else hi = mid;
    end
    return lo[63:0];
  endfunction
  task automatic wcfg(int a, logic [63:0] v);
    @(negedge clk) cfg_we = 1; cfg_addr = 4'(a); cfg_wdata = v;
    @(negedge clk) cfg_we = 0;
  endtask

  localparam int A = 0, B = 16;
  logic [63:0] prog [$];
  logic [63:0] K [80], H512 [8], H384 [8];
  int primes [$];

  task automatic run(input logic [63:0] h [8], output int cyc);
    for (int i = 0; i < 8; i++) begin @(negedge clk) cm_we = 1; cm_addr = 8'(80 + i); cm_wdata = h[i]; end
    @(negedge clk) cm_we = 0; start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int rs, c512, c384;
    logic [63:0] d512 [8], d384 [6];
    d512 = '{64'hddaf35a193617aba, 64'hcc417349ae204131, 64'h12e6fa4e89a97ea2, 64'h0a9eeee64b55d39a,
             64'h2192992a274fc1a8, 64'h36ba3c23a3feebbd, 64'h454d4423643ce80e, 64'h2a9ac94fa54ca49f};
    d384 = '{64'hcb00753f45a35e8b, 64'hb5a03d699ac65007, 64'h272c32ab0eded163,
             64'h1a8b605a43ff5bed, 64'h8086072ba1e7cc23, 64'h58baeca134c825a7};
    for (int n = 2; primes.size() < 80; n++) begin
      bit p; p = 1;
      for (int j = 2; j * j <= n; j++) if (n % j == 0) p = 0;
      if (p) primes.push_back(n);
    end
    for (int i = 0; i < 80; i++) K[i] = fracroot(primes[i], 3);
    for (int i = 0; i < 8; i++) begin H512[i] = fracroot(primes[i], 2); H384[i] = fracroot(primes[8 + i], 2); end
    chk("K0", K[0], 64'h428a2f98d728ae22);
    chk("K79", K[79], 64'h6c44198c4a475817);
    chk("H512[0]", H512[0], 64'h6a09e667f3bcc908);
    chk("H384[0]", H384[0], 64'hcbbb9d5dc1059ed8);

    // program: areg0 message, areg1 round constant index, areg2 digest pointer
    for (int i = 0; i < 8; i++) prog.push_back(I(OP_LDK, .rd(A + i), .sel(3), .imm(80 + i)));
    prog.push_back(I(OP_LDA, .sel(0), .imm(0)));
    prog.push_back(I(OP_LDA, .sel(1), .imm(0)));
    prog.push_back(I(OP_LDA, .sel(2), .imm(256)));
    prog.push_back(I(OP_LOOP, .cnt(16), .imm(prog.size() + 3)));
    prog.push_back(I(OP_LD, .rd(B + 0), .sel(0), .pinc(1), .size(2)));
    prog.push_back(I(OP_MHP, .ra(B + 0)));
    prog.push_back(I(OP_CALL, .imm(0)));
    prog.push_back(I(OP_LOOP, .cnt(64), .imm(prog.size() + 9)));
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
      prog.push_back(I(OP_LDK, .rd(B + 1), .sel(3), .imm(80 + i)));
      prog.push_back(I(OP_ADD, .rd(A + i), .ra(A + i), .rb(B + 1)));
      prog.push_back(I(OP_ST, .ra(A + i), .sel(2), .pinc(1), .size(2)));
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

    repeat (2) @(negedge clk); rst_n = 1;
    foreach (prog[i]) begin @(negedge clk) pm_we = 1; pm_addr = 9'(i); pm_wdata = prog[i]; end
    for (int i = 0; i < 80; i++) begin @(negedge clk) pm_we = 0; cm_we = 1; cm_addr = 8'(i); cm_wdata = K[i]; end
    // message "abc", one 1024-bit block: W0 = 'abc' 80h, W15 = length 24
    for (int i = 0; i < 16; i++) begin
      @(negedge clk) cm_we = 0; dm_we = 1; dm_addr = 10'(i);
      dm_wdata = (i == 0) ? 64'h6162638000000000 : (i == 15) ? 64'd24 : 64'd0;
    end
    @(negedge clk) dm_we = 0;
    wcfg(0, {56'd0, 5'd8, 2'(LD_NORMAL), 1'b1});           // 64-bit algorithm
    wcfg(2, {46'd0, 6'd39, 6'd34, 6'd28});                  // Sigma0
    wcfg(3, {46'd0, 6'd41, 6'd18, 6'd14});                  // Sigma1
    wcfg(4, {46'd0, 6'd7, 6'd8, 6'd1});                     // sigma0, shift 7
    wcfg(5, {46'd0, 6'd6, 6'd61, 6'd19});                   // sigma1, shift 6
    wcfg(6, {46'd0, 3'b011, 3'b000, 4'b0110, 4'b0000, 4'b0100});  // Ch
    wcfg(7, {46'd0, 3'b011, 3'b011, 4'b0100, 4'b0100, 4'b0100});  // Maj

    run(H512, c512);
    for (int i = 0; i < 8; i++) begin
      dm_addr = 10'(32 + i); #1;
      chk($sformatf("SHA-512 word %0d", i), dm_rdata, d512[i]);
    end
    run(H384, c384);
    for (int i = 0; i < 6; i++) begin
      dm_addr = 10'(32 + i); #1;
      chk($sformatf("SHA-384 word %0d", i), dm_rdata, d384[i]);
    end
    chk("no stack error", 64'(err), 0);
    chk("same cycles for both", 64'(c384), 64'(c512));
    $display("SHA-512 block: %0d cycles (quoted: 250)", c512);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
