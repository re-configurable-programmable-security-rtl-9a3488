// Self-checking testbench for auth_engine: assembles a SHA-256 program (one
// 512-bit block, rounds 0-15 and 16-63 in two zero-overhead loops that call a
// shared round subroutine), runs it on the message "abc" and compares the
// digest stored in data memory with the published SHA-256("abc") and with a
// reference model in the testbench. Also checks HMAC pad loads and the
// load-with-compare digest check, and reports the cycle count.
module tb_auth_engine;
  import sp_pkg::*;
  import auth_isa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we = 0, pm_we = 0, cm_we = 0, dm_we = 0, start = 0;
  logic [3:0] cfg_addr; logic [63:0] cfg_wdata, cfg_rdata;
  logic [8:0] pm_addr, start_addr = 0; logic [63:0] pm_wdata;
  logic [7:0] cm_addr; logic [63:0] cm_wdata;
  logic [9:0] dm_addr; logic [63:0] dm_wdata, dm_rdata;
  logic busy, done, cmp_fail, err;
  int checks = 0, failures = 0;
  auth_engine dut (.*);

  // ---- assembler ----
  logic [63:0] prog [$];
  function automatic logic [63:0] I(aop_e op, int rd = 0, int ra = 0, int rb = 0, int rc = 0, int re = 0,
                                    int sel = 0, int imm = 0, int cnt = 0, int pinc = 0, int size = 2);
    I = {6'(op), 5'(rd), 5'(ra), 5'(rb), 5'(rc), 5'(re), 3'(sel), 10'(cnt), 1'(pinc), 2'(size), 1'b0, 16'(imm)};
  endfunction
  localparam int A = 0, B = 16;   // register file bases

  // ---- reference SHA-256 constants and model ----
  logic [31:0] K [64], H [8];
  function automatic logic [31:0] fracbits(real x);
    real f; f = x - $floor(x);
    return 32'(longint'($floor(f * 4294967296.0)));
  endfunction
  function automatic logic [31:0] rr(logic [31:0] v, int n); return (v >> n) | (v << (32 - n)); endfunction
  task automatic sha_model(input logic [31:0] m [16], output logic [31:0] d [8]);
    logic [31:0] w [64], a, b, c, e, f, g, h, dd, t1, t2;
    for (int t = 0; t < 64; t++)
      w[t] = (t < 16) ? m[t] : (rr(w[t-2], 17) ^ rr(w[t-2], 19) ^ (w[t-2] >> 10)) + w[t-7] +
                               (rr(w[t-15], 7) ^ rr(w[t-15], 18) ^ (w[t-15] >> 3)) + w[t-16];
    {a, b, c, dd, e, f, g, h} = {H[0], H[1], H[2], H[3], H[4], H[5], H[6], H[7]};
    for (int t = 0; t < 64; t++) begin
      t1 = h + (rr(e, 6) ^ rr(e, 11) ^ rr(e, 25)) + ((e & f) ^ (~e & g)) + K[t] + w[t];
      t2 = (rr(a, 2) ^ rr(a, 13) ^ rr(a, 22)) + ((a & b) ^ (a & c) ^ (b & c));
      h = g; g = f; f = e; e = dd + t1; dd = c; c = b; b = a; a = t1 + t2;
    end
    d = '{a + H[0], b + H[1], c + H[2], dd + H[3], e + H[4], f + H[5], g + H[6], h + H[7]};
  endtask

  task automatic wcfg(int a, logic [63:0] v);
    @(negedge clk) cfg_we = 1; cfg_addr = 4'(a); cfg_wdata = v;
    @(negedge clk) cfg_we = 0;
  endtask
  task automatic run_prog(output int cyc);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
  endtask
  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  int primes [$];
  logic [31:0] msg [16], dref [8];
  int round_sub, cyc;
  initial begin
    for (int n = 2; primes.size() < 64; n++) begin
      bit p; p = 1; for (int k = 2; k * k <= n; k++) if (n % k == 0) p = 0;
      if (p) primes.push_back(n);
    end
    for (int i = 0; i < 64; i++) K[i] = fracbits(real'(primes[i]) ** (1.0 / 3.0));
    for (int i = 0; i < 8; i++) H[i] = fracbits($sqrt(real'(primes[i])));
    chk("K0", 64'(K[0]), 64'h428a2f98); chk("K63", 64'(K[63]), 64'hc67178f2); chk("H0", 64'(H[0]), 64'h6a09e667);
    msg = '{32'h61626380, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 32'h00000018};

    // ---- program ----
    // areg0: message pointer (bytes), areg1: round-constant index, areg2: digest pointer
    for (int i = 0; i < 8; i++) prog.push_back(I(OP_LDK, .rd(A + i), .sel(3), .imm(64 + i)));
    prog.push_back(I(OP_LDA, .sel(0), .imm(0)));
    prog.push_back(I(OP_LDA, .sel(1), .imm(0)));
    prog.push_back(I(OP_LDA, .sel(2), .imm(256)));
    // rounds 0..15: W = message word
    prog.push_back(I(OP_LOOP, .cnt(16), .imm(prog.size() + 3)));
    prog.push_back(I(OP_LD, .rd(B + 0), .sel(0), .pinc(1), .size(1)));
    prog.push_back(I(OP_MHP, .ra(B + 0)));
    prog.push_back(I(OP_CALL, .imm(0)));            // patched below
    // rounds 16..63: W = s1(W[t-2]) + W[t-7] + s0(W[t-15]) + W[t-16]
    prog.push_back(I(OP_LOOP, .cnt(48), .imm(prog.size() + 9)));
    prog.push_back(I(OP_MHR, .rd(B + 0), .imm(1)));
    prog.push_back(I(OP_SIG, .rd(B + 0), .ra(B + 0), .sel(3'b111)));
    prog.push_back(I(OP_MHR, .rd(B + 2), .imm(14)));
    prog.push_back(I(OP_SIG, .rd(B + 2), .ra(B + 2), .sel(3'b110)));
    prog.push_back(I(OP_MHR, .rd(B + 3), .imm(6)));
    prog.push_back(I(OP_MHR, .rd(B + 5), .imm(15)));
    prog.push_back(I(OP_ADD, .rd(B + 0), .ra(B + 0), .rb(B + 2), .rc(B + 3), .re(B + 5), .sel(3)));
    prog.push_back(I(OP_MHP, .ra(B + 0)));
    prog.push_back(I(OP_CALL, .imm(0)));            // patched below
    // final: add the initial hash value, store the digest, check it, halt
    for (int i = 0; i < 8; i++) begin
      prog.push_back(I(OP_LDK, .rd(B + 1), .sel(3), .imm(64 + i)));
      prog.push_back(I(OP_ADD, .rd(A + i), .ra(A + i), .rb(B + 1)));
      prog.push_back(I(OP_ST, .ra(A + i), .sel(2), .pinc(1), .size(1)));
    end
    prog.push_back(I(OP_HALT));
    // round subroutine: W in B0, K from areg1
    round_sub = prog.size();
    prog[14] = I(OP_CALL, .imm(round_sub));
    prog[24] = I(OP_CALL, .imm(round_sub));
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
    if (prog.size() != round_sub + 11 || $bits(prog[14]) != 64) failures++;

    repeat (2) @(negedge clk); rst_n = 1;
    foreach (prog[i]) begin @(negedge clk) pm_we = 1; pm_addr = 9'(i); pm_wdata = prog[i]; end
    for (int i = 0; i < 64; i++) begin @(negedge clk) pm_we = 0; cm_we = 1; cm_addr = 8'(i); cm_wdata = 64'(K[i]); end
    for (int i = 0; i < 8; i++) begin @(negedge clk) cm_we = 1; cm_addr = 8'(64 + i); cm_wdata = 64'(H[i]); end
    for (int i = 0; i < 8; i++) begin @(negedge clk) cm_we = 0; dm_we = 1; dm_addr = 10'(i); dm_wdata = {msg[2*i+1], msg[2*i]}; end
    @(negedge clk) dm_we = 0;
    // general: shift 8 registers, normal load, 32-bit algorithm
    wcfg(0, {56'd0, 5'd8, 2'(LD_NORMAL), 1'b0});
    wcfg(2, {46'd0, 6'd22, 6'd13, 6'd2});     // MCU Sigma0
    wcfg(3, {46'd0, 6'd25, 6'd11, 6'd6});     // MCU Sigma1
    wcfg(4, {46'd0, 6'd3, 6'd18, 6'd7});      // MGU sigma0 (third term shift)
    wcfg(5, {46'd0, 6'd10, 6'd19, 6'd17});    // MGU sigma1 (third term shift)
    wcfg(6, {46'd0, 3'b011, 3'b000, 4'b0110, 4'b0000, 4'b0100});  // Ch
    wcfg(7, {46'd0, 3'b011, 3'b011, 4'b0100, 4'b0100, 4'b0100});  // Maj
    cfg_addr = 4'd7; #1; chk("cfg readback", cfg_rdata, {46'd0, 3'b011, 3'b011, 4'b0100, 4'b0100, 4'b0100});
    run_prog(cyc);
    $display("SHA-256 block: %0d cycles", cyc);
    sha_model(msg, dref);
    for (int i = 0; i < 4; i++) begin
      dm_addr = 10'(32 + i); #1;
      chk("digest vs model", dm_rdata, {dref[2*i+1], dref[2*i]});
    end
    dm_addr = 10'(32); #1; chk("digest word0", 64'(dm_rdata[31:0]), 64'hba7816bf);
    dm_addr = 10'(35); #1; chk("digest word7", 64'(dm_rdata[63:32]), 64'hf20015ad);
    checks++; if (err) begin failures++; $display("FAIL stack error"); end

    // ---- HMAC pad loads and digest comparison ----
    prog.delete();
    prog.push_back(I(OP_LDA, .sel(0), .imm(0)));
    prog.push_back(I(OP_LD, .rd(A + 0), .sel(0), .size(2)));
    prog.push_back(I(OP_HALT));
    foreach (prog[i]) begin @(negedge clk) pm_we = 1; pm_addr = 9'(i); pm_wdata = prog[i]; end
    @(negedge clk) pm_we = 0;
    wcfg(0, {56'd0, 5'd8, 2'(LD_IPAD), 1'b1});
    run_prog(cyc);
    chk("ipad", dut.rega[0], {msg[1], msg[0]} ^ {8{8'h36}});
    wcfg(0, {56'd0, 5'd8, 2'(LD_OPAD), 1'b1});
    run_prog(cyc);
    chk("opad", dut.rega[0], {msg[1], msg[0]} ^ {8{8'h5c}});
    wcfg(0, {56'd0, 5'd8, 2'(LD_CMP), 1'b1});
    run_prog(cyc);       // A0 holds the opad value: mismatch
    chk("cmp mismatch", 64'(cmp_fail), 1);
    wcfg(0, {56'd0, 5'd8, 2'(LD_NORMAL), 1'b1});
    run_prog(cyc);
    wcfg(0, {56'd0, 5'd8, 2'(LD_CMP), 1'b1});
    run_prog(cyc);       // A0 equals memory: match
    chk("cmp match", 64'(cmp_fail), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
