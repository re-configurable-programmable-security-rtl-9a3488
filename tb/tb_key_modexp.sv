// Workload testbench: modular exponentiation on the key generation engine,
// the core operation of Diffie-Hellman, DSA and RSA. The program computes
// x^e mod M for a random 160-bit odd modulus and a 64-bit exponent with the
// Montgomery unit (square-and-multiply, most significant exponent bit first):
//   xm = mont(x, R^2 mod M); acc = R mod M;
//   64 times: acc = mont(acc, acc); e = e + e (carry = next bit);
//             if carry: acc = mont(acc, xm)
//   result = mont(acc, 1)
// with R = 2^160. The exponent bit is taken from the adder's carry, the loop
// is a zero-overhead loop whose count comes from a register, and each
// Montgomery product is waited for with the busy-wait jump. R mod M and
// R^2 mod M are supplied by the testbench, as a host would. The result is
// compared with wide-integer arithmetic in the testbench, for several random
// cases, and the cycles per exponentiation are reported. A Diffie-Hellman
// exchange then runs four exponentiations on the engine and checks that both
// parties arrive at the same shared secret.
module tb_key_modexp;
  import key_isa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  logic h_req = 0, h_we = 0, h_pm = 0, h_ack, start = 0, pulse = 0, busy, done, err;
  logic [8:0] h_addr = 0, start_addr = 0;
  logic [63:0] h_wdata = 0, h_rdata;
  key_engine dut (.*);

  function automatic logic [31:0] K(kop_e op, int rd = 0, int ra = 0, int rb = 0, int imm = 0);
    K = {op, 4'(rd), 4'(ra), 4'(rb), 14'(imm)};
  endfunction
  task automatic acc(input logic we, input logic pm, input int a, input logic [63:0] d, output logic [63:0] q);
    @(negedge clk) h_req = 1; h_we = we; h_pm = pm; h_addr = 9'(a); h_wdata = d;
    #1; while (!h_ack) begin @(negedge clk); #1; end
    q = h_rdata;
    @(negedge clk) h_req = 0; h_we = 0;
  endtask

  logic [31:0] prog [$];
  // Montgomery product of registers (a0..a2) and (b0..b2) into (a0..a2)
  task automatic mont(int a, int b0, int b1, int b2);
    for (int i = 0; i < 3; i++) prog.push_back(K(KOP_MMW, 0, a + i, 0, i));
    prog.push_back(K(KOP_MMW, 0, b0, 0, 16));
    prog.push_back(K(KOP_MMW, 0, b1, 0, 17));
    prog.push_back(K(KOP_MMW, 0, b2, 0, 18));
    prog.push_back(K(KOP_MMS, 0, 0, 0, 0));
    prog.push_back(K(KOP_JMB, 0, 0, 0, prog.size()));
    for (int i = 0; i < 3; i++) prog.push_back(K(KOP_MMR, a + i, 0, 0, i));
  endtask

  initial begin
    #20000000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  // reference x^e mod m by square-and-multiply on wide integers
  function automatic logic [319:0] ref_pow(logic [319:0] m, logic [319:0] x, logic [63:0] e);
    logic [319:0] res, b;
    res = 320'(1); b = x % m;
    for (int i = 0; i < 64; i++) begin
      if (e[i]) res = (res * b) % m;
      b = (b * b) % m;
    end
    return res;
  endfunction

  // loads the operands, runs the program once and reads the result back
  task automatic run(input logic [319:0] m, input logic [319:0] x, input logic [63:0] e,
                     output logic [319:0] res, output int cyc);
    logic [63:0] q;
    logic [319:0] r, r2;
    int t0;
    r = (320'(1) << 160) % m;
    r2 = (r * r) % m;
    for (int i = 0; i < 3; i++) begin
      acc(1, 0, i, r[64*i +: 64], q);
      acc(1, 0, 3 + i, x[64*i +: 64], q);
      acc(1, 0, 10 + i, m[64*i +: 64], q);
      acc(1, 0, 13 + i, r2[64*i +: 64], q);
    end
    acc(1, 0, 6, e, q); acc(1, 0, 7, 64, q); acc(1, 0, 8, 1, q); acc(1, 0, 9, 0, q);
    @(negedge clk) start = 1; start_addr = 0;
    t0 = $time / 10;
    @(negedge clk) start = 0;
    while (busy) @(negedge clk);
    cyc = $time / 10 - t0;
    res = '0;
    for (int i = 0; i < 3; i++) begin
      acc(0, 0, i, 0, q);
      res[64*i +: 64] = q;
    end
    chk("no error", 64'(err), 0);
  endtask

  // registers: r0-2 acc, r3-5 x then xm, r6 exponent, r7 loop count,
  // r8 = 1, r9 = 0, r10-12 M, r13-15 R^2 mod M
  initial begin
    logic [63:0] q;
    logic [319:0] m, x, res, rf, ra, rb;
    logic [63:0] e;
    int lp, jc, jmp, cyc;
    mont(3, 13, 14, 15);                                 // xm = mont(x, R^2)
    for (int i = 0; i < 3; i++) prog.push_back(K(KOP_NOP));
    lp = prog.size();
    prog.push_back(K(KOP_LOOP, 0, 7, 0, 0));             // end patched below
    mont(0, 0, 1, 2);                                    // acc = acc^2
    prog.push_back(K(KOP_ADD, 6, 6, 6));                 // carry = exponent bit
    jc = prog.size();  prog.push_back(K(KOP_JC));
    jmp = prog.size(); prog.push_back(K(KOP_JMP));
    prog[jc] = K(KOP_JC, 0, 0, 0, prog.size());
    mont(0, 3, 4, 5);                                    // acc = acc * xm
    prog[jmp] = K(KOP_JMP, 0, 0, 0, prog.size());
    prog[lp] = K(KOP_LOOP, 0, 7, 0, prog.size());
    prog.push_back(K(KOP_NOP));                          // loop end
    mont(0, 8, 9, 9);                                    // leave the Montgomery domain
    prog.push_back(K(KOP_HALT));
    // the modulus is loaded once, by the first instructions
    prog.push_front(K(KOP_MMW, 0, 12, 0, 34));
    prog.push_front(K(KOP_MMW, 0, 11, 0, 33));
    prog.push_front(K(KOP_MMW, 0, 10, 0, 32));
    foreach (prog[i]) begin
      // targets shift by the three instructions placed in front
      if (prog[i][31:26] inside {KOP_JMP, KOP_JC, KOP_JMB, KOP_LOOP} && i >= 3) prog[i][13:0] = prog[i][13:0] + 14'd3;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (prog[i]) acc(1, 1, i, {32'd0, prog[i]}, q);
    for (int t = 0; t < 3; t++) begin
      m = {160'd0, 1'b1, 158'({$urandom, $urandom, $urandom, $urandom, $urandom}), 1'b1};
      x = {160'd0, 160'({$urandom, $urandom, $urandom, $urandom, $urandom})} % m;
      e = (t == 0) ? 64'd3 : {$urandom, $urandom};
      run(m, x, e, res, cyc);
      rf = ref_pow(m, x, e);
      for (int i = 0; i < 3; i++) chk($sformatf("case %0d word %0d", t, i), res[64*i +: 64], rf[64*i +: 64]);
      $display("x^e mod M, 160-bit M, 64-bit e (%0d ones): %0d cycles", $countones(e), cyc);
    end
    // Diffie-Hellman exchange: both parties' public values and both
    // shared secrets are computed on the engine and must agree.
    begin
      logic [319:0] pa, pb, ka, kb;
      logic [63:0] sa, sb;
      int c1, c2;
      m = {160'd0, 1'b1, 158'({$urandom, $urandom, $urandom, $urandom, $urandom}), 1'b1};
      x = 320'd2;
      sa = {$urandom, $urandom}; sb = {$urandom, $urandom};
      run(m, x, sa, pa, c1);
      run(m, x, sb, pb, c2);
      run(m, pb, sa, ka, cyc);
      run(m, pa, sb, kb, cyc);
      ra = ref_pow(m, x, sa); rb = ref_pow(m, x, sb); rf = ref_pow(m, rb, sa);
      for (int i = 0; i < 3; i++) begin
        chk($sformatf("DH public A word %0d", i), pa[64*i +: 64], ra[64*i +: 64]);
        chk($sformatf("DH public B word %0d", i), pb[64*i +: 64], rb[64*i +: 64]);
        chk($sformatf("DH shared secrets agree, word %0d", i), ka[64*i +: 64], kb[64*i +: 64]);
        chk($sformatf("DH shared secret word %0d", i), ka[64*i +: 64], rf[64*i +: 64]);
      end
      $display("Diffie-Hellman, 160-bit modulus, 64-bit secrets: %0d + %0d cycles per party", c1, cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
