// Testbench of the key generation engine. The host writes operand words into
// the data registers and a program into the program memory, starts it and
// reads the results back through the same port. The program exercises the
// Montgomery multiplier (160-bit operands, with A = 2^160 mod M so the
// product must equal B), the 64-bit adder with carry, a zero-overhead loop, a
// subroutine call and HALT. Checks: results, the Montgomery latency (n + 1
// clocks, seen through the run time of the busy-wait loop), that host
// accesses wait while a program runs, the done pulse and no stack error.
module tb_key_engine;
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

  always @(negedge clk) pulse = $urandom % 2;

  function automatic logic [31:0] K(kop_e op, int rd = 0, int ra = 0, int rb = 0, int imm = 0);
    K = {op, 4'(rd), 4'(ra), 4'(rb), 14'(imm)};
  endfunction
  int waits = 0;
  task automatic acc(input logic we, input logic pm, input int a, input logic [63:0] d, output logic [63:0] q);
    @(negedge clk) h_req = 1; h_we = we; h_pm = pm; h_addr = 9'(a); h_wdata = d;
    #1; while (!h_ack) begin @(negedge clk); waits++; #1; end
    q = h_rdata;
    @(negedge clk) h_req = 0; h_we = 0;
  endtask

  int done_seen = 0;
  always @(posedge clk) if (done) done_seen++;

  initial begin
    #400000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    logic [63:0] q;
    logic [31:0] prog [32];
    logic [63:0] b [3];
    int n, t0, t1;
    b[0] = 64'h0123456789abcdef; b[1] = 64'hfedcba9876543210; b[2] = 64'h1234;
    n = 0;
    // Montgomery operands: A = 2^159-1 (= 2^160 mod M), B, M = 2^159+1
    for (int i = 0; i < 3; i++) prog[n++] = K(KOP_MMW, 0, i, 0, i);
    for (int i = 0; i < 3; i++) prog[n++] = K(KOP_MMW, 0, 3 + i, 0, 16 + i);
    for (int i = 0; i < 3; i++) prog[n++] = K(KOP_MMW, 0, 6 + i, 0, 32 + i);
    prog[n++] = K(KOP_MMS, 0, 0, 0, 0);               // 9
    prog[n++] = K(KOP_JMB, 0, 0, 0, 10);              // 10: wait
    for (int i = 0; i < 3; i++) prog[n++] = K(KOP_MMR, 9 + i, 0, 0, i);  // 11..13
    prog[n++] = K(KOP_ADD, 12, 0, 0);                 // 14: r12 = r0 + r0, C = 1
    prog[n++] = K(KOP_ADC, 13, 6, 7);                 // 15: r13 = 1 + 0 + C = 2
    prog[n++] = K(KOP_LOOP, 0, 14, 0, 17);            // 16: r14 times
    prog[n++] = K(KOP_ADD, 15, 15, 6);                // 17: r15 += 1
    prog[n++] = K(KOP_CALL, 0, 0, 0, 20);             // 18
    prog[n++] = K(KOP_HALT);                          // 19
    prog[n++] = K(KOP_LDI, 1, 0, 0, 14'h1abc);        // 20: subroutine
    prog[n++] = K(KOP_RET);                           // 21
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < n; i++) acc(1, 1, i, {32'd0, prog[i]}, q);
    acc(1, 0, 0, '1, q); acc(1, 0, 1, '1, q); acc(1, 0, 2, 64'h7fffffff, q);
    for (int i = 0; i < 3; i++) acc(1, 0, 3 + i, b[i], q);
    acc(1, 0, 6, 1, q); acc(1, 0, 7, 0, q); acc(1, 0, 8, 64'h80000000, q);
    acc(1, 0, 14, 5, q); acc(1, 0, 15, 0, q);
    @(negedge clk) start = 1; start_addr = 0;
    t0 = $time / 10;
    @(negedge clk) start = 0;
    waits = 0;
    acc(0, 0, 9, 0, q);   // waits until HALT
    t1 = $time / 10;
    chk("mont w0", q, b[0]);
    checks++; if (waits < 161) begin failures++; $display("FAIL host waited only %0d clocks", waits); end
    $display("program ran about %0d clocks, host waited %0d", t1 - t0, waits);
    acc(0, 0, 10, 0, q); chk("mont w1", q, b[1]);
    acc(0, 0, 11, 0, q); chk("mont w2", q, b[2]);
    acc(0, 0, 12, 0, q); chk("add", q, 64'hffff_ffff_ffff_fffe);
    acc(0, 0, 13, 0, q); chk("adc carry", q, 2);
    acc(0, 0, 15, 0, q); chk("loop count", q, 5);
    acc(0, 0, 1, 0, q);  chk("call/ldi", q, 64'h1abc);
    chk("done pulses", done_seen, 1);
    chk("no error", err, 0);
    chk("idle", busy, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
