// Self-checking testbench for aes_core: FIPS-197 appendix C vectors for the
// three key sizes, decryption of each, and the per-block cycle counts
// (20, 24 and 28 clocks).
module tb_aes_core;
  logic clk = 0, rst_n = 0, key_load = 0, start = 0, decrypt = 0;
  logic [255:0] key;
  logic [1:0] klen;
  logic key_ready, busy, done;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  aes_core dut (.*);

  task automatic setkey(input logic [255:0] k, input logic [1:0] l);
    key = k; klen = l;
    @(negedge clk) key_load = 1;
    @(negedge clk) key_load = 0;
    while (!key_ready) @(negedge clk);
  endtask
  task automatic run(input logic [127:0] in, input logic d, output logic [127:0] out, output int cyc);
    din = in; decrypt = d;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    out = dout;
  endtask
  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  task automatic checkc(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s cycles %0d exp %0d", what, got, exp); end
  endtask

  localparam logic [127:0] PT = 128'h00112233445566778899aabbccddeeff;
  logic [127:0] o, o2;
  int cyc;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    setkey({128'h000102030405060708090a0b0c0d0e0f, 128'd0}, 2'd0);
    run(PT, 0, o, cyc); check("aes128", o, 128'h69c4e0d86a7b0430d8cdb78070b4c55a); checkc("aes128", cyc, 20);
    run(o, 1, o2, cyc); check("aes128 dec", o2, PT); checkc("aes128 dec", cyc, 20);
    setkey({192'h000102030405060708090a0b0c0d0e0f1011121314151617, 64'd0}, 2'd1);
    run(PT, 0, o, cyc); check("aes192", o, 128'hdda97ca4864cdfe06eaf70a0ec0d7191); checkc("aes192", cyc, 24);
    run(o, 1, o2, cyc); check("aes192 dec", o2, PT);
    setkey(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f, 2'd2);
    run(PT, 0, o, cyc); check("aes256", o, 128'h8ea2b7ca516745bfeafc49904b496089); checkc("aes256", cyc, 28);
    run(o, 1, o2, cyc); check("aes256 dec", o2, PT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
