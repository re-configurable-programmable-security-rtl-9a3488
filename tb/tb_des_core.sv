// Self-checking testbench for des_core: published DES vectors, decryption
// round trips, 3DES against three chained single-DES passes, and the cycle
// counts (6 clocks per DES block, 18 per 3DES block).
module tb_des_core;
  logic clk = 0, rst_n = 0, start = 0, tdes = 0, decrypt = 0;
  logic [63:0] key1, key2, key3, din, dout;
  logic busy, done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  des_core dut (.*);

  task automatic run(input logic [63:0] in, input logic t, input logic d, output logic [63:0] out, output int cyc);
    din = in; tdes = t; decrypt = d;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    out = dout;
  endtask

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  logic [63:0] o, o2, a, b;
  int cyc;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    key1 = 64'h133457799BBCDFF1; key2 = 0; key3 = 0;
    run(64'h0123456789ABCDEF, 0, 0, o, cyc);
    check("des vec1", o, 64'h85E813540F0AB405);
    checks++; if (cyc != 6) begin failures++; $display("FAIL DES cycles %0d", cyc); end
    run(o, 0, 1, o2, cyc);
    check("des dec1", o2, 64'h0123456789ABCDEF);
    key1 = 64'h0123456789ABCDEF;
    run(64'h4E6F772069732074, 0, 0, o, cyc);
    check("des vec2", o, 64'h3FA40E8A984D4815);
    // 3DES: EDE equals E(k3, D(k2, E(k1, p)))
    key1 = 64'h0123456789ABCDEF; key2 = 64'h23456789ABCDEF01; key3 = 64'h456789ABCDEF0123;
    run(64'h5468652071756663, 1, 0, o, cyc);
    checks++; if (cyc != 18) begin failures++; $display("FAIL 3DES cycles %0d", cyc); end
    begin
      logic [63:0] s1, s2, s3, kk1, kk2, kk3;
      kk1 = key1; kk2 = key2; kk3 = key3;
      key1 = kk1; run(64'h5468652071756663, 0, 0, s1, cyc);
      key1 = kk2; run(s1, 0, 1, s2, cyc);
      key1 = kk3; run(s2, 0, 0, s3, cyc);
      check("3des chain", o, s3);
      key1 = kk1; key2 = kk2; key3 = kk3;
      run(o, 1, 1, o2, cyc);
      check("3des dec", o2, 64'h5468652071756663);
    end
    // random round trips
    for (int i = 0; i < 10; i++) begin
      key1 = {$urandom, $urandom}; a = {$urandom, $urandom};
      run(a, 0, 0, o, cyc); run(o, 0, 1, b, cyc);
      check("des rt", b, a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
