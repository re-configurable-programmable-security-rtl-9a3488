// Self-checking testbench for mont_mul: random odd moduli of 160, 512 and
// 1024 bits; checks (result * 2^n) mod M == A*B mod M and result < M, and
// the n + 2 clock latency.
module tb_mont_mul;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr = 0, start = 0, busy, done;
  logic [1:0] wsel, nsel;
  logic [3:0] widx, ridx;
  logic [63:0] wdata, rdata;
  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  mont_mul dut (.*);
  function automatic logic [1023:0] rnd(int n);
    logic [1023:0] v; v = '0;
    for (int i = 0; i < 32; i++) v[32*i +: 32] = $urandom;
    return (n == 1024) ? v : v & ((1024'(1) << n) - 1);
  endfunction
  task automatic load(input logic [1:0] s, input logic [1023:0] v);
    for (int i = 0; i < 16; i++) begin
      @(negedge clk) wr = 1; wsel = s; widx = 4'(i); wdata = v[64*i +: 64];
    end
    @(negedge clk) wr = 0;
  endtask
  initial begin
    int ns [3] = '{160, 512, 1024};
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      int n, cyc; logic [1023:0] a, b, m, r; logic [2047:0] lhs, rhs;
      n = ns[t % 3];
      m = rnd(n); m[0] = 1; m[n-1] = 1;
      a = rnd(n) % m; b = rnd(n) % m;
      load(0, a); load(1, b); load(2, m);
      nsel = 2'(t % 3);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      chk("latency", 64'(cyc), 64'(n + 1));
      for (int i = 0; i < 16; i++) begin ridx = 4'(i); #1; r[64*i +: 64] = rdata; end
      lhs = ({1024'd0, r} << n) % {1024'd0, m};
      rhs = ({1024'd0, a} * {1024'd0, b}) % {1024'd0, m};
      checks++;
      if (lhs != rhs || r >= m) begin failures++; $display("FAIL montgomery n=%0d", n); end
    end
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
