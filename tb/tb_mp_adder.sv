// Self-checking testbench for mp_adder: 256-bit addition, subtraction and
// comparison done word by word through the carry chain, against wide
// arithmetic in the testbench.
module tb_mp_adder;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [63:0] a, b, y;
  logic cin, cout, zero;
  logic [1:0] op;
  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  mp_adder dut (.*);
  initial begin
    for (int t = 0; t < 30; t++) begin
      logic [255:0] x, z, s, d; logic c; logic allz;
      for (int i = 0; i < 8; i++) begin x[32*i +: 32] = $urandom; z[32*i +: 32] = $urandom; end
      if (t == 5) z = x;
      c = 0;
      for (int w = 0; w < 4; w++) begin
        a = x[64*w +: 64]; b = z[64*w +: 64]; cin = c; op = (w == 0) ? 2'd0 : 2'd1; #1;
        s[64*w +: 64] = y; c = cout;
      end
      chk("add", s[63:0], 64'(x + z)); chk("add hi", s[255:192], 64'((x + z) >> 192));
      chk("carry", 64'(c), 64'((257'(x) + 257'(z)) >> 256));
      c = 0; allz = 1;
      for (int w = 0; w < 4; w++) begin
        a = x[64*w +: 64]; b = z[64*w +: 64]; cin = c; op = (w == 0) ? 2'd2 : 2'd3; #1;
        d[64*w +: 64] = y; c = cout; allz &= zero;
      end
      chk("sub", d[255:192], 64'((x - z) >> 192));
      chk("lt", 64'(c), 64'(x < z));
      chk("eq", 64'(allz), 64'(x == z));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
