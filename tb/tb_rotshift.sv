// Self-checking testbench for rotshift: all four operations at random
// amounts in 64- and 32-bit mode.
module tb_rotshift;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [63:0] a, y;
  logic [5:0] amt;
  logic [1:0] op;
  logic alg64;
  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  rotshift dut (.*);
  initial begin
    for (int i = 0; i < 60; i++) begin
      logic [127:0] d; logic [63:0] e; logic [31:0] e32;
      a = {$urandom, $urandom}; amt = 6'($urandom); op = 2'($urandom); alg64 = 1; #1;
      d = {a, a};
      case (op)
        0: e = d[int'(amt) +: 64];
        1: e = d[64 - int'(amt) +: 64];
        2: e = a >> amt;
        default: e = a << amt;
      endcase
      chk("rs64", y, e);
      alg64 = 0; #1;
      d = {64'd0, a[31:0], a[31:0]};
      case (op)
        0: e32 = d[int'(amt[4:0]) +: 32];
        1: e32 = d[32 - int'(amt[4:0]) +: 32];
        2: e32 = a[31:0] >> amt[4:0];
        default: e32 = a[31:0] << amt[4:0];
      endcase
      chk("rs32", y, {32'd0, e32});
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
