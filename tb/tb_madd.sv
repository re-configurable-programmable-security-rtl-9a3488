// Self-checking testbench for madd: random 2- to 4-operand sums in 64-bit
// mode and in two-lane 32-bit mode.
module tb_madd;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [3:0][63:0] op;
  logic [3:0] en;
  logic alg64;
  logic [63:0] sum;
  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  madd dut (.*);
  initial begin
    for (int i = 0; i < 50; i++) begin
      logic [63:0] e; logic [31:0] lo, hi;
      for (int k = 0; k < 4; k++) op[k] = {$urandom, $urandom};
      en = 4'($urandom); alg64 = 1; #1;
      e = 0; for (int k = 0; k < 4; k++) if (en[k]) e += op[k];
      chk("sum64", sum, e);
      alg64 = 0; #1;
      lo = 0; hi = 0; for (int k = 0; k < 4; k++) if (en[k]) begin lo += op[k][31:0]; hi += op[k][63:32]; end
      chk("sum32", sum, {hi, lo});
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
