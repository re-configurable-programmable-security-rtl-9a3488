// Self-checking testbench for logic16: every operation on random operands.
module tb_logic16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [15:0] a, b, y;
  logic [2:0] op;
  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  logic16 dut (.*);
  initial begin
    for (int t = 0; t < 20; t++) begin
      logic [15:0] e [8];
      a = 16'($urandom); b = 16'($urandom);
      e = '{a & b, a | b, a ^ b, ~a, a & ~b, b, 16'((a >> b[3:0]) & 1), a | (16'd1 << b[3:0])};
      for (int o = 0; o < 8; o++) begin op = 3'(o); #1; chk("op", 64'(y), 64'(e[o])); end
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
