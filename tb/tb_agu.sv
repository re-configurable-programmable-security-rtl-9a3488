// Self-checking testbench for agu: register loads, offsets and post-increment.
module tb_agu;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] sel;
  logic [12:0] offset, ea, step, ld_val;
  logic postinc = 0, ld = 0;
  logic [12:0] m [8];
  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  agu dut (.*);
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 8; i++) begin sel = 3'(i); ld = 1; ld_val = 13'($urandom); m[i] = ld_val; @(negedge clk); end
    ld = 0;
    for (int i = 0; i < 60; i++) begin
      sel = 3'($urandom); offset = 13'($urandom % 64); step = 13'(8); postinc = $urandom % 2; #1;
      chk("ea", 64'(ea), 64'(13'(m[sel] + offset)));
      @(negedge clk);
      if (postinc) m[sel] = m[sel] + 8;
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
