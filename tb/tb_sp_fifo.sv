// Self-checking testbench for sp_fifo: random push/pop traffic against a
// queue model, including full and empty conditions.
module tb_sp_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [63:0] in_data, out_data;
  logic [4:0] count;
  logic [63:0] q [$];
  int fulls = 0;
  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  sp_fifo #(.WIDTH(64), .DEPTH(16)) dut (.*);
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      in_valid = ($urandom % 100) < (i < 300 ? 70 : 30);
      in_data = {$urandom, $urandom};
      out_ready = ($urandom % 100) < (i < 300 ? 30 : 70);
      #1;
      if (!in_ready) fulls++;
      if (out_valid && out_ready) begin chk("data", out_data, q[0]); end
      chk("count", 64'(count), 64'(q.size()));
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
      @(negedge clk);
    end
    checks++; if (fulls == 0) begin failures++; $display("FAIL never full"); end
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
