// Self-checking testbench for msg_hist: pushes a word sequence and reads the
// SHA message-schedule taps W[t-2], W[t-7], W[t-15], W[t-16].
module tb_msg_hist;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0;
  logic [63:0] din, qa, qb;
  logic [3:0] tap_a, tap_b;
  logic [63:0] w [$];
  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  msg_hist dut (.*);
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      push = 1; din = {$urandom, $urandom}; w.push_back(din);
      @(negedge clk); push = 0;
      if (t >= 15) begin
        tap_a = 1; tap_b = 6; #1;
        chk("t-2", qa, w[t-1]); chk("t-7", qb, w[t-6]);
        tap_a = 14; tap_b = 15; #1;
        chk("t-15", qa, w[t-14]); chk("t-16", qb, w[t-15]);
      end
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
