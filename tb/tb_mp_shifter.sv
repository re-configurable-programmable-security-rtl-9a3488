// Self-checking testbench for mp_shifter: 256-bit left and right shifts done
// word by word against wide shifts in the testbench.
module tb_mp_shifter;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [63:0] a, fill, y;
  logic [5:0] amt;
  logic dir;
  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  mp_shifter dut (.*);
  initial begin
    for (int t = 0; t < 30; t++) begin
      logic [255:0] x, l, r;
      for (int i = 0; i < 8; i++) x[32*i +: 32] = $urandom;
      amt = 6'($urandom);
      for (int w = 0; w < 4; w++) begin
        a = x[64*w +: 64]; fill = (w == 0) ? 64'd0 : x[64*(w-1) +: 64]; dir = 0; #1; l[64*w +: 64] = y;
        fill = (w == 3) ? 64'd0 : x[64*(w+1) +: 64]; dir = 1; #1; r[64*w +: 64] = y;
      end
      for (int w = 0; w < 4; w++) begin
        chk("shl", l[64*w +: 64], 64'((x << amt) >> (64 * w)));
        chk("shr", r[64*w +: 64], 64'((x >> amt) >> (64 * w)));
      end
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
