// Self-checking testbench for sigma_gen: SHA-256 and SHA-512 sigma functions
// computed independently with rotations written out in the testbench.
module tb_sigma_gen;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [63:0] a, y;
  logic [17:0] cfg;
  logic shr3, alg64;
  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  sigma_gen dut (.*);
  function automatic logic [31:0] r32(logic [31:0] v, int n); return (v >> n) | (v << (32 - n)); endfunction
  function automatic logic [63:0] r64(logic [63:0] v, int n); return (v >> n) | (v << (64 - n)); endfunction
  initial begin
    for (int i = 0; i < 30; i++) begin
      a = {$urandom, $urandom};
      alg64 = 0; shr3 = 0; cfg = {6'd22, 6'd13, 6'd2}; #1;
      chk("S0_256", y, {32'd0, r32(a[31:0], 2) ^ r32(a[31:0], 13) ^ r32(a[31:0], 22)});
      shr3 = 1; cfg = {6'd3, 6'd18, 6'd7}; #1;
      chk("s0_256", y, {32'd0, r32(a[31:0], 7) ^ r32(a[31:0], 18) ^ (a[31:0] >> 3)});
      alg64 = 1; shr3 = 0; cfg = {6'd39, 6'd34, 6'd28}; #1;
      chk("S0_512", y, r64(a, 28) ^ r64(a, 34) ^ r64(a, 39));
      shr3 = 1; cfg = {6'd6, 6'd61, 6'd19}; #1;
      chk("s1_512", y, r64(a, 19) ^ r64(a, 61) ^ (a >> 6));
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
