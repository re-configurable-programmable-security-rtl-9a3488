// Self-checking testbench for auth_dmem: long-word loads through the load
// port, then 16/32/64-bit engine reads and writes against a byte model.
module tb_auth_dmem;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [12:0] addr;
  logic [1:0] size;
  logic [63:0] rdata, wdata, ld_data;
  logic we = 0, ld_we = 0;
  logic [9:0] ld_addr;
  logic [7:0] bm [8192];
  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  auth_dmem dut (.*);
  function automatic logic [63:0] mread(int a, int s);
    logic [63:0] v; int n; v = 0; n = (s == 0) ? 2 : (s == 1) ? 4 : 8;
    a = a & ~(n - 1);
    for (int b = 0; b < n; b++) v[8*b +: 8] = bm[a + b];
    return v;
  endfunction
  initial begin
    for (int i = 0; i < 1024; i++) begin
      logic [63:0] v; v = {$urandom, $urandom};
      @(negedge clk); ld_we = 1; ld_addr = 10'(i); ld_data = v;
      for (int b = 0; b < 8; b++) bm[8*i + b] = v[8*b +: 8];
    end
    @(negedge clk); ld_we = 0;
    for (int i = 0; i < 100; i++) begin
      int a, s, n;
      a = $urandom % 8192; s = $urandom % 3; n = (s == 0) ? 2 : (s == 1) ? 4 : 8;
      addr = 13'(a); size = 2'(s); #1;
      chk("rd", rdata, mread(a, s));
      wdata = {$urandom, $urandom}; we = 1;
      @(negedge clk); we = 0;
      for (int b = 0; b < n; b++) bm[(a & ~(n - 1)) + b] = wdata[8*b +: 8];
      #1; chk("wr", rdata, mread(a, s));
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
