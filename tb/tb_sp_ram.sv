// Self-checking testbench for sp_ram: write a pattern through the load port,
// read it back with one clock of read latency.
module tb_sp_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [8:0] raddr, waddr;
  logic [63:0] rdata, wdata;
  logic we = 0;
  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  sp_ram dut (.*);
  initial begin
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); we = 1; waddr = 9'(i); wdata = {32'(i) * 32'h9E3779B9, 32'(i)};
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 40; i++) begin
      int a; a = $urandom % 512;
      raddr = 9'(a); @(negedge clk);
      chk("rd", rdata, {32'(a) * 32'h9E3779B9, 32'(a)});
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
