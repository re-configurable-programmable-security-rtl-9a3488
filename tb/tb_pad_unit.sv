// Self-checking testbench for pad_unit: every byte position with the MD5/SHA
// padding byte and a random byte.
module tb_pad_unit;
  import sp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [63:0] a, y;
  pad_cfg_t cfg;
  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  pad_unit dut (.*);
  initial begin
    a = 64'h1122334455667788;
    cfg.pad_byte = 8'h80;
    cfg.pos = 0; #1; chk("p0", y, 64'h8000000000000000);
    cfg.pos = 3; #1; chk("p3", y, 64'h1122338000000000);
    cfg.pos = 7; #1; chk("p7", y, 64'h1122334455667780);
    for (int i = 0; i < 20; i++) begin
      logic [63:0] e;
      a = {$urandom, $urandom}; cfg.pos = 3'($urandom); cfg.pad_byte = 8'($urandom); #1;
      e = a;
      for (int b = 0; b < 8; b++) if (b == int'(cfg.pos)) e[63-8*b -: 8] = cfg.pad_byte; else if (b > int'(cfg.pos)) e[63-8*b -: 8] = 0;
      chk("rand", y, e);
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
