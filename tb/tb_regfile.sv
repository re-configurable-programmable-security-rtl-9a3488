// Self-checking testbench for regfile: random writes and reads against a
// model, and the shift of the first N registers used for hash working variables.
module tb_regfile;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] ra, rb, wa;
  logic [63:0] da, db, wd, shift_in;
  logic we = 0, shift = 0;
  logic [4:0] shift_n;
  logic [15:0][63:0] regs;
  logic [63:0] m [16];
  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  regfile dut (.*);
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 16; i++) m[i] = 0;
    for (int i = 0; i < 40; i++) begin
      we = 1; wa = 4'($urandom); wd = {$urandom, $urandom};
      @(negedge clk); m[wa] = wd; we = 0;
      ra = 4'($urandom); rb = 4'($urandom); #1;
      chk("ra", da, m[ra]); chk("rb", db, m[rb]);
    end
    // shift 8 registers (SHA working variables a..h)
    shift = 1; shift_n = 8; shift_in = 64'hA5A5;
    @(negedge clk); shift = 0;
    for (int i = 7; i > 0; i--) m[i] = m[i-1];
    m[0] = 64'hA5A5;
    for (int i = 0; i < 16; i++) chk("shift", regs[i], m[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
