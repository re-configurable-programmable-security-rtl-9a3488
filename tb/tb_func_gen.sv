// Self-checking testbench for func_gen: the SHA/MD5 Boolean functions
// (Ch, Maj, Parity, MD5 I) configured through the table fields, plus random
// configurations against a bit-level reference.
module tb_func_gen;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [63:0] x, y, z, fn;
  logic [17:0] cfg;
  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  func_gen dut (.*);
  function automatic logic [63:0] ref_pair(logic [63:0] a, logic [63:0] b, logic [3:0] c);
    logic [63:0] aa, bb, r;
    aa = c[0] ? ~a : a; bb = c[1] ? ~b : b;
    r = (c[3:2] == 0) ? aa : (c[3:2] == 1) ? (aa & bb) : (c[3:2] == 2) ? (aa | bb) : (aa ^ bb);
    return r;
  endfunction
  function automatic logic [63:0] ref_c(logic [63:0] a, logic [63:0] b, logic [2:0] c);
    case (c) 0: return a; 1: return a & b; 2: return a | b; 3: return a ^ b; 4: return b; default: return a; endcase
  endfunction
  initial begin
    for (int i = 0; i < 40; i++) begin
      x = {$urandom, $urandom}; y = {$urandom, $urandom}; z = {$urandom, $urandom};
      // Ch(x,y,z) = (x & y) ^ (~x & z): XY = X&Y, ZX = Z & !X, Fn = XY ^ ZX
      cfg = {3'b011, 3'b000, 4'b0110, 4'b0000, 4'b0100}; #1;
      chk("ch", fn, (x & y) ^ (~x & z));
      // Maj = (x&y) ^ (y&z) ^ (z&x)
      cfg = {3'b011, 3'b011, 4'b0100, 4'b0100, 4'b0100}; #1;
      chk("maj", fn, (x & y) ^ (y & z) ^ (z & x));
      // Parity = x ^ y ^ z : XY = X^Y, YZ = Z-pass... use XY ^ ZX with ZX = Z
      cfg = {3'b011, 3'b000, 4'b0000, 4'b0000, 4'b1100}; #1;
      chk("parity", fn, x ^ y ^ z);
      // MD5 I = y ^ (x | ~z): XY = X | !Y? use YZ = Y, ZX = !Z | X
      cfg = {3'b100, 3'b000, 4'b1001, 4'b0000, 4'b0000}; #1;
      chk("zx", fn, ~z | x);
      cfg = 18'($urandom); #1;
      chk("rand", fn, ref_c(ref_c(ref_pair(x, y, cfg[3:0]), ref_pair(y, z, cfg[7:4]), cfg[14:12]),
                            ref_pair(z, x, cfg[11:8]), cfg[17:15]));
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
