// Workload testbench: MD5 on the authentication engine (32-bit mode). MD5's
// per-round rotation amounts and message-word order change every round, so
// the program is fully unrolled: 64 rounds of seven instructions (load the
// message word, load the constant, function generator, four-operand add,
// rotate, add b, register-file shift) fit the 512-word program memory. The
// registers hold (b, c, d, a) so that one 4-register shift performs the
// round's variable rotation. F and G both use the Ch configuration (G with
// the operands reordered), H the parity configuration and I a fourth
// configuration c ^ (b | ~d). The constants floor(|sin(i+1)| * 2^32) are
// computed here. Checks the digest of "abc" against the published value and
// reports the cycle count next to the 205 cycles quoted per block.
module tb_auth_md5;
  import sp_pkg::*;
  import auth_isa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we = 0, pm_we = 0, cm_we = 0, dm_we = 0, start = 0;
  logic [3:0] cfg_addr = 0; logic [63:0] cfg_wdata = 0, cfg_rdata;
  logic [8:0] pm_addr = 0, start_addr = 0; logic [63:0] pm_wdata = 0;
  logic [7:0] cm_addr = 0; logic [63:0] cm_wdata = 0;
  logic [9:0] dm_addr = 0; logic [63:0] dm_wdata = 0, dm_rdata;
  logic busy, done, cmp_fail, err;
  int checks = 0, failures = 0;
  auth_engine dut (.*);

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  function automatic logic [63:0] I(aop_e op, int rd = 0, int ra = 0, int rb = 0, int rc = 0, int re = 0,
                                    int sel = 0, int imm = 0, int cnt = 0, int pinc = 0, int size = 2);
    I = {6'(op), 5'(rd), 5'(ra), 5'(rb), 5'(rc), 5'(re), 3'(sel), 10'(cnt), 1'(pinc), 2'(size), 1'b0, 16'(imm)};
  endfunction
  task automatic wcfg(int a, logic [63:0] v);
    @(negedge clk) cfg_we = 1; cfg_addr = 4'(a); cfg_wdata = v;
    @(negedge clk) cfg_we = 0;
  endtask

  localparam int A = 0, B = 16;   // A0..A3 = b, c, d, a
  logic [63:0] prog [$];

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [31:0] k [64], init [4], msg [16];
    int s [16], cyc, g;
    s = '{7, 12, 17, 22, 5, 9, 14, 20, 4, 11, 16, 23, 6, 10, 15, 21};
    for (int i = 0; i < 64; i++) k[i] = 32'(longint'($floor($sqrt($sin(real'(i + 1)) ** 2) * 4294967296.0)));
    chk("K0", 64'(k[0]), 64'hd76aa478);
    chk("K63", 64'(k[63]), 64'heb86d391);
    init = '{32'hefcdab89, 32'h98badcfe, 32'h10325476, 32'h67452301};
    msg = '{32'h80636261, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 32'd24, 0};

    for (int i = 0; i < 4; i++) prog.push_back(I(OP_LDK, .rd(A + i), .sel(3), .imm(64 + i)));
    prog.push_back(I(OP_LDA, .sel(0), .imm(0)));
    prog.push_back(I(OP_LDA, .sel(2), .imm(256)));
    for (int i = 0; i < 64; i++) begin
      int r; r = i / 16;
      g = (r == 0) ? i : (r == 1) ? (5 * i + 1) % 16 : (r == 2) ? (3 * i + 5) % 16 : (7 * i) % 16;
      prog.push_back(I(OP_LD, .rd(B + 0), .sel(0), .imm(4 * g), .size(1)));
      prog.push_back(I(OP_LDK, .rd(B + 1), .sel(3), .imm(i)));
      case (r)
        0: prog.push_back(I(OP_FN, .rd(B + 3), .ra(A + 0), .rb(A + 1), .rc(A + 2), .sel(0)));  // F = Ch(b, c, d)
        1: prog.push_back(I(OP_FN, .rd(B + 3), .ra(A + 2), .rb(A + 0), .rc(A + 1), .sel(0)));  // G = Ch(d, b, c)
        2: prog.push_back(I(OP_FN, .rd(B + 3), .ra(A + 0), .rb(A + 1), .rc(A + 2), .sel(1)));  // H = b ^ c ^ d
        default: prog.push_back(I(OP_FN, .rd(B + 3), .ra(A + 0), .rb(A + 1), .rc(A + 2), .sel(3)));  // I
      endcase
      prog.push_back(I(OP_ADD, .rd(B + 4), .ra(A + 3), .rb(B + 3), .rc(B + 1), .re(B + 0), .sel(3)));
      prog.push_back(I(OP_ROT, .rd(B + 4), .ra(B + 4), .sel(1), .imm(s[4 * r + i % 4])));
      prog.push_back(I(OP_ADD, .rd(B + 4), .ra(B + 4), .rb(A + 0)));
      prog.push_back(I(OP_SHF, .rd(A), .ra(B + 4)));
    end
    // a, b, c, d += initial values; digest stored a, b, c, d
    for (int j = 0; j < 4; j++) begin
      int rg; rg = (j + 3) % 4;   // a is A3, then b, c, d are A0..A2
      prog.push_back(I(OP_LDK, .rd(B + 1), .sel(3), .imm(64 + rg)));
      prog.push_back(I(OP_ADD, .rd(A + rg), .ra(A + rg), .rb(B + 1)));
      prog.push_back(I(OP_ST, .ra(A + rg), .sel(2), .pinc(1), .size(1)));
    end
    prog.push_back(I(OP_HALT));
    chk("program fits", 64'(prog.size() <= 512), 1);

    repeat (2) @(negedge clk); rst_n = 1;
    foreach (prog[i]) begin @(negedge clk) pm_we = 1; pm_addr = 9'(i); pm_wdata = prog[i]; end
    for (int i = 0; i < 64; i++) begin @(negedge clk) pm_we = 0; cm_we = 1; cm_addr = 8'(i); cm_wdata = 64'(k[i]); end
    for (int i = 0; i < 4; i++) begin @(negedge clk) cm_we = 1; cm_addr = 8'(64 + i); cm_wdata = 64'(init[i]); end
    for (int i = 0; i < 8; i++) begin @(negedge clk) cm_we = 0; dm_we = 1; dm_addr = 10'(i); dm_wdata = {msg[2*i+1], msg[2*i]}; end
    @(negedge clk) dm_we = 0;
    wcfg(0, {56'd0, 5'd4, 2'(LD_NORMAL), 1'b0});                  // shift 4 registers, 32-bit
    wcfg(6, {46'd0, 3'b011, 3'b000, 4'b0110, 4'b0000, 4'b0100});  // fg0: Ch
    wcfg(7, {46'd0, 3'b011, 3'b000, 4'b0000, 4'b0000, 4'b1100});  // fg1: parity
    wcfg(9, {46'd0, 3'b011, 3'b100, 4'b1001, 4'b0000, 4'b0000});  // fg3: Y ^ (X | ~Z)
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    // MD5("abc") = 90015098 3cd24fb0 d6963f7d 28e17f72 (bytes), little-endian words
    dm_addr = 10'(32); #1; chk("a, b", dm_rdata, {32'hb04fd23c, 32'h98500190});
    dm_addr = 10'(33); #1; chk("c, d", dm_rdata, {32'h727fe128, 32'h7d3f96d6});
    chk("no stack error", 64'(err), 0);
    checks++; if (cyc < 205) begin failures++; $display("FAIL implausible cycle count %0d", cyc); end
    $display("MD5 block: %0d cycles (quoted: 205)", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
