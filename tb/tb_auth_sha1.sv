// Workload testbench: SHA-1 on the authentication engine (32-bit mode).
// The working variables a..e sit in MCU registers 0..4; the register-file
// shift (5 registers) performs the variable rotation of each round and one
// rotate instruction fixes c = rotl30(old b). The message schedule
// W[t] = rotl1(W[t-3] ^ W[t-8] ^ W[t-14] ^ W[t-16]) comes from the message
// history buffer through the function generator configured as three-input
// parity. Four round subroutines differ only in the function-generator
// configuration (Ch, parity, Maj, parity) and round constant. Checks the
// digest of "abc" against the published value and reports the cycle count
// next to the 160 cycles the original architecture quotes per block.
module tb_auth_sha1;
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

  localparam int A = 0, B = 16;
  logic [63:0] prog [$];
  int sub [4];
  int calls [$];   // positions of CALL placeholders and their group

  // message schedule step (8 instructions) followed by a call to group g
  task automatic wstep(int g);
    prog.push_back(I(OP_MHR, .rd(B + 0), .imm(2)));
    prog.push_back(I(OP_MHR, .rd(B + 2), .imm(7)));
    prog.push_back(I(OP_MHR, .rd(B + 3), .imm(13)));
    prog.push_back(I(OP_MHR, .rd(B + 5), .imm(15)));
    prog.push_back(I(OP_FN,  .rd(B + 0), .ra(B + 0), .rb(B + 2), .rc(B + 3), .sel(1)));
    prog.push_back(I(OP_FN,  .rd(B + 0), .ra(B + 0), .rb(B + 5), .rc(B + 7), .sel(1)));
    prog.push_back(I(OP_ROT, .rd(B + 0), .ra(B + 0), .sel(1), .imm(1)));
    prog.push_back(I(OP_MHP, .ra(B + 0)));
    calls.push_back(prog.size() * 4 + g);
    prog.push_back(I(OP_CALL));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [31:0] k [4], h [5], msg [16], dref [5];
    int cyc, x;
    k = '{32'h5a827999, 32'h6ed9eba1, 32'h8f1bbcdc, 32'hca62c1d6};
    h = '{32'h67452301, 32'hefcdab89, 32'h98badcfe, 32'h10325476, 32'hc3d2e1f0};
    dref = '{32'ha9993e36, 32'h4706816a, 32'hba3e2571, 32'h7850c26c, 32'h9cd0d89d};
    msg = '{32'h61626380, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 32'h00000018};

    for (int i = 0; i < 5; i++) prog.push_back(I(OP_LDK, .rd(A + i), .sel(3), .imm(4 + i)));
    prog.push_back(I(OP_LDA, .sel(0), .imm(0)));
    prog.push_back(I(OP_LDA, .sel(2), .imm(256)));
    prog.push_back(I(OP_LDI, .rd(B + 7), .imm(0)));
    // rounds 0..15
    x = prog.size();
    prog.push_back(I(OP_LOOP, .cnt(16), .imm(x + 3)));
    prog.push_back(I(OP_LD, .rd(B + 0), .sel(0), .pinc(1), .size(1)));
    prog.push_back(I(OP_MHP, .ra(B + 0)));
    calls.push_back(prog.size() * 4 + 0);
    prog.push_back(I(OP_CALL));
    // rounds 16..19, 20..39, 40..59, 60..79
    for (int g = 0; g < 4; g++) begin
      x = prog.size();
      prog.push_back(I(OP_LOOP, .cnt(g == 0 ? 4 : 20), .imm(x + 9)));
      wstep(g);
    end
    for (int i = 0; i < 5; i++) begin
      prog.push_back(I(OP_LDK, .rd(B + 1), .sel(3), .imm(4 + i)));
      prog.push_back(I(OP_ADD, .rd(A + i), .ra(A + i), .rb(B + 1)));
      prog.push_back(I(OP_ST, .ra(A + i), .sel(2), .pinc(1), .size(1)));
    end
    prog.push_back(I(OP_HALT));
    // round subroutines: T = rotl5(a) + f(b, c, d) + e + K + W
    for (int g = 0; g < 4; g++) begin
      sub[g] = prog.size();
      prog.push_back(I(OP_LDK, .rd(B + 1), .sel(3), .imm(g)));
      prog.push_back(I(OP_ROT, .rd(B + 2), .ra(A + 0), .sel(1), .imm(5)));
      prog.push_back(I(OP_FN,  .rd(B + 3), .ra(A + 1), .rb(A + 2), .rc(A + 3), .sel(g == 3 ? 1 : g == 2 ? 2 : g)));
      prog.push_back(I(OP_ADD, .rd(B + 4), .ra(B + 2), .rb(B + 3), .rc(A + 4), .re(B + 1), .sel(3)));
      prog.push_back(I(OP_ADD, .rd(B + 4), .ra(B + 4), .rb(B + 0)));
      prog.push_back(I(OP_SHF, .rd(A), .ra(B + 4)));
      prog.push_back(I(OP_ROT, .rd(A + 2), .ra(A + 2), .sel(1), .imm(30)));
      prog.push_back(I(OP_RET));
    end
    foreach (calls[i]) prog[calls[i] / 4] = I(OP_CALL, .imm(sub[calls[i] % 4]));

    repeat (2) @(negedge clk); rst_n = 1;
    foreach (prog[i]) begin @(negedge clk) pm_we = 1; pm_addr = 9'(i); pm_wdata = prog[i]; end
    for (int i = 0; i < 4; i++) begin @(negedge clk) pm_we = 0; cm_we = 1; cm_addr = 8'(i); cm_wdata = 64'(k[i]); end
    for (int i = 0; i < 5; i++) begin @(negedge clk) cm_we = 1; cm_addr = 8'(4 + i); cm_wdata = 64'(h[i]); end
    for (int i = 0; i < 8; i++) begin @(negedge clk) cm_we = 0; dm_we = 1; dm_addr = 10'(i); dm_wdata = {msg[2*i+1], msg[2*i]}; end
    @(negedge clk) dm_we = 0;
    wcfg(0, {56'd0, 5'd5, 2'(LD_NORMAL), 1'b0});                  // shift 5 registers, 32-bit
    wcfg(6, {46'd0, 3'b011, 3'b000, 4'b0110, 4'b0000, 4'b0100});  // fg0: Ch
    wcfg(7, {46'd0, 3'b011, 3'b000, 4'b0000, 4'b0000, 4'b1100});  // fg1: parity
    wcfg(8, {46'd0, 3'b011, 3'b011, 4'b0100, 4'b0100, 4'b0100});  // fg2: Maj
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    dm_addr = 10'(32); #1; chk("h0", 64'(dm_rdata[31:0]), 64'(dref[0])); chk("h1", 64'(dm_rdata[63:32]), 64'(dref[1]));
    dm_addr = 10'(33); #1; chk("h2", 64'(dm_rdata[31:0]), 64'(dref[2])); chk("h3", 64'(dm_rdata[63:32]), 64'(dref[3]));
    dm_addr = 10'(34); #1; chk("h4", 64'(dm_rdata[31:0]), 64'(dref[4]));
    chk("no stack error", 64'(err), 0);
    checks++; if (cyc < 160) begin failures++; $display("FAIL implausible cycle count %0d", cyc); end
    $display("SHA-1 block: %0d cycles (quoted: 160)", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
