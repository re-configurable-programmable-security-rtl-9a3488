// Self-checking testbench for prog_ctrl: a small fetch/execute model runs a
// program with a three-pass loop, two nested loops, a call/return and a jump.
// The executed address trace is compared with the expected one, and the
// bubble count shows that loops cost no cycles (only the three taken
// jump/call/return each lose one fetch).
module tb_prog_ctrl;
  logic clk = 0, rst_n = 0, start = 0, en = 0;
  always #5 clk = ~clk;
  logic jump, call, ret, loop_push, err;
  logic [8:0] start_addr = 0, target, loop_end, pc;
  logic [15:0] loop_count;
  int checks = 0, failures = 0;
  prog_ctrl dut (.*);

  typedef enum {NOP, LOOP, CALL, RET, JMP, HALT} op_e;
  op_e op [512];
  int  arg1 [512], arg2 [512];
  logic [8:0] ir_pc;
  logic ir_valid = 0, halted = 0;
  int trace [$];
  int bubbles = 0;

  always_comb begin
    jump = 0; call = 0; ret = 0; loop_push = 0; target = '0; loop_end = '0; loop_count = '0;
    if (ir_valid && !halted) case (op[ir_pc])
      LOOP: begin loop_push = 1; loop_end = 9'(arg1[ir_pc]); loop_count = 16'(arg2[ir_pc]); end
      CALL: begin call = 1; target = 9'(arg1[ir_pc]); end
      RET:  ret = 1;
      JMP:  begin jump = 1; target = 9'(arg1[ir_pc]); end
      default: ;
    endcase
  end
  always @(posedge clk) if (en) begin
    if (ir_valid && !halted) begin
      trace.push_back(int'(ir_pc));
      if (op[ir_pc] == HALT) halted <= 1;
    end else if (!halted) bubbles++;
    ir_pc <= pc;
    ir_valid <= !(jump || call || ret);
  end

  int exp_t [$] = '{0,1,2,3,2,3,2,3,4,20,21,5,6,7,8,7,8,9,6,7,8,7,8,9,10,12};
  initial begin
    foreach (op[i]) begin op[i] = NOP; arg1[i] = 0; arg2[i] = 0; end
    op[1] = LOOP; arg1[1] = 3; arg2[1] = 3;
    op[4] = CALL; arg1[4] = 20;
    op[5] = LOOP; arg1[5] = 9; arg2[5] = 2;
    op[6] = LOOP; arg1[6] = 8; arg2[6] = 2;
    op[10] = JMP; arg1[10] = 12;
    op[12] = HALT;
    op[21] = RET;
    repeat (2) @(negedge clk); rst_n = 1;
    start = 1; @(negedge clk); start = 0; en = 1;
    while (!halted) @(negedge clk);
    en = 0;
    checks++;
    if (trace.size() != exp_t.size()) begin failures++; $display("FAIL trace length %0d", trace.size()); end
    foreach (exp_t[i]) begin
      checks++;
      if (i >= trace.size() || trace[i] != exp_t[i]) begin failures++; $display("FAIL trace[%0d]", i); end
    end
    checks++; if (bubbles != 4) begin failures++; $display("FAIL bubbles %0d", bubbles); end
    checks++; if (err) begin failures++; $display("FAIL err"); end
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
