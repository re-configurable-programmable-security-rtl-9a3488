// End-to-end testbench of the security processor at its default parameters.
// The host loads a SHA-256 program into the authentication engine and a small
// program into the key engine, then queues three tasks back to back:
//   1. AES-128 CBC encryption of two blocks (SP 800-38A vectors),
//   2. a chain: DES encryption (FIPS 46 example) followed through the next
//      link by SHA-256 of "abc" on the authentication engine,
//   3. a key-engine task (multiprecision add and shift on two words).
// It checks every result in external memory, the completion flags and
// interrupt, and counts the mechanisms the design relies on: several tasks
// waiting in the queue, a structure chain being followed, both DMA channels
// moving data at once, external-memory wait states, host accesses held while
// a task runs, and the complete flags being cleared.
module tb_security_processor;
  import sp_pkg::*;
  import auth_isa_pkg::*;
  import key_isa_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic h_cs = 0, h_we = 0, h_ack, irq, mem_req, mem_we, mem_ack, pulse = 0;
  logic [19:0] h_addr = 0;
  logic [63:0] h_wdata = 0, h_rdata, mem_wdata, mem_rdata;
  logic [31:0] mem_addr;
  int checks = 0, failures = 0;

  security_processor dut (.*);
  ext_mem_model #(.WORDS(4096), .WAIT(2)) u_mem (.clk, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata);

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  int host_waits = 0;
  task automatic hw(input logic [19:0] a, input logic [63:0] d);
    @(negedge clk) h_cs = 1; h_we = 1; h_addr = a; h_wdata = d;
    #1; while (!h_ack) begin @(negedge clk); host_waits++; #1; end
    @(negedge clk) h_cs = 0; h_we = 0;
  endtask
  task automatic hr(input logic [19:0] a, output logic [63:0] d);
    @(negedge clk) h_cs = 1; h_we = 0; h_addr = a;
    #1; while (!h_ack) begin @(negedge clk); host_waits++; #1; end
    d = h_rdata;
    @(negedge clk) h_cs = 0;
  endtask

  // mechanism counters
  int max_queued = 0, fetches = 0, both_dma = 0, mem_waits = 0, irq_seen = 0;
  always @(posedge clk) if (rst_n) begin
    if (int'(dut.queued) > max_queued) max_queued = int'(dut.queued);
    if (dut.u_ic.st == dut.u_ic.T_DECODE) fetches++;
    if (dut.ch_busy == 2'b11) both_dma++;
    if (mem_req && !mem_ack) mem_waits++;
    if (irq) irq_seen++;
  end

  function automatic logic [31:0] K(kop_e op, int rd = 0, int ra = 0, int rb = 0, int imm = 0);
    K = {6'(op), 4'(rd), 4'(ra), 4'(rb), 14'(imm)};
  endfunction

  logic [63:0] prog [$];
  logic [31:0] kc [72];
  logic [63:0] cw [8], d;
  localparam logic [63:0] KA = 64'h0123456789abcdef, KB = 64'hf0e1d2c3b4a59687;
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    // ---- external memory contents ----
    // task 1: AES-128 CBC
    u_mem.m[12'h100] = {54'd0, 2'(MODE_CBC), 3'(ALG_AES128), 1'b0, 2'd0, 2'(ENG_CIPHER)};
    u_mem.m[12'h102] = 12'h200; u_mem.m[12'h103] = 4;
    u_mem.m[12'h104] = 12'h300; u_mem.m[12'h105] = 6;
    u_mem.m[12'h108] = 12'h400; u_mem.m[12'h109] = 0;
    u_mem.m[12'h200] = 64'h6bc1bee22e409f96; u_mem.m[12'h201] = 64'he93d7e117393172a;
    u_mem.m[12'h202] = 64'hae2d8a571e03ac9c; u_mem.m[12'h203] = 64'h9eb76fac45af8e51;
    u_mem.m[12'h300] = 64'h2b7e151628aed2a6; u_mem.m[12'h301] = 64'habf7158809cf4f3c;
    u_mem.m[12'h304] = 64'h0001020304050607; u_mem.m[12'h305] = 64'h08090a0b0c0d0e0f;
    // task 2a: DES ECB, chained to 2b
    u_mem.m[12'h110] = {54'd0, 2'(MODE_ECB), 3'(ALG_DES), 1'b0, 2'd1, 2'(ENG_CIPHER)};
    u_mem.m[12'h112] = 12'h210; u_mem.m[12'h113] = 1;
    u_mem.m[12'h114] = 12'h310; u_mem.m[12'h115] = 1;
    u_mem.m[12'h118] = 12'h410; u_mem.m[12'h119] = 12'h120;
    u_mem.m[12'h210] = 64'h0123456789abcdef; u_mem.m[12'h310] = 64'h133457799bbcdff1;
    // task 2b: SHA-256 of "abc"
    u_mem.m[12'h120] = {54'd0, 2'd0, 3'd0, 1'b0, 2'd1, 2'(ENG_AUTH)};
    u_mem.m[12'h121] = {38'd0, 10'd32, 7'd0, 9'd0};
    u_mem.m[12'h122] = 12'h220; u_mem.m[12'h123] = 8;
    u_mem.m[12'h126] = 12'h420; u_mem.m[12'h127] = 4; u_mem.m[12'h129] = 0;
    u_mem.m[12'h220] = {32'd0, 32'h61626380}; u_mem.m[12'h227] = {32'h00000018, 32'd0};
    // task 3: key engine
    u_mem.m[12'h130] = {54'd0, 2'd0, 3'd0, 1'b0, 2'd2, 2'(ENG_KEY)};
    u_mem.m[12'h131] = {38'd0, 10'd2, 7'd0, 9'd0};
    u_mem.m[12'h132] = 12'h230; u_mem.m[12'h133] = 2;
    u_mem.m[12'h136] = 12'h430; u_mem.m[12'h137] = 2; u_mem.m[12'h139] = 0;
    u_mem.m[12'h230] = KA; u_mem.m[12'h231] = KB;

    // ---- host loads the programmable engines ----
    tb_sha_pkg::constants(kc);
    tb_sha_pkg::sha_program(prog);
    tb_sha_pkg::config_words(cw);
    foreach (prog[i]) hw({4'd2, 16'(i)}, prog[i]);
    for (int i = 0; i < 72; i++) hw({4'd3, 16'(i)}, 64'(kc[i]));
    for (int i = 0; i < 8; i++) hw({4'd1, 16'(i)}, cw[i]);
    hr({4'd1, 16'd7}, d); chk("cfg readback", d, cw[7]);
    hw({4'd5, 16'd0}, 64'(K(KOP_ADD, .rd(2), .ra(0), .rb(1))));
    hw({4'd5, 16'd1}, 64'(K(KOP_SHL, .rd(3), .ra(0), .rb(1), .imm(4))));
    hw({4'd5, 16'd2}, 64'(K(KOP_HALT)));

    // ---- queue the tasks ----
    hw(20'h00000, 32'h100);
    hw(20'h00000, 32'h110);
    hw(20'h00000, 32'h130);
    // a host access to an engine while tasks run is held until they end
    hr({4'd1, 16'd6}, d); chk("held cfg read", d, cw[6]);
    while (dut.active || dut.queued != 0) @(negedge clk);

    // ---- results ----
    chk("aes cbc 0", u_mem.m[12'h400], 64'h7649abac8119b246); chk("aes cbc 1", u_mem.m[12'h401], 64'hcee98e9b12e9197d);
    chk("aes cbc 2", u_mem.m[12'h402], 64'h5086cb9b507219ee); chk("aes cbc 3", u_mem.m[12'h403], 64'h95db113a917678b2);
    chk("des", u_mem.m[12'h410], 64'h85e813540f0ab405);
    chk("sha 0", u_mem.m[12'h420], {32'h8f01cfea, 32'hba7816bf});
    chk("sha 1", u_mem.m[12'h421], {32'h5dae2223, 32'h414140de});
    chk("sha 2", u_mem.m[12'h422], {32'h96177a9c, 32'hb00361a3});
    chk("sha 3", u_mem.m[12'h423], {32'hf20015ad, 32'hb410ff61});
    chk("key add", u_mem.m[12'h430], KA + KB);
    chk("key shl", u_mem.m[12'h431], (KA << 4) | (KB >> 60));
    hr(20'h00001, d); chk("complete flags", d, 64'b0111);
    hr(20'h00002, d); chk("tasks done", d, 3);
    chk("irq", 64'(irq), 1);
    hw(20'h00001, 64'hf);
    hr(20'h00001, d); chk("flags cleared", d, 0);
    chk("irq cleared", 64'(irq), 0);

    // ---- mechanisms ----
    $display("queue max %0d, structures fetched %0d, both DMA channels busy %0d clk, memory waits %0d, host waits %0d, irq %0d clk",
             max_queued, fetches, both_dma, mem_waits, host_waits, irq_seen);
    checks++; if (max_queued < 2) begin failures++; $display("FAIL queue never held two tasks"); end
    checks++; if (fetches != 4) begin failures++; $display("FAIL chain: %0d structures", fetches); end
    checks++; if (both_dma == 0) begin failures++; $display("FAIL DMA channels never concurrent"); end
    checks++; if (mem_waits == 0) begin failures++; $display("FAIL no memory wait states"); end
    checks++; if (host_waits == 0) begin failures++; $display("FAIL host never held"); end
    checks++; if (irq_seen == 0) begin failures++; $display("FAIL irq never raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
