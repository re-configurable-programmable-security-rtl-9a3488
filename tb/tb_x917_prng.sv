// Self-checking testbench for x917_prng: three outputs of the ANSI X9.17
// generator against the formula evaluated with a separate des_core, and the
// cycle count per number.
module tb_x917_prng;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [63:0] k1 = 64'h0123456789abcdef, k2 = 64'hfedcba9876543210, k3 = 64'h89abcdef01234567;
  logic seed_load = 0, start = 0, busy, done;
  logic [63:0] seed, dt, rnd;
  // reference 3DES
  logic rs = 0, rbusy, rdone; logic [63:0] rin, rout;
  des_core u_ref (.clk, .rst_n, .start(rs), .tdes(1'b1), .decrypt(1'b0), .key1(k1), .key2(k2), .key3(k3),
                  .din(rin), .dout(rout), .busy(rbusy), .done(rdone));
  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  x917_prng dut (.*);
  task automatic E(input logic [63:0] x, output logic [63:0] y);
    rin = x; @(negedge clk) rs = 1; @(negedge clk) rs = 0;
    while (!rdone) @(negedge clk);
    y = rout;
  endtask
  initial begin
    logic [63:0] v, i, r; int cyc;
    repeat (2) @(negedge clk); rst_n = 1;
    v = 64'h1122334455667788;
    seed = v; @(negedge clk) seed_load = 1; @(negedge clk) seed_load = 0;
    for (int t = 0; t < 3; t++) begin
      dt = {$urandom, $urandom};
      E(dt, i); E(i ^ v, r); E(r ^ i, v);
      @(negedge clk) start = 1; @(negedge clk) start = 0;
      cyc = 0; while (!done) begin @(negedge clk); cyc++; end
      chk("R", rnd, r);
      checks++; if (cyc > 70) begin failures++; $display("FAIL cycles %0d", cyc); end
      if (t == 0) $display("X9.17 number: %0d cycles", cyc);
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
