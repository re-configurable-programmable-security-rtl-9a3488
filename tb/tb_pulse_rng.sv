// Self-checking testbench for pulse_rng: pulses at random gaps and known
// clock counts. After every pulse the seed must equal the fold of the counter
// values at the synchronised rising edges and the event count must step by
// one; a pulse held high for many clocks counts once; reset clears both.
module tb_pulse_rng;
  logic clk = 0, rst_n = 0, pulse = 0;
  always #5 clk = ~clk;
  logic [63:0] seed;
  logic [15:0] events;
  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  pulse_rng dut (.*);
  initial begin
    logic [63:0] e; int cnt;
    e = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    cnt = 0;
    for (int p = 0; p < 10; p++) begin
      int gap; gap = 5 + $urandom % 20;
      repeat (gap) begin @(negedge clk); cnt++; end
      pulse = 1;
      // rising edge seen after two synchroniser stages: counter value then
      repeat (3) begin @(negedge clk); cnt++; end
      e = {e[56:0], e[63:57]} ^ 64'(cnt - 1);
      pulse = 0;
      repeat (2) begin @(negedge clk); cnt++; end
      chk($sformatf("seed after pulse %0d", p), seed, e);
      chk($sformatf("events after pulse %0d", p), 64'(events), 64'(p + 1));
    end
    // a long pulse is one event
    pulse = 1;
    repeat (20) @(negedge clk);
    pulse = 0;
    repeat (4) @(negedge clk);
    chk("long pulse counts once", 64'(events), 11);
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    chk("reset seed", seed, 0);
    chk("reset events", 64'(events), 0);
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
