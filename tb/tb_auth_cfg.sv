// Testbench of the authentication engine's configuration registers. Writes
// random values to every register address, then checks that each decoded
// output field and each read-back value holds exactly the written bits
// (18-bit sigma and function-generator fields, 8-bit general and 11-bit pad
// registers), that a write takes effect on the next clock, and that reset
// clears everything.
module tb_auth_cfg;
  import sp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  logic we = 0;
  logic [3:0] addr = 0;
  logic [63:0] wdata = 0, rdata;
  gen_cfg_t gen;
  pad_cfg_t pad;
  logic [1:0][17:0] mcu_sig, mgu_sig;
  logic [3:0][17:0] fg;
  auth_cfg dut (.*);

  initial begin
    #100000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    logic [63:0] v [10];
    logic [63:0] mask [10];
    mask[0] = 64'hff; mask[1] = 64'h7ff;
    for (int i = 2; i < 10; i++) mask[i] = 64'h3ffff;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 10; i++) begin
        v[i] = {$urandom, $urandom};
        @(negedge clk) we = 1; addr = 4'(i); wdata = v[i];
        @(posedge clk) #1;
        we = 0;
        chk($sformatf("readback %0d", i), rdata, v[i] & mask[i]);
      end
      chk("gen", gen, v[0][7:0]);
      chk("pad", pad, v[1][10:0]);
      chk("mcu0", mcu_sig[0], v[2][17:0]); chk("mcu1", mcu_sig[1], v[3][17:0]);
      chk("mgu0", mgu_sig[0], v[4][17:0]); chk("mgu1", mgu_sig[1], v[5][17:0]);
      for (int i = 0; i < 4; i++) chk($sformatf("fg%0d", i), fg[i], v[6 + i][17:0]);
    end
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    chk("reset fg", fg, '0);
    chk("reset gen", gen, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
