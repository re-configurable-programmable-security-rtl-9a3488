// Testbench of the two-channel DMA. Channel 0 copies eight words from the
// external memory model into a local memory, while channel 1 at the same time
// copies eight other local words out to the external memory. The local model
// holds `loc_rdy` low on random cycles, as a full or empty FIFO would, and the
// external model adds wait states. Checks: every word arrives in order at the
// right address, each channel pulses `ch_done` once, the two channels are
// busy together, and the combined transfer finishes within a bound derived
// from the word-interleaved schedule (each word takes at least the external
// wait plus two clocks). A zero-length start completes without a transfer.
module tb_dma;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  logic [1:0] ch_start = 0, ch_dir = 0, ch_busy, ch_done;
  logic [1:0][31:0] ch_ext = 0;
  logic [1:0][15:0] ch_loc = 0, ch_len = 0;
  logic mem_req, mem_we, mem_ack, loc_req, loc_we, loc_rdy;
  logic [31:0] mem_addr;
  logic [63:0] mem_wdata, mem_rdata, loc_wdata, loc_rdata;
  logic [15:0] loc_addr;

  dma dut (.*);
  ext_mem_model #(.WORDS(1024), .WAIT(2)) u_mem (.clk, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata);

  // local memory with random stalls
  logic [63:0] lmem [256];
  logic stall = 0;
  always @(negedge clk) stall = ($urandom % 4) == 0;
  assign loc_rdy = loc_req && !stall;
  assign loc_rdata = lmem[loc_addr[7:0]];
  always @(posedge clk) if (loc_req && loc_rdy && loc_we) lmem[loc_addr[7:0]] <= loc_wdata;

  int done_cnt [2];
  int overlap = 0;
  always @(posedge clk) begin
    if (ch_done[0]) done_cnt[0]++;
    if (ch_done[1]) done_cnt[1]++;
    if (ch_busy == 2'b11) overlap++;
  end

  initial begin
    #200000; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish;
  end

  initial begin
    int t0, cyc;
    done_cnt[0] = 0; done_cnt[1] = 0;
    for (int i = 0; i < 256; i++) lmem[i] = '0;
    @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      u_mem.m[16 + i] = 64'hE000_0000_0000_0000 | i;
      lmem[100 + i] = 64'h1000_0000_0000_0000 | (i * 3);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    ch_dir = 2'b10; ch_ext[0] = 16; ch_loc[0] = 10; ch_len[0] = 8;
    ch_ext[1] = 200; ch_loc[1] = 100; ch_len[1] = 8;
    ch_start = 2'b11;
    t0 = $time / 10;
    @(negedge clk) ch_start = 0;
    while (ch_busy != 0) @(negedge clk);
    @(negedge clk);
    cyc = $time / 10 - t0 - 1;
    for (int i = 0; i < 8; i++) begin
      chk($sformatf("in word %0d", i), lmem[10 + i], 64'hE000_0000_0000_0000 | i);
      chk($sformatf("out word %0d", i), u_mem.m[200 + i], 64'h1000_0000_0000_0000 | (i * 3));
    end
    chk("ch0 done pulses", done_cnt[0], 1);
    chk("ch1 done pulses", done_cnt[1], 1);
    checks++; if (overlap < 8) begin failures++; $display("FAIL channels overlapped only %0d clocks", overlap); end
    // 16 words, each at least WAIT+2 clocks of external access plus local side
    checks++; if (cyc < 16 * 3 || cyc > 16 * 12) begin failures++; $display("FAIL transfer took %0d clocks", cyc); end
    $display("16 words in %0d clocks, overlap %0d", cyc, overlap);
    // zero length
    @(negedge clk) ch_dir = 0; ch_len[0] = 0; ch_start = 2'b01;
    @(negedge clk) ch_start = 0;
    repeat (5) @(negedge clk);
    chk("zero length idle", ch_busy, 0);
    chk("zero length done", done_cnt[0], 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
