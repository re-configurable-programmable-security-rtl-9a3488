// Self-checking testbench for cipher_engine: SP 800-38A AES-128 vectors in
// ECB, CBC, OFB and CFB, decryption in ECB/CBC/CFB, the FIPS 81 DES-CBC
// vector, the per-block latency through the engine, and the clocks per
// block when DES, 3DES and AES-128 blocks stream through back to back.
module tb_cipher_engine;
  import sp_pkg::*;
  logic clk = 0, rst_n = 0, cfg_load = 0, decrypt = 0;
  cipher_alg_e alg; cipher_mode_e mode;
  logic [255:0] key; logic [127:0] iv;
  logic ready, in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [63:0] in_data, out_data;
  logic [31:0] in_words, out_words;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  cipher_engine dut (.*);

  logic [63:0] got [$];
  always @(posedge clk) if (out_valid && out_ready) got.push_back(out_data);

  task automatic cfg(input cipher_alg_e a, input cipher_mode_e m, input logic d, input logic [255:0] k, input logic [127:0] v);
    alg = a; mode = m; decrypt = d; key = k; iv = v;
    @(negedge clk) cfg_load = 1;
    @(negedge clk) cfg_load = 0;
    while (!ready) @(negedge clk);
    got.delete();
  endtask
  task automatic send(input logic [63:0] w);
    in_data = w; in_valid = 1;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    in_valid = 0;
  endtask
  task automatic expect_words(input string what, input logic [63:0] e [$]);
    int t = 0;
    while (got.size() < e.size() && t < 1000) begin @(negedge clk); t++; end
    for (int i = 0; i < e.size(); i++) begin
      checks++;
      if (i >= got.size() || got[i] !== e[i]) begin
        failures++; $display("FAIL %s word %0d got %h exp %h", what, i, (i < got.size()) ? got[i] : 64'hx, e[i]);
      end
    end
  endtask

  // streams n identical blocks in ECB back to back and checks the steady
  // clocks per block between the last output words, and that all outputs
  // of the same plaintext block agree
  task automatic stream(input string what, input int nw, input int n, input int per_blk);
    logic [63:0] w [$];
    int tl [$];
    int span;
    got.delete();
    fork
      for (int i = 0; i < n * nw; i++) send(64'h0123_4567_89ab_cdef ^ 64'(i % nw));
      begin
        int seen = 0, t = 0;
        while (seen < n * nw && t < 5000) begin
          @(posedge clk);
          if (out_valid && out_ready) begin tl.push_back($time / 10); seen++; end
          t++;
        end
      end
    join
    @(negedge clk);
    checks++;
    span = (tl.size() == n * nw) ? (tl[n * nw - 1] - tl[(n - 3) * nw - 1]) : -1;
    if (span != 3 * per_blk) begin
      failures++; $display("FAIL %s: %0d clocks for the last 3 blocks, expected %0d", what, span, 3 * per_blk);
    end
    checks++;
    w = got;
    for (int i = nw; i < w.size(); i++) if (w[i] !== w[i - nw]) begin
      failures++; $display("FAIL %s: stream word %0d differs", what, i); break;
    end
    $display("%s: %0d clocks per block in a stream", what, span / 3);
  endtask

  localparam logic [255:0] K = {128'h2b7e151628aed2a6abf7158809cf4f3c, 128'd0};
  localparam logic [127:0] IV = 128'h000102030405060708090a0b0c0d0e0f;
  logic [63:0] p [$] = '{64'h6bc1bee22e409f96, 64'he93d7e117393172a, 64'hae2d8a571e03ac9c, 64'h9eb76fac45af8e51};
  initial begin
    int t0, lat;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cfg(ALG_AES128, MODE_ECB, 0, K, IV);
    foreach (p[i]) send(p[i]);
    expect_words("aes ecb", '{64'h3ad77bb40d7a3660, 64'ha89ecaf32466ef97, 64'hf5d3d58503b9699d, 64'he785895a96fdbaaf});
    cfg(ALG_AES128, MODE_ECB, 1, K, IV);
    foreach (got[i]) ;
    send(64'h3ad77bb40d7a3660); send(64'ha89ecaf32466ef97);
    expect_words("aes ecb dec", '{64'h6bc1bee22e409f96, 64'he93d7e117393172a});
    cfg(ALG_AES128, MODE_CBC, 0, K, IV);
    foreach (p[i]) send(p[i]);
    expect_words("aes cbc", '{64'h7649abac8119b246, 64'hcee98e9b12e9197d, 64'h5086cb9b507219ee, 64'h95db113a917678b2});
    cfg(ALG_AES128, MODE_CBC, 1, K, IV);
    send(64'h7649abac8119b246); send(64'hcee98e9b12e9197d); send(64'h5086cb9b507219ee); send(64'h95db113a917678b2);
    expect_words("aes cbc dec", p);
    cfg(ALG_AES128, MODE_OFB, 0, K, IV);
    foreach (p[i]) send(p[i]);
    expect_words("aes ofb", '{64'h3b3fd92eb72dad20, 64'h333449f8e83cfb4a, 64'h7789508d16918f03, 64'hf53c52dac54ed825});
    cfg(ALG_AES128, MODE_CFB, 0, K, IV);
    foreach (p[i]) send(p[i]);
    expect_words("aes cfb", '{64'h3b3fd92eb72dad20, 64'h333449f8e83cfb4a, 64'hc8a64537a0b3a93f, 64'hcde3cdad9f1ce58b});
    cfg(ALG_AES128, MODE_CFB, 1, K, IV);
    send(64'h3b3fd92eb72dad20); send(64'h333449f8e83cfb4a); send(64'hc8a64537a0b3a93f); send(64'hcde3cdad9f1ce58b);
    expect_words("aes cfb dec", p);
    // FIPS 81 DES CBC example
    cfg(ALG_DES, MODE_CBC, 0, {64'h0123456789abcdef, 192'd0}, {64'h1234567890abcdef, 64'd0});
    t0 = $time;
    send(64'h4e6f772069732074); send(64'h68652074696d6520); send(64'h666f7220616c6c20);
    expect_words("des cbc", '{64'he5c7cdde872bf27c, 64'h43e934008c389c0f, 64'h683788499a7c05f6});
    // latency of one AES block through the engine: 2 words in, 20 clocks in the core
    cfg(ALG_AES128, MODE_ECB, 0, K, IV);
    t0 = $time / 10;
    send(p[0]); send(p[1]);
    while (got.size() < 2) @(negedge clk);
    lat = $time / 10 - t0;
    checks++;
    if (lat < 20 || lat > 30) begin failures++; $display("FAIL AES block latency %0d", lat); end
    checks++;
    if (in_words != 2 || out_words != 2) begin failures++; $display("FAIL word counters %0d %0d", in_words, out_words); end
    // streaming throughput: the controller overlaps gathering and writing
    // back with the accelerator
    cfg(ALG_DES, MODE_ECB, 0, {64'h0123456789abcdef, 192'd0}, IV);
    stream("DES ECB", 1, 12, 8);
    cfg(ALG_TDES, MODE_ECB, 0, {64'h0123456789abcdef, 64'h23456789abcdef01, 64'h456789abcdef0123, 64'd0}, IV);
    stream("3DES ECB", 1, 12, 20);
    cfg(ALG_AES128, MODE_ECB, 0, K, IV);
    stream("AES-128 ECB", 2, 12, 23);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
