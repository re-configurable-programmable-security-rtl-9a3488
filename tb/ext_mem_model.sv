// Behavioural model of the external memory (SDRAM behind its controller)
// for testbenches: 64-bit words, word addressed, request/acknowledge with a
// configurable wait before each acknowledge. Not synthesizable.
module ext_mem_model #(
  parameter int WORDS = 4096,  // words modelled
  parameter int WAIT  = 2      // clocks before acknowledge
) (
  input  logic        clk,
  input  logic        mem_req,
  input  logic        mem_we,
  input  logic [31:0] mem_addr,
  input  logic [63:0] mem_wdata,
  output logic        mem_ack,
  output logic [63:0] mem_rdata
);
  logic [63:0] m [WORDS];
  int w = 0;
  initial begin
    mem_ack = 0; mem_rdata = 0;
    for (int i = 0; i < WORDS; i++) m[i] = 0;
  end
  always @(posedge clk) begin
    mem_ack <= 1'b0;
    if (mem_req && !mem_ack) begin
      if (w == WAIT) begin
        w <= 0;
        mem_ack <= 1'b1;
        if (mem_we) m[mem_addr % WORDS] <= mem_wdata;
        else mem_rdata <= m[mem_addr % WORDS];
      end else w <= w + 1;
    end
  end
endmodule
