// Message history buffer: keeps the last DEPTH message-schedule words of a
// hash (SHA-1/2 need W[t-2], W[t-7], W[t-15], W[t-16] and W[t-3], W[t-8],
// W[t-14]). A push shifts a new word in at tap 0; tap k returns the word pushed
// k+1 pushes ago. Two combinational read taps. Reset clears the buffer.
module msg_hist #(
  parameter int DEPTH = 16   // words held
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,    // shift in a new word
  input  logic [63:0]              din,     // new word
  input  logic [$clog2(DEPTH)-1:0] tap_a,   // read tap A (0 = newest)
  input  logic [$clog2(DEPTH)-1:0] tap_b,   // read tap B
  output logic [63:0]              qa,      // word at tap A
  output logic [63:0]              qb       // word at tap B
);
  logic [63:0] h [DEPTH];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) h[i] <= '0;
    end else if (push) begin
      h[0] <= din;
      for (int i = 1; i < DEPTH; i++) h[i] <= h[i-1];
    end
  end
  assign qa = h[tap_a];
  assign qb = h[tap_b];
endmodule
