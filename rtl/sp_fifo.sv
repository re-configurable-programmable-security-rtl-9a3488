// Synchronous FIFO with valid/ready handshakes on both sides. Used for the
// host task queue and the cipher input/output buffers. A word is written when
// in_valid && in_ready and read when out_valid && out_ready; out_data shows the
// head word combinationally. Depth must be a power of two.
module sp_fifo #(
  parameter int WIDTH = 64,  // bits per entry
  parameter int DEPTH = 8    // entries
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,   // producer has a word
  output logic             in_ready,   // FIFO not full
  input  logic [WIDTH-1:0] in_data,    // word written
  output logic             out_valid,  // FIFO not empty
  input  logic             out_ready,  // consumer takes the head word
  output logic [WIDTH-1:0] out_data,   // head word
  output logic [$clog2(DEPTH):0] count // words held
);
  localparam int AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wp, rp;
  assign count     = wp - rp;
  assign in_ready  = count != (AW+1)'(DEPTH);
  assign out_valid = count != '0;
  assign out_data  = mem[rp[AW-1:0]];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0;
    end else begin
      if (in_valid && in_ready) begin
        mem[wp[AW-1:0]] <= in_data;
        wp <= wp + 1'b1;
      end
      if (out_valid && out_ready) rp <= rp + 1'b1;
    end
  end
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
endmodule
