// Single-port synchronous-read RAM with a second, write-only port for loading
// from the host or DMA. Used for the program memories (512 x 64 in the
// authentication engine, 512 x 32 in the key engine) and the constants memory.
// Read data appears one clock after the address. When both ports write the
// same cycle the load port wins. Contents are not reset.
module sp_ram #(
  parameter int DEPTH = 512,  // words
  parameter int WIDTH = 64    // bits per word
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] raddr,  // read address
  output logic [WIDTH-1:0]         rdata,  // read data, registered
  input  logic                     we,     // load-port write enable
  input  logic [$clog2(DEPTH)-1:0] waddr,  // load-port address
  input  logic [WIDTH-1:0]         wdata   // load-port data
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
