// Authentication engine data memory: 8 Kbytes (1024 x 64-bit long words)
// addressed in bytes, with word (16-bit), dual word (32-bit) and long word
// (64-bit) access. Accesses are naturally aligned (low address bits below the
// access size are ignored). Byte order inside a long word is little-endian:
// byte address 8k+0 is bits [7:0]. Reads are combinational; writes happen on
// the clock edge. A second long-word write port serves DMA/host loading and
// wins over the engine port on a collision.
// Byte-address bit 0 is never used: the smallest access is a 16-bit word.
module auth_dmem #(
  parameter int BYTES = 8192   // capacity in bytes
) (
  input  logic                     clk,
  input  logic [$clog2(BYTES)-1:0] addr,    // byte address
  input  logic [1:0]               size,    // 0 word16, 1 dual word 32, 2/3 long word 64
  output logic [63:0]              rdata,   // read data, zero-extended
  input  logic                     we,      // engine write
  input  logic [63:0]              wdata,   // engine write data (low bits used)
  input  logic                     ld_we,   // load-port write
  input  logic [$clog2(BYTES/8)-1:0] ld_addr, // load-port long-word address
  input  logic [63:0]              ld_data  // load-port data
);
  localparam int LW = BYTES / 8;
  logic [63:0] mem [LW];
  logic [$clog2(LW)-1:0] la;
  logic [63:0] line;
  logic [63:0] merged;
  assign la   = addr[$clog2(BYTES)-1:3];
  assign line = mem[la];
  always_comb begin
    merged = line;
    case (size)
      2'd0: begin
        rdata = {48'd0, line[16*addr[2:1] +: 16]};
        merged[16*addr[2:1] +: 16] = wdata[15:0];
      end
      2'd1: begin
        rdata = {32'd0, line[32*addr[2] +: 32]};
        merged[32*addr[2] +: 32] = wdata[31:0];
      end
      default: begin
        rdata  = line;
        merged = wdata;
      end
    endcase
  end
  always_ff @(posedge clk) begin
    if (we && !(ld_we && ld_addr == la)) mem[la] <= merged;
    if (ld_we) mem[ld_addr] <= ld_data;
  end
endmodule
