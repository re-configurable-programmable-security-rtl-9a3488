// Pad unit: message padding for the hash algorithms. In the 64-bit word `a`
// (big-endian byte order, byte 0 = bits [63:56], as SHA/MD5 message words are
// loaded), the byte at position `cfg.pos` is replaced by the padding byte and
// every later byte is cleared; earlier bytes pass unchanged. With pad byte
// 0x80 this appends the '1' bit and the zero fill of MD5/SHA padding.
// The 3-bit byte pointer follows the pad configuration register; the padding
// byte field is 8 bits wide here. Combinational.
module pad_unit
  import sp_pkg::*;
(
  input  logic [63:0] a,    // last message word
  input  pad_cfg_t    cfg,  // position and padding byte
  output logic [63:0] y     // padded word
);
  always_comb begin
    for (int b = 0; b < 8; b++) begin
      if (b < 32'(cfg.pos))       y[63-8*b -: 8] = a[63-8*b -: 8];
      else if (b == 32'(cfg.pos)) y[63-8*b -: 8] = cfg.pad_byte;
      else                        y[63-8*b -: 8] = 8'h00;
    end
  end
endmodule
