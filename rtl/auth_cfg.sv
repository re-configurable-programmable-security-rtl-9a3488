// Configuration registers of the authentication engine, written and read by
// the host. They let one datapath serve different hash algorithms:
//   addr 0  general: [0] 64-bit algorithm, [2:1] load mode (normal, with
//           ipad, with opad, with comparison), [7:3] registers in a shift
//   addr 1  pad: [7:0] padding byte, [10:8] byte position
//   addr 2,3  MCU sigma generator rotation indexes 0 and 1 (18 bits each)
//   addr 4,5  MGU sigma generator rotation indexes 0 and 1 (18 bits each)
//   addr 6..9 function generator configurations 0..3 (18 bits each)
// The register kinds and the 18-bit widths follow the engine description;
// the number of sigma registers per set (two, as SHA needs) and the address
// map are this design's. Writes take effect on the next clock; reads are
// combinational. Reset clears all registers.
// Host write-data bits above the widest register (18 bits) are ignored.
module auth_cfg
  import sp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,        // host write
  input  logic [3:0]  addr,      // register address
  input  logic [63:0] wdata,     // write data
  output logic [63:0] rdata,     // read data
  output gen_cfg_t    gen,       // general configuration
  output pad_cfg_t    pad,       // pad configuration
  output logic [1:0][17:0] mcu_sig, // MCU sigma rotation indexes
  output logic [1:0][17:0] mgu_sig, // MGU sigma rotation indexes
  output logic [3:0][17:0] fg       // function generator configurations
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gen <= '0; pad <= '0; mcu_sig <= '0; mgu_sig <= '0; fg <= '0;
    end else if (we) begin
      case (addr)
        4'd0: gen <= wdata[7:0];
        4'd1: pad <= wdata[10:0];
        4'd2: mcu_sig[0] <= wdata[17:0];
        4'd3: mcu_sig[1] <= wdata[17:0];
        4'd4: mgu_sig[0] <= wdata[17:0];
        4'd5: mgu_sig[1] <= wdata[17:0];
        4'd6: fg[0] <= wdata[17:0];
        4'd7: fg[1] <= wdata[17:0];
        4'd8: fg[2] <= wdata[17:0];
        4'd9: fg[3] <= wdata[17:0];
        default: ;
      endcase
    end
  end
  always_comb begin
    case (addr)
      4'd0: rdata = 64'(gen);
      4'd1: rdata = 64'(pad);
      4'd2: rdata = 64'(mcu_sig[0]);
      4'd3: rdata = 64'(mcu_sig[1]);
      4'd4: rdata = 64'(mgu_sig[0]);
      4'd5: rdata = 64'(mgu_sig[1]);
      4'd6: rdata = 64'(fg[0]);
      4'd7: rdata = 64'(fg[1]);
      4'd8: rdata = 64'(fg[2]);
      4'd9: rdata = 64'(fg[3]);
      default: rdata = '0;
    endcase
  end
endmodule
