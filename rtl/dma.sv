// Two-channel DMA between the external memory and the local memories of the
// engines. Each channel is programmed with an external word address, a local
// word address, a length in 64-bit words and a direction (0: external to
// local, 1: local to external). Active channels take turns word by word on
// both ports; a channel whose local side is not ready (an empty or full FIFO)
// yields to the other and keeps any word it already holds, so an inbound and
// an outbound stream (for example plaintext
// into the cipher engine and ciphertext out of it) move at the same time.
// External port: request/acknowledge; a read returns data with the
// acknowledge. Local ("SRAM interface") port: request/ready, reads return
// data combinationally with ready, so a local target that cannot take or give
// a word (a full or empty FIFO) simply holds ready low.
// The two channels follow the interconnect figure; the word-interleaved
// arbitration and the port protocols are this design's.
module dma #(
  parameter int EAW = 32,   // external word-address bits
  parameter int LAW = 16,   // local word-address bits
  parameter int LENW = 16   // length bits
) (
  input  logic            clk,
  input  logic            rst_n,
  // channel programming
  input  logic [1:0]      ch_start,  // start channel 0/1
  input  logic [1:0]      ch_dir,    // direction per channel
  input  logic [1:0][EAW-1:0]  ch_ext,   // external start address
  input  logic [1:0][LAW-1:0]  ch_loc,   // local start address
  input  logic [1:0][LENW-1:0] ch_len,   // words
  output logic [1:0]      ch_busy,   // channel active
  output logic [1:0]      ch_done,   // one-cycle pulse at the end of a channel's transfer
  // external memory port
  output logic            mem_req,
  output logic            mem_we,
  output logic [EAW-1:0]  mem_addr,
  output logic [63:0]     mem_wdata,
  input  logic            mem_ack,
  input  logic [63:0]     mem_rdata,
  // local memory port
  output logic            loc_req,
  output logic            loc_we,
  output logic [LAW-1:0]  loc_addr,
  output logic [63:0]     loc_wdata,
  input  logic            loc_rdy,
  input  logic [63:0]     loc_rdata
);
  logic [1:0][EAW-1:0]  ea;
  logic [1:0][LAW-1:0]  la;
  logic [1:0][LENW-1:0] left;
  logic [1:0]           dir_q;
  logic                 cur;      // channel served by the current word
  logic [1:0][63:0]     buf_q;    // word in flight per channel
  logic [1:0]           have;     // channel holds a word read from its source
  typedef enum logic [1:0] {D_PICK, D_FIRST, D_SECOND} dst_e;
  dst_e st;

  // first half of a word: external read (inbound) or local read (outbound)
  always_comb begin
    mem_req = 1'b0; mem_we = 1'b0; mem_addr = ea[cur]; mem_wdata = buf_q[cur];
    loc_req = 1'b0; loc_we = 1'b0; loc_addr = la[cur]; loc_wdata = buf_q[cur];
    if (st == D_FIRST) begin
      if (!dir_q[cur]) mem_req = 1'b1;
      else loc_req = 1'b1;
    end else if (st == D_SECOND) begin
      if (!dir_q[cur]) begin loc_req = 1'b1; loc_we = 1'b1; end
      else begin mem_req = 1'b1; mem_we = 1'b1; end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ch_busy <= '0; ch_done <= '0; st <= D_PICK; cur <= 1'b0; buf_q <= '0; have <= '0;
      ea <= '0; la <= '0; left <= '0; dir_q <= '0;
    end else begin
      ch_done <= '0;
      for (int c = 0; c < 2; c++) begin
        if (ch_start[c] && !ch_busy[c]) begin
          ea[c] <= ch_ext[c]; la[c] <= ch_loc[c]; left[c] <= ch_len[c]; dir_q[c] <= ch_dir[c];
          if (ch_len[c] == '0) ch_done[c] <= 1'b1;
          else ch_busy[c] <= 1'b1;
        end
      end
      case (st)
        D_PICK: begin
          // alternate between channels that have work; resume a held word
          if (ch_busy[~cur]) begin cur <= ~cur; st <= have[~cur] ? D_SECOND : D_FIRST; end
          else if (ch_busy[cur]) st <= have[cur] ? D_SECOND : D_FIRST;
        end
        D_FIRST: begin
          if (!dir_q[cur] && mem_ack) begin buf_q[cur] <= mem_rdata; have[cur] <= 1'b1; st <= D_SECOND; end
          if ( dir_q[cur]) begin
            if (loc_rdy) begin buf_q[cur] <= loc_rdata; have[cur] <= 1'b1; st <= D_SECOND; end
            else st <= D_PICK;   // local source empty: let the other channel run
          end
        end
        default: begin  // D_SECOND
          if (!dir_q[cur] && !loc_rdy) st <= D_PICK;   // local target full: keep the word, switch
          if ((!dir_q[cur] && loc_rdy) || (dir_q[cur] && mem_ack)) begin
            have[cur] <= 1'b0;
            ea[cur] <= ea[cur] + 1'b1;
            la[cur] <= la[cur] + 1'b1;
            left[cur] <= left[cur] - 1'b1;
            if (left[cur] == LENW'(1)) begin
              ch_busy[cur] <= 1'b0; ch_done[cur] <= 1'b1;
            end
            st <= D_PICK;
          end
        end
      endcase
    end
  end
  // a request holds its address and data until acknowledged
  a_mem_stable: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req && !mem_ack |=> mem_req && $stable(mem_addr) && $stable(mem_we));
endmodule
