// Host interface: the 64-bit slave port through which the host queues tasks
// and reaches the program and data memories and the registers of the
// engines. A transfer is held (h_cs with h_we, h_addr, h_wdata) until h_ack;
// read data is valid with h_ack. Memory and register accesses to the engines
// wait while the interconnect runs a task (it owns the engines' load ports
// then); queueing a task waits while the queue is full.
// Address map (h_addr[19:16] region, low bits the word):
//   0: control  0 write: queue task structure address / read: tasks queued
//               1 complete flags (read; write 1s to clear)
//               2 tasks finished (read)   3 read: {active, irq}
//   1: authentication configuration registers   2: authentication program memory
//   3: authentication constants memory          4: authentication data memory
//   5: key engine program memory                6: key engine data registers
// The 64-bit width and the access to memories and registers follow the
// interface description; the map and handshake are this design's.
module host_if (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        h_cs,       // host transfer request
  input  logic        h_we,       // write
  input  logic [19:0] h_addr,     // word address
  input  logic [63:0] h_wdata,    // write data
  output logic [63:0] h_rdata,    // read data
  output logic        h_ack,      // transfer done this cycle
  // interconnect
  output logic        task_push,
  output logic [31:0] task_ptr,
  input  logic        task_full,
  output logic [3:0]  flag_clear,
  input  logic [3:0]  complete,
  input  logic        irq,
  input  logic [15:0] tasks_done,
  input  logic        active,
  input  logic [4:0]  queued,
  // authentication engine
  output logic        a_cfg_we,
  output logic [3:0]  a_cfg_addr,
  input  logic [63:0] a_cfg_rdata,
  output logic        a_pm_we,
  output logic        a_cm_we,
  output logic        a_dm_we,
  output logic [9:0]  a_addr,
  input  logic [63:0] a_dm_rdata,
  output logic [63:0] a_wdata,
  // key generation engine host port
  output logic        k_req,
  output logic        k_we,
  output logic        k_pm,
  output logic [8:0]  k_addr,
  output logic [63:0] k_wdata,
  input  logic [63:0] k_rdata,
  input  logic        k_ack
);
  logic [3:0] region;
  logic       eng_ok;
  assign region = h_addr[19:16];
  assign eng_ok = !active;
  assign task_ptr   = h_wdata[31:0];
  assign a_cfg_addr = h_addr[3:0];
  assign a_addr     = h_addr[9:0];
  assign a_wdata    = h_wdata;
  assign k_we       = h_we;
  assign k_pm       = (region == 4'd5);
  assign k_addr     = h_addr[8:0];
  assign k_wdata    = h_wdata;

  always_comb begin
    h_ack = 1'b0; h_rdata = '0;
    task_push = 1'b0; flag_clear = '0;
    a_cfg_we = 1'b0; a_pm_we = 1'b0; a_cm_we = 1'b0; a_dm_we = 1'b0; k_req = 1'b0;
    if (h_cs) case (region)
      4'd0: case (h_addr[1:0])
        2'd0: begin
          h_ack = !(h_we && task_full); task_push = h_we && !task_full; h_rdata = 64'(queued);
        end
        2'd1: begin h_ack = 1'b1; flag_clear = h_we ? h_wdata[3:0] : '0; h_rdata = 64'(complete); end
        2'd2: begin h_ack = 1'b1; h_rdata = 64'(tasks_done); end
        default: begin h_ack = 1'b1; h_rdata = {62'd0, active, irq}; end
      endcase
      4'd1: begin h_ack = eng_ok; a_cfg_we = eng_ok && h_we; h_rdata = a_cfg_rdata; end
      4'd2: begin h_ack = eng_ok; a_pm_we = eng_ok && h_we; end
      4'd3: begin h_ack = eng_ok; a_cm_we = eng_ok && h_we; end
      4'd4: begin h_ack = eng_ok; a_dm_we = eng_ok && h_we; h_rdata = a_dm_rdata; end
      4'd5, 4'd6: begin k_req = eng_ok; h_ack = eng_ok && k_ack; h_rdata = k_rdata; end
      default: h_ack = 1'b1;
    endcase
  end
  a_no_push_full: assert property (@(posedge clk) disable iff (!rst_n) !(task_push && task_full));
endmodule
