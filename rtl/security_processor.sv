// Security processor, one layer: a slave co-processor that takes the
// cryptographic work of IPsec/IKE off a host. The host queues tasks through
// the 64-bit host interface; the interconnect engine fetches each task's
// structure from external memory with the two-channel DMA, feeds the cipher
// engine (DES/3DES/AES in ECB/CBC/OFB/CFB), the programmable authentication
// engine (SHA/MD5/HMAC) or the programmable key generation engine (Montgomery
// arithmetic, X9.17 random numbers), returns the results to external memory
// and raises a completion flag/interrupt.
// Ports: the host bus (see host_if), the external memory port (see dma;
// an SDRAM controller sits behind it), the interrupt and the key engine's
// pulse source. Programs and constants for the two programmable engines are
// loaded by the host before tasks use them.
module security_processor
  import sp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // host interface
  input  logic        h_cs,
  input  logic        h_we,
  input  logic [19:0] h_addr,
  input  logic [63:0] h_wdata,
  output logic [63:0] h_rdata,
  output logic        h_ack,
  output logic        irq,          // a task-complete flag is set
  // external memory
  output logic        mem_req,
  output logic        mem_we,
  output logic [31:0] mem_addr,     // 64-bit word address
  output logic [63:0] mem_wdata,
  input  logic        mem_ack,
  input  logic [63:0] mem_rdata,
  // random seed source
  input  logic        pulse
);
  // ---- interconnect <-> host ----
  logic        task_push, task_full, active;
  logic [31:0] task_ptr;
  logic [3:0]  flag_clear, complete;
  logic [15:0] tasks_done;
  logic [4:0]  queued;
  // ---- DMA ----
  logic [1:0]  ch_start, ch_dir, ch_busy, ch_done;
  logic [1:0][31:0] ch_ext;
  logic [1:0][15:0] ch_loc, ch_len;
  logic        loc_req, loc_we, loc_rdy;
  logic [15:0] loc_addr;
  logic [63:0] loc_wdata, loc_rdata;
  // ---- cipher engine ----
  cipher_alg_e  c_alg;
  cipher_mode_e c_mode;
  logic         c_decrypt, c_cfg_load, c_ready, c_in_valid, c_in_ready, c_out_valid, c_out_ready;
  logic [255:0] c_key;
  logic [127:0] c_iv;
  logic [63:0]  c_in_data, c_out_data;
  logic [31:0]  c_in_words, c_out_words;
  // ---- authentication engine ----
  logic        ia_dm_we, a_start, a_done, a_busy, a_cmp_fail, a_err;
  logic [9:0]  ia_dm_addr, ha_addr;
  logic [63:0] ia_dm_wdata, a_dm_rdata, a_cfg_rdata, ha_wdata;
  logic [8:0]  a_start_addr;
  logic        ha_cfg_we, ha_pm_we, ha_cm_we, ha_dm_we;
  logic [3:0]  ha_cfg_addr;
  // ---- key engine ----
  logic        ik_req, ik_we, ik_ack, k_start, k_done, k_busy, k_err;
  logic [3:0]  ik_addr;
  logic [63:0] ik_wdata, k_rdata;
  logic [8:0]  k_start_addr;
  logic        hk_req, hk_we, hk_pm, k_ack;
  logic [8:0]  hk_addr;
  logic [63:0] hk_wdata;

  host_if u_host (
    .clk, .rst_n, .h_cs, .h_we, .h_addr, .h_wdata, .h_rdata, .h_ack,
    .task_push, .task_ptr, .task_full, .flag_clear, .complete, .irq, .tasks_done, .active, .queued,
    .a_cfg_we(ha_cfg_we), .a_cfg_addr(ha_cfg_addr), .a_cfg_rdata, .a_pm_we(ha_pm_we), .a_cm_we(ha_cm_we),
    .a_dm_we(ha_dm_we), .a_addr(ha_addr), .a_dm_rdata, .a_wdata(ha_wdata),
    .k_req(hk_req), .k_we(hk_we), .k_pm(hk_pm), .k_addr(hk_addr), .k_wdata(hk_wdata), .k_rdata, .k_ack);

  ic_engine u_ic (
    .clk, .rst_n, .task_push, .task_ptr, .task_full, .flag_clear, .complete, .irq, .tasks_done,
    .active, .queued,
    .ch_start, .ch_dir, .ch_ext, .ch_loc, .ch_len, .ch_busy, .ch_done,
    .loc_req, .loc_we, .loc_addr, .loc_wdata, .loc_rdy, .loc_rdata,
    .c_alg, .c_mode, .c_decrypt, .c_key, .c_iv, .c_cfg_load, .c_ready,
    .c_in_valid, .c_in_ready, .c_in_data, .c_out_valid, .c_out_ready, .c_out_data,
    .a_dm_we(ia_dm_we), .a_dm_addr(ia_dm_addr), .a_dm_wdata(ia_dm_wdata), .a_dm_rdata,
    .a_start, .a_start_addr, .a_done,
    .k_req(ik_req), .k_we(ik_we), .k_addr(ik_addr), .k_wdata(ik_wdata), .k_rdata, .k_ack(ik_ack),
    .k_start, .k_start_addr, .k_done);

  dma #(.EAW(32), .LAW(16), .LENW(16)) u_dma (
    .clk, .rst_n, .ch_start, .ch_dir, .ch_ext, .ch_loc, .ch_len, .ch_busy, .ch_done,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata,
    .loc_req, .loc_we, .loc_addr, .loc_wdata, .loc_rdy, .loc_rdata);

  cipher_engine #(.BUF_DEPTH(16)) u_cipher (
    .clk, .rst_n, .alg(c_alg), .mode(c_mode), .decrypt(c_decrypt), .key(c_key), .iv(c_iv),
    .cfg_load(c_cfg_load), .ready(c_ready),
    .in_valid(c_in_valid), .in_ready(c_in_ready), .in_data(c_in_data),
    .out_valid(c_out_valid), .out_ready(c_out_ready), .out_data(c_out_data),
    .in_words(c_in_words), .out_words(c_out_words));

  // The interconnect owns the engines' load ports while a task runs, the host otherwise.
  auth_engine u_auth (
    .clk, .rst_n,
    .cfg_we(ha_cfg_we), .cfg_addr(ha_cfg_addr), .cfg_wdata(ha_wdata), .cfg_rdata(a_cfg_rdata),
    .pm_we(ha_pm_we), .pm_addr(ha_addr[8:0]), .pm_wdata(ha_wdata),
    .cm_we(ha_cm_we), .cm_addr(ha_addr[7:0]), .cm_wdata(ha_wdata),
    .dm_we(active ? ia_dm_we : ha_dm_we), .dm_addr(active ? ia_dm_addr : ha_addr),
    .dm_wdata(active ? ia_dm_wdata : ha_wdata), .dm_rdata(a_dm_rdata),
    .start(a_start), .start_addr(a_start_addr), .busy(a_busy), .done(a_done),
    .cmp_fail(a_cmp_fail), .err(a_err));

  key_engine u_key (
    .clk, .rst_n,
    .h_req(active ? ik_req : hk_req), .h_we(active ? ik_we : hk_we), .h_pm(active ? 1'b0 : hk_pm),
    .h_addr(active ? {5'd0, ik_addr} : hk_addr), .h_wdata(active ? ik_wdata : hk_wdata),
    .h_rdata(k_rdata), .h_ack(k_ack),
    .start(k_start), .start_addr(k_start_addr), .pulse, .busy(k_busy), .done(k_done), .err(k_err));
  assign ik_ack = k_ack;
endmodule
