// InterConnect engine: schedules host tasks on the crypto engines. The host
// pushes the external address of a task structure into the task queue. For
// each task the interconnect fetches the structure through DMA channel 0,
// decodes it, moves the key and the data into the selected engine, starts
// the engine, moves the result (ciphertext, message digest, key) back to
// external memory and follows the structure's next link; at the end of a
// chain it sets the task-complete flag of the task's channel ID, which can
// interrupt the host, and takes the next task from the queue.
// Task structure (ten 64-bit words in external memory, word addresses):
//   +0 header: [1:0] engine ID (cipher, authentication, key generation),
//      [3:2] channel ID, [4] in/out bound (1: inbound = decrypt),
//      [7:5] algorithm type, [9:8] cipher mode
//   +1 engine fields: authentication/key engine program start [8:0] and
//      result location [25:16] (data-memory long word / first register)
//   +2 data pointer   +3 data length (words)
//   +4 key pointer    +5 key length (words; for the cipher: key words
//      followed by two IV words)
//   +6 message digest / result pointer   +7 its length (words)
//   +8 write-back data pointer (cipher output)
//   +9 next link (structure address, 0 ends the chain)
// The field list follows the task-structure table; the word order, field
// widths and encodings are this design's. The status registers hold, per
// channel ID, the complete flag (write 1 to clear) and the number of tasks
// finished. A task that names all three engines is not supported: chains of
// structures serve that purpose here.
// Local address map seen by the DMA ([15:12] region): 0 cipher data stream,
// 1 cipher key/IV words, 2 authentication data memory, 3 key engine
// registers, 4 task structure buffer.
module ic_engine
  import sp_pkg::*;
#(
  parameter int QDEPTH = 8    // task queue entries
) (
  input  logic         clk,
  input  logic         rst_n,
  // host side
  input  logic         task_push,      // queue a task structure address
  input  logic [31:0]  task_ptr,
  output logic         task_full,      // queue full
  input  logic [3:0]   flag_clear,     // clear complete flags
  output logic [3:0]   complete,       // task complete flag per channel ID
  output logic         irq,            // any complete flag set
  output logic [15:0]  tasks_done,     // tasks finished
  output logic         active,         // a task is in progress
  output logic [4:0]   queued,         // tasks waiting
  // DMA programming
  output logic [1:0]   ch_start,
  output logic [1:0]   ch_dir,
  output logic [1:0][31:0] ch_ext,
  output logic [1:0][15:0] ch_loc,
  output logic [1:0][15:0] ch_len,
  input  logic [1:0]   ch_busy,
  input  logic [1:0]   ch_done,
  // DMA local port (decoded here)
  input  logic         loc_req,
  input  logic         loc_we,
  input  logic [15:0]  loc_addr,
  input  logic [63:0]  loc_wdata,
  output logic         loc_rdy,
  output logic [63:0]  loc_rdata,
  // cipher engine
  output cipher_alg_e  c_alg,
  output cipher_mode_e c_mode,
  output logic         c_decrypt,
  output logic [255:0] c_key,
  output logic [127:0] c_iv,
  output logic         c_cfg_load,
  input  logic         c_ready,
  output logic         c_in_valid,
  input  logic         c_in_ready,
  output logic [63:0]  c_in_data,
  input  logic         c_out_valid,
  output logic         c_out_ready,
  input  logic [63:0]  c_out_data,
  // authentication engine
  output logic         a_dm_we,
  output logic [9:0]   a_dm_addr,
  output logic [63:0]  a_dm_wdata,
  input  logic [63:0]  a_dm_rdata,
  output logic         a_start,
  output logic [8:0]   a_start_addr,
  input  logic         a_done,
  // key generation engine (its host port while a task runs)
  output logic         k_req,
  output logic         k_we,
  output logic [3:0]   k_addr,
  output logic [63:0]  k_wdata,
  input  logic [63:0]  k_rdata,
  input  logic         k_ack,
  output logic         k_start,
  output logic [8:0]   k_start_addr,
  input  logic         k_done
);
  // ---------------- task queue ----------------
  logic        q_valid, q_pop;
  logic [31:0] q_ptr;
  logic [$clog2(QDEPTH):0] q_count;
  logic        q_in_ready;
  sp_fifo #(.WIDTH(32), .DEPTH(QDEPTH)) u_queue (.clk, .rst_n, .in_valid(task_push), .in_ready(q_in_ready),
    .in_data(task_ptr), .out_valid(q_valid), .out_ready(q_pop), .out_data(q_ptr), .count(q_count));
  assign task_full = !q_in_ready;
  assign queued    = 5'(q_count);

  // ---------------- task structure ----------------
  logic [9:0][63:0] ts;
  logic [1:0]  eng;
  logic [1:0]  chid;
  assign eng  = ts[0][1:0];
  assign chid = ts[0][3:2];
  assign c_alg     = cipher_alg_e'(ts[0][7:5]);
  assign c_mode    = cipher_mode_e'(ts[0][9:8]);
  assign c_decrypt = ts[0][4];
  assign a_start_addr = ts[1][8:0];
  assign k_start_addr = ts[1][8:0];

  // ---------------- local port decode ----------------
  logic [3:0] region;
  logic [11:0] off;
  logic [5:0][63:0] kiv;
  assign region = loc_addr[15:12];
  assign off    = loc_addr[11:0];
  assign c_key  = {kiv[0], kiv[1], kiv[2], kiv[3]};
  assign c_iv   = {kiv[4], kiv[5]};
  always_comb begin
    loc_rdy = 1'b0; loc_rdata = '0;
    c_in_valid = 1'b0; c_in_data = loc_wdata; c_out_ready = 1'b0;
    a_dm_we = 1'b0; a_dm_addr = off[9:0]; a_dm_wdata = loc_wdata;
    k_req = 1'b0; k_we = loc_we; k_addr = off[3:0]; k_wdata = loc_wdata;
    if (loc_req) case (region)
      4'd0: if (loc_we) begin c_in_valid = 1'b1; loc_rdy = c_in_ready; end
            else begin c_out_ready = 1'b1; loc_rdy = c_out_valid; loc_rdata = c_out_data; end
      4'd1: begin loc_rdy = 1'b1; loc_rdata = kiv[off[2:0]]; end
      4'd2: begin a_dm_we = loc_we; loc_rdy = 1'b1; loc_rdata = a_dm_rdata; end
      4'd3: begin k_req = 1'b1; loc_rdy = k_ack; loc_rdata = k_rdata; end
      4'd4: begin loc_rdy = 1'b1; loc_rdata = ts[off[3:0]]; end
      default: loc_rdy = 1'b1;
    endcase
  end

  // ---------------- task sequencer ----------------
  typedef enum logic [3:0] {T_IDLE, T_FETCH, T_DECODE, T_CKEY, T_CCFG, T_CDATA,
                            T_LOAD, T_RUN, T_RESULT, T_NEXT} tstate_e;
  tstate_e     st;
  logic [31:0] cur_ptr;
  logic [1:0]  done_seen;
  logic        run_seen;

  assign active = (st != T_IDLE);
  assign irq    = |complete;
  assign q_pop  = (st == T_IDLE) && q_valid;

  always_comb begin
    ch_start = '0; ch_dir = '0; ch_ext = '0; ch_loc = '0; ch_len = '0;
    c_cfg_load = 1'b0; a_start = 1'b0; k_start = 1'b0;
    case (st)
      T_FETCH:  begin ch_start[0] = !ch_busy[0] && !done_seen[0] && !run_seen; ch_ext[0] = cur_ptr;
                      ch_loc[0] = 16'h4000; ch_len[0] = 16'd10; end
      T_CKEY:   begin ch_start[0] = !run_seen; ch_ext[0] = ts[4][31:0]; ch_loc[0] = 16'h1000;
                      ch_len[0] = ts[5][15:0]; end
      T_CCFG:   c_cfg_load = !run_seen;
      T_CDATA:  begin
        ch_start = {!run_seen, !run_seen};
        ch_ext[0] = ts[2][31:0]; ch_loc[0] = 16'h0000; ch_len[0] = ts[3][15:0];
        ch_dir[1] = 1'b1; ch_ext[1] = ts[8][31:0]; ch_loc[1] = 16'h0000; ch_len[1] = ts[3][15:0];
      end
      T_LOAD:   begin ch_start[0] = !run_seen; ch_ext[0] = ts[2][31:0];
                      ch_loc[0] = (eng == ENG_AUTH) ? 16'h2000 : 16'h3000; ch_len[0] = ts[3][15:0]; end
      T_RUN:    begin a_start = !run_seen && eng == ENG_AUTH; k_start = !run_seen && eng == ENG_KEY; end
      T_RESULT: begin ch_start[1] = !run_seen; ch_dir[1] = 1'b1; ch_ext[1] = ts[6][31:0];
                      ch_loc[1] = ((eng == ENG_AUTH) ? 16'h2000 : 16'h3000) | 16'(ts[1][25:16]);
                      ch_len[1] = ts[7][15:0]; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= T_IDLE; cur_ptr <= '0; ts <= '0; kiv <= '0; complete <= '0; tasks_done <= '0;
      done_seen <= '0; run_seen <= 1'b0;
    end else begin
      complete <= complete & ~flag_clear;
      // DMA writes into the structure buffer and the cipher key/IV words
      if (loc_req && loc_we && region == 4'd4) ts[off[3:0]] <= loc_wdata;
      if (loc_req && loc_we && region == 4'd1) kiv[off[2:0]] <= loc_wdata;
      done_seen <= done_seen | ch_done;
      case (st)
        T_IDLE: if (q_valid) begin cur_ptr <= q_ptr; st <= T_FETCH; run_seen <= 1'b0; done_seen <= '0; end
        T_FETCH: begin
          run_seen <= 1'b1;
          if (run_seen && (done_seen[0] || ch_done[0])) begin st <= T_DECODE; run_seen <= 1'b0; done_seen <= '0; end
        end
        T_DECODE: begin
          run_seen <= 1'b0; done_seen <= '0;
          case (eng)
            ENG_CIPHER: st <= T_CKEY;
            ENG_AUTH, ENG_KEY: st <= T_LOAD;
            default: st <= T_NEXT;
          endcase
        end
        T_CKEY: begin
          run_seen <= 1'b1;
          if (run_seen && (done_seen[0] || ch_done[0])) begin st <= T_CCFG; run_seen <= 1'b0; done_seen <= '0; end
        end
        T_CCFG: begin
          run_seen <= 1'b1;
          if (run_seen && c_ready) begin st <= T_CDATA; run_seen <= 1'b0; done_seen <= '0; end
        end
        T_CDATA: begin
          run_seen <= 1'b1;
          if (run_seen && &(done_seen | ch_done)) begin st <= T_NEXT; run_seen <= 1'b0; done_seen <= '0; end
        end
        T_LOAD: begin
          run_seen <= 1'b1;
          if (run_seen && (done_seen[0] || ch_done[0])) begin st <= T_RUN; run_seen <= 1'b0; done_seen <= '0; end
        end
        T_RUN: begin
          run_seen <= 1'b1;
          if (run_seen && ((eng == ENG_AUTH && a_done) || (eng == ENG_KEY && k_done))) begin
            st <= T_RESULT; run_seen <= 1'b0; done_seen <= '0;
          end
        end
        T_RESULT: begin
          run_seen <= 1'b1;
          if (run_seen && (done_seen[1] || ch_done[1])) begin st <= T_NEXT; run_seen <= 1'b0; done_seen <= '0; end
        end
        default: begin  // T_NEXT
          if (ts[9][31:0] != '0) begin
            cur_ptr <= ts[9][31:0]; st <= T_FETCH; run_seen <= 1'b0; done_seen <= '0;
          end else begin
            complete[chid] <= 1'b1;
            tasks_done <= tasks_done + 1'b1;
            st <= T_IDLE;
          end
        end
      endcase
    end
  end
endmodule
