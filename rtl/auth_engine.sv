// Authentication (hash) engine: a small programmable processor whose
// datapath is made for the SHA-1/2 and MD5 families and their HMAC forms.
// Program control (two nested zero-overhead loops, four-level call stack,
// conditional/unconditional jumps) fetches 64-bit instructions from a
// 512-word program memory; the dispatcher reads up to four operands from two
// 16 x 64-bit register files (the MCU file for the working variables, the
// MGU file for the message schedule) and drives one of the units: the
// multi-operand adder, the sigma generator (MCU or MGU rotation sets), the
// function generator, the rotator/shifter, the message history buffer or
// the pad unit. Loads from the 8 Kbyte data memory can XOR the word with the
// HMAC inner or outer pad or compare it with a register (digest check). A
// constants memory holds round constants and initial hash values.
// The unit list, memory sizes, loop/call depths and configuration registers
// follow the engine description; the instruction encoding (auth_isa_pkg), the
// two-stage fetch/execute pipeline and the constants-memory size are this
// design's choices.
// Timing: one instruction per clock; a taken jump, call or return costs one
// clock; loops cost none. Loads and memory reads are combinational within
// the execute clock.
// Interface: while the engine is idle the host/DMA side loads the program,
// constants and data memories and the configuration registers, and reads
// the data memory (dm_rdata, long words). `start` runs from `start_addr`
// until HALT, which pulses `done`. `cmp_fail` is set by a load-with-compare
// mismatch since start; `err` flags a loop/call stack overflow.
module auth_engine
  import sp_pkg::*;
  import auth_isa_pkg::*;
#(
  parameter int PM_DEPTH = 512,   // program memory words (64-bit)
  parameter int DM_BYTES = 8192,  // data memory bytes
  parameter int CM_DEPTH = 256    // constants memory words (64-bit)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,      // configuration register write
  input  logic [3:0]  cfg_addr,
  input  logic [63:0] cfg_wdata,
  output logic [63:0] cfg_rdata,
  input  logic        pm_we,       // program memory load
  input  logic [$clog2(PM_DEPTH)-1:0] pm_addr,
  input  logic [63:0] pm_wdata,
  input  logic        cm_we,       // constants memory load
  input  logic [$clog2(CM_DEPTH)-1:0] cm_addr,
  input  logic [63:0] cm_wdata,
  input  logic        dm_we,       // data memory long-word load
  input  logic [$clog2(DM_BYTES/8)-1:0] dm_addr, // long-word address (load and idle read)
  input  logic [63:0] dm_wdata,
  output logic [63:0] dm_rdata,    // data memory long word at dm_addr (valid while idle)
  input  logic        start,       // run the program
  input  logic [$clog2(PM_DEPTH)-1:0] start_addr,
  output logic        busy,        // program running
  output logic        done,        // HALT executed (one-cycle pulse)
  output logic        cmp_fail,    // load-with-compare mismatch
  output logic        err          // loop/call stack error
);
  localparam int PAW = $clog2(PM_DEPTH);
  localparam int DAW = $clog2(DM_BYTES);
  localparam int CAW = $clog2(CM_DEPTH);

  // ---------------- configuration ----------------
  gen_cfg_t gen;
  pad_cfg_t pad;
  logic [1:0][17:0] mcu_sig, mgu_sig;
  logic [3:0][17:0] fgc;
  auth_cfg u_cfg (.clk, .rst_n, .we(cfg_we), .addr(cfg_addr), .wdata(cfg_wdata), .rdata(cfg_rdata),
                  .gen, .pad, .mcu_sig, .mgu_sig, .fg(fgc));

  // ---------------- fetch ----------------
  logic [PAW-1:0] pc, tgt;
  logic [63:0]    ir;
  logic           ir_valid, running;
  logic           do_jump, do_call, do_ret, do_loop, do_halt;
  logic [15:0]    lcount;
  logic           pc_err;
  sp_ram #(.DEPTH(PM_DEPTH), .WIDTH(64)) u_pmem (
    .clk, .raddr(pc), .rdata(ir), .we(pm_we), .waddr(pm_addr), .wdata(pm_wdata));
  prog_ctrl #(.AW(PAW), .LOOP_DEPTH(2), .CALL_DEPTH(4)) u_pc (
    .clk, .rst_n, .start, .start_addr, .en(running && !do_halt),
    .jump(do_jump), .call(do_call), .ret(do_ret), .target(tgt),
    .loop_push(do_loop), .loop_end(ir[PAW-1:0]), .loop_count(lcount), .pc, .err(pc_err));

  // ---------------- decode ----------------
  aop_e        op;
  logic [4:0]  f_rd, f_ra, f_rb, f_rc, f_re;
  logic [2:0]  sel;
  logic [9:0]  cnt;
  logic        pinc;
  logic [1:0]  size;
  logic [15:0] imm;
  logic        ex;
  assign op   = aop_e'(ir[63:58]);
  assign f_rd = ir[57:53];
  assign f_ra = ir[52:48];
  assign f_rb = ir[47:43];
  assign f_rc = ir[42:38];
  assign f_re = ir[37:33];
  assign sel  = ir[32:30];
  assign cnt  = ir[29:20];
  assign pinc = ir[19];
  assign size = ir[18:17];
  assign imm  = ir[15:0];
  assign ex   = running && ir_valid;

  // ---------------- register files ----------------
  logic [15:0][63:0] rega, regb;
  logic [63:0] opa, opb, opc, ope, opd;
  logic        wea, web, shfa, shfb;
  logic [63:0] wdat;
  logic [3:0]  unused_ra, unused_rb;
  logic [63:0] unused_da, unused_db, unused_ea, unused_eb;
  assign unused_ra = '0;
  assign unused_rb = '0;
  regfile #(.NREGS(16)) u_rfa (.clk, .rst_n, .ra(unused_ra), .rb(unused_rb), .da(unused_da), .db(unused_db),
    .we(wea), .wa(f_rd[3:0]), .wd(wdat), .shift(shfa), .shift_n(gen.shift_n), .shift_in(opa), .regs(rega));
  regfile #(.NREGS(16)) u_rfb (.clk, .rst_n, .ra(unused_ra), .rb(unused_rb), .da(unused_ea), .db(unused_eb),
    .we(web), .wa(f_rd[3:0]), .wd(wdat), .shift(shfb), .shift_n(gen.shift_n), .shift_in(opa), .regs(regb));

  function automatic logic [63:0] rd_reg(input logic [4:0] r, input logic [15:0][63:0] a, input logic [15:0][63:0] b);
    rd_reg = r[4] ? b[r[3:0]] : a[r[3:0]];
  endfunction
  assign opa = rd_reg(f_ra, rega, regb);
  assign opb = rd_reg(f_rb, rega, regb);
  assign opc = rd_reg(f_rc, rega, regb);
  assign ope = rd_reg(f_re, rega, regb);
  assign opd = rd_reg(f_rd, rega, regb);

  // ---------------- units ----------------
  logic [63:0] add_y, sig_y, fn_y, rot_y, pad_y, mh_y, mh_unused;
  madd #(.NOPS(4)) u_add (.op({ope, opc, opb, opa}), .en({sel[1], sel[0], 2'b11}), .alg64(gen.alg64), .sum(add_y));
  sigma_gen u_sig (.a(opa), .cfg(sel[2] ? mgu_sig[sel[0]] : mcu_sig[sel[0]]), .shr3(sel[1]),
                   .alg64(gen.alg64), .y(sig_y));
  func_gen u_fn (.x(opa), .y(opb), .z(opc), .cfg(fgc[sel[1:0]]), .fn(fn_y));
  rotshift u_rot (.a(opa), .amt(imm[5:0]), .op(sel[1:0]), .alg64(gen.alg64), .y(rot_y));
  pad_unit u_pad (.a(opa), .cfg(pad), .y(pad_y));
  msg_hist #(.DEPTH(16)) u_mh (.clk, .rst_n, .push(ex && op == OP_MHP), .din(opa),
    .tap_a(imm[3:0]), .tap_b(4'd0), .qa(mh_y), .qb(mh_unused));

  // address generation
  logic [DAW-1:0] ea, step;
  logic           is_mem;
  assign is_mem = (op == OP_LD) || (op == OP_ST) || (op == OP_LDK);
  assign step = (op == OP_LDK) ? DAW'(1) : (size == 2'd0) ? DAW'(2) : (size == 2'd1) ? DAW'(4) : DAW'(8);
  agu #(.NAREG(8), .AW(DAW)) u_agu (.clk, .rst_n, .sel, .offset(imm[DAW-1:0]), .ea,
    .postinc(ex && is_mem && pinc), .step, .ld(ex && op == OP_LDA), .ld_val(imm[DAW-1:0]));

  // data memory: engine port while running, long-word access from outside when idle
  logic [63:0] dm_q, ld_val;
  logic [DAW-1:0] dm_a;
  assign dm_a = running ? ea : {dm_addr, 3'b000};
  auth_dmem #(.BYTES(DM_BYTES)) u_dmem (.clk, .addr(dm_a), .size(running ? size : 2'd2), .rdata(dm_q),
    .we(ex && op == OP_ST), .wdata(opa), .ld_we(dm_we), .ld_addr(dm_addr), .ld_data(dm_wdata));
  assign dm_rdata = dm_q;

  // constants memory
  logic [63:0] cmem [CM_DEPTH];
  always_ff @(posedge clk) if (cm_we) cmem[cm_addr] <= cm_wdata;

  always_comb begin
    ld_val = dm_q;
    case (gen.load_mode)
      LD_IPAD: ld_val = dm_q ^ (gen.alg64 ? IPAD : {32'd0, IPAD[31:0]});
      LD_OPAD: ld_val = dm_q ^ (gen.alg64 ? OPAD : {32'd0, OPAD[31:0]});
      default: ;
    endcase
    if (size == 2'd0) ld_val = {48'd0, ld_val[15:0]};
    else if (size == 2'd1) ld_val = {32'd0, ld_val[31:0]};
  end

  // ---------------- execute ----------------
  logic wr;
  always_comb begin
    wr = 1'b1;
    case (op)
      OP_ADD:  wdat = add_y;
      OP_SIG:  wdat = sig_y;
      OP_FN:   wdat = fn_y;
      OP_ROT:  wdat = rot_y;
      OP_LDI:  wdat = {48'd0, imm};
      OP_LDH:  wdat = {opd[47:0], imm};
      OP_LD:   begin wdat = ld_val; wr = (gen.load_mode != LD_CMP); end
      OP_LDK:  wdat = cmem[ea[CAW-1:0]];
      OP_MHR:  wdat = mh_y;
      OP_PAD:  wdat = pad_y;
      default: begin wdat = '0; wr = 1'b0; end
    endcase
    wea  = ex && wr && !f_rd[4];
    web  = ex && wr &&  f_rd[4];
    shfa = ex && op == OP_SHF && !f_rd[4];
    shfb = ex && op == OP_SHF &&  f_rd[4];
    do_jump = ex && ((op == OP_JMP) || (op == OP_JZ && opa == '0) || (op == OP_JNZ && opa != '0));
    do_call = ex && op == OP_CALL;
    do_ret  = ex && op == OP_RET;
    do_loop = ex && op == OP_LOOP;
    do_halt = ex && op == OP_HALT;
    tgt     = imm[PAW-1:0];
    lcount  = (cnt != '0) ? {6'd0, cnt} : opa[15:0];
  end

  assign busy = running;
  assign err  = pc_err;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0; ir_valid <= 1'b0; done <= 1'b0; cmp_fail <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        running <= 1'b1; ir_valid <= 1'b0; cmp_fail <= 1'b0;
      end else if (running) begin
        ir_valid <= !(do_jump || do_call || do_ret);
        if (ex && op == OP_LD && gen.load_mode == LD_CMP && ld_val != opd) cmp_fail <= 1'b1;
        if (do_halt) begin
          running <= 1'b0; done <= 1'b1; ir_valid <= 1'b0;
        end
      end
    end
  end
endmodule
