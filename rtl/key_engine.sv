// Key generation engine: a programmable processor for the modular
// arithmetic of Diffie-Hellman, DSA and RSA and for random numbers. Program
// control (two nested zero-overhead loops, four-level call stack,
// conditional/unconditional jumps) fetches 32-bit instructions from a
// 512-word program memory; instructions work on a 16 x 64-bit data register
// file with a 64-bit multiprecision adder (carry flag), a 64-bit
// multiprecision barrel shifter, a 16-bit logical unit, the Montgomery
// multiplier (160/512/1024-bit operands moved word by word), the ANSI X9.17
// generator on a Triple-DES unit and the pulse-counter seed register.
// The host/engine arbitration gives the host the register file and the
// program memory while the engine is idle; a host request made while a
// program runs waits (`h_ack` low) until it halts.
// Units, memory sizes and loop/call depths follow the engine's description;
// the instruction encoding (key_isa_pkg), the register count and the
// arbitration rule are this design's.
// Timing: one instruction per clock; taken jumps/calls/returns cost one
// clock; long operations (Montgomery, X9.17) run in the background and are
// waited for with JMB/JRB loops.
module key_engine
  import key_isa_pkg::*;
#(
  parameter int PM_DEPTH = 512,   // program memory words (32-bit)
  parameter int MONT_N   = 1024   // largest Montgomery operand
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        h_req,     // host access request
  input  logic        h_we,      // host write
  input  logic        h_pm,      // 1: program memory, 0: data register
  input  logic [8:0]  h_addr,    // program word or register number
  input  logic [63:0] h_wdata,   // write data
  output logic [63:0] h_rdata,   // register read data (valid with h_ack)
  output logic        h_ack,     // access performed this cycle
  input  logic        start,     // run from start_addr
  input  logic [8:0]  start_addr,
  input  logic        pulse,     // external pulse source for the seed counter
  output logic        busy,
  output logic        done,      // HALT executed (one-cycle pulse)
  output logic        err        // loop/call stack error
);
  localparam int PAW = $clog2(PM_DEPTH);
  logic running, ir_valid;
  logic [31:0] ir;
  logic [PAW-1:0] pc;
  logic do_jump, do_call, do_ret, do_loop, do_halt, ex;

  // host/engine arbitration
  assign h_ack = h_req && !running && !start;

  sp_ram #(.DEPTH(PM_DEPTH), .WIDTH(32)) u_pmem (.clk, .raddr(pc), .rdata(ir),
    .we(h_ack && h_we && h_pm), .waddr(h_addr[PAW-1:0]), .wdata(h_wdata[31:0]));

  kop_e        op;
  logic [3:0]  f_rd, f_ra, f_rb;
  logic [13:0] imm;
  assign op   = kop_e'(ir[31:26]);
  assign f_rd = ir[25:22];
  assign f_ra = ir[21:18];
  assign f_rb = ir[17:14];
  assign imm  = ir[13:0];
  assign ex   = running && ir_valid;

  // register file
  logic [15:0][63:0] regs;
  logic [63:0] opa, opb, opd, wd;
  logic        we, rwe;
  logic [3:0]  wa;
  logic [63:0] unused_da, unused_db;
  regfile #(.NREGS(16)) u_rf (.clk, .rst_n, .ra(f_ra), .rb(f_rb), .da(unused_da), .db(unused_db),
    .we(rwe), .wa, .wd(running ? wd : h_wdata), .shift(1'b0), .shift_n('0), .shift_in('0), .regs);
  assign opa = regs[f_ra];
  assign opb = regs[f_rb];
  assign opd = regs[f_rd];
  assign rwe = running ? (ex && we) : (h_ack && h_we && !h_pm);
  assign wa  = running ? f_rd : h_addr[3:0];
  assign h_rdata = regs[h_addr[3:0]];

  prog_ctrl #(.AW(PAW), .LOOP_DEPTH(2), .CALL_DEPTH(4)) u_pc (
    .clk, .rst_n, .start, .start_addr(start_addr[PAW-1:0]), .en(running && !do_halt),
    .jump(do_jump), .call(do_call), .ret(do_ret), .target(imm[PAW-1:0]),
    .loop_push(do_loop), .loop_end(imm[PAW-1:0]), .loop_count(opa[15:0]), .pc, .err);

  // units
  logic        cf, zf;
  logic [63:0] add_y, sh_y, mm_y, rn_y, seed;
  logic        add_c, add_z, mm_busy, mm_done, rn_busy, rn_done;
  logic [15:0] log_y, pevents;
  logic [1:0]  add_op;
  always_comb begin
    case (op)
      KOP_ADC: add_op = 2'd1;
      KOP_SUB, KOP_CMP: add_op = 2'd2;
      KOP_SBB: add_op = 2'd3;
      default: add_op = 2'd0;
    endcase
  end
  mp_adder   u_add (.a(opa), .b(opb), .cin(cf), .op(add_op), .y(add_y), .cout(add_c), .zero(add_z));
  mp_shifter u_sh  (.a(opa), .fill(opb), .amt(imm[5:0]), .dir(op == KOP_SHR), .y(sh_y));
  logic16    u_log (.a(opa[15:0]), .b(opb[15:0]), .op(imm[2:0]), .y(log_y));
  mont_mul #(.MAXN(MONT_N)) u_mm (.clk, .rst_n, .wr(ex && op == KOP_MMW), .wsel(imm[5:4]),
    .widx(imm[$clog2(MONT_N/64)-1:0]), .wdata(opa), .nsel(imm[1:0]), .start(ex && op == KOP_MMS),
    .busy(mm_busy), .done(mm_done), .ridx(imm[$clog2(MONT_N/64)-1:0]), .rdata(mm_y));
  x917_prng u_rng (.clk, .rst_n, .k1(regs[13]), .k2(regs[14]), .k3(regs[15]),
    .seed_load(ex && op == KOP_SEED), .seed(opa), .start(ex && op == KOP_RNS), .dt(opa),
    .rnd(rn_y), .busy(rn_busy), .done(rn_done));
  pulse_rng u_prng (.clk, .rst_n, .pulse, .seed, .events(pevents));

  always_comb begin
    we = 1'b1;
    case (op)
      KOP_ADD, KOP_ADC, KOP_SUB, KOP_SBB: wd = add_y;
      KOP_SHL, KOP_SHR: wd = sh_y;
      KOP_LOG: wd = {opa[63:16], log_y};
      KOP_LDI: wd = {50'd0, imm};
      KOP_LDH: wd = {opd[49:0], imm};
      KOP_MMR: wd = mm_y;
      KOP_RNR: wd = rn_y;
      KOP_PRS: wd = seed;
      default: begin wd = '0; we = 1'b0; end
    endcase
    do_jump = ex && ((op == KOP_JMP) || (op == KOP_JZ && zf) || (op == KOP_JC && cf) ||
                     (op == KOP_JMB && mm_busy) || (op == KOP_JRB && rn_busy));
    do_call = ex && op == KOP_CALL;
    do_ret  = ex && op == KOP_RET;
    do_loop = ex && op == KOP_LOOP;
    do_halt = ex && op == KOP_HALT;
  end

  assign busy = running;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0; ir_valid <= 1'b0; done <= 1'b0; cf <= 1'b0; zf <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        running <= 1'b1; ir_valid <= 1'b0;
      end else if (running) begin
        ir_valid <= !(do_jump || do_call || do_ret);
        if (ex && (op == KOP_ADD || op == KOP_ADC || op == KOP_SUB || op == KOP_SBB || op == KOP_CMP)) begin
          cf <= add_c; zf <= add_z;
        end
        if (do_halt) begin running <= 1'b0; done <= 1'b1; ir_valid <= 1'b0; end
      end
    end
  end
endmodule
