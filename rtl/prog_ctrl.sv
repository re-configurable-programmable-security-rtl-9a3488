// Program control: the program counter sequencer shared by the authentication
// and key generation engines. It supports conditional/unconditional jumps, a
// LOOP_DEPTH-level stack of zero-overhead loops and a CALL_DEPTH-level
// subroutine return stack (two and four levels by default, as both engines
// specify).
// Timing: `pc` is the address being fetched this cycle; the instruction
// appears one cycle later and is executed then, so a jump, call or return
// issued by the executing instruction redirects the PC on the next edge and
// the one instruction fetched behind it must be discarded by the engine.
// Loops cost nothing: when the fetch address equals the innermost loop's end
// address and iterations remain, the next fetch address is the loop's start,
// decided in the fetch stage without a bubble. A LOOP instruction executed at
// address A pushes a loop with body A+1..loop_end repeated loop_count times
// (a count of 0 runs the body once). The return address of a call is the
// address after the call. Overflow or underflow of either stack sets `err`.
module prog_ctrl #(
  parameter int AW         = 9,  // program address bits (512 words)
  parameter int LOOP_DEPTH = 2,  // nested zero-overhead loops
  parameter int CALL_DEPTH = 4   // nested subroutine calls
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,       // load start_addr into the PC
  input  logic [AW-1:0] start_addr,  // first instruction
  input  logic          en,          // advance the PC this cycle
  input  logic          jump,        // taken jump (conditional decided by engine)
  input  logic          call,        // subroutine call to target
  input  logic          ret,         // return from subroutine
  input  logic [AW-1:0] target,      // jump/call target
  input  logic          loop_push,   // start a loop
  input  logic [AW-1:0] loop_end,    // last instruction of the loop body
  input  logic [15:0]   loop_count,  // iterations
  output logic [AW-1:0] pc,          // fetch address
  output logic          err          // stack overflow/underflow (sticky)
);
  logic [AW-1:0] lstart [LOOP_DEPTH];
  logic [AW-1:0] lend   [LOOP_DEPTH];
  logic [15:0]   lcnt   [LOOP_DEPTH];
  logic [$clog2(LOOP_DEPTH+1)-1:0] lsp;
  logic [AW-1:0] cstack [CALL_DEPTH];
  logic [$clog2(CALL_DEPTH+1)-1:0] csp;
  localparam int CW = $clog2(CALL_DEPTH), LW = $clog2(LOOP_DEPTH);   // stack index widths

  // Innermost loop as seen by the fetch stage (includes one pushed this cycle).
  logic          lact;
  logic [AW-1:0] tstart, tend;
  logic [15:0]   tcnt;
  always_comb begin
    if (loop_push) begin
      lact = 1'b1; tstart = pc; tend = loop_end; tcnt = (loop_count == 0) ? 16'd1 : loop_count;
    end else if (lsp != 0) begin
      lact = 1'b1; tstart = lstart[LW'(lsp-1'b1)]; tend = lend[LW'(lsp-1'b1)]; tcnt = lcnt[LW'(lsp-1'b1)];
    end else begin
      lact = 1'b0; tstart = '0; tend = '0; tcnt = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc <= '0; lsp <= '0; csp <= '0; err <= 1'b0;
    end else if (start) begin
      pc <= start_addr; lsp <= '0; csp <= '0; err <= 1'b0;
    end else if (en) begin
      if (jump) begin
        pc <= target;
      end else if (call) begin
        if (csp == CALL_DEPTH[$bits(csp)-1:0]) err <= 1'b1;
        else begin
          cstack[CW'(csp)] <= pc;
          csp <= csp + 1'b1;
        end
        pc <= target;
      end else if (ret) begin
        if (csp == 0) err <= 1'b1;
        else begin
          pc  <= cstack[CW'(csp-1'b1)];
          csp <= csp - 1'b1;
        end
      end else begin
        // loop bookkeeping in the fetch stage
        logic [$clog2(LOOP_DEPTH+1)-1:0] sp;
        sp = lsp;
        if (loop_push) begin
          if (lsp == LOOP_DEPTH[$bits(lsp)-1:0]) err <= 1'b1;
          else begin
            lstart[LW'(lsp)] <= tstart; lend[LW'(lsp)] <= tend; lcnt[LW'(lsp)] <= tcnt;
            sp = lsp + 1'b1;
          end
        end
        if (lact && pc == tend && sp != 0) begin
          if (tcnt > 16'd1) begin
            pc <= tstart;
            lcnt[LW'(sp-1'b1)] <= tcnt - 16'd1;
          end else begin
            pc <= pc + 1'b1;
            sp = sp - 1'b1;
          end
        end else begin
          pc <= pc + 1'b1;
        end
        lsp <= sp;
      end
    end
  end
endmodule
