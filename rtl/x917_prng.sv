// ANSI X9.17 pseudo random number generator built on the Triple-DES unit of
// the key generation engine. For each 64-bit output:
//   I = E(DT);  R = E(I xor V);  V = E(R xor I)
// where E is 3DES encryption (EDE) with keys K1..K3, DT a date/time vector
// supplied per request and V the secret seed (loaded with `seed_load`).
// The three encryptions run one after another on a single des_core, so a
// number takes 3 x 18 plus a few control clocks (about 60).
// The DES unit's busy output is not used; the sequencer waits for its done
// pulse instead.
module x917_prng (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [63:0] k1,        // 3DES key 1
  input  logic [63:0] k2,        // 3DES key 2
  input  logic [63:0] k3,        // 3DES key 3
  input  logic        seed_load, // load V
  input  logic [63:0] seed,      // seed value
  input  logic        start,     // request a number
  input  logic [63:0] dt,        // date/time vector
  output logic [63:0] rnd,       // random number R
  output logic        busy,
  output logic        done       // one-cycle pulse: rnd valid
);
  typedef enum logic [2:0] {P_IDLE, P_I, P_R, P_V, P_WAIT} pst_e;
  pst_e        st, nxt;
  logic [63:0] v, i_q, din;
  logic        dstart, dbusy, ddone;
  logic [63:0] dout;
  des_core u_tdes (.clk, .rst_n, .start(dstart), .tdes(1'b1), .decrypt(1'b0),
    .key1(k1), .key2(k2), .key3(k3), .din, .dout, .busy(dbusy), .done(ddone));

  assign busy = (st != P_IDLE);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= P_IDLE; v <= '0; i_q <= '0; rnd <= '0; done <= 1'b0; dstart <= 1'b0; din <= '0; nxt <= P_IDLE;
    end else begin
      done <= 1'b0; dstart <= 1'b0;
      if (seed_load) v <= seed;
      case (st)
        P_IDLE: if (start) begin din <= dt; dstart <= 1'b1; st <= P_WAIT; nxt <= P_I; end
        P_WAIT: if (ddone) st <= nxt;
        P_I: begin i_q <= dout; din <= dout ^ v; dstart <= 1'b1; st <= P_WAIT; nxt <= P_R; end
        P_R: begin rnd <= dout; din <= dout ^ i_q; dstart <= 1'b1; st <= P_WAIT; nxt <= P_V; end
        default: begin v <= dout; done <= 1'b1; st <= P_IDLE; end  // P_V
      endcase
    end
  end
endmodule
