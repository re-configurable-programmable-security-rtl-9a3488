// Cipher engine: bulk encryption/decryption with DES, 3DES and AES-128/192/256
// in ECB, CBC, OFB and CFB modes. Words enter through the input buffer and
// leave through the output buffer (64-bit FIFOs); the controller gathers one
// 64-bit word (DES/3DES) or two (AES) into a block, applies the chaining mode
// around the selected accelerator and writes the result words back. The
// controller's read and write word counters play the role of the input and
// output address generators. CFB works on full blocks (CFB-64 / CFB-128).
// Following the block diagram, both accelerators share the input side and
// the output side; only one works at a time.
// Configuration: set alg, mode, decrypt, key and iv and pulse `cfg_load`; this
// stores them, loads the chaining value and, for AES, starts the key
// expansion (`ready` stays low until it ends). DES keys are key[255:192]
// (K1), key[191:128] (K2), key[127:64] (K3); an AES key is left-aligned. The
// DES chaining value is iv[127:64]. The first word of an AES block is its
// high half.
// Timing: the controller overlaps its work with the accelerator. The next
// block is gathered while the current one is in the accelerator; the result
// is captured in the clock after the accelerator's done and the next block
// starts one clock later, while result words are written back from a result
// register. A stream of blocks therefore takes 8/20 clocks per DES/3DES
// block (6/18 in the accelerator) and 23/27/31 per AES-128/192/256 block
// (20/24/28 in the accelerator; the next start waits for the second result
// word to leave). The accelerator cycle counts follow the published ones;
// the overlap is this design's way of keeping the controller overhead small.
// The buffers' fill-level outputs are left open: the controller only needs
// their valid/ready handshakes.
module cipher_engine
  import sp_pkg::*;
#(
  parameter int BUF_DEPTH = 16   // words in each of the input and output buffers
) (
  input  logic         clk,
  input  logic         rst_n,
  input  cipher_alg_e  alg,        // algorithm
  input  cipher_mode_e mode,       // chaining mode
  input  logic         decrypt,    // 1: decrypt
  input  logic [255:0] key,        // key material
  input  logic [127:0] iv,         // initial chaining value
  input  logic         cfg_load,   // latch configuration, load IV, expand key
  output logic         ready,      // configured and idle
  input  logic         in_valid,   // input buffer write
  output logic         in_ready,
  input  logic [63:0]  in_data,
  output logic         out_valid,  // output buffer read
  input  logic         out_ready,
  output logic [63:0]  out_data,
  output logic [31:0]  in_words,   // words consumed since cfg_load (input address)
  output logic [31:0]  out_words   // words produced since cfg_load (output address)
);
  // ---- buffers ----
  logic        ib_valid, ib_ready, ob_valid, ob_ready;
  logic [63:0] ib_data, ob_data;
  sp_fifo #(.WIDTH(64), .DEPTH(BUF_DEPTH)) u_inbuf (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(ib_valid), .out_ready(ib_ready), .out_data(ib_data), .count());
  sp_fifo #(.WIDTH(64), .DEPTH(BUF_DEPTH)) u_outbuf (
    .clk, .rst_n, .in_valid(ob_valid), .in_ready(ob_ready), .in_data(ob_data),
    .out_valid, .out_ready, .out_data, .count());

  // ---- configuration ----
  cipher_alg_e  alg_q;
  cipher_mode_e mode_q;
  logic         dec_q;
  logic [255:0] key_q;
  logic [127:0] cv;        // chaining value
  logic         is_aes;
  assign is_aes = (alg_q == ALG_AES128) || (alg_q == ALG_AES192) || (alg_q == ALG_AES256);

  // ---- accelerators ----
  logic         core_dec, des_start, aes_start, des_done, aes_done, des_busy, aes_busy, aes_kready;
  logic [63:0]  des_out;
  logic [127:0] aes_out, core_in;
  des_core u_des (
    .clk, .rst_n, .start(des_start), .tdes(alg_q == ALG_TDES), .decrypt(core_dec),
    .key1(key_q[255:192]), .key2(key_q[191:128]), .key3(key_q[127:64]),
    .din(core_in[127:64]), .dout(des_out), .busy(des_busy), .done(des_done));
  aes_core u_aes (
    .clk, .rst_n, .key_load(cfg_load && (alg == ALG_AES128 || alg == ALG_AES192 || alg == ALG_AES256)),
    .key, .klen(alg == ALG_AES128 ? 2'd0 : alg == ALG_AES192 ? 2'd1 : 2'd2),
    .key_ready(aes_kready), .start(aes_start), .decrypt(core_dec), .din(core_in),
    .dout(aes_out), .busy(aes_busy), .done(aes_done));

  // ---- controller ----
  // Three overlapping parts: the gather side fills the next block `nblk`
  // from the input buffer, the core side starts the accelerator on it and
  // applies the chaining mode when it ends, and the emit side writes the
  // result register `res` to the output buffer word by word.
  logic [127:0] nblk, blk, res;
  logic         nfull;          // nblk holds a complete block
  logic         gidx;           // gather word index within a block
  logic         crun;           // accelerator busy with blk
  logic [1:0]   rcnt;           // result words still to write back
  logic         cfg_ok, kok, go;
  assign kok      = !(is_aes && !aes_kready);
  assign core_dec = dec_q && (mode_q == MODE_ECB || mode_q == MODE_CBC);
  assign ready    = cfg_ok && kok && !nfull && !crun && (rcnt == 2'd0) && !gidx;

  // start the next block when it is complete, the accelerator is free and
  // the result register is empty or being emptied in this clock
  assign go = cfg_ok && kok && nfull && !crun && !(des_done || aes_done) &&
              (rcnt == 2'd0 || (rcnt == 2'd1 && ob_ready));

  always_comb begin
    case (mode_q)
      MODE_ECB: core_in = nblk;
      MODE_CBC: core_in = dec_q ? nblk : nblk ^ cv;
      default:  core_in = cv;                   // OFB, CFB: encrypt the chaining value
    endcase
  end

  logic [127:0] cres;
  assign cres = is_aes ? aes_out : {des_out, 64'd0};

  assign ib_ready  = cfg_ok && kok && !nfull;
  assign ob_valid  = (rcnt != 2'd0);
  assign ob_data   = (rcnt == 2'd1) ? (is_aes ? res[63:0] : res[127:64]) : res[127:64];
  assign des_start = go && !is_aes;
  assign aes_start = go && is_aes;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg_ok <= 1'b0; gidx <= 1'b0; nfull <= 1'b0; crun <= 1'b0; rcnt <= '0;
      in_words <= '0; out_words <= '0;
      alg_q <= ALG_DES; mode_q <= MODE_ECB; dec_q <= 1'b0; cv <= '0;
      nblk <= '0; blk <= '0; res <= '0;
    end else if (cfg_load) begin
      alg_q <= alg; mode_q <= mode; dec_q <= decrypt; key_q <= key; cv <= iv;
      cfg_ok <= 1'b1; gidx <= 1'b0; nfull <= 1'b0; crun <= 1'b0; rcnt <= '0;
      in_words <= '0; out_words <= '0;
    end else begin
      // gather side
      if (ib_ready && ib_valid) begin
        in_words <= in_words + 1;
        if (!gidx) nblk[127:64] <= ib_data; else nblk[63:0] <= ib_data;
        if (!is_aes) nblk[63:0] <= '0;
        if (is_aes && !gidx) gidx <= 1'b1;
        else begin gidx <= 1'b0; nfull <= 1'b1; end
      end
      // emit side
      if (ob_valid && ob_ready) begin
        out_words <= out_words + 1;
        rcnt <= rcnt - 2'd1;
      end
      // core side
      if (go) begin
        blk <= nblk; nfull <= 1'b0; crun <= 1'b1;
      end
      if (crun && (des_done || aes_done)) begin
        logic [127:0] o, m;
        m = is_aes ? '1 : {64'hFFFF_FFFF_FFFF_FFFF, 64'd0};
        case (mode_q)
          MODE_ECB: o = cres;
          MODE_CBC: begin
            o  = dec_q ? (cres ^ cv) : cres;
            cv <= dec_q ? blk : cres;
          end
          MODE_OFB: begin
            o  = blk ^ cres;
            cv <= cres;
          end
          default: begin  // CFB
            o  = (blk ^ cres) & m;
            cv <= dec_q ? blk : (blk ^ cres) & m;
          end
        endcase
        res  <= o & m;
        rcnt <= is_aes ? 2'd2 : 2'd1;
        crun <= 1'b0;
      end
    end
  end
endmodule
