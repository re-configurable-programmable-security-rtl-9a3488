// AES block cipher (FIPS-197) with 128-, 192- and 256-bit keys, the
// configurable AES accelerator of the cipher engine. One round takes two
// clocks: (Inv)SubBytes with (Inv)ShiftRows, then (Inv)MixColumns with
// AddRoundKey. A block therefore takes 2*Nr clocks after the clock that loads
// it: 20, 24 and 28 clocks for AES-128/192/256, the cycle counts given for the
// engine. The key schedule is expanded once per key (`key_load`, one 32-bit
// word per clock, at most 52 clocks) into a round-key store, so blocks of a
// stream under the same key need no further key work and decryption reads the
// round keys in reverse. The S-box and its inverse are constant 256-entry
// tables (FIPS-197 Figure 7 and 14).
// Interface: key is left-aligned in `key` (a 128-bit key in [255:128]);
// `klen` 0/1/2 selects 128/192/256. After key_load, `key_ready` rises when the
// schedule is complete. Pulse `start` with `din` and `decrypt`; `done` pulses
// with `dout` valid. The first byte of a block is bits [127:120].
module aes_core (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         key_load,   // expand a new key
  input  logic [255:0] key,        // key, left-aligned
  input  logic [1:0]   klen,       // 0: 128, 1: 192, 2: 256 bits
  output logic         key_ready,  // round keys available
  input  logic         start,      // begin a block
  input  logic         decrypt,    // 1: decrypt
  input  logic [127:0] din,        // input block
  output logic [127:0] dout,       // output block
  output logic         busy,       // block or key expansion in progress
  output logic         done        // one-cycle pulse: dout valid
);
  // ---------------- GF(2^8) helpers ----------------
  function automatic logic [7:0] xt(input logic [7:0] a);
    xt = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction
  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    gmul = ({8{b[0]}} & a) ^ ({8{b[1]}} & xt(a)) ^ ({8{b[2]}} & xt(xt(a))) ^
           ({8{b[3]}} & xt(xt(xt(a))));   // multipliers used here are below 16
  endfunction
  localparam logic [7:0] SBOX [256] = '{
    8'h63, 8'h7c, 8'h77, 8'h7b, 8'hf2, 8'h6b, 8'h6f, 8'hc5, 8'h30, 8'h01, 8'h67, 8'h2b, 8'hfe, 8'hd7, 8'hab, 8'h76,
    8'hca, 8'h82, 8'hc9, 8'h7d, 8'hfa, 8'h59, 8'h47, 8'hf0, 8'had, 8'hd4, 8'ha2, 8'haf, 8'h9c, 8'ha4, 8'h72, 8'hc0,
    8'hb7, 8'hfd, 8'h93, 8'h26, 8'h36, 8'h3f, 8'hf7, 8'hcc, 8'h34, 8'ha5, 8'he5, 8'hf1, 8'h71, 8'hd8, 8'h31, 8'h15,
    8'h04, 8'hc7, 8'h23, 8'hc3, 8'h18, 8'h96, 8'h05, 8'h9a, 8'h07, 8'h12, 8'h80, 8'he2, 8'heb, 8'h27, 8'hb2, 8'h75,
    8'h09, 8'h83, 8'h2c, 8'h1a, 8'h1b, 8'h6e, 8'h5a, 8'ha0, 8'h52, 8'h3b, 8'hd6, 8'hb3, 8'h29, 8'he3, 8'h2f, 8'h84,
    8'h53, 8'hd1, 8'h00, 8'hed, 8'h20, 8'hfc, 8'hb1, 8'h5b, 8'h6a, 8'hcb, 8'hbe, 8'h39, 8'h4a, 8'h4c, 8'h58, 8'hcf,
    8'hd0, 8'hef, 8'haa, 8'hfb, 8'h43, 8'h4d, 8'h33, 8'h85, 8'h45, 8'hf9, 8'h02, 8'h7f, 8'h50, 8'h3c, 8'h9f, 8'ha8,
    8'h51, 8'ha3, 8'h40, 8'h8f, 8'h92, 8'h9d, 8'h38, 8'hf5, 8'hbc, 8'hb6, 8'hda, 8'h21, 8'h10, 8'hff, 8'hf3, 8'hd2,
    8'hcd, 8'h0c, 8'h13, 8'hec, 8'h5f, 8'h97, 8'h44, 8'h17, 8'hc4, 8'ha7, 8'h7e, 8'h3d, 8'h64, 8'h5d, 8'h19, 8'h73,
    8'h60, 8'h81, 8'h4f, 8'hdc, 8'h22, 8'h2a, 8'h90, 8'h88, 8'h46, 8'hee, 8'hb8, 8'h14, 8'hde, 8'h5e, 8'h0b, 8'hdb,
    8'he0, 8'h32, 8'h3a, 8'h0a, 8'h49, 8'h06, 8'h24, 8'h5c, 8'hc2, 8'hd3, 8'hac, 8'h62, 8'h91, 8'h95, 8'he4, 8'h79,
    8'he7, 8'hc8, 8'h37, 8'h6d, 8'h8d, 8'hd5, 8'h4e, 8'ha9, 8'h6c, 8'h56, 8'hf4, 8'hea, 8'h65, 8'h7a, 8'hae, 8'h08,
    8'hba, 8'h78, 8'h25, 8'h2e, 8'h1c, 8'ha6, 8'hb4, 8'hc6, 8'he8, 8'hdd, 8'h74, 8'h1f, 8'h4b, 8'hbd, 8'h8b, 8'h8a,
    8'h70, 8'h3e, 8'hb5, 8'h66, 8'h48, 8'h03, 8'hf6, 8'h0e, 8'h61, 8'h35, 8'h57, 8'hb9, 8'h86, 8'hc1, 8'h1d, 8'h9e,
    8'he1, 8'hf8, 8'h98, 8'h11, 8'h69, 8'hd9, 8'h8e, 8'h94, 8'h9b, 8'h1e, 8'h87, 8'he9, 8'hce, 8'h55, 8'h28, 8'hdf,
    8'h8c, 8'ha1, 8'h89, 8'h0d, 8'hbf, 8'he6, 8'h42, 8'h68, 8'h41, 8'h99, 8'h2d, 8'h0f, 8'hb0, 8'h54, 8'hbb, 8'h16
  };
  localparam logic [7:0] ISBOX [256] = '{
    8'h52, 8'h09, 8'h6a, 8'hd5, 8'h30, 8'h36, 8'ha5, 8'h38, 8'hbf, 8'h40, 8'ha3, 8'h9e, 8'h81, 8'hf3, 8'hd7, 8'hfb,
    8'h7c, 8'he3, 8'h39, 8'h82, 8'h9b, 8'h2f, 8'hff, 8'h87, 8'h34, 8'h8e, 8'h43, 8'h44, 8'hc4, 8'hde, 8'he9, 8'hcb,
    8'h54, 8'h7b, 8'h94, 8'h32, 8'ha6, 8'hc2, 8'h23, 8'h3d, 8'hee, 8'h4c, 8'h95, 8'h0b, 8'h42, 8'hfa, 8'hc3, 8'h4e,
    8'h08, 8'h2e, 8'ha1, 8'h66, 8'h28, 8'hd9, 8'h24, 8'hb2, 8'h76, 8'h5b, 8'ha2, 8'h49, 8'h6d, 8'h8b, 8'hd1, 8'h25,
    8'h72, 8'hf8, 8'hf6, 8'h64, 8'h86, 8'h68, 8'h98, 8'h16, 8'hd4, 8'ha4, 8'h5c, 8'hcc, 8'h5d, 8'h65, 8'hb6, 8'h92,
    8'h6c, 8'h70, 8'h48, 8'h50, 8'hfd, 8'hed, 8'hb9, 8'hda, 8'h5e, 8'h15, 8'h46, 8'h57, 8'ha7, 8'h8d, 8'h9d, 8'h84,
    8'h90, 8'hd8, 8'hab, 8'h00, 8'h8c, 8'hbc, 8'hd3, 8'h0a, 8'hf7, 8'he4, 8'h58, 8'h05, 8'hb8, 8'hb3, 8'h45, 8'h06,
    8'hd0, 8'h2c, 8'h1e, 8'h8f, 8'hca, 8'h3f, 8'h0f, 8'h02, 8'hc1, 8'haf, 8'hbd, 8'h03, 8'h01, 8'h13, 8'h8a, 8'h6b,
    8'h3a, 8'h91, 8'h11, 8'h41, 8'h4f, 8'h67, 8'hdc, 8'hea, 8'h97, 8'hf2, 8'hcf, 8'hce, 8'hf0, 8'hb4, 8'he6, 8'h73,
    8'h96, 8'hac, 8'h74, 8'h22, 8'he7, 8'had, 8'h35, 8'h85, 8'he2, 8'hf9, 8'h37, 8'he8, 8'h1c, 8'h75, 8'hdf, 8'h6e,
    8'h47, 8'hf1, 8'h1a, 8'h71, 8'h1d, 8'h29, 8'hc5, 8'h89, 8'h6f, 8'hb7, 8'h62, 8'h0e, 8'haa, 8'h18, 8'hbe, 8'h1b,
    8'hfc, 8'h56, 8'h3e, 8'h4b, 8'hc6, 8'hd2, 8'h79, 8'h20, 8'h9a, 8'hdb, 8'hc0, 8'hfe, 8'h78, 8'hcd, 8'h5a, 8'hf4,
    8'h1f, 8'hdd, 8'ha8, 8'h33, 8'h88, 8'h07, 8'hc7, 8'h31, 8'hb1, 8'h12, 8'h10, 8'h59, 8'h27, 8'h80, 8'hec, 8'h5f,
    8'h60, 8'h51, 8'h7f, 8'ha9, 8'h19, 8'hb5, 8'h4a, 8'h0d, 8'h2d, 8'he5, 8'h7a, 8'h9f, 8'h93, 8'hc9, 8'h9c, 8'hef,
    8'ha0, 8'he0, 8'h3b, 8'h4d, 8'hae, 8'h2a, 8'hf5, 8'hb0, 8'hc8, 8'heb, 8'hbb, 8'h3c, 8'h83, 8'h53, 8'h99, 8'h61,
    8'h17, 8'h2b, 8'h04, 8'h7e, 8'hba, 8'h77, 8'hd6, 8'h26, 8'he1, 8'h69, 8'h14, 8'h63, 8'h55, 8'h21, 8'h0c, 8'h7d
  };
  function automatic logic [7:0] sbox(input logic [7:0] a);
    sbox = SBOX[a];
  endfunction
  function automatic logic [7:0] isbox(input logic [7:0] a);
    isbox = ISBOX[a];
  endfunction
  function automatic logic [31:0] subword(input logic [31:0] w);
    for (int i = 0; i < 4; i++) subword[8*i +: 8] = sbox(w[8*i +: 8]);
  endfunction

  // Byte n of the state (n = 4*column + row) is s[127-8n -: 8].
  function automatic logic [127:0] sub_shift(input logic [127:0] s, input logic inv);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        int src;
        src = inv ? 4 * ((c - r + 4) % 4) + r : 4 * ((c + r) % 4) + r;
        sub_shift[127-8*(4*c+r) -: 8] = inv ? isbox(s[127-8*src -: 8]) : sbox(s[127-8*src -: 8]);
      end
  endfunction
  function automatic logic [127:0] mix(input logic [127:0] s, input logic inv);
    logic [7:0] a [4];
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) a[r] = s[127-8*(4*c+r) -: 8];
      for (int r = 0; r < 4; r++) begin
        if (!inv)
          mix[127-8*(4*c+r) -: 8] = gmul(a[r], 8'h02) ^ gmul(a[(r+1)%4], 8'h03) ^ a[(r+2)%4] ^ a[(r+3)%4];
        else
          mix[127-8*(4*c+r) -: 8] = gmul(a[r], 8'h0e) ^ gmul(a[(r+1)%4], 8'h0b) ^
                                    gmul(a[(r+2)%4], 8'h0d) ^ gmul(a[(r+3)%4], 8'h09);
      end
    end
  endfunction

  // ---------------- key schedule ----------------
  logic [31:0] w [60];
  logic [5:0]  wi;          // next word to generate
  logic [3:0]  nk;          // key words
  logic [3:0]  nr;          // rounds
  logic [2:0]  kpos;        // wi mod nk
  logic [7:0]  rcon;
  logic        kexp;
  logic [5:0]  wlast;
  logic [31:0] temp, wnew, wprev_nk;

  assign wlast = 6'(4 * (int'(nr) + 1));
  always_comb begin
    temp     = w[wi - 6'd1];
    wprev_nk = w[wi - 6'(nk)];
    if (kpos == 3'd0)                  temp = subword({temp[23:0], temp[31:24]}) ^ {rcon, 24'd0};
    else if (nk == 4'd8 && kpos == 3'd4) temp = subword(temp);
    wnew = wprev_nk ^ temp;
  end

  function automatic logic [127:0] rkey(input logic [3:0] r);
    rkey = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  // ---------------- block datapath ----------------
  logic [127:0] st;
  logic [3:0]   rnd;
  logic         phase, run, dec_q;

  assign busy = run | kexp;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      kexp <= 1'b0; key_ready <= 1'b0; run <= 1'b0; done <= 1'b0;
      nk <= 4'd4; nr <= 4'd10; wi <= '0; kpos <= '0; rcon <= 8'h01; dout <= '0;
    end else begin
      done <= 1'b0;
      if (key_load) begin
        for (int i = 0; i < 8; i++) w[i] <= key[255-32*i -: 32];
        nk   <= (klen == 2'd0) ? 4'd4 : (klen == 2'd1) ? 4'd6 : 4'd8;
        nr   <= (klen == 2'd0) ? 4'd10 : (klen == 2'd1) ? 4'd12 : 4'd14;
        wi   <= (klen == 2'd0) ? 6'd4 : (klen == 2'd1) ? 6'd6 : 6'd8;
        kpos <= '0;
        rcon <= 8'h01;
        kexp <= 1'b1;
        key_ready <= 1'b0;
      end else if (kexp) begin
        w[wi] <= wnew;
        if (kpos == 3'd0) rcon <= xt(rcon);
        kpos <= (kpos == 3'(nk - 4'd1)) ? 3'd0 : kpos + 3'd1;
        wi   <= wi + 6'd1;
        if (wi == wlast - 6'd1) begin
          kexp <= 1'b0; key_ready <= 1'b1;
        end
      end else if (run) begin
        if (!phase) begin
          st <= sub_shift(st, dec_q);
          phase <= 1'b1;
        end else begin
          phase <= 1'b0;
          if (!dec_q) begin
            if (rnd == nr) begin
              dout <= st ^ rkey(rnd); done <= 1'b1; run <= 1'b0;
            end else begin
              st <= mix(st, 1'b0) ^ rkey(rnd);
            end
            rnd <= rnd + 4'd1;
          end else begin
            if (rnd == 4'd0) begin
              dout <= st ^ rkey(4'd0); done <= 1'b1; run <= 1'b0;
            end else begin
              st <= mix(st ^ rkey(rnd), 1'b1);
            end
            rnd <= rnd - 4'd1;
          end
        end
      end else if (start && key_ready) begin
        dec_q <= decrypt;
        st    <= din ^ (decrypt ? rkey(nr) : rkey(4'd0));
        rnd   <= decrypt ? nr - 4'd1 : 4'd1;
        phase <= 1'b0;
        run   <= 1'b1;
      end
    end
  end
endmodule
