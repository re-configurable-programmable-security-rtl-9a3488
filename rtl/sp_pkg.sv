// Shared types and constants of the security processor.
// Holds the engine identifiers used in task words, the cipher algorithm and
// chaining-mode encodings, and the configuration-register layouts of the
// authentication engine. Encodings are this design's own; the field widths of
// the function generator (18 bits) and the pad register come from the
// configuration-register description of the authentication engine.
package sp_pkg;
  typedef logic [63:0] word_t;

  // Engine selected by a task (the task can go to one engine or pass through all three).
  typedef enum logic [1:0] {ENG_CIPHER = 2'd0, ENG_AUTH = 2'd1, ENG_KEY = 2'd2, ENG_ALL = 2'd3} engine_e;

  // Cipher algorithm and chaining mode.
  typedef enum logic [2:0] {ALG_DES = 3'd0, ALG_TDES = 3'd1, ALG_AES128 = 3'd2,
                            ALG_AES192 = 3'd3, ALG_AES256 = 3'd4} cipher_alg_e;
  typedef enum logic [1:0] {MODE_ECB = 2'd0, MODE_CBC = 2'd1, MODE_OFB = 2'd2, MODE_CFB = 2'd3} cipher_mode_e;

  // Load modes of the authentication engine general configuration.
  typedef enum logic [1:0] {LD_NORMAL = 2'd0, LD_IPAD = 2'd1, LD_OPAD = 2'd2, LD_CMP = 2'd3} load_mode_e;

  // General configuration register of the authentication engine.
  typedef struct packed {
    logic [4:0]  shift_n;    // number of data registers moved by a register-file shift
    load_mode_e  load_mode;  // normal, with ipad, with opad, with comparison
    logic        alg64;      // 1: 64-bit algorithm, 0: 32-bit algorithm
  } gen_cfg_t;

  // Pad configuration: byte position and padding byte.
  typedef struct packed {
    logic [2:0] pos;
    logic [7:0] pad_byte;
  } pad_cfg_t;

  localparam logic [63:0] IPAD = {8{8'h36}};
  localparam logic [63:0] OPAD = {8{8'h5c}};
endpackage
