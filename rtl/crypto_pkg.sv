// crypto_pkg: types and constants shared by the RSA and Blowfish stream
// accelerators and by the reconfigurable slot that hosts them.
//
// Both accelerators move 64-bit words over an AXI4-Stream style handshake
// and take a 32-bit control word from a memory-mapped GPIO register. The
// control word layout for Blowfish (bit 31 = skip key set-up, bit 30 =
// decrypt, bits 29:0 = block count) and the use of the whole word as the
// block count for RSA follow the accelerator description; the encoding of
// the slot selector is this design's own.
package crypto_pkg;

  localparam int unsigned STREAM_W  = 64;  // stream word (one cipher block)
  localparam int unsigned CONTROL_W = 32;  // GPIO control word

  // Blowfish control word fields
  localparam int unsigned BF_SKIP_INIT_BIT = 31;  // 1: key already expanded
  localparam int unsigned BF_DECRYPT_BIT   = 30;  // 1: decrypt, 0: encrypt
  localparam int unsigned BF_COUNT_W       = 30;  // block count width

  // Blowfish table geometry
  localparam int unsigned BF_ROUNDS    = 16;
  localparam int unsigned BF_P_WORDS   = BF_ROUNDS + 2;   // 18 subkeys
  localparam int unsigned BF_SBOXES    = 4;
  localparam int unsigned BF_SBOX_SIZE = 256;
  localparam int unsigned BF_PI_WORDS  = BF_P_WORDS + BF_SBOXES * BF_SBOX_SIZE; // 1042

  // Which reconfigurable module is loaded in the accelerator slot
  typedef enum logic [1:0] {
    RM_BLANK    = 2'd0,
    RM_RSA      = 2'd1,
    RM_BLOWFISH = 2'd2
  } rm_sel_e;

  // Stream-side sequence of the RSA accelerator (one state per input word kind)
  typedef enum logic [1:0] {
    RSA_EXPONENT = 2'd0,
    RSA_MODULUS  = 2'd1,
    RSA_CRYPT    = 2'd2,
    RSA_FLUSH    = 2'd3
  } rsa_state_e;

  // Stream-side sequence of the Blowfish accelerator
  typedef enum logic [1:0] {
    BFA_SETUP = 2'd0,
    BFA_CRYPT = 2'd1,
    BFA_FLUSH = 2'd2
  } bfa_state_e;

endpackage
