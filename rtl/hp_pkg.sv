// hp_pkg: types, constants and word functions shared by the SHA-1 / SHA-256
// hash processor.
//
// Holds the instruction opcodes (bits [8:5] of an instruction word), the ALU
// operation select codes, the datapath control bundle the control unit
// drives, the register file map of the chaining variables, the initial hash
// values, the round constants and the SHA logical functions. The opcode and
// ALU select numbering, the constants, the initial hash values and the
// functions follow the SHA standards and the processor's instruction table;
// the register file map (SHA-1 variables in registers 0-4, SHA-256 variables
// in 5-12, 13-15 spare) and the struct layout are this design's own choices.
package hp_pkg;

  localparam int unsigned WORD_W   = 32;   // data word
  localparam int unsigned PADDR_W  = 5;    // program memory address
  localparam int unsigned ROUND_W  = 7;    // round number
  localparam int unsigned RF_AW    = 4;    // register file address
  localparam int unsigned RF_PORTS = 8;    // read and write ports of the register file

  typedef logic [WORD_W-1:0] word_t;

  // Instruction opcodes, instruction word bits [8:5]; bits [4:0] are the operand address.
  typedef enum logic [3:0] {
    OP_LDA    = 4'b0000,
    OP_SHA1   = 4'b0001,
    OP_ADD    = 4'b0010,
    OP_SUB    = 4'b0011,
    OP_INPUT  = 4'b0100,
    OP_OUT    = 4'b0101,
    OP_JMPP   = 4'b0110,
    OP_HALT   = 4'b0111,
    OP_STA    = 4'b1000,
    OP_AND    = 4'b1001,
    OP_SHA2   = 4'b1010,
    OP_SRGF1  = 4'b1011,
    OP_RRGF1  = 4'b1100,
    OP_SRGF2  = 4'b1101,
    OP_RRGF2  = 4'b1110,
    OP_JMPZ   = 4'b1111
  } opcode_e;

  // ALU / message expansion / constants ROM operation select.
  typedef enum logic [2:0] {
    SEL_SHA1 = 3'b000,
    SEL_SHA2 = 3'b001,
    SEL_ADD  = 3'b010,
    SEL_SUB  = 3'b011,
    SEL_AND  = 3'b100,
    SEL_OR   = 3'b101
  } alusel_e;

  // Control bundle from the control unit to the datapath.
  typedef struct packed {
    logic                                 rf_we;   // write all eight register file ports
    logic [RF_PORTS-1:0]                  rf_re;   // per read port: capture register into output
    logic [RF_PORTS-1:0][RF_AW-1:0]       rf_wa;   // per write port: target register
    logic [RF_PORTS-1:0][RF_AW-1:0]       rf_ra;   // per read port: source register
    logic                                 alu_e;   // ALU enable
    alusel_e                              alu_sel; // ALU / schedule / constant select
    logic                                 m_we;    // write di into message RAM at 'round'
    logic [ROUND_W-1:0]                   round;   // round number / message RAM address
  } dp_ctrl_t;

  // Register file map of the chaining variables.
  localparam logic [RF_AW-1:0] RF_SHA1_BASE  = 4'd0;
  localparam logic [RF_AW-1:0] RF_SHA2_BASE  = 4'd5;
  localparam logic [RF_AW-1:0] RF_SPARE_BASE = 4'd13;

  // Initial hash values.
  localparam word_t SHA1_IV [5] = '{32'h67452301, 32'hEFCDAB89, 32'h98BADCFE,
                                    32'h10325476, 32'hC3D2E1F0};
  localparam word_t SHA2_IV [8] = '{32'h6A09E667, 32'hBB67AE85, 32'h3C6EF372, 32'hA54FF53A,
                                    32'h510E527F, 32'h9B05688C, 32'h1F83D9AB, 32'h5BE0CD19};

  // SHA-1 round constants, one per 20 rounds.
  localparam word_t SHA1_K [4] = '{32'h5A827999, 32'h6ED9EBA1, 32'h8F1BBCDC, 32'hCA62C1D6};

  // SHA-256 round constants.
  localparam word_t SHA2_K [64] = '{
    32'h428a2f98, 32'h71374491, 32'hb5c0fbcf, 32'he9b5dba5, 32'h3956c25b, 32'h59f111f1, 32'h923f82a4, 32'hab1c5ed5,
    32'hd807aa98, 32'h12835b01, 32'h243185be, 32'h550c7dc3, 32'h72be5d74, 32'h80deb1fe, 32'h9bdc06a7, 32'hc19bf174,
    32'he49b69c1, 32'hefbe4786, 32'h0fc19dc6, 32'h240ca1cc, 32'h2de92c6f, 32'h4a7484aa, 32'h5cb0a9dc, 32'h76f988da,
    32'h983e5152, 32'ha831c66d, 32'hb00327c8, 32'hbf597fc7, 32'hc6e00bf3, 32'hd5a79147, 32'h06ca6351, 32'h14292967,
    32'h27b70a85, 32'h2e1b2138, 32'h4d2c6dfc, 32'h53380d13, 32'h650a7354, 32'h766a0abb, 32'h81c2c92e, 32'h92722c85,
    32'ha2bfe8a1, 32'ha81a664b, 32'hc24b8b70, 32'hc76c51a3, 32'hd192e819, 32'hd6990624, 32'hf40e3585, 32'h106aa070,
    32'h19a4c116, 32'h1e376c08, 32'h2748774c, 32'h34b0bcb5, 32'h391c0cb3, 32'h4ed8aa4a, 32'h5b9cca4f, 32'h682e6ff3,
    32'h748f82ee, 32'h78a5636f, 32'h84c87814, 32'h8cc70208, 32'h90befffa, 32'ha4506ceb, 32'hbef9a3f7, 32'hc67178f2};

  // Word operations.
  function automatic word_t rotl(word_t x, int unsigned n);
    return (x << n) | (x >> (WORD_W - n));
  endfunction

  function automatic word_t rotr(word_t x, int unsigned n);
    return (x >> n) | (x << (WORD_W - n));
  endfunction

  function automatic word_t f_ch(word_t x, word_t y, word_t z);
    return (x & y) ^ (~x & z);
  endfunction

  function automatic word_t f_parity(word_t x, word_t y, word_t z);
    return x ^ y ^ z;
  endfunction

  function automatic word_t f_maj(word_t x, word_t y, word_t z);
    return (x & y) ^ (x & z) ^ (y & z);
  endfunction

  function automatic word_t big_sigma0(word_t x);
    return rotr(x, 2) ^ rotr(x, 13) ^ rotr(x, 22);
  endfunction

  function automatic word_t big_sigma1(word_t x);
    return rotr(x, 6) ^ rotr(x, 11) ^ rotr(x, 25);
  endfunction

  function automatic word_t small_sigma0(word_t x);
    return rotr(x, 7) ^ rotr(x, 18) ^ (x >> 3);
  endfunction

  function automatic word_t small_sigma1(word_t x);
    return rotr(x, 17) ^ rotr(x, 19) ^ (x >> 10);
  endfunction

endpackage
