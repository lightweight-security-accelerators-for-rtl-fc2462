// lwc_pkg: types and constants shared by the lightweight security coprocessor.
//
// The Ascon state is five 64-bit words x0..x4 (x0 is the 64-bit rate).  Data
// blocks travel as 64-bit words whose most significant byte is the byte at the
// lowest memory address, the byte order Ascon uses for its rate.  The funct7
// field of a coprocessor instruction carries a module ID in bits 6:4 and an
// operation in bits 3:0; the codes below follow the coprocessor's instruction
// tables.  The initial values of Ascon-128 and Ascon-Hash (for a = 12, b = 6) come from the Ascon parameter set (r = 64, c = 256).
package lwc_pkg;

  typedef logic [4:0][63:0] ascon_state_t;

  localparam logic [63:0] ASCON128_IV = 64'h80400c0600000000;
  localparam logic [63:0] ASCONHASH_IV = 64'h00400c0000000100;

  // funct7[6:4]: which module an instruction addresses
  typedef enum logic [2:0] {
    MOD_NONE  = 3'd0,
    MOD_AEADE = 3'd1,
    MOD_AEADD = 3'd2,
    MOD_HASH  = 3'd3,
    MOD_RAND  = 3'd4,
    MOD_KMU   = 3'd5
  } module_id_e;

  // funct7[3:0] codes, per module
  localparam logic [3:0] OP_SET_TEXT  = 4'd1;  // Set P / Set C / Set M
  localparam logic [3:0] OP_SET_AD    = 4'd2;  // Set AD / Set Hash (hash)
  localparam logic [3:0] OP_SET_OUT   = 4'd3;  // Set C Tag / Set D Tag / Init Hash (hash)
  localparam logic [3:0] OP_SET_NONCE = 4'd4;
  localparam logic [3:0] OP_USE_KEY   = 4'd5;
  localparam logic [3:0] OP_INIT      = 4'd6;
  localparam logic [3:0] OP_HASH_SET_H = 4'd2;
  localparam logic [3:0] OP_HASH_INIT  = 4'd3;
  localparam logic [3:0] OP_RAND_SEED  = 4'd1;
  localparam logic [3:0] OP_RAND_GET   = 4'd2;
  localparam logic [3:0] OP_KMU_NEW    = 4'd1;
  localparam logic [3:0] OP_KMU_GET    = 4'd2;
  localparam logic [3:0] OP_KMU_SEND   = 4'd3;
  localparam logic [3:0] OP_KMU_DEL    = 4'd4;

  // Operands of one AEAD operation, gathered by the Set instructions.
  typedef struct packed {
    logic [31:0] in_addr;     // [P] (encrypt) or [C] (decrypt)
    logic [31:0] in_len;      // bytes of P or C
    logic [31:0] ad_addr;
    logic [31:0] ad_len;
    logic [31:0] out_addr;    // [C] (encrypt) or [Dec] (decrypt)
    logic [31:0] tag_addr;    // where the tag is written / read
    logic [31:0] nonce_addr;
    logic [7:0]  key_id;
  } aead_cfg_t;

  typedef struct packed {
    logic [31:0] m_addr;
    logic [31:0] m_len;
    logic [31:0] h_addr;
  } hash_cfg_t;

  // Operations the mode controller can start.
  typedef enum logic [3:0] {
    CMD_NONE, CMD_AEAD_ENC, CMD_AEAD_DEC, CMD_HASH, CMD_SEED, CMD_RAND,
    CMD_KMU_NEW, CMD_KMU_GET, CMD_KMU_SEND, CMD_KMU_DEL
  } start_cmd_e;

  // Keep the first n bytes (1..8) of a block, counted from the most significant byte.
  function automatic logic [63:0] keep_bytes(input logic [63:0] w, input logic [3:0] n);
    logic [63:0] m;
    m = (n >= 4'd8) ? '1 : ~({64{1'b1}} >> (8 * n));
    return w & m;
  endfunction

  // The Ascon padding bit 0x80 placed right after the first n bytes (n = 0..7).
  function automatic logic [63:0] pad_bit(input logic [3:0] n);
    return (n >= 4'd8) ? 64'd0 : (64'h8000000000000000 >> (8 * n));
  endfunction

endpackage
