// instr_decoder: instruction decoder of the interface controller.
//
// Decodes the funct7 field of each accepted coprocessor command: bits 6:4
// select the module (1 AEAD encrypt, 2 AEAD decrypt, 3 Hash, 4 Rand, 5 KMU),
// bits 3:0 the operation.  "Set" operations load the operand registers of their
// module from rs1/rs2 (addresses, byte lengths, key ID); operations that start
// work (Init Enc, Init Dec, Init Hash, Seed, Get Rand and the four KMU
// operations) are reported on action; their register operands are kept in
// arg_id (rs1[7:0]), arg_addr (rs2 for KMU, rs1 for Get Rand) and kmu_op.
//
// Timing: the registers load on the clock where fire is high, so a unit
// started in the following clock sees them; action is combinational from
// funct7.  An unassigned code starts nothing.  The codes
// and operand slots follow the design's instruction tables; the register
// arrangement is this design's own.
module instr_decoder
  import lwc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        fire,
  input  logic [6:0]  funct7,
  input  logic [31:0] rs1,
  input  logic [31:0] rs2,
  output start_cmd_e  action,
  output logic [3:0]  kmu_op,
  output logic [7:0]  arg_id,
  output logic [31:0] arg_addr,
  output aead_cfg_t   enc_cfg,
  output aead_cfg_t   dec_cfg,
  output hash_cfg_t   hash_cfg
);

  module_id_e  mod;
  logic [3:0]  op;

  assign mod    = module_id_e'(funct7[6:4]);
  assign op     = funct7[3:0];

  always_comb begin
    action   = CMD_NONE;
    case (mod)
      MOD_AEADE, MOD_AEADD: begin
        if (op == OP_INIT) action = (mod == MOD_AEADE) ? CMD_AEAD_ENC : CMD_AEAD_DEC;
      end
      MOD_HASH: begin
        if (op == OP_HASH_INIT) action = CMD_HASH;
      end
      MOD_RAND: begin
        if (op == OP_RAND_SEED) action = CMD_SEED;
        if (op == OP_RAND_GET)  action = CMD_RAND;
      end
      MOD_KMU: begin
        case (op)
          OP_KMU_NEW:  action = CMD_KMU_NEW;
          OP_KMU_GET:  action = CMD_KMU_GET;
          OP_KMU_SEND: action = CMD_KMU_SEND;
          OP_KMU_DEL:  action = CMD_KMU_DEL;
          default: ;
        endcase
      end
      default: ;
    endcase
  end

  // Set operations: operand registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enc_cfg  <= '0;
      dec_cfg  <= '0;
      hash_cfg <= '0;
      kmu_op   <= '0;
      arg_id   <= '0;
      arg_addr <= '0;
    end else if (fire) begin
      if (action != CMD_NONE) begin
        kmu_op   <= op;
        arg_id   <= rs1[7:0];
        arg_addr <= (mod == MOD_KMU) ? rs2 : rs1;
      end
      case (mod)
        MOD_AEADE: case (op)
          OP_SET_TEXT:  begin enc_cfg.in_addr <= rs1; enc_cfg.in_len <= rs2; end
          OP_SET_AD:    begin enc_cfg.ad_addr <= rs1; enc_cfg.ad_len <= rs2; end
          OP_SET_OUT:   begin enc_cfg.out_addr <= rs1; enc_cfg.tag_addr <= rs2; end
          OP_SET_NONCE: enc_cfg.nonce_addr <= rs1;
          OP_USE_KEY:   enc_cfg.key_id <= rs1[7:0];
          default: ;
        endcase
        MOD_AEADD: case (op)
          OP_SET_TEXT:  begin dec_cfg.in_addr <= rs1; dec_cfg.in_len <= rs2; end
          OP_SET_AD:    begin dec_cfg.ad_addr <= rs1; dec_cfg.ad_len <= rs2; end
          OP_SET_OUT:   begin dec_cfg.out_addr <= rs1; dec_cfg.tag_addr <= rs2; end
          OP_SET_NONCE: dec_cfg.nonce_addr <= rs1;
          OP_USE_KEY:   dec_cfg.key_id <= rs1[7:0];
          default: ;
        endcase
        MOD_HASH: case (op)
          OP_SET_TEXT:   begin hash_cfg.m_addr <= rs1; hash_cfg.m_len <= rs2; end
          OP_HASH_SET_H: hash_cfg.h_addr <= rs1;
          default: ;
        endcase
        default: ;
      endcase
    end
  end

endmodule
