// lw_coprocessor: lightweight security coprocessor for a RISC-V core.
//
// Attached to the host core as a custom-instruction coprocessor, it offers
// authenticated encryption (Ascon-128), hashing (Ascon-Hash), random numbers
// (an Ascon sponge generator seeded by Trivium) and key management, all built
// around one shared Ascon permutation that computes two rounds per clock.
// Software passes addresses and lengths with "Set" instructions, then an
// "Init"/action instruction runs the operation; the coprocessor reads its
// inputs from and writes its results to memory through the host's data cache
// port, and returns a result word (finish, tag valid, hash valid, random word
// counter) to the instruction's rd.
//
// Inside: the interface controller (instr_decoder, and mem_fsm which turns
// 64-bit block transfers into 32-bit cache accesses), the mode controller
// (mode_ctrl, which starts units, answers commands and shares the permutation
// and the memory sequencer), the units ascon_aead, ascon_hash, ascon_prng (with
// trivium64) and kmu, and ascon_p.
//
// Ports.  Command: cmd_valid/cmd_ready with funct7, rd, xd and the values of
// rs1 and rs2.  Response: resp_valid/resp_ready with rd and data, for commands
// with xd set.  busy is high while a command is in progress; the interrupt irq is not
// used by any operation and stays low.  Memory: a 32-bit request/response port
// (see mem_fsm).  The command/response/busy/interrupt/memory grouping follows
// the host's coprocessor interface; the exact signal set is this design's own.
module lw_coprocessor
  import lwc_pkg::*;
#(
  parameter int unsigned  NKEYS      = 8,
  parameter logic [127:0] MASTER_KEY = 128'h6b6d752d6d61737465722d6b65792d30,
  parameter int unsigned  SEED_WORDS = 2,
  parameter logic [79:0]  TRIV_KEY   = 80'h0f62b5085bae0154a7fa,
  parameter logic [79:0]  TRIV_IV    = 80'h288ff65dc42b92f960c7
) (
  input  logic        clk,
  input  logic        rst_n,
  // coprocessor command
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  logic [6:0]  cmd_funct7,
  input  logic [4:0]  cmd_rd,
  input  logic        cmd_xd,
  input  logic [31:0] cmd_rs1,
  input  logic [31:0] cmd_rs2,
  // coprocessor response
  output logic        resp_valid,
  input  logic        resp_ready,
  output logic [4:0]  resp_rd,
  output logic [31:0] resp_data,
  output logic        busy,
  output logic        irq,
  // data cache port
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output logic [31:0] mem_req_addr,
  output logic        mem_req_we,
  output logic [31:0] mem_req_wdata,
  output logic [3:0]  mem_req_mask,
  input  logic        mem_resp_valid,
  input  logic [31:0] mem_resp_data
);

  localparam int NU = 4;   // 0 AEAD, 1 Hash, 2 Rand, 3 KMU

  blk_if  b_unit [NU] ();
  blk_if  b_mem ();
  perm_if p_unit [NU] ();

  // ---- interface controller: decoder ----
  start_cmd_e  action;
  logic [3:0]  kmu_op;
  logic [7:0]  arg_id;
  logic [31:0] arg_addr;
  aead_cfg_t   enc_cfg, dec_cfg;
  hash_cfg_t   hash_cfg;

  instr_decoder u_dec (
    .clk, .rst_n, .fire(cmd_valid && cmd_ready), .funct7(cmd_funct7), .rs1(cmd_rs1),
    .rs2(cmd_rs2), .action, .kmu_op, .arg_id, .arg_addr, .enc_cfg, .dec_cfg, .hash_cfg);

  // ---- mode controller ----
  logic aead_start, aead_dec, aead_done, aead_ok;
  logic hash_start, hash_done, hash_ok;
  logic seed_start, rand_start, rand_done;
  logic [31:0] rand_count;
  logic kmu_start, kmu_done;
  logic p_start, p_full;
  ascon_state_t p_state, p_out;
  logic p_done;

  logic [NU-1:0] u_pstart, u_pfull, u_req, u_we, u_done;
  ascon_state_t  u_pstate [NU];
  logic [31:0]   u_addr [NU];
  logic [3:0]    u_nbytes [NU];
  logic [63:0]   u_wdata [NU];

  for (genvar i = 0; i < NU; i++) begin : g_share
    assign u_pstart[i]          = p_unit[i].start;
    assign u_pfull[i]           = p_unit[i].full;
    assign u_pstate[i]          = p_unit[i].state_in;
    assign p_unit[i].done       = p_done;
    assign p_unit[i].state_out  = p_out;
    assign u_req[i]             = b_unit[i].req;
    assign u_we[i]              = b_unit[i].we;
    assign u_addr[i]            = b_unit[i].addr;
    assign u_nbytes[i]          = b_unit[i].nbytes;
    assign u_wdata[i]           = b_unit[i].wdata;
    assign b_unit[i].done       = u_done[i];
    assign b_unit[i].rdata      = b_mem.rdata;
  end

  mode_ctrl #(.NU(NU)) u_mode (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_rd, .cmd_xd, .action,
    .resp_valid, .resp_ready, .resp_rd, .resp_data, .busy,
    .aead_start, .aead_dec, .aead_done, .aead_ok,
    .hash_start, .hash_done, .hash_ok,
    .seed_start, .rand_start, .rand_done, .rand_count,
    .kmu_start, .kmu_done,
    .u_pstart, .u_pfull, .u_pstate, .p_start, .p_full, .p_state,
    .u_req, .u_we, .u_addr, .u_nbytes, .u_wdata, .u_done,
    .m_req(b_mem.req), .m_we(b_mem.we), .m_addr(b_mem.addr), .m_nbytes(b_mem.nbytes),
    .m_wdata(b_mem.wdata), .m_done(b_mem.done));

  assign irq = 1'b0;

  // ---- shared permutation ----
  ascon_p u_perm (
    .clk, .rst_n, .start(p_start), .full(p_full), .state_in(p_state),
    .state_out(p_out), .busy(), .done(p_done));

  // ---- memory sequencer ----
  mem_fsm u_mem (
    .clk, .rst_n, .blk(b_mem), .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_req_we,
    .mem_req_wdata, .mem_req_mask, .mem_resp_valid, .mem_resp_data);

  // ---- units ----
  logic [127:0] aead_key;
  logic         w_req, w_valid;
  logic [63:0]  w_word;

  ascon_aead u_aead (
    .clk, .rst_n, .start(aead_start), .dec(aead_dec), .cfg(aead_dec ? dec_cfg : enc_cfg),
    .key(aead_key), .busy(), .done(aead_done), .ok(aead_ok),
    .blk(b_unit[0]), .perm(p_unit[0]));

  ascon_hash u_hash (
    .clk, .rst_n, .start(hash_start), .cfg(hash_cfg), .busy(), .done(hash_done),
    .ok(hash_ok), .blk(b_unit[1]), .perm(p_unit[1]));

  ascon_prng #(.SEED_WORDS(SEED_WORDS), .TRIV_KEY(TRIV_KEY), .TRIV_IV(TRIV_IV)) u_rand (
    .clk, .rst_n, .seed_start, .get_start(rand_start), .get_addr(arg_addr),
    .word_req(w_req), .word_valid(w_valid), .word(w_word), .busy(),
    .done(rand_done), .count(rand_count), .blk(b_unit[2]), .perm(p_unit[2]));

  kmu #(.NKEYS(NKEYS), .MASTER_KEY(MASTER_KEY)) u_kmu (
    .clk, .rst_n, .start(kmu_start), .op(kmu_op), .id(arg_id), .addr(arg_addr),
    .rd_id(aead_dec ? dec_cfg.key_id : enc_cfg.key_id), .rd_key(aead_key),
    .word_req(w_req), .word_valid(w_valid), .word(w_word), .busy(), .done(kmu_done),
    .blk(b_unit[3]), .perm(p_unit[3]));

endmodule
