// kmu: key management unit: generation, storage and distribution of
// symmetric 128-bit keys.
//
// Keys live in NKEYS slots addressed by an ID (taken modulo NKEYS).  The AEAD
// unit reads the key of its "Use Key" ID through rd_id/rd_key, so keys held here
// need never pass through software.  Operations:
//   NEW  - fill slot ID with a fresh key: two 64-bit words from the random
//          number generator (word_req / word_valid).
//   GET  - export slot ID to memory at addr as an encrypted key Ke (16 bytes).
//   SEND - import an encrypted key Ke from memory at addr into slot ID.
//   DEL  - clear slot ID.
// Ke is the Ascon-128 ciphertext of the key under the device key MASTER_KEY,
// with nonce N = ID (zero-extended to 128 bits) and no associated data:
// S = IV || MASTER_KEY || N, p^12, MASTER_KEY added to x3,x4, 1 added to x4;
// Ke1 = K[127:64] ^ x0, x0 = Ke1, p^6, Ke2 = K[63:0] ^ x0.  Import runs the same
// duplex in the decrypt direction.  No tag is produced, so an altered Ke imports
// an altered key.  The permutation is the shared one (perm), memory goes
// through the block port.
//
// Interface: start (one clock) with op, id and addr; done pulses at the end.
// Slot count, the wrapping scheme and the master key are this design's own
// choices: the design names the unit's operations and an encrypted key Ke.
module kmu
  import lwc_pkg::*;
#(
  parameter int unsigned  NKEYS      = 8,
  parameter logic [127:0] MASTER_KEY = 128'h6b6d752d6d61737465722d6b65792d30
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [3:0]   op,          // OP_KMU_NEW / GET / SEND / DEL
  input  logic [7:0]   id,
  input  logic [31:0]  addr,
  input  logic [7:0]   rd_id,
  output logic [127:0] rd_key,
  output logic         word_req,
  input  logic         word_valid,
  input  logic [63:0]  word,
  output logic         busy,
  output logic         done,
  blk_if.unit          blk,
  perm_if.user         perm
);

  localparam int IW = (NKEYS > 1) ? $clog2(NKEYS) : 1;

  typedef enum logic [3:0] {
    S_IDLE, S_INIT_POST, S_KE0, S_KE1, S_STORE, S_NEW0, S_NEW1, S_PWAIT, S_DONE
  } state_e;

  state_e       state, ret;
  logic [127:0] keys [NKEYS];
  logic [3:0]   op_r;
  logic [IW-1:0] slot;
  logic [31:0]  a;
  ascon_state_t s;
  logic [127:0] k;          // key being exported, imported or generated
  logic         pstart, pfull;

  assign rd_key = keys[IW'(rd_id % NKEYS)];

  always_comb begin
    blk.req    = (state == S_KE0) || (state == S_KE1);
    blk.we     = (op_r == OP_KMU_GET);
    blk.addr   = (state == S_KE1) ? a + 32'd8 : a;
    blk.nbytes = 4'd8;
    blk.wdata  = (state == S_KE1) ? (k[63:0] ^ s[0]) : (k[127:64] ^ s[0]);
  end

  assign perm.start    = pstart;
  assign perm.full     = pfull;
  assign perm.state_in = s;
  assign busy          = (state != S_IDLE);
  // held until the generator answers; it samples the request only when idle
  assign word_req      = (state == S_NEW0) || (state == S_NEW1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      ret    <= S_IDLE;
      op_r   <= '0;
      slot   <= '0;
      a      <= '0;
      s      <= '0;
      k      <= '0;
      pstart <= 1'b0;
      pfull  <= 1'b0;
      done   <= 1'b0;
      for (int i = 0; i < NKEYS; i++) keys[i] <= '0;
    end else begin
      pstart <= 1'b0;
      done   <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          op_r <= op;
          slot <= IW'(id % NKEYS);
          a    <= addr;
          k    <= keys[IW'(id % NKEYS)];
          case (op)
            OP_KMU_NEW: state <= S_NEW0;
            OP_KMU_GET, OP_KMU_SEND: begin
              s[0]   <= ASCON128_IV;
              s[1]   <= MASTER_KEY[127:64];
              s[2]   <= MASTER_KEY[63:0];
              s[3]   <= '0;
              s[4]   <= {56'd0, id};
              pstart <= 1'b1;
              pfull  <= 1'b1;
              ret    <= S_INIT_POST;
              state  <= S_PWAIT;
            end
            OP_KMU_DEL: begin
              keys[IW'(id % NKEYS)] <= '0;
              state <= S_DONE;
            end
            default: state <= S_DONE;
          endcase
        end
        S_PWAIT: if (perm.done) begin
          s     <= perm.state_out;
          state <= ret;
        end
        S_INIT_POST: begin
          s[3]  <= s[3] ^ MASTER_KEY[127:64];
          s[4]  <= s[4] ^ MASTER_KEY[63:0] ^ 64'd1;
          state <= S_KE0;
        end
        S_KE0: if (blk.done) begin
          // encrypt: Ke1 = K1 ^ x0; decrypt: K1 = Ke1 ^ x0; either way x0 becomes Ke1
          if (op_r == OP_KMU_GET) begin
            s[0] <= k[127:64] ^ s[0];
          end else begin
            k[127:64] <= blk.rdata ^ s[0];
            s[0]      <= blk.rdata;
          end
          pstart <= 1'b1;
          pfull  <= 1'b0;
          ret    <= S_KE1;
          state  <= S_PWAIT;
        end
        S_KE1: if (blk.done) begin
          if (op_r == OP_KMU_SEND) k[63:0] <= blk.rdata ^ s[0];
          state <= (op_r == OP_KMU_SEND) ? S_STORE : S_DONE;
        end
        S_NEW0: if (word_valid) begin
          k[127:64] <= word;
          state     <= S_NEW1;
        end
        S_NEW1: if (word_valid) begin
          k[63:0] <= word;
          state   <= S_STORE;
        end
        S_STORE: begin
          keys[slot] <= k;
          state      <= S_DONE;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
