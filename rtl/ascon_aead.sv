// ascon_aead: Ascon-128 authenticated encryption and decryption (AEAD unit).
//
// The unit sequences the Ascon-128 duplex over its 320-bit state register S
// with the shared permutation: initialisation S = IV || K || N, p^12, then K is
// added to the last 128 bits; associated data is absorbed 64 bits at a time
// (padded with 0x80 and zeros, p^6 after every block, skipped when it is
// empty); a 1 is added to the last state bit; each plaintext block is added to
// the rate and the sum is the ciphertext block (for decryption the ciphertext
// replaces the rate), p^6 between blocks, the last block padded and truncated;
// finally K is added to x1,x2, p^12, and the tag is x3,x4 xor K.  Nonce, AD and
// text are read from memory and the output text and tag written back through
// the block port; decryption reads the expected tag and compares.
//
// Interface: start (one clock) with dec and cfg; key is the 128-bit key of
// cfg.key_id, sampled at start.  done pulses at the end with ok: 1 after an
// encryption (finish), tag match after a decryption (valid).  Memory buffers
// must be 4-byte aligned.  The algorithm and the operands follow the design;
// the FSM is this design's own.
module ascon_aead
  import lwc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         dec,
  input  aead_cfg_t    cfg,
  input  logic [127:0] key,
  output logic         busy,
  output logic         done,
  output logic         ok,
  blk_if.unit          blk,
  perm_if.user         perm
);

  typedef enum logic [3:0] {
    S_IDLE, S_NONCE0, S_NONCE1, S_INIT_POST, S_AD, S_DSEP, S_TXT, S_TXT_WR,
    S_FINAL, S_TAG, S_TAG0, S_TAG1, S_PWAIT, S_DONE
  } state_e;

  state_e       state, ret;
  ascon_state_t s;
  logic [127:0] k;
  logic         dec_r;
  aead_cfg_t    c;
  logic [31:0]  ad_rem, ad_ptr, rem, in_ptr, out_ptr;
  logic [63:0]  out_blk;
  logic [127:0] tag;
  logic [3:0]   ad_n, tx_n;
  logic         pstart, pfull;

  assign ad_n = (ad_rem >= 32'd8) ? 4'd8 : ad_rem[3:0];
  assign tx_n = (rem >= 32'd8) ? 4'd8 : rem[3:0];

  // block port requests follow the state
  always_comb begin
    blk.req    = 1'b0;
    blk.we     = 1'b0;
    blk.addr   = '0;
    blk.nbytes = 4'd8;
    blk.wdata  = '0;
    case (state)
      S_NONCE0: begin blk.req = 1'b1; blk.addr = c.nonce_addr; end
      S_NONCE1: begin blk.req = 1'b1; blk.addr = c.nonce_addr + 32'd8; end
      S_AD:     begin blk.req = (ad_n != 0); blk.addr = ad_ptr; blk.nbytes = ad_n; end
      S_TXT:    begin blk.req = (tx_n != 0); blk.addr = in_ptr; blk.nbytes = tx_n; end
      S_TXT_WR: begin blk.req = 1'b1; blk.we = 1'b1; blk.addr = out_ptr;
                      blk.nbytes = tx_n; blk.wdata = out_blk; end
      S_TAG0:   begin blk.req = 1'b1; blk.we = !dec_r; blk.addr = c.tag_addr;
                      blk.wdata = tag[127:64]; end
      S_TAG1:   begin blk.req = 1'b1; blk.we = !dec_r; blk.addr = c.tag_addr + 32'd8;
                      blk.wdata = tag[63:0]; end
      default: ;
    endcase
  end

  assign perm.start    = pstart;
  assign perm.full     = pfull;
  assign perm.state_in = s;
  assign busy          = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      ret     <= S_IDLE;
      s       <= '0;
      k       <= '0;
      dec_r   <= 1'b0;
      c       <= '0;
      ad_rem  <= '0; ad_ptr <= '0; rem <= '0; in_ptr <= '0; out_ptr <= '0;
      out_blk <= '0;
      tag     <= '0;
      pstart  <= 1'b0;
      pfull   <= 1'b0;
      done    <= 1'b0;
      ok      <= 1'b0;
    end else begin
      pstart <= 1'b0;
      done   <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          c       <= cfg;
          k       <= key;
          dec_r   <= dec;
          ad_rem  <= cfg.ad_len;
          ad_ptr  <= cfg.ad_addr;
          rem     <= cfg.in_len;
          in_ptr  <= cfg.in_addr;
          out_ptr <= cfg.out_addr;
          ok      <= 1'b1;
          state   <= S_NONCE0;
        end
        S_NONCE0: if (blk.done) begin
          s[3]  <= blk.rdata;
          state <= S_NONCE1;
        end
        S_NONCE1: if (blk.done) begin
          s[0]   <= ASCON128_IV;
          s[1]   <= k[127:64];
          s[2]   <= k[63:0];
          s[4]   <= blk.rdata;
          pstart <= 1'b1; pfull <= 1'b1;
          ret    <= S_INIT_POST;
          state  <= S_PWAIT;
        end
        S_PWAIT: if (perm.done) begin
          s     <= perm.state_out;
          state <= ret;
        end
        S_INIT_POST: begin
          s[3]  <= s[3] ^ k[127:64];
          s[4]  <= s[4] ^ k[63:0];
          state <= (c.ad_len != 0) ? S_AD : S_DSEP;
        end
        S_AD: if (ad_n == 0 || blk.done) begin
          s[0]   <= s[0] ^ (ad_n == 0 ? 64'd0 : blk.rdata) ^ pad_bit(ad_n);
          ad_rem <= ad_rem - 32'(ad_n);
          ad_ptr <= ad_ptr + 32'd8;
          pstart <= 1'b1; pfull <= 1'b0;
          ret    <= (ad_n == 4'd8) ? S_AD : S_DSEP;
          state  <= S_PWAIT;
        end
        S_DSEP: begin
          s[4]  <= s[4] ^ 64'd1;
          state <= S_TXT;
        end
        S_TXT: if (tx_n == 0) begin
          s[0]  <= s[0] ^ pad_bit(4'd0);
          state <= S_FINAL;
        end else if (blk.done) begin
          out_blk <= keep_bytes(s[0] ^ blk.rdata, tx_n);
          if (dec_r)
            s[0] <= blk.rdata ^ (s[0] & ~keep_bytes('1, tx_n)) ^ pad_bit(tx_n);
          else
            s[0] <= s[0] ^ blk.rdata ^ pad_bit(tx_n);
          state <= S_TXT_WR;
        end
        S_TXT_WR: if (blk.done) begin
          rem     <= rem - 32'(tx_n);
          in_ptr  <= in_ptr + 32'd8;
          out_ptr <= out_ptr + 32'd8;
          if (tx_n == 4'd8) begin
            pstart <= 1'b1; pfull <= 1'b0;
            ret    <= S_TXT;
            state  <= S_PWAIT;
          end else begin
            state <= S_FINAL;
          end
        end
        S_FINAL: begin
          s[1]   <= s[1] ^ k[127:64];
          s[2]   <= s[2] ^ k[63:0];
          // the permutation samples the state one clock later, after this update
          pstart <= 1'b1; pfull <= 1'b1;
          ret    <= S_TAG;
          state  <= S_PWAIT;
        end
        S_TAG: begin
          tag   <= {s[3] ^ k[127:64], s[4] ^ k[63:0]};
          state <= S_TAG0;
        end
        S_TAG0: if (blk.done) begin
          if (dec_r && blk.rdata != tag[127:64]) ok <= 1'b0;
          state <= S_TAG1;
        end
        S_TAG1: if (blk.done) begin
          if (dec_r && blk.rdata != tag[63:0]) ok <= 1'b0;
          state <= S_DONE;
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
