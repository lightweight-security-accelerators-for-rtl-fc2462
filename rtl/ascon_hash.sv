// ascon_hash: Ascon-Hash unit (256-bit digest).
//
// Sponge over the 320-bit state register S with the shared permutation, p^12
// throughout: S = IV || 0^256, p^12; each 64-bit message block is added to the
// rate followed by p^12, the last block padded with 0x80 and zeros (an empty
// padding block when the length is a multiple of 8); then four 64-bit rate
// words are squeezed, with p^12 between them, giving H1..H4.
//
// Interface: start (one clock) with cfg = {[M], |M| in bytes, [Hash]}.  The
// message is read and the 32-byte digest written through the block port; done
// pulses at the end with ok = 1 (the valid result of Init Hash).  Buffers must be
// 4-byte aligned.  The mode follows the design; the FSM is this design's own.
module ascon_hash
  import lwc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  hash_cfg_t  cfg,
  output logic       busy,
  output logic       done,
  output logic       ok,
  blk_if.unit        blk,
  perm_if.user       perm
);

  typedef enum logic [2:0] {S_IDLE, S_ABS, S_SQ, S_PWAIT, S_DONE} state_e;

  state_e       state, ret;
  ascon_state_t s;
  logic [31:0]  rem, m_ptr, h_ptr;
  logic [1:0]   sq;        // index of the digest word being written
  logic [3:0]   n;
  logic         pstart;

  assign n = (rem >= 32'd8) ? 4'd8 : rem[3:0];

  always_comb begin
    blk.req    = 1'b0;
    blk.we     = 1'b0;
    blk.addr   = '0;
    blk.nbytes = 4'd8;
    blk.wdata  = '0;
    case (state)
      S_ABS: begin blk.req = (n != 0); blk.addr = m_ptr; blk.nbytes = n; end
      S_SQ:  begin blk.req = 1'b1; blk.we = 1'b1; blk.addr = h_ptr; blk.wdata = s[0]; end
      default: ;
    endcase
  end

  assign perm.start    = pstart;
  assign perm.full     = 1'b1;
  assign perm.state_in = s;
  assign busy          = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      ret    <= S_IDLE;
      s      <= '0;
      rem    <= '0;
      m_ptr  <= '0;
      h_ptr  <= '0;
      sq     <= '0;
      pstart <= 1'b0;
      done   <= 1'b0;
      ok     <= 1'b0;
    end else begin
      pstart <= 1'b0;
      done   <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          s      <= '0;
          s[0]   <= ASCONHASH_IV;
          rem    <= cfg.m_len;
          m_ptr  <= cfg.m_addr;
          h_ptr  <= cfg.h_addr;
          sq     <= '0;
          ok     <= 1'b0;
          pstart <= 1'b1;
          ret    <= S_ABS;
          state  <= S_PWAIT;
        end
        S_PWAIT: if (perm.done) begin
          s     <= perm.state_out;
          state <= ret;
        end
        S_ABS: if (n == 0 || blk.done) begin
          s[0]   <= s[0] ^ (n == 0 ? 64'd0 : blk.rdata) ^ pad_bit(n);
          rem    <= rem - 32'(n);
          m_ptr  <= m_ptr + 32'd8;
          pstart <= 1'b1;
          ret    <= (n == 4'd8) ? S_ABS : S_SQ;
          state  <= S_PWAIT;
        end
        S_SQ: if (blk.done) begin
          h_ptr <= h_ptr + 32'd8;
          sq    <= sq + 2'd1;
          if (sq == 2'd3) begin
            state <= S_DONE;
          end else begin
            pstart <= 1'b1;
            ret    <= S_SQ;
            state  <= S_PWAIT;
          end
        end
        S_DONE: begin
          ok    <= 1'b1;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
