// ascon_prng: reseedable sponge random number generator ("Rand" unit).
//
// A sponge over its own 320-bit state register with the shared Ascon
// permutation, p^12 everywhere (r = 64).  The state starts at zero and is
// permuted once before the first seed.  Seeding absorbs SEED_WORDS 64-bit seed
// words, each added to the rate and followed by p^12; reseeding absorbs more
// words into the running state in the same way.  Each random word is the rate,
// followed by p^12.  The seed words come from a 64-bit Trivium instance
// (trivium64), started on the first seed; it stands in for a true random source.
// The state register is separate from the AEAD/hash state so that the generator
// keeps its state across other operations.
//
// Interface: seed_start runs a (re)seed.  get_start writes one 64-bit random
// word to get_addr through the block port.  word_req (sampled when idle, held by the
// requester until word_valid) hands one random word to the key management unit
// on word.  Each ends with a done
// pulse; count is the number of words given out since the last seed.  A request
// before any seed seeds first.  SEED_WORDS, the counter's meaning and the
// automatic first seed are this design's own choices.
module ascon_prng
  import lwc_pkg::*;
#(
  parameter int unsigned SEED_WORDS = 2,
  parameter logic [79:0] TRIV_KEY   = 80'h0f62b5085bae0154a7fa,
  parameter logic [79:0] TRIV_IV    = 80'h288ff65dc42b92f960c7
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        seed_start,
  input  logic        get_start,
  input  logic [31:0] get_addr,
  input  logic        word_req,
  output logic        word_valid,
  output logic [63:0] word,
  output logic        busy,
  output logic        done,
  output logic [31:0] count,
  blk_if.unit         blk,
  perm_if.user        perm
);

  typedef enum logic [1:0] {OP_SEED, OP_GET, OP_WORD} op_e;
  typedef enum logic [2:0] {S_IDLE, S_TINIT, S_ABS, S_OUT, S_PWAIT, S_DONE} state_e;

  state_e       state, ret;
  op_e          op;
  ascon_state_t s;
  logic         seeded, started;
  logic [7:0]   left;       // seed words still to absorb
  logic [31:0]  addr;
  logic         pstart, tinit, tnext, tready;
  logic [63:0]  z;

  trivium64 #(.KEY(TRIV_KEY), .IV(TRIV_IV)) seedgen (
    .clk, .rst_n, .init(tinit), .next(tnext), .ready(tready), .z);

  always_comb begin
    blk.req    = (state == S_OUT) && (op == OP_GET);
    blk.we     = 1'b1;
    blk.addr   = addr;
    blk.nbytes = 4'd8;
    blk.wdata  = s[0];
  end

  assign perm.start    = pstart;
  assign perm.full     = 1'b1;
  assign perm.state_in = s;
  assign busy          = (state != S_IDLE);
  assign word          = s[0];
  assign tnext         = (state == S_ABS) && tready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ret        <= S_IDLE;
      op         <= OP_SEED;
      s          <= '0;
      seeded     <= 1'b0;
      started    <= 1'b0;
      left       <= '0;
      addr       <= '0;
      pstart     <= 1'b0;
      tinit      <= 1'b0;
      word_valid <= 1'b0;
      done       <= 1'b0;
      count      <= '0;
    end else begin
      pstart     <= 1'b0;
      tinit      <= 1'b0;
      word_valid <= 1'b0;
      done       <= 1'b0;
      case (state)
        S_IDLE: if (seed_start || get_start || word_req) begin
          op    <= seed_start ? OP_SEED : (get_start ? OP_GET : OP_WORD);
          addr  <= get_addr;
          left  <= 8'(SEED_WORDS);
          if (seed_start || !seeded) begin
            if (!started) begin
              // first seed: start the seed generator, permute the zero state
              tinit   <= 1'b1;
              started <= 1'b1;
              pstart  <= 1'b1;
              ret     <= S_TINIT;
              state   <= S_PWAIT;
            end else begin
              state <= S_ABS;
            end
          end else begin
            state <= S_OUT;
          end
        end
        S_TINIT: if (tready) state <= S_ABS;
        S_ABS: if (tready) begin
          s[0]   <= s[0] ^ z;
          left   <= left - 8'd1;
          pstart <= 1'b1;
          ret    <= (left == 8'd1) ? ((op == OP_SEED) ? S_DONE : S_OUT) : S_ABS;
          state  <= S_PWAIT;
          if (left == 8'd1) begin
            seeded <= 1'b1;
            count  <= '0;
          end
        end
        S_PWAIT: if (perm.done) begin
          s     <= perm.state_out;
          state <= ret;
        end
        S_OUT: if (op == OP_WORD || blk.done) begin
          word_valid <= (op == OP_WORD);
          count      <= count + 32'd1;
          pstart     <= 1'b1;
          ret        <= S_DONE;
          state      <= S_PWAIT;
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
