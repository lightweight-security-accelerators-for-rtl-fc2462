// mode_ctrl: mode controller of the coprocessor.
//
// Accepts one coprocessor command at a time.  A command that only sets
// operands is absorbed in one clock (the decoder loads its registers).  A
// command that starts work pulses the start of its unit (AEAD, Hash, Rand or
// KMU), holds busy until that unit's done, and returns the instruction's
// result: finish for Init Enc, the tag check (valid) for Init Dec, valid for
// Init Hash, the word counter for Get Rand, zero for the others.  When the
// instruction has a destination register (xd), a response carries the result
// to rd; otherwise none is sent.
//
// The controller also shares the single Ascon permutation and the single
// memory sequencer among the NU = 4 units (0 AEAD, 1 Hash, 2 Rand, 3 KMU).
// Units use them one at a time: the permutation takes the state of the unit
// whose start is high and its result and done go to every unit; the memory
// port serves the lowest-numbered unit with a request, and done is returned to
// that unit only.  Assertions flag two units asking in the same clock.
//
// Timing: cmd_ready is high only when idle; the unit start pulses in the clock
// after the command is accepted; resp_valid stays high until resp_ready.
module mode_ctrl
  import lwc_pkg::*;
#(
  parameter int NU = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  // command side
  input  logic         cmd_valid,
  output logic         cmd_ready,
  input  logic [4:0]   cmd_rd,
  input  logic         cmd_xd,
  input  start_cmd_e   action,
  output logic         resp_valid,
  input  logic         resp_ready,
  output logic [4:0]   resp_rd,
  output logic [31:0]  resp_data,
  output logic         busy,
  // unit control
  output logic         aead_start,
  output logic         aead_dec,
  input  logic         aead_done,
  input  logic         aead_ok,
  output logic         hash_start,
  input  logic         hash_done,
  input  logic         hash_ok,
  output logic         seed_start,
  output logic         rand_start,
  input  logic         rand_done,
  input  logic [31:0]  rand_count,
  output logic         kmu_start,
  input  logic         kmu_done,
  // permutation sharing
  input  logic [NU-1:0] u_pstart,
  input  logic [NU-1:0] u_pfull,
  input  ascon_state_t  u_pstate [NU],
  output logic          p_start,
  output logic          p_full,
  output ascon_state_t  p_state,
  // memory sequencer sharing
  input  logic [NU-1:0] u_req,
  input  logic [NU-1:0] u_we,
  input  logic [31:0]   u_addr [NU],
  input  logic [3:0]    u_nbytes [NU],
  input  logic [63:0]   u_wdata [NU],
  output logic [NU-1:0] u_done,
  output logic          m_req,
  output logic          m_we,
  output logic [31:0]   m_addr,
  output logic [3:0]    m_nbytes,
  output logic [63:0]   m_wdata,
  input  logic          m_done
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_RUN, S_RESP} state_e;
  state_e      state;
  start_cmd_e  cmd;
  logic        xd;

  assign cmd_ready = (state == S_IDLE);
  assign busy      = (state != S_IDLE);

  always_comb begin
    aead_start = (state == S_START) && (cmd == CMD_AEAD_ENC || cmd == CMD_AEAD_DEC);
    aead_dec   = (cmd == CMD_AEAD_DEC);
    hash_start = (state == S_START) && (cmd == CMD_HASH);
    seed_start = (state == S_START) && (cmd == CMD_SEED);
    rand_start = (state == S_START) && (cmd == CMD_RAND);
    kmu_start  = (state == S_START) &&
                 (cmd == CMD_KMU_NEW || cmd == CMD_KMU_GET || cmd == CMD_KMU_SEND || cmd == CMD_KMU_DEL);
  end

  logic        unit_done;
  logic [31:0] unit_result;
  always_comb begin
    unit_done   = 1'b0;
    unit_result = '0;
    case (cmd)
      CMD_AEAD_ENC, CMD_AEAD_DEC: begin unit_done = aead_done; unit_result = {31'd0, aead_ok}; end
      CMD_HASH:                   begin unit_done = hash_done; unit_result = {31'd0, hash_ok}; end
      CMD_SEED, CMD_RAND:         begin unit_done = rand_done; unit_result = rand_count; end
      CMD_KMU_NEW, CMD_KMU_GET, CMD_KMU_SEND, CMD_KMU_DEL: unit_done = kmu_done;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cmd        <= CMD_NONE;
      xd         <= 1'b0;
      resp_valid <= 1'b0;
      resp_rd    <= '0;
      resp_data  <= '0;
    end else begin
      case (state)
        S_IDLE: if (cmd_valid) begin
          cmd       <= action;
          xd        <= cmd_xd;
          resp_rd   <= cmd_rd;
          resp_data <= '0;
          if (action != CMD_NONE) begin
            state <= S_START;
          end else if (cmd_xd) begin
            resp_valid <= 1'b1;
            state      <= S_RESP;
          end
        end
        S_START: state <= S_RUN;
        S_RUN: if (unit_done) begin
          resp_data <= (cmd == CMD_SEED) ? 32'd0 : unit_result;
          if (xd) begin
            resp_valid <= 1'b1;
            state      <= S_RESP;
          end else begin
            state <= S_IDLE;
          end
        end
        S_RESP: if (resp_ready) begin
          resp_valid <= 1'b0;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---- shared permutation ----
  always_comb begin
    p_start = |u_pstart;
    p_full  = 1'b0;
    p_state = '0;
    for (int i = NU - 1; i >= 0; i--) begin
      if (u_pstart[i]) begin
        p_full  = u_pfull[i];
        p_state = u_pstate[i];
      end
    end
  end

  // ---- shared memory sequencer ----
  logic [$clog2(NU)-1:0] sel;
  always_comb begin
    sel = '0;
    for (int i = NU - 1; i >= 0; i--) if (u_req[i]) sel = i[$clog2(NU)-1:0];
    m_req    = |u_req;
    m_we     = u_we[sel];
    m_addr   = u_addr[sel];
    m_nbytes = u_nbytes[sel];
    m_wdata  = u_wdata[sel];
    u_done   = '0;
    u_done[sel] = m_done;
  end

  // units take turns: never two permutation starts or two memory requests at once
  a_one_perm_user: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(u_pstart));
  a_one_mem_user:  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(u_req));
  a_resp_held:     assert property (@(posedge clk) disable iff (!rst_n)
                                    resp_valid && !resp_ready |=> resp_valid);

endmodule
