// mem_fsm: the memory sequencer ("FSM Mem") of the interface controller.
//
// The coprocessor's units work on 64-bit Ascon blocks; the data cache port of
// the RV32 host is 32 bits wide and little-endian.  For each block request
// this FSM issues one or two word accesses (one when nbytes <= 4) at addr and
// addr+4, one access outstanding at a time, and converts byte order: byte k of
// the block (bits 63-8k..56-8k) is the byte at address addr+k.  Reads return
// only the first nbytes bytes, the rest zero; writes set the byte mask so that
// only the first nbytes bytes are stored.
//
// Memory port: mem_req_valid/mem_req_ready handshake with addr, we, wdata and a
// byte mask; every request, load or store, is answered by one mem_resp_valid
// pulse (with the load data).  Block port: see blk_if; done pulses one clock
// after the last response.  The word width and this protocol are this design's
// own choice for the cache request/response path.
module mem_fsm
  import lwc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  blk_if.mem          blk,
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output logic [31:0] mem_req_addr,
  output logic        mem_req_we,
  output logic [31:0] mem_req_wdata,
  output logic [3:0]  mem_req_mask,
  input  logic        mem_resp_valid,
  input  logic [31:0] mem_resp_data
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT, S_DONE} state_e;
  state_e      state;
  logic        idx;        // word being moved: 0 at addr, 1 at addr+4
  logic [63:0] rbuf;

  always_comb begin
    mem_req_valid = (state == S_REQ);
    mem_req_addr  = blk.addr + {29'd0, idx, 2'b00};
    mem_req_we    = blk.we;
    for (int k = 0; k < 4; k++) begin
      mem_req_wdata[8*k +: 8] = blk.wdata[63 - 8*(4*idx + k) -: 8];
      mem_req_mask[k]         = (4*idx + k) < blk.nbytes;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= 1'b0;
      rbuf  <= '0;
    end else begin
      case (state)
        S_IDLE: if (blk.req) begin
          idx   <= 1'b0;
          rbuf  <= '0;
          state <= S_REQ;
        end
        S_REQ: if (mem_req_ready) state <= S_WAIT;
        S_WAIT: if (mem_resp_valid) begin
          if (!blk.we)
            for (int k = 0; k < 4; k++)
              rbuf[63 - 8*(4*idx + k) -: 8] <= mem_resp_data[8*k +: 8];
          if (idx == 1'b0 && blk.nbytes > 4'd4) begin
            idx   <= 1'b1;
            state <= S_REQ;
          end else begin
            state <= S_DONE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign blk.done  = (state == S_DONE);
  assign blk.rdata = keep_bytes(rbuf, blk.nbytes);

endmodule
