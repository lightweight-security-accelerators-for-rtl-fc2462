// ascon_p: the Ascon permutation, two rounds per clock.
//
// The permutation is unrolled by two: each clock applies round i and round i+1
// (round-constant addition to x2, the 5-bit S-box layer written bit-sliced over
// the 64 columns, and the linear layer Sigma_0..Sigma_4) to the working register.
// p^a (a = 12) takes six clocks and starts at round 0; p^b (b = 6) takes three
// clocks and starts at round 6, so its constants are the last six of p^a.
// Round i adds the constant ((15 - i) << 4) | i.
//
// Interface: pulse start with state_in and full (1: 12 rounds, 0: 6 rounds).
// busy is high while rounds run; done pulses on the clock state_out holds the
// result, ROUNDS/2 clocks after start.  A start while busy is ignored.
// The two-round unrolling follows the coprocessor's permutation; the
// start/done handshake is this design's own.
module ascon_p
  import lwc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         full,
  input  ascon_state_t state_in,
  output ascon_state_t state_out,
  output logic         busy,
  output logic         done
);

  function automatic ascon_state_t round(input ascon_state_t s, input logic [3:0] i);
    logic [63:0] x0, x1, x2, x3, x4, t0, t1, t2, t3, t4;
    ascon_state_t r;
    x0 = s[0]; x1 = s[1]; x2 = s[2]; x3 = s[3]; x4 = s[4];
    x2 = x2 ^ {56'd0, 4'hf - i, i};
    // substitution layer, bit-sliced
    x0 = x0 ^ x4; x4 = x4 ^ x3; x2 = x2 ^ x1;
    t0 = ~x0 & x1; t1 = ~x1 & x2; t2 = ~x2 & x3; t3 = ~x3 & x4; t4 = ~x4 & x0;
    x0 = x0 ^ t1; x1 = x1 ^ t2; x2 = x2 ^ t3; x3 = x3 ^ t4; x4 = x4 ^ t0;
    x1 = x1 ^ x0; x0 = x0 ^ x4; x3 = x3 ^ x2; x2 = ~x2;
    // linear diffusion layer
    r[0] = x0 ^ {x0[18:0], x0[63:19]} ^ {x0[27:0], x0[63:28]};
    r[1] = x1 ^ {x1[60:0], x1[63:61]} ^ {x1[38:0], x1[63:39]};
    r[2] = x2 ^ {x2[0],    x2[63:1]}  ^ {x2[5:0],  x2[63:6]};
    r[3] = x3 ^ {x3[9:0],  x3[63:10]} ^ {x3[16:0], x3[63:17]};
    r[4] = x4 ^ {x4[6:0],  x4[63:7]}  ^ {x4[40:0], x4[63:41]};
    return r;
  endfunction

  ascon_state_t st;
  logic [3:0]   rnd;      // index of the first round applied this clock

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= '0;
      rnd  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        st  <= round(round(st, rnd), rnd + 4'd1);
        rnd <= rnd + 4'd2;
        if (rnd == 4'd10) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else if (start) begin
        st   <= state_in;
        rnd  <= full ? 4'd0 : 4'd6;
        busy <= 1'b1;
      end
    end
  end

  assign state_out = st;

endmodule
