// trivium64: Trivium stream cipher producing 64 keystream bits per clock.
//
// The 288-bit state is three shift registers: A = s[0..92], B = s[93..176] and
// C = s[177..287] (s[k] is bit s_(k+1) of the cipher description).  Every tap
// lies at least 64 positions from its register's input, so 64 consecutive
// single-bit updates are computed at once: update j (0..63) reads the original
// bits s[tap-j].  Keystream bit j is s[65-j]^s[92-j]^s[161-j]^s[176-j]^s[242-j]^s[287-j];
// the new bits t3 (into A, fed back from s[68], AND of s[285],s[286]), t1 (into B,
// from s[170], AND of s[90],s[91]) and t2 (into C, from s[263], AND of s[174],s[175]).
// It serves as the seed generator of the random number generator.
//
// Interface: a pulse on init loads KEY into s[0..79], IV into s[93..172] and ones
// into s[285..287] and runs the 4*288 = 1152 warm-up updates, 18 clocks.  ready
// then rises; z shows the next 64 keystream bits (bit j is keystream bit j) and a
// pulse on next advances to the following 64.  KEY bit i is key bit K_(i+1).
// The 64-bit width and the tap positions follow the design; the key, IV and this
// handshake are this design's own.
module trivium64 #(
  parameter logic [79:0] KEY = 80'h0f62b5085bae0154a7fa,
  parameter logic [79:0] IV  = 80'h288ff65dc42b92f960c7
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        next,
  output logic        ready,
  output logic [63:0] z
);

  logic [287:0] s;
  logic [4:0]   warm;     // warm-up clocks still to run
  logic [287:0] s_next;

  always_comb begin
    logic [63:0] t1, t2, t3;
    for (int j = 0; j < 64; j++) begin
      z[j]  = s[65-j] ^ s[92-j] ^ s[161-j] ^ s[176-j] ^ s[242-j] ^ s[287-j];
      t1[j] = s[65-j] ^ s[92-j] ^ (s[90-j] & s[91-j]) ^ s[170-j];
      t2[j] = s[161-j] ^ s[176-j] ^ (s[174-j] & s[175-j]) ^ s[263-j];
      t3[j] = s[242-j] ^ s[287-j] ^ (s[285-j] & s[286-j]) ^ s[68-j];
    end
    s_next = s;
    for (int p = 0; p < 93; p++)  s_next[p]       = (p >= 64) ? s[p-64]       : t3[63-p];
    for (int p = 0; p < 84; p++)  s_next[93 + p]  = (p >= 64) ? s[93+p-64]    : t1[63-p];
    for (int p = 0; p < 111; p++) s_next[177 + p] = (p >= 64) ? s[177+p-64]   : t2[63-p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s     <= '0;
      warm  <= '0;
      ready <= 1'b0;
    end else if (init) begin
      s          <= '0;
      s[79:0]    <= KEY;
      s[172:93]  <= IV;
      s[287:285] <= 3'b111;
      warm       <= 5'd18;
      ready      <= 1'b0;
    end else if (warm != 0) begin
      s    <= s_next;
      warm <= warm - 5'd1;
      if (warm == 5'd1) ready <= 1'b1;
    end else if (next && ready) begin
      s <= s_next;
    end
  end

endmodule
