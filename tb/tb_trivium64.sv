// tb_trivium64: compares the 64-bit-per-clock Trivium with a bit-serial model
// of the cipher: after init the keystream must match bit for bit, the warm-up
// must take 18 clocks, and z must hold while next is low.
module tb_trivium64;
  import ascon_ref_pkg::*;

  localparam logic [79:0] K = 80'h0123456789abcdef1357;
  localparam logic [79:0] V = 80'hfedcba98765432102468;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init = 0, next = 0, ready;
  logic [63:0] z;
  int checks = 0, failures = 0;
  bit st[288];

  trivium64 #(.KEY(K), .IV(V)) dut (.clk, .rst_n, .init, .next, .ready, .z);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    logic [63:0] exp, held;
    foreach (st[i]) st[i] = 0;
    for (int i = 0; i < 80; i++) begin st[i] = K[i]; st[93+i] = V[i]; end
    st[285] = 1; st[286] = 1; st[287] = 1;
    for (int i = 0; i < 1152; i++) void'(trivium_step(st));
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    cyc = 1;
    while (!ready) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 19) begin failures++; $display("warm-up took %0d clocks", cyc); end
    for (int w = 0; w < 40; w++) begin
      for (int j = 0; j < 64; j++) exp[j] = trivium_step(st);
      checks++;
      if (z !== exp) begin failures++; $display("word %0d: got %h expected %h", w, z, exp); end
      held = z;
      if (w % 3 == 0) begin
        repeat (2) @(negedge clk);
        checks++;
        if (z !== held) begin failures++; $display("z changed without next"); end
      end
      next = 1; @(negedge clk); next = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
