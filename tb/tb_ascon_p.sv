// tb_ascon_p: checks the two-round-per-clock Ascon permutation against the
// table-driven reference, for p^12 and p^6 on random states, and checks that
// the result arrives 6 (p^12) or 3 (p^6) clocks after start.
module tb_ascon_p;
  import lwc_pkg::*;
  import ascon_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, full = 0, busy, done;
  ascon_state_t sin, sout;
  int checks = 0, failures = 0;

  ascon_p dut (.clk, .rst_n, .start, .full, .state_in(sin), .state_out(sout), .busy, .done);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit f);
    w64_t s[5];
    int cyc;
    for (int i = 0; i < 5; i++) begin
      sin[i] = {$urandom, $urandom};
      s[i] = sin[i];
    end
    ref_perm(s, f ? 12 : 6);
    @(negedge clk); start = 1; full = f;
    @(negedge clk); start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != (f ? 6 : 3)) begin
      failures++; $display("latency %0d for %0d rounds", cyc, f ? 12 : 6);
    end
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (sout[i] !== s[i]) begin
        failures++; $display("x%0d: got %h expected %h", i, sout[i], s[i]);
      end
    end
  endtask

  initial begin
    sin = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 20; k++) run(k[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
