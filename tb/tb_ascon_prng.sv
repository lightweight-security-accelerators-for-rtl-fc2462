// tb_ascon_prng: checks the sponge generator against a reference built from the
// table-driven permutation and the bit-serial Trivium: seed, random words
// written to memory and handed out directly, the word counter, a reseed into
// the running state, and a request before any seed (which must seed first).
module tb_ascon_prng;
  import lwc_pkg::*;
  import ascon_ref_pkg::*;

  localparam logic [79:0] TK = 80'h13579bdf02468ace1122;
  localparam logic [79:0] TV = 80'h0badc0ffee0ddf00d123;
  localparam int SW = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  blk_if  blk ();
  perm_if perm ();
  logic seed_start = 0, get_start = 0, word_req = 0, word_valid, busy, done, pbusy;
  logic [31:0] get_addr = 0, count;
  logic [63:0] word;
  logic        mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [31:0] mem_req_addr, mem_req_wdata, mem_resp_data;
  logic [3:0]  mem_req_mask;

  ascon_prng #(.SEED_WORDS(SW), .TRIV_KEY(TK), .TRIV_IV(TV)) dut (
    .clk, .rst_n, .seed_start, .get_start, .get_addr, .word_req, .word_valid, .word,
    .busy, .done, .count, .blk(blk.unit), .perm(perm.user));
  ascon_p pc (.clk, .rst_n, .start(perm.start), .full(perm.full), .state_in(perm.state_in),
              .state_out(perm.state_out), .busy(pbusy), .done(perm.done));
  mem_fsm mf (.clk, .rst_n, .blk(blk.mem), .mem_req_valid, .mem_req_ready, .mem_req_addr,
              .mem_req_we, .mem_req_wdata, .mem_req_mask, .mem_resp_valid, .mem_resp_data);
  mem_model #(.AW(10)) mem (.clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
              .req_addr(mem_req_addr), .req_we(mem_req_we), .req_wdata(mem_req_wdata),
              .req_mask(mem_req_mask), .resp_valid(mem_resp_valid), .resp_data(mem_resp_data));

  // reference
  w64_t rs[5];
  bit   tst[288];

  function automatic w64_t triv_word();
    w64_t w;
    for (int j = 0; j < 64; j++) w[j] = trivium_step(tst);
    return w;
  endfunction

  task automatic ref_seed();
    for (int i = 0; i < SW; i++) begin
      rs[0] ^= triv_word();
      ref_perm(rs, 12);
    end
  endtask

  function automatic w64_t ref_word();
    w64_t w = rs[0];
    ref_perm(rs, 12);
    return w;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(ref logic sig);
    @(negedge clk); sig = 1;
    @(negedge clk); sig = 0;
    while (!done) @(negedge clk);
  endtask

  task automatic get_mem(input logic [31:0] a, input int exp_count);
    w64_t e, g;
    get_addr = a;
    pulse(get_start);
    e = ref_word();
    for (int k = 0; k < 8; k++) g[63 - 8*k -: 8] = mem.mem[a + k];
    checks += 2;
    if (g !== e) begin failures++; $display("rand word %h vs %h", g, e); end
    if (count != exp_count) begin failures++; $display("count %0d vs %0d", count, exp_count); end
  endtask

  task automatic get_word(input int exp_count);
    w64_t e, g = 0;
    bit seen = 0;
    @(negedge clk); word_req = 1;
    @(negedge clk); word_req = 0;
    while (!done) begin
      if (word_valid) begin g = word; seen = 1; end
      @(negedge clk);
    end
    e = ref_word();
    checks += 3;
    if (!seen) begin failures++; $display("no word_valid"); end
    if (g !== e) begin failures++; $display("word %h vs %h", g, e); end
    if (count != exp_count) begin failures++; $display("count %0d vs %0d", count, exp_count); end
  endtask

  initial begin
    foreach (tst[i]) tst[i] = 0;
    for (int i = 0; i < 80; i++) begin tst[i] = TK[i]; tst[93+i] = TV[i]; end
    tst[285] = 1; tst[286] = 1; tst[287] = 1;
    for (int i = 0; i < 1152; i++) void'(trivium_step(tst));
    foreach (rs[i]) rs[i] = 0;
    ref_perm(rs, 12);
    repeat (2) @(negedge clk);
    rst_n = 1;
    // a word requested before any seed: the generator seeds itself first
    ref_seed();
    get_mem(32'h100, 1);
    get_mem(32'h108, 2);
    get_word(3);
    // explicit reseed into the running state
    pulse(seed_start);
    ref_seed();
    checks++;
    if (count != 0) begin failures++; $display("count not cleared by seed"); end
    for (int i = 0; i < 4; i++) get_word(i + 1);
    get_mem(32'h200, 5);
    pulse(seed_start);
    ref_seed();
    get_mem(32'h208, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
