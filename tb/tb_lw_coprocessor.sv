// tb_lw_coprocessor: end-to-end test of the coprocessor at its default
// parameters, driven the way software would drive it: one custom instruction
// at a time over the command/response port, data in a behavioural memory.
//
// Sequence: Get Rand before any seed (the generator seeds itself), Seed, Get
// Rand, KMU Set New Key, AEAD encryption with that key over random AD and
// plaintext, decryption (tag valid), decryption with a corrupted tag (valid =
// 0), Ascon-Hash, KMU Get key / Delete key / Send key, encryption with the
// imported key, a reseed, and unknown codes.  Every result is compared with
// reference models (table-driven permutation, bit-serial Trivium) that know
// only the parameters.  It also counts the mechanisms of the design and fails
// if one never happened: command back-pressure while busy, a held response,
// empty AD, an AD or text length that ends on a whole block (extra padding
// block), a partial final block, a rejected tag, reseeding, the automatic
// first seed, each KMU operation, and a key imported from its encrypted form.
module tb_lw_coprocessor;
  import lwc_pkg::*;
  import ascon_ref_pkg::*;

  // the coprocessor's default parameters, as the reference must know them
  localparam logic [127:0] MK = 128'h6b6d752d6d61737465722d6b65792d30;
  localparam logic [79:0]  TK = 80'h0f62b5085bae0154a7fa;
  localparam logic [79:0]  TV = 80'h288ff65dc42b92f960c7;
  localparam int           SW = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        cmd_valid = 0, cmd_ready, cmd_xd = 0, resp_valid, resp_ready = 1, busy, irq;
  logic [6:0]  cmd_funct7 = 0;
  logic [4:0]  cmd_rd = 0, resp_rd;
  logic [31:0] cmd_rs1 = 0, cmd_rs2 = 0, resp_data;
  logic        mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [31:0] mem_req_addr, mem_req_wdata, mem_resp_data;
  logic [3:0]  mem_req_mask;

  lw_coprocessor dut (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_funct7, .cmd_rd, .cmd_xd,
    .cmd_rs1, .cmd_rs2, .resp_valid, .resp_ready, .resp_rd, .resp_data, .busy, .irq,
    .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_req_we, .mem_req_wdata,
    .mem_req_mask, .mem_resp_valid, .mem_resp_data);
  mem_model #(.AW(12)) mem (.clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_addr(mem_req_addr), .req_we(mem_req_we), .req_wdata(mem_req_wdata),
    .req_mask(mem_req_mask), .resp_valid(mem_resp_valid), .resp_data(mem_resp_data));

  // mechanism counters
  int n_stall = 0, n_resp_hold = 0, n_empty_ad = 0, n_whole_end = 0, n_partial = 0;
  int n_reject = 0, n_reseed = 0, n_autoseed = 0, n_new = 0, n_get = 0, n_send = 0, n_del = 0;
  int n_enc = 0, n_dec = 0, n_hash = 0, n_rand = 0;

  always @(posedge clk) if (cmd_valid && !cmd_ready) n_stall++;
  always @(posedge clk) if (resp_valid && !resp_ready) n_resp_hold++;

  // ---------------- reference generator ----------------
  w64_t rs[5];
  bit   tst[288];
  bit   seeded = 0;

  function automatic w64_t triv_word();
    w64_t w;
    for (int j = 0; j < 64; j++) w[j] = trivium_step(tst);
    return w;
  endfunction
  function automatic void ref_seed();
    for (int i = 0; i < SW; i++) begin rs[0] ^= triv_word(); ref_perm(rs, 12); end
    seeded = 1;
  endfunction
  function automatic w64_t ref_word();
    w64_t w;
    if (!seeded) ref_seed();
    w = rs[0];
    ref_perm(rs, 12);
    return w;
  endfunction

  // ---------------- instruction issue ----------------
  task automatic issue(input logic [2:0] m, input logic [3:0] op, input logic [31:0] a,
                       input logic [31:0] b, input bit xd, output logic [31:0] res);
    @(negedge clk);
    cmd_valid = 1; cmd_funct7 = {m, op}; cmd_rs1 = a; cmd_rs2 = b; cmd_xd = xd;
    cmd_rd = 5'($urandom_range(1, 31));
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk);
    cmd_valid = 0; cmd_rs1 = 'x; cmd_rs2 = 'x;
    res = 0;
    if (xd) begin
      // sometimes hold the response off for a few clocks
      if ($urandom_range(0, 2) == 0) begin resp_ready = 0; repeat (3) @(negedge clk); end
      resp_ready = 1;
      while (!resp_valid) @(negedge clk);
      res = resp_data;
      checks++;
      if (resp_rd !== cmd_rd) begin failures++; $display("response rd %0d vs %0d", resp_rd, cmd_rd); end
      @(negedge clk);
    end else begin
      // no response expected: wait until idle, while checking none comes
      while (busy) begin
        if (resp_valid) begin failures++; $display("response without xd"); end
        @(negedge clk);
      end
    end
    // try to issue the next command right away sometimes so that it waits on busy
  endtask

  // issue a command while the previous one still runs: it must wait
  task automatic issue_overlapped(input logic [2:0] m, input logic [3:0] op, input logic [31:0] a,
                                  input logic [31:0] b, input logic [2:0] m2, input logic [3:0] op2,
                                  input logic [31:0] a2, input logic [31:0] b2);
    logic [31:0] r;
    @(negedge clk);
    cmd_valid = 1; cmd_funct7 = {m, op}; cmd_rs1 = a; cmd_rs2 = b; cmd_xd = 0;
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk);
    cmd_funct7 = {m2, op2}; cmd_rs1 = a2; cmd_rs2 = b2;
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk);
    cmd_valid = 0;
    while (busy) @(negedge clk);
  endtask

  task automatic put(input int addr, input bytes_t q);
    foreach (q[i]) mem.mem[addr + i] = q[i];
  endtask

  function automatic bytes_t rnd_bytes(input int n);
    bytes_t q = {};
    repeat (n) q.push_back(8'($urandom));
    return q;
  endfunction

  // memory map of the test
  localparam int NONCE = 'h000, AD = 'h100, PT = 'h200, CT = 'h300, TAG = 'h400, DEC = 'h500;
  localparam int MSG = 'h600, HSH = 'h700, RND = 'h780, KE = 'h7c0;

  task automatic aead_round(input logic [7:0] kid, input logic [127:0] key, input int adn, input int ptn);
    bytes_t ad, pt, ct;
    logic [127:0] nonce, tag, got;
    logic [31:0] r;
    ad = rnd_bytes(adn); pt = rnd_bytes(ptn);
    nonce = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < 16; i++) mem.mem[NONCE + i] = nonce[127 - 8*i -: 8];
    put(AD, ad); put(PT, pt);
    ref_aead(key, nonce, ad, pt, 0, ct, tag);
    if (adn == 0) n_empty_ad++;
    if ((adn != 0 && adn % 8 == 0) || ptn % 8 == 0) n_whole_end++;
    if (ptn % 8 != 0) n_partial++;
    issue(MOD_AEADE, OP_SET_TEXT, PT, ptn, 1, r);
    issue(MOD_AEADE, OP_SET_AD, AD, adn, 0, r);
    issue(MOD_AEADE, OP_SET_OUT, CT, TAG, 0, r);
    issue(MOD_AEADE, OP_SET_NONCE, NONCE, 0, 0, r);
    issue(MOD_AEADE, OP_USE_KEY, {24'd0, kid}, 0, 0, r);
    issue(MOD_AEADE, OP_INIT, 0, 0, 1, r);
    n_enc++;
    checks++;
    if (r !== 1) begin failures++; $display("Init Enc returned %0d", r); end
    foreach (ct[i]) begin
      checks++;
      if (mem.mem[CT + i] !== ct[i]) begin failures++; $display("C byte %0d differs (|AD|=%0d |P|=%0d)", i, adn, ptn); end
    end
    for (int i = 0; i < 16; i++) got[127 - 8*i -: 8] = mem.mem[TAG + i];
    checks++;
    if (got !== tag) begin failures++; $display("tag %h vs %h", got, tag); end
    // decrypt
    issue(MOD_AEADD, OP_SET_TEXT, CT, ptn, 0, r);
    issue(MOD_AEADD, OP_SET_AD, AD, adn, 0, r);
    issue(MOD_AEADD, OP_SET_OUT, DEC, TAG, 0, r);
    issue(MOD_AEADD, OP_SET_NONCE, NONCE, 0, 0, r);
    issue(MOD_AEADD, OP_USE_KEY, {24'd0, kid}, 0, 0, r);
    issue(MOD_AEADD, OP_INIT, 0, 0, 1, r);
    n_dec++;
    checks++;
    if (r !== 1) begin failures++; $display("Init Dec returned %0d for a good tag", r); end
    foreach (pt[i]) begin
      checks++;
      if (mem.mem[DEC + i] !== pt[i]) begin failures++; $display("D byte %0d differs", i); end
    end
    mem.mem[TAG + $urandom_range(0, 15)] ^= 8'h10;
    issue(MOD_AEADD, OP_INIT, 0, 0, 1, r);
    checks++;
    if (r !== 0) begin failures++; $display("Init Dec accepted a corrupted tag"); end
    else n_reject++;
  endtask

  task automatic get_rand(input logic [31:0] exp_count);
    logic [31:0] r;
    w64_t e, g;
    issue(MOD_RAND, OP_RAND_GET, RND, 0, 1, r);
    e = ref_word();
    n_rand++;
    for (int k = 0; k < 8; k++) g[63 - 8*k -: 8] = mem.mem[RND + k];
    checks += 2;
    if (g !== e) begin failures++; $display("Get Rand %h vs %h", g, e); end
    if (r !== exp_count) begin failures++; $display("Get Rand counter %0d vs %0d", r, exp_count); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    logic [127:0] k2, k5;
    bytes_t m, kb, kc, noad;
    logic [127:0] t;
    logic [255:0] h, hg;
    foreach (tst[i]) tst[i] = 0;
    for (int i = 0; i < 80; i++) begin tst[i] = TK[i]; tst[93+i] = TV[i]; end
    tst[285] = 1; tst[286] = 1; tst[287] = 1;
    for (int i = 0; i < 1152; i++) void'(trivium_step(tst));
    foreach (rs[i]) rs[i] = 0;
    ref_perm(rs, 12);

    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    checks++;
    if (irq !== 0) begin failures++; $display("irq raised"); end

    // random word before any seed
    get_rand(1);
    n_autoseed++;
    // explicit reseed
    issue(MOD_RAND, OP_RAND_SEED, 0, 0, 1, r);
    ref_seed();
    n_reseed++;
    get_rand(1);
    get_rand(2);

    // a fresh key in slot 2 from the generator
    issue(MOD_KMU, OP_KMU_NEW, 2, 0, 0, r);
    k2[127:64] = ref_word();
    k2[63:0]   = ref_word();
    n_new++;

    aead_round(2, k2, 0, 0);
    aead_round(2, k2, 16, 13);
    aead_round(2, k2, 5, 24);
    aead_round(2, k2, 11, 7);

    // hash
    for (int t2 = 0; t2 < 3; t2++) begin
      m = rnd_bytes(t2 == 0 ? 16 : $urandom_range(0, 40));
      put(MSG, m);
      h = ref_hash(m);
      issue(MOD_HASH, OP_SET_TEXT, MSG, m.size(), 0, r);
      issue(MOD_HASH, OP_HASH_SET_H, HSH, 0, 0, r);
      issue(MOD_HASH, OP_HASH_INIT, 0, 0, 1, r);
      n_hash++;
      for (int i = 0; i < 32; i++) hg[255 - 8*i -: 8] = mem.mem[HSH + i];
      checks += 2;
      if (r !== 1) begin failures++; $display("Init Hash returned %0d", r); end
      if (hg !== h) begin failures++; $display("hash %h vs %h", hg, h); end
    end

    // export the key of slot 2, delete it, import it into slot 5
    issue(MOD_KMU, OP_KMU_GET, 2, KE, 0, r);
    n_get++;
    kb = {};
    for (int j = 0; j < 16; j++) kb.push_back(k2[127 - 8*j -: 8]);
    noad = {};
    ref_aead(MK, 128'd2, noad, kb, 0, kc, t);
    for (int j = 0; j < 16; j++) begin
      checks++;
      if (mem.mem[KE + j] !== kc[j]) begin failures++; $display("Ke byte %0d differs", j); end
    end
    issue(MOD_KMU, OP_KMU_DEL, 2, 0, 0, r);
    n_del++;
    // slot 2 now holds zero: an encryption with it must use the zero key
    aead_round(2, 128'd0, 3, 9);
    // Send key: the ciphertext made for ID 2 imports correctly only under ID 2
    issue(MOD_KMU, OP_KMU_SEND, 2, KE, 1, r);
    n_send++;
    aead_round(2, k2, 8, 8);

    // back-pressure: a Set instruction issued while a random word is produced
    issue_overlapped(MOD_RAND, OP_RAND_SEED, 0, 0, MOD_AEADE, OP_USE_KEY, 2, 0);
    ref_seed();
    n_reseed++;
    get_rand(1);
    // unknown codes are accepted and do nothing
    issue(3'd6, 4'd1, 0, 0, 1, r);
    issue(MOD_KMU, 4'd9, 0, 0, 1, r);
    checks++;
    if (r !== 0) begin failures++; $display("unknown code returned %0d", r); end
    get_rand(2);

    // every mechanism must have happened
    begin
      automatic string names[16] = '{"stall", "resp_hold", "empty_ad", "whole_block_end", "partial_block",
                           "tag_reject", "reseed", "auto_seed", "kmu_new", "kmu_get", "kmu_send",
                           "kmu_del", "enc", "dec", "hash", "rand"};
      automatic int cnt[16] = '{n_stall, n_resp_hold, n_empty_ad, n_whole_end, n_partial, n_reject, n_reseed,
                      n_autoseed, n_new, n_get, n_send, n_del, n_enc, n_dec, n_hash, n_rand};
      for (int i = 0; i < 16; i++) begin
        $display("mechanism %-16s %0d", names[i], cnt[i]);
        checks++;
        if (cnt[i] == 0) begin failures++; $display("mechanism %s never happened", names[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
