// tb_ascon_aead: runs the AEAD unit with the permutation, the memory sequencer
// and a behavioural memory.  Checks the published Ascon-128 test vector for an
// empty message and empty AD (tag E355159F292911F794CB1432A0103A8A), then random
// keys, nonces and lengths (0..24 bytes of AD and text, so empty, partial and
// whole final blocks all occur) against the reference model: ciphertext, tag,
// decryption back to the plaintext, and a rejected tag after one flipped bit.
module tb_ascon_aead;
  import lwc_pkg::*;
  import ascon_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  blk_if  blk ();
  perm_if perm ();
  logic start = 0, dec = 0, busy, done, ok, pbusy;
  aead_cfg_t cfg;
  logic [127:0] key;
  logic        mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [31:0] mem_req_addr, mem_req_wdata, mem_resp_data;
  logic [3:0]  mem_req_mask;

  ascon_aead dut (.clk, .rst_n, .start, .dec, .cfg, .key, .busy, .done, .ok,
                  .blk(blk.unit), .perm(perm.user));
  ascon_p pc (.clk, .rst_n, .start(perm.start), .full(perm.full), .state_in(perm.state_in),
              .state_out(perm.state_out), .busy(pbusy), .done(perm.done));
  mem_fsm mf (.clk, .rst_n, .blk(blk.mem), .mem_req_valid, .mem_req_ready, .mem_req_addr,
              .mem_req_we, .mem_req_wdata, .mem_req_mask, .mem_resp_valid, .mem_resp_data);
  mem_model #(.AW(11)) mem (.clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
              .req_addr(mem_req_addr), .req_we(mem_req_we), .req_wdata(mem_req_wdata),
              .req_mask(mem_req_mask), .resp_valid(mem_resp_valid), .resp_data(mem_resp_data));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input int addr, input bytes_t q);
    foreach (q[i]) mem.mem[addr + i] = q[i];
  endtask

  task automatic run(input bit d, output bit res);
    @(negedge clk); start = 1; dec = d;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    res = ok;
  endtask

  task automatic one(input logic [127:0] k, input logic [127:0] n, input bytes_t ad,
                     input bytes_t p, input bit kat, input logic [127:0] kat_tag);
    bytes_t c;
    logic [127:0] t, t2;
    bit res;
    key = k;
    for (int i = 0; i < 16; i++) mem.mem[i] = n[127 - 8*i -: 8];
    put('h040, ad);
    put('h100, p);
    ref_aead(k, n, ad, p, 0, c, t);
    if (kat) begin
      checks++;
      if (t !== kat_tag) begin failures++; $display("reference tag %h != %h", t, kat_tag); end
    end
    cfg = '{in_addr: 32'h100, in_len: p.size(), ad_addr: 32'h40, ad_len: ad.size(),
            out_addr: 32'h200, tag_addr: 32'h300, nonce_addr: 32'h0, key_id: 8'd0};
    run(0, res);
    checks++;
    if (!res) begin failures++; $display("encrypt: finish low"); end
    foreach (c[i]) begin
      checks++;
      if (mem.mem['h200 + i] !== c[i]) begin
        failures++; $display("C byte %0d: %h vs %h (|AD|=%0d |P|=%0d)", i, mem.mem['h200+i], c[i], ad.size(), p.size());
      end
    end
    for (int i = 0; i < 16; i++) t2[127 - 8*i -: 8] = mem.mem['h300 + i];
    checks++;
    if (t2 !== t) begin failures++; $display("tag %h vs %h (|AD|=%0d |P|=%0d)", t2, t, ad.size(), p.size()); end
    // decrypt the ciphertext just written
    cfg = '{in_addr: 32'h200, in_len: p.size(), ad_addr: 32'h40, ad_len: ad.size(),
            out_addr: 32'h400, tag_addr: 32'h300, nonce_addr: 32'h0, key_id: 8'd0};
    run(1, res);
    checks++;
    if (!res) begin failures++; $display("decrypt: valid low"); end
    foreach (p[i]) begin
      checks++;
      if (mem.mem['h400 + i] !== p[i]) begin failures++; $display("D byte %0d wrong", i); end
    end
    // a corrupted tag must be rejected
    mem.mem['h300 + $urandom_range(0, 15)] ^= 8'(1 << $urandom_range(0, 7));
    run(1, res);
    checks++;
    if (res) begin failures++; $display("corrupted tag accepted"); end
  endtask

  initial begin
    bytes_t ad, p;
    logic [127:0] k, n;
    key = 0; cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    k = 128'h000102030405060708090a0b0c0d0e0f;
    ad = {}; p = {};
    one(k, k, ad, p, 1, 128'he355159f292911f794cb1432a0103a8a);
    for (int t = 0; t < 30; t++) begin
      ad = {}; p = {};
      repeat ($urandom_range(0, 24)) ad.push_back(8'($urandom));
      repeat ($urandom_range(0, 24)) p.push_back(8'($urandom));
      k = {$urandom, $urandom, $urandom, $urandom};
      n = {$urandom, $urandom, $urandom, $urandom};
      one(k, n, ad, p, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
