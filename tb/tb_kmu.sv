// tb_kmu: key management unit with the permutation, the memory sequencer, a
// behavioural memory and a stand-in random source.  Checks that NEW stores the
// two random words, that GET writes the Ascon-128 ciphertext of the key under
// the master key (nonce = ID) as computed by the reference model, that SEND of
// that Ke restores the key in another slot, that DEL clears a slot, and that
// other slots are left alone.
module tb_kmu;
  import lwc_pkg::*;
  import ascon_ref_pkg::*;

  localparam logic [127:0] MK = 128'h00112233445566778899aabbccddeeff;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  blk_if  blk ();
  perm_if perm ();
  logic start = 0, busy, done, pbusy, word_req, word_valid = 0;
  logic [3:0] op = 0;
  logic [7:0] id = 0, rd_id = 0;
  logic [31:0] addr = 0;
  logic [127:0] rd_key;
  logic [63:0] word = 0;
  logic        mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [31:0] mem_req_addr, mem_req_wdata, mem_resp_data;
  logic [3:0]  mem_req_mask;

  kmu #(.NKEYS(8), .MASTER_KEY(MK)) dut (.clk, .rst_n, .start, .op, .id, .addr, .rd_id, .rd_key,
    .word_req, .word_valid, .word, .busy, .done, .blk(blk.unit), .perm(perm.user));
  ascon_p pc (.clk, .rst_n, .start(perm.start), .full(perm.full), .state_in(perm.state_in),
              .state_out(perm.state_out), .busy(pbusy), .done(perm.done));
  mem_fsm mf (.clk, .rst_n, .blk(blk.mem), .mem_req_valid, .mem_req_ready, .mem_req_addr,
              .mem_req_we, .mem_req_wdata, .mem_req_mask, .mem_resp_valid, .mem_resp_data);
  mem_model #(.AW(10)) mem (.clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
              .req_addr(mem_req_addr), .req_we(mem_req_we), .req_wdata(mem_req_wdata),
              .req_mask(mem_req_mask), .resp_valid(mem_resp_valid), .resp_data(mem_resp_data));

  // stand-in random source: answers a held request after a few clocks, then
  // stays busy for a while, as the generator does while it permutes
  logic [63:0] rq[$];
  initial begin
    forever begin
      @(negedge clk);
      if (word_req) begin
        repeat ($urandom_range(1, 4)) @(negedge clk);
        word = {$urandom, $urandom};
        rq.push_back(word);
        word_valid = 1;
        @(negedge clk);
        word_valid = 0;
        repeat (8) @(negedge clk);
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [3:0] o, input logic [7:0] i, input logic [31:0] a);
    @(negedge clk); start = 1; op = o; id = i; addr = a;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  function automatic logic [127:0] key_of(input logic [7:0] i);
    rd_id = i;
    return rd_key;
  endfunction

  task automatic check_key(input logic [7:0] i, input logic [127:0] e, input string what);
    rd_id = i;
    #1;
    checks++;
    if (rd_key !== e) begin failures++; $display("%s: slot %0d holds %h, expected %h", what, i, rd_key, e); end
  endtask

  initial begin
    logic [127:0] k3, k6, t;
    bytes_t kb, c, noad;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) check_key(8'(i), 0, "reset");
    for (int r = 0; r < 3; r++) begin
      automatic logic [7:0] a = 8'(2 * r + 1);
      automatic logic [7:0] b = 8'(2 * r + 2);
      rq = {};
      run(OP_KMU_NEW, a, 0);
      k3 = {rq[0], rq[1]};
      checks++;
      if (rq.size() != 2) begin failures++; $display("NEW took %0d words", rq.size()); end
      check_key(a, k3, "NEW");
      // export
      run(OP_KMU_GET, a, 32'h80);
      kb = {};
      for (int j = 0; j < 16; j++) kb.push_back(k3[127 - 8*j -: 8]);
      noad = {};
      ref_aead(MK, {120'd0, a}, noad, kb, 0, c, t);
      for (int j = 0; j < 16; j++) begin
        checks++;
        if (mem.mem['h80 + j] !== c[j]) begin failures++; $display("Ke byte %0d: %h vs %h", j, mem.mem['h80 + j], c[j]); end
      end
      // delete, then import into the same ID
      run(OP_KMU_DEL, a, 0);
      check_key(a, 0, "DEL");
      run(OP_KMU_SEND, a, 32'h80);
      check_key(a, k3, "SEND");
      // an import under another ID decrypts with another nonce: a different key
      k6 = key_of(b);
      run(OP_KMU_SEND, b, 32'h80);
      rd_id = b; #1;
      checks++;
      if (rd_key === k3 || rd_key === k6) begin failures++; $display("SEND under another ID gave the same key"); end
      check_key(a, k3, "other slot");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
