// tb_ascon_hash: runs the hash unit with the permutation, the memory sequencer
// and a behavioural memory.  Checks the published Ascon-Hash digest of the empty
// message and random messages of 0..40 bytes against the reference model, and
// that bytes just past the digest are left untouched.
module tb_ascon_hash;
  import lwc_pkg::*;
  import ascon_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  blk_if  blk ();
  perm_if perm ();
  logic start = 0, busy, done, ok, pbusy;
  hash_cfg_t cfg;
  logic        mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [31:0] mem_req_addr, mem_req_wdata, mem_resp_data;
  logic [3:0]  mem_req_mask;

  ascon_hash dut (.clk, .rst_n, .start, .cfg, .busy, .done, .ok, .blk(blk.unit), .perm(perm.user));
  ascon_p pc (.clk, .rst_n, .start(perm.start), .full(perm.full), .state_in(perm.state_in),
              .state_out(perm.state_out), .busy(pbusy), .done(perm.done));
  mem_fsm mf (.clk, .rst_n, .blk(blk.mem), .mem_req_valid, .mem_req_ready, .mem_req_addr,
              .mem_req_we, .mem_req_wdata, .mem_req_mask, .mem_resp_valid, .mem_resp_data);
  mem_model #(.AW(10)) mem (.clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
              .req_addr(mem_req_addr), .req_we(mem_req_we), .req_wdata(mem_req_wdata),
              .req_mask(mem_req_mask), .resp_valid(mem_resp_valid), .resp_data(mem_resp_data));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input bytes_t m, input bit kat, input logic [255:0] kat_h);
    logic [255:0] h, got;
    foreach (m[i]) mem.mem['h40 + i] = m[i];
    mem.mem['h220] = 8'h5a;
    h = ref_hash(m);
    if (kat) begin
      checks++;
      if (h !== kat_h) begin failures++; $display("reference digest %h", h); end
    end
    cfg = '{m_addr: 32'h40, m_len: m.size(), h_addr: 32'h200};
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (!ok) begin failures++; $display("valid low"); end
    for (int i = 0; i < 32; i++) got[255 - 8*i -: 8] = mem.mem['h200 + i];
    checks++;
    if (got !== h) begin failures++; $display("|M|=%0d digest %h vs %h", m.size(), got, h); end
    checks++;
    if (mem.mem['h220] !== 8'h5a) begin failures++; $display("wrote past the digest"); end
  endtask

  initial begin
    bytes_t m;
    cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    m = {};
    one(m, 1, 256'h7346bc14f036e87ae03d0997913088f5f68411434b3cf8b54fa796a80d251f91);
    for (int t = 0; t < 25; t++) begin
      m = {};
      repeat ($urandom_range(0, 40)) m.push_back(8'($urandom));
      one(m, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
