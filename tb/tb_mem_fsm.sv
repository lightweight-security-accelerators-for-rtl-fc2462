// tb_mem_fsm: random block reads and writes of 1..8 bytes through the memory
// sequencer into a behavioural memory.  Checks read data and zeroed tails
// against the memory array, that writes touch exactly nbytes bytes, and that a
// block of more than four bytes takes two word accesses and one of up to four
// takes one.
module tb_mem_fsm;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  blk_if blk ();
  logic        mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [31:0] mem_req_addr, mem_req_wdata, mem_resp_data;
  logic [3:0]  mem_req_mask;

  mem_fsm dut (.clk, .rst_n, .blk(blk.mem), .mem_req_valid, .mem_req_ready, .mem_req_addr,
               .mem_req_we, .mem_req_wdata, .mem_req_mask, .mem_resp_valid, .mem_resp_data);
  mem_model #(.AW(10)) mem (.clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
               .req_addr(mem_req_addr), .req_we(mem_req_we), .req_wdata(mem_req_wdata),
               .req_mask(mem_req_mask), .resp_valid(mem_resp_valid), .resp_data(mem_resp_data));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(input bit we, input logic [31:0] addr, input int n, input logic [63:0] wd,
                      output logic [63:0] rd);
    int a0 = mem.accesses;
    blk.req = 1; blk.we = we; blk.addr = addr; blk.nbytes = 4'(n); blk.wdata = wd;
    do @(negedge clk); while (!blk.done);
    rd = blk.rdata;
    @(negedge clk);
    blk.req = 0;
    checks++;
    if (mem.accesses - a0 != (n > 4 ? 2 : 1)) begin
      failures++; $display("%0d bytes took %0d accesses", n, mem.accesses - a0);
    end
  endtask

  initial begin
    logic [63:0] rd, exp, wd;
    byte unsigned prev[16];
    blk.req = 0; blk.we = 0; blk.addr = 0; blk.nbytes = 0; blk.wdata = 0;
    foreach (mem.mem[i]) mem.mem[i] = 8'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int t = 0; t < 60; t++) begin
      automatic int n = $urandom_range(1, 8);
      automatic logic [31:0] a = 32'($urandom_range(0, 120)) * 4;
      // read
      exp = 0;
      for (int k = 0; k < n; k++) exp[63 - 8*k -: 8] = mem.mem[a + k];
      xfer(0, a, n, 0, rd);
      checks++;
      if (rd !== exp) begin failures++; $display("read %0d@%h: %h vs %h", n, a, rd, exp); end
      // write
      wd = {$urandom, $urandom};
      for (int k = 0; k < 16; k++) prev[k] = mem.mem[a + k];
      xfer(1, a, n, wd, rd);
      for (int k = 0; k < 16; k++) begin
        automatic byte unsigned e = (k < n) ? wd[63 - 8*k -: 8] : prev[k];
        checks++;
        if (mem.mem[a + k] !== e) begin
          failures++; $display("write %0d@%h byte %0d: %h vs %h", n, a, k, mem.mem[a + k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
