// mem_model: behavioural stand-in for the host's data cache, for testbenches.
//
// A byte-addressed memory of 2**AW bytes behind the 32-bit request/response
// port: requests are accepted after a random 0..2 clock wait and answered
// 1..3 clocks later with one resp_valid pulse.  Testbenches fill and read the
// array mem directly.
module mem_model #(parameter int AW = 12) (
  input  logic        clk,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic [31:0] req_addr,
  input  logic        req_we,
  input  logic [31:0] req_wdata,
  input  logic [3:0]  req_mask,
  output logic        resp_valid,
  output logic [31:0] resp_data
);
  byte unsigned mem[2**AW];
  int accesses = 0;

  initial begin
    req_ready = 0; resp_valid = 0; resp_data = 0;
    foreach (mem[i]) mem[i] = 0;
    forever begin
      @(posedge clk);
      if (req_valid) begin
        logic [31:0] a;
        repeat ($urandom_range(0, 2)) @(posedge clk);
        req_ready <= 1;
        @(posedge clk);
        req_ready <= 0;
        a = req_addr;
        accesses++;
        for (int k = 0; k < 4; k++) begin
          if (req_we && req_mask[k]) mem[(a + k) % (2**AW)] = req_wdata[8*k +: 8];
          resp_data[8*k +: 8] <= mem[(a + k) % (2**AW)];
        end
        repeat ($urandom_range(0, 2)) @(posedge clk);
        resp_valid <= 1;
        @(posedge clk);
        resp_valid <= 0;
      end
    end
  end
endmodule
