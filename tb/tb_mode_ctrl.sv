// tb_mode_ctrl: drives the mode controller with commands and answers its unit
// starts from stand-in units.  Checks that each action starts exactly its unit
// (one pulse, the clock after acceptance), that cmd_ready and busy follow the
// command, that the response carries the right unit result to rd only when xd
// is set and is held until resp_ready, that Set-type commands are answered at
// once, and that the permutation and memory-port sharing pass the active
// unit's request through and return done only to it.
module tb_mode_ctrl;
  import lwc_pkg::*;

  localparam int NU = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cmd_valid = 0, cmd_ready, cmd_xd = 0, resp_valid, resp_ready = 1, busy;
  logic [4:0] cmd_rd = 0, resp_rd;
  logic [31:0] resp_data;
  start_cmd_e action = CMD_NONE;
  logic aead_start, aead_dec, aead_done = 0, aead_ok = 0, hash_start, hash_done = 0, hash_ok = 0;
  logic seed_start, rand_start, rand_done = 0, kmu_start, kmu_done = 0;
  logic [31:0] rand_count = 0;
  logic [NU-1:0] u_pstart = 0, u_pfull = 0, u_req = 0, u_we = 0, u_done;
  ascon_state_t u_pstate [NU];
  logic [31:0] u_addr [NU];
  logic [3:0] u_nbytes [NU];
  logic [63:0] u_wdata [NU];
  logic p_start, p_full, m_req, m_we, m_done = 0;
  ascon_state_t p_state;
  logic [31:0] m_addr;
  logic [3:0] m_nbytes;
  logic [63:0] m_wdata;

  mode_ctrl #(.NU(NU)) dut (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_rd, .cmd_xd, .action,
    .resp_valid, .resp_ready, .resp_rd, .resp_data, .busy, .aead_start, .aead_dec, .aead_done,
    .aead_ok, .hash_start, .hash_done, .hash_ok, .seed_start, .rand_start, .rand_done, .rand_count,
    .kmu_start, .kmu_done, .u_pstart, .u_pfull, .u_pstate, .p_start, .p_full, .p_state,
    .u_req, .u_we, .u_addr, .u_nbytes, .u_wdata, .u_done, .m_req, .m_we, .m_addr, .m_nbytes,
    .m_wdata, .m_done);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count start pulses
  int n_starts[6] = '{0, 0, 0, 0, 0, 0};
  always @(posedge clk) begin
    if (aead_start) n_starts[0]++;
    if (hash_start) n_starts[1]++;
    if (seed_start) n_starts[2]++;
    if (rand_start) n_starts[3]++;
    if (kmu_start)  n_starts[4]++;
  end

  function automatic int unit_of(start_cmd_e a);
    case (a)
      CMD_AEAD_ENC, CMD_AEAD_DEC: return 0;
      CMD_HASH: return 1;
      CMD_SEED: return 2;
      CMD_RAND: return 3;
      CMD_NONE: return 5;
      default: return 4;
    endcase
  endfunction

  task automatic one(input start_cmd_e a, input bit xd);
    int prev[6] = n_starts;
    int u = unit_of(a);
    logic [31:0] exp;
    int hold;
    @(negedge clk);
    checks++;
    if (!cmd_ready || busy) begin failures++; $display("not idle prev a command"); end
    cmd_valid = 1; action = a; cmd_xd = xd; cmd_rd = 5'($urandom);
    @(negedge clk);
    cmd_valid = 0; action = CMD_NONE;
    exp = 0;
    if (u != 5) begin
      checks++;
      if (!busy || cmd_ready) begin failures++; $display("%s: not busy", a.name()); end
      repeat ($urandom_range(2, 6)) @(negedge clk);
      // the unit finishes
      case (u)
        0: begin aead_ok = 1'($urandom); exp = {31'd0, aead_ok}; aead_done = 1; end
        1: begin hash_ok = 1; exp = 1; hash_done = 1; end
        2: begin rand_count = $urandom; exp = 0; rand_done = 1; end
        3: begin rand_count = $urandom; exp = rand_count; rand_done = 1; end
        default: begin kmu_done = 1; exp = 0; end
      endcase
      @(negedge clk);
      aead_done = 0; hash_done = 0; rand_done = 0; kmu_done = 0;
      for (int i = 0; i < 5; i++) begin
        checks++;
        if (n_starts[i] - prev[i] != (i == u ? 1 : 0)) begin
          failures++; $display("%s: unit %0d started %0d times", a.name(), i, n_starts[i] - prev[i]);
        end
      end
      if (u == 0) begin
        checks++;
        if (aead_dec !== (a == CMD_AEAD_DEC)) begin failures++; $display("aead_dec wrong"); end
      end
    end
    if (xd) begin
      hold = $urandom_range(0, 3);
      resp_ready = (hold == 0);
      repeat (hold) begin
        checks++;
        if (!resp_valid) begin failures++; $display("%s: response dropped", a.name()); end
        @(negedge clk);
      end
      resp_ready = 1;
      checks += 3;
      if (!resp_valid) begin failures++; $display("%s: no response", a.name()); end
      if (resp_data !== exp) begin failures++; $display("%s: data %h vs %h", a.name(), resp_data, exp); end
      if (resp_rd !== cmd_rd) begin failures++; $display("%s: rd", a.name()); end
      @(negedge clk);
    end
    checks++;
    if (resp_valid || busy) begin failures++; $display("%s: not back to idle", a.name()); end
  endtask

  task automatic check_sharing();
    for (int t = 0; t < 40; t++) begin
      automatic int i = $urandom_range(0, NU - 1);
      for (int j = 0; j < NU; j++) begin
        u_pstate[j] = {5{$urandom, $urandom}};
        u_addr[j] = $urandom; u_nbytes[j] = 4'($urandom); u_wdata[j] = {$urandom, $urandom};
      end
      u_pstart = 0; u_pstart[i] = 1; u_pfull = 4'($urandom);
      u_req = 0; u_req[i] = 1; u_we = 4'($urandom); m_done = 1'($urandom);
      #1;
      checks += 4;
      if (!p_start || p_full !== u_pfull[i] || p_state !== u_pstate[i]) begin failures++; $display("perm share %0d", i); end
      if (!m_req || m_we !== u_we[i] || m_addr !== u_addr[i] || m_nbytes !== u_nbytes[i]) begin
        failures++; $display("mem share %0d", i);
      end
      if (m_wdata !== u_wdata[i]) begin failures++; $display("mem wdata %0d", i); end
      if (u_done !== (NU'(m_done) << i)) begin failures++; $display("done routing %0d", i); end
    end
    u_pstart = 0; u_req = 0; m_done = 0;
    #1;
    checks++;
    if (p_start || m_req) begin failures++; $display("request without a user"); end
  endtask

  initial begin
    for (int j = 0; j < NU; j++) begin u_pstate[j] = '0; u_addr[j] = 0; u_nbytes[j] = 0; u_wdata[j] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      automatic start_cmd_e a = start_cmd_e'($urandom_range(0, 9));
      one(a, 1'($urandom));
    end
    one(CMD_NONE, 1);
    one(CMD_AEAD_DEC, 1);
    one(CMD_RAND, 1);
    check_sharing();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
