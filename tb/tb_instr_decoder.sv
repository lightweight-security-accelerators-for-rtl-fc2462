// tb_instr_decoder: issues every instruction of the five modules with random
// operands and checks the decoded action, the operand registers each Set
// instruction loads (and that other registers keep their values), and the
// argument registers of the action instructions.  Unassigned codes must start
// nothing and change nothing.
module tb_instr_decoder;
  import lwc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic fire = 0;
  logic [6:0] funct7 = 0;
  logic [31:0] rs1 = 0, rs2 = 0, arg_addr;
  start_cmd_e action;
  logic [3:0] kmu_op;
  logic [7:0] arg_id;
  aead_cfg_t enc_cfg, dec_cfg, e_enc, e_dec;
  hash_cfg_t hash_cfg, e_hash;

  instr_decoder dut (.clk, .rst_n, .fire, .funct7, .rs1, .rs2, .action, .kmu_op, .arg_id,
                     .arg_addr, .enc_cfg, .dec_cfg, .hash_cfg);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected action of a code, worked out from the instruction tables
  function automatic start_cmd_e exp_action(input logic [2:0] m, input logic [3:0] o);
    case (m)
      3'd1: return (o == 4'd6) ? CMD_AEAD_ENC : CMD_NONE;
      3'd2: return (o == 4'd6) ? CMD_AEAD_DEC : CMD_NONE;
      3'd3: return (o == 4'd3) ? CMD_HASH : CMD_NONE;
      3'd4: return (o == 4'd1) ? CMD_SEED : (o == 4'd2) ? CMD_RAND : CMD_NONE;
      3'd5: case (o)
              4'd1: return CMD_KMU_NEW;
              4'd2: return CMD_KMU_GET;
              4'd3: return CMD_KMU_SEND;
              4'd4: return CMD_KMU_DEL;
              default: return CMD_NONE;
            endcase
      default: return CMD_NONE;
    endcase
  endfunction

  task automatic model(input logic [2:0] m, input logic [3:0] o, input logic [31:0] a, input logic [31:0] b);
    aead_cfg_t c;
    if (m == 3'd1 || m == 3'd2) begin
      c = (m == 3'd1) ? e_enc : e_dec;
      case (o)
        4'd1: begin c.in_addr = a; c.in_len = b; end
        4'd2: begin c.ad_addr = a; c.ad_len = b; end
        4'd3: begin c.out_addr = a; c.tag_addr = b; end
        4'd4: c.nonce_addr = a;
        4'd5: c.key_id = a[7:0];
        default: ;
      endcase
      if (m == 3'd1) e_enc = c; else e_dec = c;
    end
    if (m == 3'd3) begin
      if (o == 4'd1) begin e_hash.m_addr = a; e_hash.m_len = b; end
      if (o == 4'd2) e_hash.h_addr = a;
    end
  endtask

  initial begin
    e_enc = '0; e_dec = '0; e_hash = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      automatic logic [2:0] m = 3'($urandom_range(0, 7));
      automatic logic [3:0] o = 4'($urandom_range(0, 10));
      automatic logic [31:0] a = $urandom, b = $urandom;
      funct7 = {m, o}; rs1 = a; rs2 = b;
      #1;
      checks++;
      if (action !== exp_action(m, o)) begin
        failures++; $display("funct7 %b: action %s", funct7, action.name());
      end
      fire = 1;
      @(negedge clk);
      fire = 0;
      rs1 = $urandom; rs2 = $urandom;
      model(m, o, a, b);
      checks += 3;
      if (enc_cfg !== e_enc) begin failures++; $display("funct7 %b: encrypt registers", {m, o}); end
      if (dec_cfg !== e_dec) begin failures++; $display("funct7 %b: decrypt registers", {m, o}); end
      if (hash_cfg !== e_hash) begin failures++; $display("funct7 %b: hash registers", {m, o}); end
      if (exp_action(m, o) != CMD_NONE) begin
        checks += 3;
        if (arg_id !== a[7:0]) begin failures++; $display("arg_id"); end
        if (arg_addr !== ((m == 3'd5) ? b : a)) begin failures++; $display("arg_addr"); end
        if (kmu_op !== o) begin failures++; $display("kmu_op"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
