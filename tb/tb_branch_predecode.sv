// tb_branch_predecode: checks the pre-decoder on every branch and hint
// opcode of the SPU ISA (listed here by mnemonic and opcode value) and on
// random instruction words compared with a table lookup of all opcodes.
module tb_branch_predecode;
  import spe_bp_pkg::*;

  instr_t instr;
  logic   is_br, is_cond, is_ind, is_hint;
  int     checks = 0, failures = 0;

  branch_predecode dut (.instr_i(instr), .is_branch_o(is_br), .is_cond_o(is_cond),
                        .is_indir_o(is_ind), .is_hint_o(is_hint));

  // 9-bit RI16 opcodes and 11-bit RR opcodes of the branches
  int ri16_op [8] = '{'h064, 'h060, 'h066, 'h062, 'h040, 'h042, 'h044, 'h046};
  bit ri16_cd [8] = '{0, 0, 0, 0, 1, 1, 1, 1};
  int rr_op   [8] = '{'h1A8, 'h1A9, 'h1AA, 'h1AB, 'h128, 'h129, 'h12A, 'h12B};
  bit rr_cd   [8] = '{0, 0, 0, 0, 1, 1, 1, 1};

  task automatic expect_class(string name, bit br, bit cd, bit ind, bit hn);
    #1;
    checks++;
    if (is_br !== br || is_hint !== hn || (br && (is_cond !== cd || is_ind !== ind))) begin
      failures++;
      $display("FAIL %s instr=%08h br=%0b cond=%0b ind=%0b hint=%0b", name, instr,
               is_br, is_cond, is_ind, is_hint);
    end
  endtask

  function automatic bit ref_branch(instr_t w);
    for (int i = 0; i < 8; i++) begin
      if (int'(w[31:23]) == ri16_op[i]) return 1;
      if (int'(w[31:21]) == rr_op[i])   return 1;
    end
    return 0;
  endfunction

  function automatic bit ref_hint(instr_t w);
    return int'(w[31:21]) == 'h1AC || int'(w[31:25]) == 'h08 || int'(w[31:25]) == 'h09;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int nb = 0;
    for (int i = 0; i < 8; i++) begin
      instr = {ri16_op[i][8:0], 23'($urandom)};
      expect_class("ri16", 1, ri16_cd[i], 0, 0);
      instr = {rr_op[i][10:0], 21'($urandom)};
      expect_class("rr", 1, rr_cd[i], 1, 0);
    end
    instr = {11'h1AC, 21'($urandom)}; expect_class("hbr", 0, 0, 0, 1);
    instr = {7'h08, 25'($urandom)};   expect_class("hbra", 0, 0, 0, 1);
    instr = {7'h09, 25'($urandom)};   expect_class("hbrr", 0, 0, 0, 1);
    // listing-style words: lqx, rotqby, and, clgt, nop are not branches
    instr = {11'h1C4, 21'h0}; expect_class("lqx", 0, 0, 0, 0);
    instr = {11'h1DC, 21'h0}; expect_class("rotqby", 0, 0, 0, 0);
    instr = {11'h0C1, 21'h0}; expect_class("and", 0, 0, 0, 0);
    instr = {11'h2C0, 21'h0}; expect_class("clgt", 0, 0, 0, 0);
    instr = {11'h201, 21'h0}; expect_class("nop", 0, 0, 0, 0);
    for (int i = 0; i < 20000; i++) begin
      instr = instr_t'($urandom);
      if (i % 4 == 0) instr[31:28] = 4'b0011;   // concentrate near the branch space
      if (i % 4 == 1) instr[31:28] = 4'b0010;
      #1;
      checks++;
      if (is_br !== ref_branch(instr) || is_hint !== ref_hint(instr)) begin
        failures++;
        $display("FAIL random instr=%08h", instr);
      end
      nb += int'(is_br);
    end
    checks++;
    if (nb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
