// branch_predecode: partial pre-decoder for one SPU instruction in the ILB.
//
// It looks only at the opcode bits that separate the branch and hint classes
// of the SPU instruction set, so that the BTB is read for branch
// instructions only, already in stage IB1 instead of after decode (ID2).
// The bit patterns are those of the SPU ISA (big-endian bit 0 = instr[31]),
// which the predictor proposal relies on but does not list:
//   RI16 branches  001x00xx0        br bra brsl brasl brz brnz brhz brhnz
//   RR branches    001x01010xx      bi bisl iret bisled biz binz bihz bihnz
//   hints          00110101100 (hbr), 000100x (hbra, hbrr)
// Bit 3 of the opcode separates the conditional forms (0) from the
// unconditional ones (1). Combinational.
//
// Ports
//   instr_i      instruction word
//   is_branch_o  branch instruction
//   is_cond_o    conditional branch (valid with is_branch_o)
//   is_indir_o   register-indirect branch (valid with is_branch_o)
//   is_hint_o    branch hint instruction
module branch_predecode
  import spe_bp_pkg::*;
(
  input  instr_t instr_i,
  output logic   is_branch_o,
  output logic   is_cond_o,
  output logic   is_indir_o,
  output logic   is_hint_o
);

  logic ri16_br, rr_br;

  // RI16 form: opcode bits 0..8 = instr[31:23]
  assign ri16_br = (instr_i[31:29] == 3'b001) && (instr_i[27:26] == 2'b00) &&
                   (instr_i[23] == 1'b0);
  // RR form: opcode bits 0..10 = instr[31:21]
  assign rr_br   = (instr_i[31:29] == 3'b001) && (instr_i[27:23] == 5'b01010);

  assign is_branch_o = ri16_br || rr_br;
  assign is_cond_o   = !instr_i[28];
  assign is_indir_o  = rr_br;
  assign is_hint_o   = (instr_i[31:21] == 11'b00110101100) ||
                       (instr_i[31:26] == 6'b000100);

endmodule
