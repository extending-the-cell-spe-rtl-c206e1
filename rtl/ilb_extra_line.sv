// ilb_extra_line: the extra Instruction Line Buffer line of the branch
// warning predictor.
//
// When a branch warning finds its branch predicted taken, the instructions
// at the predicted target are prefetched from the local store into this
// line, so that the fetch can switch to them when the branch reaches the
// ILB and the branch costs no cycles. The purpose is the original proposal's;
// the mechanics are this implementation's own: the line holds the 32-instruction,
// line-aligned block of local store that contains the target, a prefetch
// of the line already held or in flight is dropped, and a new prefetch
// replaces the old one (responses of superseded requests are discarded,
// the local store answering in order).
//
// Interface and timing
//   pf_valid_i/pf_target_i  start a prefetch (one cycle pulse)
//   ls_req_*                line read request to the local store, held until
//                           ls_req_ready_i; ls_rsp_* the whole line, in order
//   rd_addr_i               word address of the instruction pair the fetch
//                           wants; rd_hit_o when the line is filled and holds
//                           it, rd_instr_o the pair (combinational read)
//   line_valid_o, busy_o    line filled / a fill is outstanding
module ilb_extra_line
  import spe_bp_pkg::*;
#(
  parameter int unsigned MAX_OUTST = 4   // outstanding LS reads tracked
) (
  input  logic        clk,
  input  logic        rst_n,
  // prefetch request
  input  logic        pf_valid_i,
  input  waddr_t      pf_target_i,
  // local store read port
  output logic        ls_req_valid_o,
  output line_addr_t  ls_req_line_o,
  input  logic        ls_req_ready_i,
  input  logic        ls_rsp_valid_i,
  input  instr_t [LINE_INSTRS-1:0] ls_rsp_data_i,
  // fetch read port
  input  waddr_t      rd_addr_i,
  output logic        rd_hit_o,
  output instr_t [1:0] rd_instr_o,
  // status
  output logic        line_valid_o,
  output logic        busy_o
);

  localparam int unsigned CNT_W = $clog2(MAX_OUTST + 1);

  line_addr_t       line_q;
  logic             valid_q;
  logic             req_pend_q;    // request for line_q not yet issued
  logic [CNT_W-1:0] outst_q;       // issued, unanswered requests
  instr_t           data_q [LINE_INSTRS];

  line_addr_t pf_line;
  logic       pf_redundant, issue, accept;

  assign pf_line      = pf_target_i[WADDR_W-1:LINE_OFS_W];
  assign pf_redundant = (pf_line == line_q) && (valid_q || req_pend_q || outst_q != '0);
  assign issue        = req_pend_q && ls_req_ready_i && (outst_q != CNT_W'(MAX_OUTST));
  // only the answer to the newest request is kept
  assign accept       = ls_rsp_valid_i && !req_pend_q && (outst_q == CNT_W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line_q     <= '0;
      valid_q    <= 1'b0;
      req_pend_q <= 1'b0;
      outst_q    <= '0;
    end else begin
      outst_q <= outst_q + CNT_W'(issue) - CNT_W'(ls_rsp_valid_i && outst_q != '0);
      if (pf_valid_i && !pf_redundant) begin
        line_q     <= pf_line;
        valid_q    <= 1'b0;
        req_pend_q <= 1'b1;
      end else begin
        if (issue)  req_pend_q <= 1'b0;
        if (accept) valid_q    <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (accept && !(pf_valid_i && !pf_redundant))
      for (int i = 0; i < int'(LINE_INSTRS); i++) data_q[i] <= ls_rsp_data_i[i];
  end

  assign ls_req_valid_o = req_pend_q && (outst_q != CNT_W'(MAX_OUTST));
  assign ls_req_line_o  = line_q;

  logic [LINE_OFS_W-1:0] rd_ofs;
  assign rd_ofs        = {rd_addr_i[LINE_OFS_W-1:1], 1'b0};
  assign rd_hit_o      = valid_q && (rd_addr_i[WADDR_W-1:LINE_OFS_W] == line_q);
  assign rd_instr_o[0] = data_q[rd_ofs];
  assign rd_instr_o[1] = data_q[rd_ofs | LINE_OFS_W'(1)];

  assign line_valid_o = valid_q;
  assign busy_o       = req_pend_q || outst_q != '0;

  // a response never arrives without an outstanding request
  assert property (@(posedge clk) disable iff (!rst_n) ls_rsp_valid_i |-> outst_q != '0);

endmodule
