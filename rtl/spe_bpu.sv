// spe_bpu: dynamic branch prediction extension for the Cell SPU front end.
//
// The SPU has no branch predictor of its own: it fetches sequentially and
// relies on compiler hints. This unit adds a bimodal predictor whose
// counters and targets live in a direct-mapped BTB, and keeps it energy
// efficient by reading the BTB only for branch instructions (found by
// pre-decoding the pair entering IB1) or, in the branch warning scheme, only
// for executed hints and branch warnings. The scheme is fixed by SCHEME; the
// default is the SBP with overruled hints (SBP-OH-NLS), the best of the
// three proposed schemes.
//
// Blocks: bp_control (policy, hint register, resolution) with the btb,
// bimodal_counter and two branch_predecode instances inside it, and the
// ilb_extra_line that holds the prefetched target line of a warned branch.
// The SPU pipeline, its ILB, hint logic and the local store are outside this
// unit: their connections are the ports below.
//
// Interface (word addresses of the 256 KB local store)
//   ib1_*            pair entering IB1
//   hx_*             executed hint (target 0 = branch warning)
//   res_i            resolved branch and the prediction it carried
//   ib2_pred_o       prediction of last cycle's pair, to travel with it
//   redirect_*       IB2: flush the ILB, fetch from the predicted target
//   ib1_hold_o       keep the IB1 pair one more cycle (second branch of a
//                    two-branch pair is being looked up)
//   use_xline_*      IB1: the fetch continues in the extra ILB line
//   xl_rd_*          fetch read port of the extra line (pair at xl_rd_addr_i)
//   hint_load_*      load a hint into the SPU hint logic
//   ls_*             local store line read port used by the extra line
//   mispredict_o, restart_addr_o   resolved branch was mispredicted
//   btb_rd_o, btb_wr_o, hint_overruled_o, pf_valid_o   activity
// Timing: BTB read in the IB1 cycle, prediction and redirect one cycle later;
// misprediction in the resolve cycle; extra-line fill after the local store
// latency.
module spe_bpu
  import spe_bp_pkg::*;
#(
  parameter scheme_t     SCHEME      = SCHEME_SBP_OH_NLS,
  parameter int unsigned BTB_ENTRIES = 256
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ib1_valid_i,
  input  waddr_t        ib1_addr_i,
  input  instr_t [1:0]  ib1_instr_i,
  input  logic          hx_valid_i,
  input  waddr_t        hx_branch_i,
  input  waddr_t        hx_target_i,
  input  resolve_t      res_i,
  output pred_t         ib2_pred_o,
  output logic          redirect_o,
  output waddr_t        redirect_target_o,
  output logic          ib1_hold_o,
  output logic          use_xline_o,
  output waddr_t        xline_target_o,
  input  waddr_t        xl_rd_addr_i,
  output logic          xl_rd_hit_o,
  output instr_t [1:0]  xl_rd_instr_o,
  output logic          xl_busy_o,
  output logic          hint_load_o,
  output waddr_t        hint_load_branch_o,
  output waddr_t        hint_load_target_o,
  output logic          ls_req_valid_o,
  output line_addr_t    ls_req_line_o,
  input  logic          ls_req_ready_i,
  input  logic          ls_rsp_valid_i,
  input  instr_t [LINE_INSTRS-1:0] ls_rsp_data_i,
  output logic          mispredict_o,
  output waddr_t        restart_addr_o,
  output logic          btb_rd_o,
  output logic          btb_wr_o,
  output logic          hint_overruled_o,
  output logic          pf_valid_o
);

  waddr_t pf_target;
  logic   unused_line_valid;

  bp_control #(.SCHEME(SCHEME), .BTB_ENTRIES(BTB_ENTRIES)) u_ctrl (
    .clk, .rst_n,
    .ib1_valid_i, .ib1_addr_i, .ib1_instr_i,
    .hx_valid_i, .hx_branch_i, .hx_target_i,
    .res_i,
    .ib2_pred_o, .redirect_o, .redirect_target_o, .ib1_hold_o,
    .use_xline_o, .xline_target_o,
    .hint_load_o, .hint_load_branch_o, .hint_load_target_o,
    .pf_valid_o, .pf_target_o(pf_target),
    .hint_overruled_o,
    .mispredict_o, .restart_addr_o,
    .btb_rd_o, .btb_wr_o
  );

  ilb_extra_line u_xline (
    .clk, .rst_n,
    .pf_valid_i    (pf_valid_o),
    .pf_target_i   (pf_target),
    .ls_req_valid_o, .ls_req_line_o, .ls_req_ready_i,
    .ls_rsp_valid_i, .ls_rsp_data_i,
    .rd_addr_i     (xl_rd_addr_i),
    .rd_hit_o      (xl_rd_hit_o),
    .rd_instr_o    (xl_rd_instr_o),
    .line_valid_o  (unused_line_valid),
    .busy_o        (xl_busy_o)
  );

endmodule
