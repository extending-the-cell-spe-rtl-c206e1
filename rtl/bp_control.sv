// bp_control: prediction controller of the SPE dynamic branch predictor.
//
// One module implements the three proposed schemes, chosen by SCHEME:
//
//   SCHEME_SBP         Simple Bimodal Predictor. Both instructions of the
//                      pair entering IB1 are pre-decoded; for the first
//                      branch found the BTB is read, and in the next cycle
//                      (IB2) a hit whose counter says taken redirects the
//                      fetch to the stored target (the ILB is flushed).
//                      Executed hints are ignored.
//   SCHEME_SBP_OH_NLS  SBP plus hints. An executed hint first reads the BTB
//                      for its branch; if that branch is predicted strongly
//                      not taken the hint is not loaded, otherwise it is
//                      loaded (hint_load_o, to the SPU's own hint logic) and
//                      the branch, when it reaches IB1, follows the hint
//                      without a BTB read.
//   SCHEME_BWP_OH_NLS  Branch Warning Predictor. The BTB is read only for an
//                      executed hint or branch warning (a hint whose target
//                      is 0); there is no pre-decode and a branch with neither
//                      is not predicted. A warned branch predicted taken has
//                      its target prefetched into the extra ILB line
//                      (pf_valid_o); when the branch reaches IB1 the fetch
//                      switches to that line (use_xline_o). Hints follow the
//                      same not-loading rule as above.
//
// Every resolved branch updates the BTB (read and write of its entry) and is
// checked against the prediction it carried (mispredict_o, restart_addr_o).
//
// The scheme behaviour, the IB1 pre-decode and the one-cycle BTB read follow
// the original predictor proposal. This implementation's own choices: one hint register shared by
// hints and warnings (only one hint is active at a time), which every
// executed hint or warning replaces, leaving it empty when it is not loaded; a hint is matched by the
// address of its branch, so a matching pair needs no BTB read; when both
// instructions of a pair are branches, the first is looked up in IB1 and,
// if it is predicted not taken, the second in the following cycle, while
// ib1_hold_o asks the SPU to keep the next pair in IB1 for one more cycle
// (one BTB read port); branch lookups have the single BTB
// read port before hint lookups, which wait in a one-entry register (a newer
// hint replaces a waiting one); the lookup of the pair that is in IB1 while
// a redirect, a switch to the extra line or a misprediction happens is
// cancelled, since that pair is on the wrong path.
//
// Interface (addresses are local-store word addresses)
//   ib1_*        instruction pair entering IB1 (pair address, two words)
//   hx_*         an executed hint: address of its branch, target (0 = warning)
//   res_i        a resolved branch with the prediction it carried
//   ib2_pred_o   prediction for the pair of the previous cycle (IB2)
//   redirect_o   IB2: flush the ILB and fetch from redirect_target_o
//   ib1_hold_o   the pair now in IB1 is not taken in; present it again
//   use_xline_o  IB1: the branch in this pair follows a warning; fetch on
//                from the extra ILB line at xline_target_o
//   hint_load_o  load hint (branch, target) into the SPU hint logic
//   pf_valid_o   prefetch pf_target_o into the extra ILB line
//   hint_overruled_o  an executed hint was not loaded (strongly not taken)
//   btb_rd_o, btb_wr_o  BTB read / write this cycle (energy events)
module bp_control
  import spe_bp_pkg::*;
#(
  parameter scheme_t     SCHEME      = SCHEME_SBP_OH_NLS,
  parameter int unsigned BTB_ENTRIES = 256
) (
  input  logic          clk,
  input  logic          rst_n,
  // IB1
  input  logic          ib1_valid_i,
  input  waddr_t        ib1_addr_i,
  input  instr_t [1:0]  ib1_instr_i,
  // executed hint / branch warning
  input  logic          hx_valid_i,
  input  waddr_t        hx_branch_i,
  input  waddr_t        hx_target_i,
  // branch resolution
  input  resolve_t      res_i,
  // IB2 prediction and fetch redirect
  output pred_t         ib2_pred_o,
  output logic          redirect_o,
  output waddr_t        redirect_target_o,
  // switch to the extra ILB line
  output logic          ib1_hold_o,
  output logic          use_xline_o,
  output waddr_t        xline_target_o,
  // hint loading and target prefetch
  output logic          hint_load_o,
  output waddr_t        hint_load_branch_o,
  output waddr_t        hint_load_target_o,
  output logic          pf_valid_o,
  output waddr_t        pf_target_o,
  output logic          hint_overruled_o,
  // misprediction
  output logic          mispredict_o,
  output waddr_t        restart_addr_o,
  // activity
  output logic          btb_rd_o,
  output logic          btb_wr_o
);

  localparam bit USE_PREDECODE = (SCHEME != SCHEME_BWP_OH_NLS);
  localparam bit USE_HINTS     = (SCHEME != SCHEME_SBP);
  localparam bit USE_WARNINGS  = (SCHEME == SCHEME_BWP_OH_NLS);

  // ---------------- active hint register ----------------
  typedef struct packed {
    logic   valid;
    logic   warn;     // loaded by a branch warning
    waddr_t branch;
    waddr_t target;
  } hint_reg_t;

  hint_reg_t act_q;

  // ---------------- BTB ----------------
  logic   lk_valid, lk_rvalid, lk_hit;
  waddr_t lk_addr, lk_target;
  ctr_t   lk_ctr;

  btb #(.ENTRIES(BTB_ENTRIES)) u_btb (
    .clk, .rst_n,
    .lk_valid_i (lk_valid),
    .lk_addr_i  (lk_addr),
    .lk_rvalid_o(lk_rvalid),
    .lk_hit_o   (lk_hit),
    .lk_ctr_o   (lk_ctr),
    .lk_target_o(lk_target),
    .up_valid_i (res_i.valid),
    .up_addr_i  (res_i.addr),
    .up_taken_i (res_i.taken),
    .up_target_i(res_i.target)
  );

  // ---------------- IB1: pre-decode ----------------
  logic [1:0] is_br;
  logic [1:0] unused_cond, unused_indir, unused_hint;

  for (genvar s = 0; s < 2; s++) begin : g_pd
    branch_predecode u_pd (
      .instr_i    (ib1_instr_i[s]),
      .is_branch_o(is_br[s]),
      .is_cond_o  (unused_cond[s]),
      .is_indir_o (unused_indir[s]),
      .is_hint_o  (unused_hint[s])
    );
  end

  logic   ib1_has_br, ib1_match, ib1_lookup, squash, second;
  waddr_t ib1_br_addr;

  assign ib1_has_br  = USE_PREDECODE && ib1_valid_i && (is_br != 2'b00);
  assign ib1_br_addr = {ib1_addr_i[WADDR_W-1:1], !is_br[0]};
  assign ib1_match   = USE_HINTS && ib1_valid_i && act_q.valid &&
                       (act_q.branch[WADDR_W-1:1] == ib1_addr_i[WADDR_W-1:1]);

  // pair on the wrong path: cancel its lookup and its prediction
  // a redirect, a misprediction or a held pair stops the IB1 pair here
  assign squash      = redirect_o || mispredict_o || second;
  assign ib1_lookup  = ib1_has_br && !ib1_match && !squash;

  assign use_xline_o    = ib1_match && act_q.warn && !squash;
  assign ib1_hold_o     = second;
  assign xline_target_o = act_q.target;

  // ---------------- hint lookups ----------------
  hint_reg_t hp_q;       // executed hint waiting for the BTB port
  logic      hint_lookup;

  assign hint_lookup = hp_q.valid && !ib1_lookup && !second;

  waddr_t s2_addr_q;
  assign lk_valid = ib1_lookup || hint_lookup || second;
  assign lk_addr  = second ? {s2_addr_q[WADDR_W-1:1], 1'b1} :
                    ib1_lookup ? ib1_br_addr : hp_q.branch;

  // ---------------- IB2 stage registers ----------------
  typedef enum logic [1:0] {S2_NONE, S2_LOOKUP, S2_FOLLOW} s2_kind_t;

  s2_kind_t  s2_kind_q;
  logic      s2_two_q;       // slot 1 of the looked-up pair is a branch too
  logic      s2_warn_q;
  waddr_t    s2_target_q;
  logic      h2_valid_q;     // a hint lookup is answered this cycle
  hint_reg_t h2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_kind_q  <= S2_NONE;
      s2_two_q   <= 1'b0;
      h2_valid_q <= 1'b0;
    end else begin
      if (second || ib1_lookup)      s2_kind_q <= S2_LOOKUP;
      else if (ib1_match && !squash) s2_kind_q <= S2_FOLLOW;
      else                           s2_kind_q <= S2_NONE;
      s2_two_q <= ib1_lookup && (is_br == 2'b11);
      h2_valid_q <= hint_lookup;
    end
  end

  always_ff @(posedge clk) begin
    s2_addr_q   <= second ? {s2_addr_q[WADDR_W-1:1], 1'b1} :
                   ib1_match ? act_q.branch : ib1_br_addr;
    s2_warn_q   <= act_q.warn;
    s2_target_q <= act_q.target;
    if (hint_lookup) h2_q <= hp_q;
  end

  // ---------------- IB2: branch prediction ----------------
  logic br_taken;
  assign br_taken = (s2_kind_q == S2_LOOKUP) && lk_hit && ctr_taken(lk_ctr);
  // first branch of a two-branch pair predicted not taken: read the BTB for
  // the second one in this cycle, holding the pair now in IB1
  assign second   = s2_two_q && !br_taken && !mispredict_o;

  always_comb begin
    ib2_pred_o = '0;
    case (s2_kind_q)
      S2_LOOKUP: begin
        ib2_pred_o.valid  = 1'b1;
        ib2_pred_o.addr   = s2_addr_q;
        ib2_pred_o.taken  = br_taken;
        ib2_pred_o.target = br_taken ? lk_target : '0;
        ib2_pred_o.src    = br_taken ? SRC_BTB : SRC_NONE;
      end
      S2_FOLLOW: begin
        ib2_pred_o.valid  = 1'b1;
        ib2_pred_o.addr   = s2_addr_q;
        ib2_pred_o.taken  = 1'b1;
        ib2_pred_o.target = s2_target_q;
        ib2_pred_o.src    = s2_warn_q ? SRC_WARN : SRC_HINT;
      end
      default: ;
    endcase
  end

  // a misprediction resolved in this cycle flushes IB2 as well
  assign redirect_o        = br_taken && !mispredict_o;
  assign redirect_target_o = lk_target;

  // ---------------- hint lookup results ----------------
  logic h2_is_warn, h2_load_hint, h2_load_warn;

  assign h2_is_warn   = USE_WARNINGS && (h2_q.target == '0);
  assign h2_load_hint = h2_valid_q && !h2_is_warn &&
                        !(lk_hit && lk_ctr == CTR_STRONG_NT);
  assign h2_load_warn = h2_valid_q && h2_is_warn && lk_hit && ctr_taken(lk_ctr);

  assign hint_overruled_o   = h2_valid_q && !h2_is_warn && lk_hit && lk_ctr == CTR_STRONG_NT;
  assign hint_load_o        = h2_load_hint;
  assign hint_load_branch_o = h2_q.branch;
  assign hint_load_target_o = h2_q.target;
  assign pf_valid_o         = h2_load_warn;
  assign pf_target_o        = lk_target;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_q <= '0;
      hp_q  <= '0;
    end else begin
      if (h2_load_hint)
        act_q <= '{valid: 1'b1, warn: 1'b0, branch: h2_q.branch, target: h2_q.target};
      else if (h2_load_warn)
        act_q <= '{valid: 1'b1, warn: 1'b1, branch: h2_q.branch, target: lk_target};
      else if (h2_valid_q)
        act_q.valid <= 1'b0;   // superseded by a hint or warning not loaded

      if (USE_HINTS && hx_valid_i)
        hp_q <= '{valid: 1'b1, warn: 1'b0, branch: hx_branch_i, target: hx_target_i};
      else if (hint_lookup)
        hp_q.valid <= 1'b0;
    end
  end

  // ---------------- resolution ----------------
  assign mispredict_o   = res_i.valid &&
                          ((res_i.taken != res_i.pred_taken) ||
                           (res_i.taken && res_i.target != res_i.pred_target));
  assign restart_addr_o = res_i.taken ? res_i.target : res_i.addr + 1'b1;

  assign btb_rd_o = lk_valid;
  assign btb_wr_o = res_i.valid;

  // the BTB answers exactly the lookups issued one cycle earlier
  assert property (@(posedge clk) disable iff (!rst_n)
                   lk_rvalid == (s2_kind_q == S2_LOOKUP || h2_valid_q));
  // a held pair is always followed by the second branch's lookup
  assert property (@(posedge clk) disable iff (!rst_n)
                   second |=> s2_kind_q == S2_LOOKUP && !s2_two_q);

endmodule
