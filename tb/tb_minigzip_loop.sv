// tb_minigzip_loop: runs the inner loop of a gzip decompressor (the loop
// listed with the predictor: a hint, a data-dependent brz that leaves the
// loop by skipping the loop branch, and the brnz loop branch) on the unit in
// all three schemes, with the exact relative layout of that code:
//   original:        hbra 0x18,0x3e18 hints brnz 6 words ahead, brz 1 before it
//   warning version: hbra 0x24,0 warns brz 9 words ahead, brnz follows brz,
//                    and the loop branch has no hint any more
// SBP and SBP-OH-NLS run the original, BWP-OH-NLS the warning version.
// Every prediction, hint outcome, misprediction and BTB access is compared
// with the reference predictor of tb_spe_bpu, and the modelled stall cycles
// (18 per miss, 7 per pre-decode redirect, 0 per followed hint) are printed
// and compared between schemes: the hinted loop beats pre-decode alone, and
// the warning version, whose loop branch lost its hint, loses to both.
module tb_minigzip_loop;
  import spe_bp_pkg::*;

  localparam int NS    = 3;
  localparam int ITER  = 40;     // loop iterations per entry
  localparam int OUTER = 8;      // loop entries
  localparam int LAT   = 6;      // local store latency

  localparam instr_t NOP  = {11'h201, 21'h0};
  localparam instr_t BRZ  = {9'h040, 23'h0};
  localparam instr_t BRNZ = {9'h042, 23'h0};
  localparam instr_t BR   = {9'h064, 23'h0};

  // Word addresses of the listing, placed so that the hint's absolute
  // target 0x3e18 (bytes) is the loop top.
  localparam waddr_t LTOP = 16'h0F86;            // 0x3e18 / 4
  // original code: hbra at H0, brz at H0+5, brnz at H0+6
  localparam waddr_t H0   = 16'h0F9B;
  localparam waddr_t OZ   = H0 + 16'd5;          // brz  $3,0x8  (+2 words)
  localparam waddr_t ON   = H0 + 16'd6;          // brnz $9,0x3ff94 (-27 words)
  // warning version: hbra 0x24,0 at H1, brz at H1+9, brnz at H1+10
  localparam waddr_t H1   = 16'h0F9B;
  localparam waddr_t WZ   = H1 + 16'd9;          // brz  $3,0x8
  localparam waddr_t WN   = H1 + 16'd10;         // brnz $15,0x3ff84 (-31 words)
  // the loop top of the warning version is 21 words before its hint, as in
  // the original, so both versions share LTOP

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // stimulus and observation, one set per instance
  logic         ib1_valid [NS];
  waddr_t       ib1_addr  [NS];
  instr_t [1:0] ib1_instr [NS];
  logic         hx_valid  [NS];
  waddr_t       hx_branch [NS], hx_target [NS];
  resolve_t     res       [NS];
  pred_t        pred      [NS];
  logic         redirect  [NS], hold [NS], use_xl [NS], xl_hit [NS], xl_busy [NS];
  waddr_t       redir_t   [NS], xl_t [NS], xl_rd [NS], hl_b [NS], hl_t [NS], rst_a [NS];
  instr_t [1:0] xl_instr  [NS];
  logic         hload [NS], lsq_v [NS], lsq_r [NS], lsr_v [NS], mispred [NS];
  logic         brd [NS], bwr [NS], overr [NS], pfv [NS];
  line_addr_t   lsq_l [NS];
  instr_t [LINE_INSTRS-1:0] lsr_d [NS];

  spe_bpu #(.SCHEME(SCHEME_SBP)) u_sbp (
    .clk, .rst_n, .ib1_valid_i(ib1_valid[0]), .ib1_addr_i(ib1_addr[0]), .ib1_instr_i(ib1_instr[0]),
    .hx_valid_i(hx_valid[0]), .hx_branch_i(hx_branch[0]), .hx_target_i(hx_target[0]), .res_i(res[0]),
    .ib2_pred_o(pred[0]), .redirect_o(redirect[0]), .redirect_target_o(redir_t[0]), .ib1_hold_o(hold[0]),
    .use_xline_o(use_xl[0]), .xline_target_o(xl_t[0]), .xl_rd_addr_i(xl_rd[0]),
    .xl_rd_hit_o(xl_hit[0]), .xl_rd_instr_o(xl_instr[0]), .xl_busy_o(xl_busy[0]),
    .hint_load_o(hload[0]), .hint_load_branch_o(hl_b[0]), .hint_load_target_o(hl_t[0]),
    .ls_req_valid_o(lsq_v[0]), .ls_req_line_o(lsq_l[0]), .ls_req_ready_i(lsq_r[0]),
    .ls_rsp_valid_i(lsr_v[0]), .ls_rsp_data_i(lsr_d[0]), .mispredict_o(mispred[0]),
    .restart_addr_o(rst_a[0]), .btb_rd_o(brd[0]), .btb_wr_o(bwr[0]),
    .hint_overruled_o(overr[0]), .pf_valid_o(pfv[0]));

  spe_bpu #(.SCHEME(SCHEME_SBP_OH_NLS)) u_sbp_oh (
    .clk, .rst_n, .ib1_valid_i(ib1_valid[1]), .ib1_addr_i(ib1_addr[1]), .ib1_instr_i(ib1_instr[1]),
    .hx_valid_i(hx_valid[1]), .hx_branch_i(hx_branch[1]), .hx_target_i(hx_target[1]), .res_i(res[1]),
    .ib2_pred_o(pred[1]), .redirect_o(redirect[1]), .redirect_target_o(redir_t[1]), .ib1_hold_o(hold[1]),
    .use_xline_o(use_xl[1]), .xline_target_o(xl_t[1]), .xl_rd_addr_i(xl_rd[1]),
    .xl_rd_hit_o(xl_hit[1]), .xl_rd_instr_o(xl_instr[1]), .xl_busy_o(xl_busy[1]),
    .hint_load_o(hload[1]), .hint_load_branch_o(hl_b[1]), .hint_load_target_o(hl_t[1]),
    .ls_req_valid_o(lsq_v[1]), .ls_req_line_o(lsq_l[1]), .ls_req_ready_i(lsq_r[1]),
    .ls_rsp_valid_i(lsr_v[1]), .ls_rsp_data_i(lsr_d[1]), .mispredict_o(mispred[1]),
    .restart_addr_o(rst_a[1]), .btb_rd_o(brd[1]), .btb_wr_o(bwr[1]),
    .hint_overruled_o(overr[1]), .pf_valid_o(pfv[1]));

  spe_bpu #(.SCHEME(SCHEME_BWP_OH_NLS)) u_bwp (
    .clk, .rst_n, .ib1_valid_i(ib1_valid[2]), .ib1_addr_i(ib1_addr[2]), .ib1_instr_i(ib1_instr[2]),
    .hx_valid_i(hx_valid[2]), .hx_branch_i(hx_branch[2]), .hx_target_i(hx_target[2]), .res_i(res[2]),
    .ib2_pred_o(pred[2]), .redirect_o(redirect[2]), .redirect_target_o(redir_t[2]), .ib1_hold_o(hold[2]),
    .use_xline_o(use_xl[2]), .xline_target_o(xl_t[2]), .xl_rd_addr_i(xl_rd[2]),
    .xl_rd_hit_o(xl_hit[2]), .xl_rd_instr_o(xl_instr[2]), .xl_busy_o(xl_busy[2]),
    .hint_load_o(hload[2]), .hint_load_branch_o(hl_b[2]), .hint_load_target_o(hl_t[2]),
    .ls_req_valid_o(lsq_v[2]), .ls_req_line_o(lsq_l[2]), .ls_req_ready_i(lsq_r[2]),
    .ls_rsp_valid_i(lsr_v[2]), .ls_rsp_data_i(lsr_d[2]), .mispredict_o(mispred[2]),
    .restart_addr_o(rst_a[2]), .btb_rd_o(brd[2]), .btb_wr_o(bwr[2]),
    .hint_overruled_o(overr[2]), .pf_valid_o(pfv[2]));

  // ---------------- local store models ----------------
  function automatic instr_t ls_word(int a);
    return {16'h5EED ^ 16'(a), 16'(a)};
  endfunction

  for (genvar s = 0; s < NS; s++) begin : g_ls
    logic       pv [LAT];
    line_addr_t pl [LAT];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < LAT; i++) pv[i] <= 1'b0;
      end else begin
        pv[0] <= lsq_v[s] && lsq_r[s];
        pl[0] <= lsq_l[s];
        for (int i = 1; i < LAT; i++) begin pv[i] <= pv[i-1]; pl[i] <= pl[i-1]; end
      end
    end
    assign lsq_r[s] = 1'b1;
    assign lsr_v[s] = pv[LAT-1];
    always_comb
      for (int i = 0; i < int'(LINE_INSTRS); i++)
        lsr_d[s][i] = ls_word(int'(pl[LAT-1]) * int'(LINE_INSTRS) + i);
  end

  // ---------------- reference predictor ----------------
  bit  r_valid [NS][256];
  int  r_tag   [NS][256];
  int  r_tgt   [NS][256];
  int  r_ctr   [NS][256];
  bit  r_act   [NS];
  bit  r_warn  [NS];
  int  r_actb  [NS], r_actt [NS];

  function automatic void ref_lookup(int s, int a, output bit hit, output int ctr, output int tgt);
    hit = r_valid[s][a % 256] && r_tag[s][a % 256] == a / 256;
    ctr = hit ? r_ctr[s][a % 256] : 1;
    tgt = r_tgt[s][a % 256];
  endfunction

  function automatic void ref_update(int s, int a, bit tk, int tg);
    bit hit; int ctr, tgt;
    ref_lookup(s, a, hit, ctr, tgt);
    ctr = tk ? ((ctr < 3) ? ctr + 1 : 3) : ((ctr > 0) ? ctr - 1 : 0);
    if (tk || !hit) r_tgt[s][a % 256] = tg;
    r_valid[s][a % 256] = 1; r_tag[s][a % 256] = a / 256; r_ctr[s][a % 256] = ctr;
  endfunction

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0;
  int n_redirect [NS], n_follow_hint [NS], n_overrule [NS], n_prefetch [NS];
  int n_xline [NS], n_mispred [NS], n_nolookup [NS], n_ignored [NS];
  int n_pairs [NS], n_btb_rd [NS], n_hold [NS];
  int stall [NS], stall_base [NS];

  always @(posedge clk) for (int s = 0; s < NS; s++) if (rst_n && brd[s]) n_btb_rd[s]++;

  task automatic chk(int s, string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL [scheme %0d] %s at %0t", s, what, $time); end
  endtask

  task automatic idle(int s);
    ib1_valid[s] = 0; hx_valid[s] = 0; res[s] = '0; xl_rd[s] = '0;
  endtask

  // execute a hint (target 0 = warning) and check its outcome two cycles on
  task automatic do_hint(int s, waddr_t b, waddr_t t);
    bit hit; int ctr, tgt;
    bit is_warn = (s == 2) && t == '0;
    bit exp_load, exp_over, exp_pf;
    idle(s); hx_valid[s] = 1; hx_branch[s] = b; hx_target[s] = t;
    @(negedge clk); idle(s);
    @(negedge clk);
    ref_lookup(s, int'(b), hit, ctr, tgt);
    exp_over = (s != 0) && !is_warn && hit && ctr == 0;
    exp_load = (s != 0) && !is_warn && !exp_over;
    exp_pf   = is_warn && hit && ctr >= 2;
    chk(s, "hint load", hload[s] == exp_load);
    chk(s, "hint overruled", overr[s] == exp_over);
    chk(s, "warning prefetch", pfv[s] == exp_pf);
    if (s == 0) n_ignored[s]++;
    if (exp_over) n_overrule[s]++;
    if (exp_pf) n_prefetch[s]++;
    if (exp_load) begin r_act[s] = 1; r_warn[s] = 0; r_actb[s] = int'(b); r_actt[s] = int'(t); end
    if (exp_pf)   begin r_act[s] = 1; r_warn[s] = 1; r_actb[s] = int'(b); r_actt[s] = tgt; end
    if (s != 0 && !exp_load && !exp_pf) r_act[s] = 0;
    @(negedge clk);
  endtask

  // a pair without a branch
  task automatic do_plain(int s, waddr_t pa);
    idle(s); ib1_valid[s] = 1; ib1_addr[s] = pa; ib1_instr[s] = '{NOP, NOP};
    #1;
    chk(s, "no BTB read for a plain pair", !brd[s]);
    n_pairs[s]++;
    n_nolookup[s]++;
    @(negedge clk); idle(s); #1;
    chk(s, "no prediction for a plain pair", !pred[s].valid && !redirect[s]);
    @(negedge clk);
  endtask

  // a pair with branch b (slot b[0]), actual outcome tk/tg, hinted in the
  // original program when orig_hinted
  task automatic do_branch(int s, waddr_t b, instr_t op, bit tk, waddr_t tg, bit orig_hinted);
    bit hit; int ctr, tgt;
    bit match, lookup, e_valid, e_taken;
    int e_tgt;
    pred_src_t e_src;
    waddr_t pa = {b[15:1], 1'b0};
    idle(s); ib1_valid[s] = 1; ib1_addr[s] = pa;
    ib1_instr[s] = b[0] ? '{op, NOP} : '{NOP, op};
    match  = (s != 0) && r_act[s] && r_actb[s] / 2 == int'(pa) / 2;
    lookup = (s != 2) && !match;
    ref_lookup(s, int'(b), hit, ctr, tgt);
    #1;
    n_pairs[s]++;
    chk(s, "BTB read only for branches", brd[s] == lookup);
    chk(s, "extra line switch", use_xl[s] == (match && r_warn[s]));
    if (!lookup) n_nolookup[s]++;
    if (match && r_warn[s]) begin
      n_xline[s]++;
      chk(s, "extra line target", xl_t[s] == waddr_t'(r_actt[s]));
    end
    // expected IB2 prediction
    e_valid = match || lookup;
    e_taken = match || (lookup && hit && ctr >= 2);
    e_tgt   = match ? r_actt[s] : (e_taken ? tgt : 0);
    e_src   = match ? (r_warn[s] ? SRC_WARN : SRC_HINT) : (e_taken ? SRC_BTB : SRC_NONE);
    @(negedge clk); idle(s); #1;
    chk(s, "pred valid", pred[s].valid == e_valid);
    if (e_valid) begin
      chk(s, "pred addr", pred[s].addr == b);
      chk(s, "pred taken", pred[s].taken == e_taken);
      chk(s, "pred src", pred[s].src == e_src);
      if (e_taken) chk(s, "pred target", int'(pred[s].target) == e_tgt);
    end
    chk(s, "redirect", redirect[s] == (e_src == SRC_BTB));
    if (e_src == SRC_BTB) begin
      n_redirect[s]++;
      chk(s, "redirect target", int'(redir_t[s]) == e_tgt);
    end
    if (e_src == SRC_HINT) n_follow_hint[s]++;
    // penalty accounting
    if (tk && e_taken && waddr_t'(e_tgt) == tg) stall[s] += (e_src == SRC_BTB) ? 7 : 0;
    else if (tk != e_taken || (tk && waddr_t'(e_tgt) != tg)) stall[s] += 18;
    stall_base[s] += (tk != orig_hinted) ? 18 : 0;
    // resolve
    @(negedge clk);
    res[s] = '{valid: 1'b1, addr: b, taken: tk, target: tg,
               pred_taken: e_taken, pred_target: waddr_t'(e_tgt)};
    #1;
    begin
      bit e_mis = (tk != e_taken) || (tk && waddr_t'(e_tgt) != tg);
      chk(s, "mispredict", mispred[s] == e_mis);
      chk(s, "BTB write at resolve", bwr[s]);
      if (e_mis) begin
        n_mispred[s]++;
        chk(s, "restart address", rst_a[s] == (tk ? tg : b + 16'd1));
      end
    end
    ref_update(s, int'(b), tk, int'(tg));
    @(negedge clk); idle(s);
    // after an extra-line switch, wait for the line and read the target pair
    if (match && r_warn[s] && tk) begin
      automatic int n = 0;
      xl_rd[s] = waddr_t'(r_actt[s]);
      #1;
      while (!xl_hit[s] && n < 50) begin @(negedge clk); xl_rd[s] = waddr_t'(r_actt[s]); #1; n++; end
      chk(s, "extra line holds target", xl_hit[s] &&
          xl_instr[s][0] == ls_word(r_actt[s] & ~1) && xl_instr[s][1] == ls_word(r_actt[s] | 1));
      @(negedge clk); idle(s);
    end
  endtask

  // resolve branch b with the prediction it carries (or none)
  task automatic resolve_one(int s, waddr_t b, bit tk, waddr_t tg, bit has_p, bit p_tk,
                             waddr_t p_tg, pred_src_t p_src, bit orig_hinted);
    bit e_mis = has_p ? ((tk != p_tk) || (tk && p_tg != tg)) : tk;
    idle(s);
    res[s] = '{valid: 1'b1, addr: b, taken: tk, target: tg,
               pred_taken: has_p && p_tk, pred_target: has_p ? p_tg : '0};
    #1;
    chk(s, "mispredict", mispred[s] == e_mis);
    chk(s, "BTB write at resolve", bwr[s]);
    if (e_mis) begin
      n_mispred[s]++;
      chk(s, "restart address", rst_a[s] == (tk ? tg : b + 16'd1));
      stall[s] += 18;
    end else if (tk) stall[s] += (p_src == SRC_BTB) ? 7 : 0;
    stall_base[s] += (tk != orig_hinted) ? 18 : 0;
    ref_update(s, int'(b), tk, int'(tg));
    @(negedge clk); idle(s);
  endtask

  // a pair holding two branches, b0 in slot 0 and b0+1 in slot 1. If the
  // pair matches the active hint, the hinted branch follows it and the other
  // gets no prediction. Otherwise (SBP schemes) b0 is looked up in IB1 and,
  // when it is predicted not taken, b0+1 one cycle later while IB1 is held.
  task automatic expect_pred(int s, string tag, bit match, waddr_t a, output pred_t p);
    bit hit; int ctr, tgt;
    bit e_taken; int e_tgt; pred_src_t e_src;
    ref_lookup(s, int'(a), hit, ctr, tgt);
    e_taken = match || (hit && ctr >= 2);
    e_tgt   = match ? r_actt[s] : (e_taken ? tgt : 0);
    e_src   = match ? (r_warn[s] ? SRC_WARN : SRC_HINT) : (e_taken ? SRC_BTB : SRC_NONE);
    p = pred[s];
    chk(s, {tag, " pred valid"}, p.valid);
    chk(s, {tag, " pred addr"}, p.addr == a);
    chk(s, {tag, " pred taken"}, p.taken == e_taken);
    chk(s, {tag, " pred src"}, p.src == e_src);
    if (e_taken) chk(s, {tag, " pred target"}, int'(p.target) == e_tgt);
    chk(s, {tag, " redirect"}, redirect[s] == (e_src == SRC_BTB));
    if (e_src == SRC_BTB) n_redirect[s]++;
    if (e_src == SRC_HINT) n_follow_hint[s]++;
  endtask

  task automatic do_pair2(int s, waddr_t b0, instr_t op0, instr_t op1,
                          bit tk0, waddr_t tg0, bit tk1, waddr_t tg1, bit hint0, bit hint1);
    bit match, lookup;
    waddr_t b1 = b0 + 16'd1;
    pred_t p0, p1;
    p0 = '0; p1 = '0;
    idle(s); ib1_valid[s] = 1; ib1_addr[s] = b0; ib1_instr[s] = '{op1, op0};
    match  = (s != 0) && r_act[s] && r_actb[s] / 2 == int'(b0) / 2;
    lookup = (s != 2) && !match;
    #1;
    n_pairs[s]++;
    chk(s, "BTB read only for branches", brd[s] == lookup);
    chk(s, "extra line switch", use_xl[s] == (match && r_warn[s]));
    if (!lookup) n_nolookup[s]++;
    if (match && r_warn[s]) n_xline[s]++;
    @(negedge clk); idle(s); #1;
    if (match) begin
      if (r_actb[s] == int'(b0)) expect_pred(s, "hinted slot 0", 1, b0, p0);
      else                       expect_pred(s, "hinted slot 1", 1, b1, p1);
      chk(s, "no hold", !hold[s]);
    end else if (lookup) begin
      expect_pred(s, "slot 0", 0, b0, p0);
      chk(s, "hold for slot 1", hold[s] == !p0.taken);
      if (!p0.taken) begin
        n_hold[s]++;
        chk(s, "second BTB read", brd[s]);
        @(negedge clk); #1;
        expect_pred(s, "slot 1", 0, b1, p1);
        chk(s, "single hold", !hold[s]);
      end
    end else begin
      chk(s, "not predicted", !pred[s].valid && !hold[s]);
    end
    @(negedge clk);
    resolve_one(s, b0, tk0, tg0, p0.valid, p0.taken, p0.target, p0.src, hint0);
    if (!tk0) resolve_one(s, b1, tk1, tg1, p1.valid, p1.taken, p1.target, p1.src, hint1);
  endtask

  // brz/brnz with their displacement fields, as the assembler emits them
  function automatic instr_t ri16(logic [8:0] op, int disp_words, int rt);
    return {op, 16'(disp_words), 7'(rt)};
  endfunction

  task automatic run_scheme(int s);
    automatic bit warn_code = (s == 2);
    automatic waddr_t hz = warn_code ? WZ : OZ;
    automatic waddr_t hn = warn_code ? WN : ON;
    automatic waddr_t h  = warn_code ? H1 : H0;
    for (int i = 0; i < 256; i++) r_valid[s][i] = 0;
    r_act[s] = 0; r_warn[s] = 0;
    for (int o = 0; o < OUTER; o++) begin
      for (int it = 0; it < ITER; it++) begin
        automatic bit last = (it == ITER - 1);
        // loop body from the loop top up to the hint
        for (int p = int'(LTOP) & ~1; p < int'(h) - 1; p += 2) do_plain(s, waddr_t'(p));
        // hbra: original hints the loop branch, the other version warns brz
        if (warn_code) do_hint(s, hz, '0);
        else           do_hint(s, hn, LTOP);
        // brz exits the loop on the last iteration by skipping brnz
        // brz and brnz share a pair in both versions
        do_pair2(s, hz, ri16(9'h040, 2, 3),
                 ri16(9'h042, int'(LTOP) - int'(hn), warn_code ? 15 : 9),
                 last, hz + 16'd2, 1'b1, LTOP, 0, !warn_code);
      end
      do_plain(s, hz + 16'd2);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < NS; s++) begin
      idle(s); ib1_addr[s] = '0; ib1_instr[s] = '0; hx_branch[s] = '0; hx_target[s] = '0;
      n_redirect[s] = 0; n_follow_hint[s] = 0; n_overrule[s] = 0; n_prefetch[s] = 0;
      n_xline[s] = 0; n_mispred[s] = 0; n_nolookup[s] = 0; n_ignored[s] = 0;
      n_pairs[s] = 0; n_btb_rd[s] = 0; n_hold[s] = 0; stall[s] = 0; stall_base[s] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < NS; s++) run_scheme(s);
    for (int s = 0; s < NS; s++)
      $display("scheme %0d: pairs=%0d btb_reads=%0d holds=%0d redirects=%0d hint_follow=%0d prefetch=%0d mispredict=%0d stall=%0d base_stall=%0d",
               s, n_pairs[s], n_btb_rd[s], n_hold[s], n_redirect[s], n_follow_hint[s], n_prefetch[s],
               n_mispred[s], stall[s], stall_base[s]);
    // SBP: the loop branch is found by pre-decode and redirected
    chk(0, "SBP redirects the loop branch", n_redirect[0] >= OUTER * (ITER - 3));
    chk(0, "SBP needs the second lookup of the pair", n_hold[0] >= OUTER * (ITER - 3));
    // SBP-OH-NLS: the loop branch follows its hint every iteration
    chk(1, "hint followed", n_follow_hint[1] >= OUTER * (ITER - 1) - 1);
    chk(1, "hints beat pre-decode alone", stall[1] < stall[0]);
    // BWP with the warning code: brz is never predicted taken, so its
    // warning is never loaded, and the unhinted loop branch is not predicted
    chk(2, "warning of a not-taken branch never prefetches", n_prefetch[2] == 0);
    chk(2, "unhinted loop branch costs more than SBP-OH-NLS", stall[2] > stall[1]);
    chk(2, "BTB read only for hints and warnings", n_btb_rd[2] == OUTER * ITER);
    chk(2, "no hold without pre-decode", n_hold[2] == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
