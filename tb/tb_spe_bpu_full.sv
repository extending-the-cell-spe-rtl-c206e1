// tb_spe_bpu_full: the unit at its default configuration (SBP-OH-NLS,
// 256-entry BTB) taken through one complete prediction life cycle of a
// loop branch: cold miss and misprediction, BTB allocation, IB2 redirect
// one cycle after IB1, correct-prediction resolve, then training to
// strongly not taken so that a hint is overruled, retraining, a loaded hint
// that the branch follows without a BTB read. It also fills all 256 BTB
// entries with distinct branches and checks each one redirects to its own
// target.
module tb_spe_bpu_full;
  import spe_bp_pkg::*;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         ib1_valid, hx_valid;
  waddr_t       ib1_addr, hx_branch, hx_target;
  instr_t [1:0] ib1_instr;
  resolve_t     res;
  pred_t        pred;
  logic         redirect, hold, use_xl, xl_hit, xl_busy, hload, lsq_v, mispred, brd, bwr, overr, pfv;
  waddr_t       redir_t, xl_t, hl_b, hl_t, rst_a;
  instr_t [1:0] xl_instr;
  line_addr_t   lsq_l;
  instr_t [LINE_INSTRS-1:0] lsr_d;

  spe_bpu dut (
    .clk, .rst_n, .ib1_valid_i(ib1_valid), .ib1_addr_i(ib1_addr), .ib1_instr_i(ib1_instr),
    .hx_valid_i(hx_valid), .hx_branch_i(hx_branch), .hx_target_i(hx_target), .res_i(res),
    .ib2_pred_o(pred), .redirect_o(redirect), .redirect_target_o(redir_t), .ib1_hold_o(hold),
    .use_xline_o(use_xl), .xline_target_o(xl_t), .xl_rd_addr_i(16'h0),
    .xl_rd_hit_o(xl_hit), .xl_rd_instr_o(xl_instr), .xl_busy_o(xl_busy),
    .hint_load_o(hload), .hint_load_branch_o(hl_b), .hint_load_target_o(hl_t),
    .ls_req_valid_o(lsq_v), .ls_req_line_o(lsq_l), .ls_req_ready_i(1'b1),
    .ls_rsp_valid_i(1'b0), .ls_rsp_data_i(lsr_d), .mispredict_o(mispred),
    .restart_addr_o(rst_a), .btb_rd_o(brd), .btb_wr_o(bwr),
    .hint_overruled_o(overr), .pf_valid_o(pfv));

  always #5 clk = ~clk;
  assign lsr_d = '0;

  localparam instr_t NOP  = {11'h201, 21'h0};
  localparam instr_t BRNZ = {9'h042, 23'h0};
  localparam waddr_t B = 16'h3E19, T = 16'h3E00;

  int checks = 0, failures = 0;
  int n_redirect = 0, n_mispred = 0, n_overrule = 0, n_follow = 0;

  task automatic chk(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic idle();
    ib1_valid = 0; hx_valid = 0; res = '0;
  endtask

  // branch b in IB1, check IB2, resolve with outcome tk; returns prediction
  task automatic branch(waddr_t b, bit tk, waddr_t tg, output pred_t p);
    idle(); ib1_valid = 1; ib1_addr = {b[15:1], 1'b0};
    ib1_instr = b[0] ? '{BRNZ, NOP} : '{NOP, BRNZ};
    @(negedge clk); idle(); #1;
    p = pred;
    chk("prediction one cycle after IB1", pred.valid && pred.addr == b);
    chk("redirect only for BTB predictions", redirect == (pred.src == SRC_BTB));
    if (redirect) n_redirect++;
    if (pred.src == SRC_HINT) n_follow++;
    @(negedge clk);
    res = '{valid: 1'b1, addr: b, taken: tk, target: tg,
            pred_taken: p.taken, pred_target: p.target};
    #1;
    chk("mispredict flag", mispred == ((tk != p.taken) || (tk && tg != p.target)));
    if (mispred) n_mispred++;
    @(negedge clk); idle();
  endtask

  task automatic hint(waddr_t b, waddr_t t, output bit loaded, output bit overruled);
    idle(); hx_valid = 1; hx_branch = b; hx_target = t;
    @(negedge clk); idle();
    @(negedge clk); #1;
    loaded = hload; overruled = overr;
    if (overr) n_overrule++;
    @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic pred_t p;
    automatic bit ld, ov;
    idle(); ib1_addr = '0; ib1_instr = '0; hx_branch = '0; hx_target = '0;
    repeat (3) @(negedge clk); rst_n = 1; @(negedge clk);

    branch(B, 1, T, p);   chk("cold: not taken", !p.taken);
    branch(B, 1, T, p);   chk("trained: BTB taken", p.taken && p.src == SRC_BTB && p.target == T);
    branch(B, 1, T, p);   chk("strongly taken", p.taken);
    repeat (3) branch(B, 0, T, p);
    hint(B, T, ld, ov);   chk("hint overruled at strongly not taken", ov && !ld);
    branch(B, 0, T, p);   chk("overruled hint not followed", !p.taken);
    branch(B, 1, T, p);   // 00 -> 01
    hint(B, T, ld, ov);   chk("hint loaded", ld && !ov && hl_b == B && hl_t == T);
    idle(); ib1_valid = 1; ib1_addr = {B[15:1], 1'b0}; ib1_instr = '{BRNZ, NOP}; #1;
    chk("hinted branch needs no BTB read", !brd);
    @(negedge clk); idle(); #1;
    chk("follows hint", pred.taken && pred.src == SRC_HINT && pred.target == T);
    if (pred.src == SRC_HINT) n_follow++;
    @(negedge clk);

    // fill the whole BTB: 256 branches with distinct indices
    for (int i = 0; i < 256; i++) begin
      automatic waddr_t a = waddr_t'(16'h8000 + i);
      idle(); res = '{valid: 1'b1, addr: a, taken: 1'b1, target: waddr_t'(i * 3),
                      pred_taken: 1'b0, pred_target: '0};
      @(negedge clk);
    end
    for (int i = 0; i < 256; i++) begin
      automatic waddr_t a = waddr_t'(16'h8000 + i);
      idle(); ib1_valid = 1; ib1_addr = {a[15:1], 1'b0};
      ib1_instr = a[0] ? '{BRNZ, NOP} : '{NOP, BRNZ};
      @(negedge clk); idle(); #1;
      chk("full BTB entry", redirect && redir_t == waddr_t'(i * 3));
      @(negedge clk);
    end
    $display("redirects=%0d mispredicts=%0d overruled=%0d followed=%0d",
             n_redirect, n_mispred, n_overrule, n_follow);
    chk("all mechanisms seen", n_redirect > 0 && n_mispred > 0 && n_overrule > 0 && n_follow > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
