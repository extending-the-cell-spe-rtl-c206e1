// tb_bp_control: directed test of the prediction controller. Three
// instances, one per scheme (0 = SBP, 1 = SBP-OH-NLS, 2 = BWP-OH-NLS), get
// the same stimulus, and each output is compared with the value the scheme
// calls for, worked out by hand for the sequence below: a cold miss, BTB
// training by resolutions, IB2 redirect one cycle after IB1, cancelling of
// the wrong-path pair, hint overruled when strongly not taken, hint loaded
// and followed, branch warning with target prefetch and extra-line switch,
// a warning of a not-taken branch, BTB port conflict, misprediction squash.
module tb_bp_control;
  import spe_bp_pkg::*;

  localparam int NS = 3;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         ib1_valid;
  waddr_t       ib1_addr;
  instr_t [1:0] ib1_instr;
  logic         hx_valid;
  waddr_t       hx_branch, hx_target;
  resolve_t     res;

  pred_t  pred       [NS];
  logic   redirect   [NS], hold [NS], use_xl [NS], hload [NS], pf [NS], overr [NS];
  logic   mispred    [NS], brd [NS], bwr [NS];
  waddr_t redir_t    [NS], xl_t [NS], hl_b [NS], hl_t [NS], pf_t [NS], rst_a [NS];

  for (genvar s = 0; s < NS; s++) begin : g_dut
    bp_control #(.SCHEME(scheme_t'(s)), .BTB_ENTRIES(256)) dut (
      .clk, .rst_n,
      .ib1_valid_i(ib1_valid), .ib1_addr_i(ib1_addr), .ib1_instr_i(ib1_instr),
      .hx_valid_i(hx_valid), .hx_branch_i(hx_branch), .hx_target_i(hx_target),
      .res_i(res),
      .ib2_pred_o(pred[s]), .redirect_o(redirect[s]), .redirect_target_o(redir_t[s]), .ib1_hold_o(hold[s]),
      .use_xline_o(use_xl[s]), .xline_target_o(xl_t[s]),
      .hint_load_o(hload[s]), .hint_load_branch_o(hl_b[s]), .hint_load_target_o(hl_t[s]),
      .pf_valid_o(pf[s]), .pf_target_o(pf_t[s]), .hint_overruled_o(overr[s]),
      .mispredict_o(mispred[s]), .restart_addr_o(rst_a[s]),
      .btb_rd_o(brd[s]), .btb_wr_o(bwr[s])
    );
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam instr_t NOP  = {11'h201, 21'h0};
  localparam instr_t BRNZ = {9'h042, 23'h0};
  localparam instr_t BR   = {9'h064, 23'h0};

  localparam waddr_t PB = 16'h0100;  // pair holding branch B in slot 1
  localparam waddr_t B  = 16'h0101;
  localparam waddr_t T  = 16'h0040;
  localparam waddr_t W  = 16'h0200;  // warned branch, slot 0
  localparam waddr_t WT = 16'h0300;
  localparam waddr_t N  = 16'h0480;  // branch never taken

  task automatic chk(string what, int s, bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL [scheme %0d] %s at %0t", s, what, $time);
    end
  endtask

  task automatic idle();
    ib1_valid = 0; hx_valid = 0; res = '0;
  endtask

  // drive one cycle of stimulus; outputs of that cycle are sampled by the
  // caller before the next call (we are between negedge and posedge)
  task automatic step();
    @(negedge clk);
  endtask

  task automatic put_pair(waddr_t a, instr_t i0, instr_t i1);
    idle(); ib1_valid = 1; ib1_addr = a; ib1_instr = '{i1, i0};
  endtask

  task automatic put_res(waddr_t a, bit tk, waddr_t tg, bit ptk, waddr_t ptg);
    idle();
    res = '{valid: 1'b1, addr: a, taken: tk, target: tg, pred_taken: ptk, pred_target: ptg};
  endtask

  task automatic put_hint(waddr_t b, waddr_t t);
    idle(); hx_valid = 1; hx_branch = b; hx_target = t;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle(); ib1_addr = '0; ib1_instr = '0; hx_branch = '0; hx_target = '0;
    repeat (3) step();
    rst_n = 1;
    step();

    // 1. cold branch in IB1: SBP schemes read the BTB, BWP does not
    put_pair(PB, NOP, BRNZ); #1;
    for (int s = 0; s < NS; s++) chk("cold lookup", s, brd[s] == (s != 2));
    step(); idle(); #1;
    for (int s = 0; s < NS; s++) begin
      chk("cold pred valid", s, pred[s].valid == (s != 2));
      chk("cold not taken", s, !pred[s].taken && !redirect[s]);
      if (s != 2) chk("cold pred addr", s, pred[s].addr == B);
    end

    // 2. resolve B taken, predicted not taken: mispredict, BTB write
    put_res(B, 1, T, 0, '0); #1;
    for (int s = 0; s < NS; s++) begin
      chk("mispredict", s, mispred[s] && rst_a[s] == T && bwr[s]);
    end
    step();

    // 3. B again: SBP schemes redirect in IB2, not in IB1
    put_pair(PB, NOP, BRNZ); #1;
    for (int s = 0; s < NS; s++) chk("no redirect in IB1", s, !redirect[s]);
    step();
    // 4. the sequential pair behind it holds a branch; it is cancelled
    put_pair(16'h0102, BR, NOP); #1;
    for (int s = 0; s < NS; s++) begin
      chk("redirect in IB2", s, redirect[s] == (s != 2));
      if (s != 2) begin
        chk("redirect target", s, redir_t[s] == T);
        chk("pred src btb", s, pred[s].valid && pred[s].taken &&
                                 pred[s].src == SRC_BTB && pred[s].target == T);
        chk("wrong-path lookup cancelled", s, !brd[s]);
      end
    end
    step(); idle(); #1;
    for (int s = 0; s < NS; s++) chk("cancelled pair no pred", s, !pred[s].valid);

    // 5. correct prediction: no mispredict
    put_res(B, 1, T, 1, T); #1;
    for (int s = 0; s < NS; s++) chk("correct resolve", s, !mispred[s]);
    step();
    // counter now 11; three not-taken outcomes -> 00
    repeat (3) begin put_res(B, 0, T, 0, '0); step(); end

    // 6. hint for B, which is strongly not taken: overruled
    put_hint(B, T); #1;
    for (int s = 0; s < NS; s++) chk("hint no lookup same cycle", s, !brd[s]);
    step(); idle(); #1;
    for (int s = 0; s < NS; s++) chk("hint lookup", s, brd[s] == (s != 0));
    step(); #1;
    for (int s = 0; s < NS; s++) begin
      chk("hint overruled", s, overr[s] == (s != 0));
      chk("hint not loaded", s, !hload[s]);
    end
    step();
    put_pair(PB, NOP, BRNZ); step(); idle(); #1;
    for (int s = 0; s < NS; s++) chk("overruled hint not followed", s, !pred[s].taken);

    // 7. one taken outcome (00 -> 01), hint again: loaded
    put_res(B, 1, T, 0, '0); step();
    put_hint(B, T); step(); idle(); step(); #1;
    for (int s = 0; s < NS; s++) begin
      chk("hint loaded", s, hload[s] == (s != 0) && !overr[s]);
      if (s != 0) chk("hint load fields", s, hl_b[s] == B && hl_t[s] == T);
    end
    step();
    // 8. B follows the hint: no BTB read, predicted taken from the hint
    put_pair(PB, NOP, BRNZ); #1;
    for (int s = 0; s < NS; s++) begin
      chk("hinted pair lookup", s, brd[s] == (s == 0));
      chk("hint is no xline", s, !use_xl[s]);
    end
    step(); idle(); #1;
    for (int s = 0; s < NS; s++) begin
      if (s == 0) chk("SBP weak NT", s, pred[s].valid && !pred[s].taken && !redirect[s]);
      else chk("follow hint", s, pred[s].valid && pred[s].taken && pred[s].src == SRC_HINT &&
                                 pred[s].target == T && !redirect[s]);
    end
    step();

    // 9. branch warning for W after W was taken twice
    put_res(W, 1, WT, 0, '0); step();
    put_res(W, 1, WT, 0, '0); step();
    put_hint(W, '0); step(); idle(); step(); #1;
    for (int s = 0; s < NS; s++) begin
      chk("warning prefetch", s, pf[s] == (s == 2));
      if (s == 2) chk("prefetch target", s, pf_t[s] == WT);
      chk("target-0 hint in SBP-OH-NLS is a hint", s, hload[s] == (s == 1));
    end
    step();
    put_pair(W, BR, NOP); #1;
    for (int s = 0; s < NS; s++) begin
      chk("xline switch", s, use_xl[s] == (s == 2));
      if (s == 2) chk("xline target", s, xl_t[s] == WT);
    end
    step(); idle(); #1;
    for (int s = 0; s < NS; s++) begin
      if (s == 2) chk("warn pred", s, pred[s].valid && pred[s].taken &&
                                      pred[s].src == SRC_WARN && pred[s].target == WT);
      if (s == 0) chk("SBP predicts W by BTB", s, redirect[s] && redir_t[s] == WT);
    end
    step();

    // 10. warning for a never-seen branch: nothing loaded, old warning dropped
    put_hint(N, '0); step(); idle(); step(); #1;
    for (int s = 0; s < NS; s++) chk("miss warning no prefetch", s, !pf[s]);
    step();
    put_pair(W, BR, NOP); #1;
    for (int s = 0; s < NS; s++) chk("old warning dropped", s, !use_xl[s]);
    step(); idle(); step();

    // 11. port conflict: hint and branch lookup in the same cycle
    put_res(B, 1, T, 0, '0); step();           // B: 01 -> 10
    put_hint(B, T); step();                    // hint waits in its register
    put_pair(16'h0700, BR, NOP); #1;
    for (int s = 0; s < NS; s++) chk("lookup with waiting hint", s, brd[s]);
    step(); idle(); #1;
    chk("hint waits (SBP-OH-NLS)", 1, brd[1] && !hload[1]);
    chk("BWP hint looked up at once", 2, hload[2] && !brd[2]);
    step(); #1;
    chk("hint loaded one cycle late", 1, hload[1]);
    chk("no second BWP load", 2, !hload[2]);
    step();

    // 12. misprediction in the same cycle as a branch pair: lookup cancelled
    put_pair(16'h0800, BR, NOP);
    res = '{valid: 1'b1, addr: N, taken: 1'b0, target: WT, pred_taken: 1'b1, pred_target: WT};
    #1;
    for (int s = 0; s < NS; s++) begin
      chk("mispredict not taken", s, mispred[s] && rst_a[s] == N + 16'd1);
      chk("squashed lookup", s, !brd[s]);
    end
    step(); idle(); #1;
    for (int s = 0; s < NS; s++) chk("squashed pair", s, !pred[s].valid);
    step();

    // 13. pair with two branches: slot 0 unknown, slot 1 trained taken
    put_res(16'h0901, 1, 16'h0A00, 0, '0); step();
    put_pair(16'h0900, BR, BRNZ); #1;
    for (int s = 0; s < NS; s++) chk("first lookup slot 0", s, brd[s] == (s != 2) && !hold[s]);
    step();
    put_pair(16'h0902, NOP, NOP); #1;        // next pair arrives, must be held
    for (int s = 0; s < NS; s++) begin
      chk("hold for second lookup", s, hold[s] == (s != 2));
      if (s != 2) chk("slot 0 predicted not taken", s, pred[s].valid && pred[s].addr == 16'h0900 &&
                                                     !pred[s].taken && !redirect[s] && brd[s]);
    end
    step(); idle(); #1;
    for (int s = 0; s < NS; s++) begin
      chk("no second hold", s, !hold[s]);
      if (s != 2) chk("slot 1 predicted by BTB", s, pred[s].valid && pred[s].addr == 16'h0901 &&
                                                   pred[s].taken && redirect[s] && redir_t[s] == 16'h0A00);
      else chk("BWP predicts neither", s, !pred[s].valid);
    end
    step();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
