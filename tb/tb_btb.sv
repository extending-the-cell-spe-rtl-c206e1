// tb_btb: random lookups and updates of the BTB against a reference model
// kept in the testbench (per-index valid/tag/target/counter, saturating
// counter, allocation as weakly-not-taken-then-step). Branch addresses are
// drawn from a small set that contains aliasing pairs (same index, other
// tag). The lookup result is checked exactly one cycle after the request.
module tb_btb;
  import spe_bp_pkg::*;

  localparam int unsigned ENTRIES = 256;
  localparam int unsigned IDX_W   = $clog2(ENTRIES);

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   lk_valid, lk_rvalid, lk_hit;
  waddr_t lk_addr, lk_target;
  ctr_t   lk_ctr;
  logic   up_valid, up_taken;
  waddr_t up_addr, up_target;
  int     checks = 0, failures = 0;

  btb #(.ENTRIES(ENTRIES)) dut (
    .clk, .rst_n,
    .lk_valid_i(lk_valid), .lk_addr_i(lk_addr), .lk_rvalid_o(lk_rvalid),
    .lk_hit_o(lk_hit), .lk_ctr_o(lk_ctr), .lk_target_o(lk_target),
    .up_valid_i(up_valid), .up_addr_i(up_addr), .up_taken_i(up_taken),
    .up_target_i(up_target)
  );

  always #5 clk = ~clk;

  // reference
  bit     m_valid  [ENTRIES];
  int     m_tag    [ENTRIES];
  int     m_target [ENTRIES];
  int     m_ctr    [ENTRIES];

  waddr_t pool [16];

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int n_hits = 0, n_alias = 0;
    automatic bit exp_valid = 0, exp_hit = 0;
    automatic int exp_ctr = 0, exp_target = 0;
    for (int i = 0; i < 8; i++) pool[i] = waddr_t'($urandom);
    // aliasing partners: same index, different tag
    for (int i = 8; i < 16; i++) pool[i] = pool[i-8] ^ waddr_t'(16'h1 << (IDX_W + (i % 4)));
    for (int i = 0; i < int'(ENTRIES); i++) m_valid[i] = 0;
    lk_valid = 0; up_valid = 0; lk_addr = '0; up_addr = '0; up_taken = 0; up_target = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    exp_valid = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // check the result of last cycle's lookup
      check("rvalid timing", lk_rvalid == exp_valid);
      if (exp_valid) begin
        check("hit", lk_hit == exp_hit);
        check("ctr", int'(lk_ctr) == exp_ctr);
        if (exp_hit) begin
          check("target", int'(lk_target) == exp_target);
          n_hits++;
        end
      end
      // drive new requests
      lk_valid  = ($urandom % 3) != 0;
      lk_addr   = pool[$urandom % 16];
      up_valid  = ($urandom % 2) != 0;
      up_addr   = pool[$urandom % 16];
      up_taken  = ($urandom % 4) != 0;
      up_target = waddr_t'($urandom);
      // expected lookup (read before this cycle's write)
      begin
        automatic int li = int'(lk_addr[IDX_W-1:0]);
        automatic int lt = int'(lk_addr >> IDX_W);
        exp_valid  = lk_valid;
        exp_hit    = m_valid[li] && m_tag[li] == lt;
        exp_ctr    = exp_hit ? m_ctr[li] : 1;
        exp_target = m_target[li];
        if (lk_valid && m_valid[li] && m_tag[li] != lt) n_alias++;
      end
      // model the update
      if (up_valid) begin
        automatic int ui = int'(up_addr[IDX_W-1:0]);
        automatic int ut = int'(up_addr >> IDX_W);
        automatic bit uh = m_valid[ui] && m_tag[ui] == ut;
        automatic int oc = uh ? m_ctr[ui] : 1;
        automatic int nc = up_taken ? ((oc < 3) ? oc + 1 : 3) : ((oc > 0) ? oc - 1 : 0);
        if (up_taken || !uh) m_target[ui] = int'(up_target);
        m_valid[ui] = 1; m_tag[ui] = ut; m_ctr[ui] = nc;
      end
    end
    check("hits seen", n_hits > 100);
    check("aliasing misses seen", n_alias > 50);
    // reset clears the valid bits
    @(negedge clk); lk_valid = 0; up_valid = 0; rst_n = 0;
    @(negedge clk); rst_n = 1;
    lk_valid = 1; lk_addr = pool[0];
    @(negedge clk); lk_valid = 0;
    check("miss after reset", lk_rvalid && !lk_hit && lk_ctr == CTR_WEAK_NT);
    $display("hits=%0d alias=%0d", n_hits, n_alias);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
