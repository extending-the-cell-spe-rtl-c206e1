// tb_bimodal_counter: exhaustive check of the bimodal counter against a
// saturating-integer reference (0..3, +1 on taken, -1 on not taken).
module tb_bimodal_counter;
  import spe_bp_pkg::*;

  ctr_t cur, nxt;
  logic taken, ptaken, is_strong;
  int   checks = 0, failures = 0;

  bimodal_counter dut (.state_i(cur), .taken_i(taken), .next_o(nxt),
                       .taken_o(ptaken), .strong_o(is_strong));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref_next;
    for (int s = 0; s < 4; s++) begin
      for (int t = 0; t < 2; t++) begin
        cur = ctr_t'(s);
        taken = t[0];
        #1;
        ref_next = t ? ((s < 3) ? s + 1 : 3) : ((s > 0) ? s - 1 : 0);
        checks++;
        if (int'(nxt) != ref_next) begin
          failures++;
          $display("FAIL cur=%0d taken=%0d nxt=%0d exp=%0d", s, t, nxt, ref_next);
        end
        checks++;
        if (ptaken != (s >= 2)) begin
          failures++;
          $display("FAIL taken decode cur=%0d", s);
        end
        checks++;
        if (is_strong != (s == 0 || s == 3)) begin
          failures++;
          $display("FAIL is_strong decode cur=%0d", s);
        end
      end
    end
    // Walk: from strongly not taken, two taken outcomes reach a taken cur.
    cur = CTR_STRONG_NT; taken = 1'b1; #1;
    cur = nxt; #1;
    checks++;
    if (nxt != CTR_WEAK_T) begin failures++; $display("FAIL walk"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
