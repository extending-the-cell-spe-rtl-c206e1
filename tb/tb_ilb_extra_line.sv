// tb_ilb_extra_line: prefetches into the extra ILB line from a local store
// model (fixed 6-cycle read latency, in-order answers, random ready) whose
// word at address a is {16'hC0DE ^ a, a}. Checks: fill data at every pair of
// the line, no hit before the fill, one request for a repeated prefetch, a
// prefetch that supersedes an outstanding one ends with the newer line.
module tb_ilb_extra_line;
  import spe_bp_pkg::*;

  localparam int LAT = 6;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       pf_valid;
  waddr_t     pf_target;
  logic       req_valid, req_ready;
  line_addr_t req_line;
  logic       rsp_valid;
  instr_t [LINE_INSTRS-1:0] rsp_data;
  waddr_t     rd_addr;
  logic       rd_hit, line_valid, busy;
  instr_t [1:0] rd_instr;
  int         checks = 0, failures = 0;
  int         n_req = 0;

  ilb_extra_line dut (
    .clk, .rst_n, .pf_valid_i(pf_valid), .pf_target_i(pf_target),
    .ls_req_valid_o(req_valid), .ls_req_line_o(req_line), .ls_req_ready_i(req_ready),
    .ls_rsp_valid_i(rsp_valid), .ls_rsp_data_i(rsp_data),
    .rd_addr_i(rd_addr), .rd_hit_o(rd_hit), .rd_instr_o(rd_instr),
    .line_valid_o(line_valid), .busy_o(busy)
  );

  always #5 clk = ~clk;

  function automatic instr_t ls_word(int a);
    return {16'hC0DE ^ 16'(a), 16'(a)};
  endfunction

  // local store model: in-order pipeline of LAT cycles
  logic       pipe_v [LAT];
  line_addr_t pipe_l [LAT];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) pipe_v[i] <= 1'b0;
    end else begin
      pipe_v[0] <= req_valid && req_ready;
      pipe_l[0] <= req_line;
      for (int i = 1; i < LAT; i++) begin
        pipe_v[i] <= pipe_v[i-1];
        pipe_l[i] <= pipe_l[i-1];
      end
      if (req_valid && req_ready) n_req <= n_req + 1;
    end
  end
  assign rsp_valid = pipe_v[LAT-1];
  always_comb
    for (int i = 0; i < int'(LINE_INSTRS); i++)
      rsp_data[i] = ls_word(int'(pipe_l[LAT-1]) * int'(LINE_INSTRS) + i);

  always @(negedge clk) req_ready = ($urandom % 4) != 0;

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic prefetch(waddr_t t);
    @(negedge clk); pf_valid = 1; pf_target = t;
    @(negedge clk); pf_valid = 0;
  endtask

  task automatic check_line(waddr_t t);
    automatic int base = int'(t) & ~(int'(LINE_INSTRS) - 1);
    for (int p = 0; p < int'(LINE_INSTRS); p += 2) begin
      rd_addr = waddr_t'(base + p); #1;
      check("hit", rd_hit);
      check("pair0", rd_instr[0] == ls_word(base + p));
      check("pair1", rd_instr[1] == ls_word(base + p + 1));
    end
    rd_addr = waddr_t'(base + int'(LINE_INSTRS)); #1;
    check("no hit outside line", !rd_hit);
  endtask

  task automatic wait_fill();
    automatic int n = 0;
    while (busy && n < 200) begin @(negedge clk); n++; end
    check("fill completes", !busy && line_valid);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int r0;
    pf_valid = 0; pf_target = '0; rd_addr = '0; req_ready = 1;
    repeat (3) @(negedge clk); rst_n = 1;
    check("empty after reset", !line_valid && !busy);
    // simple fill, target in the middle of a line
    prefetch(16'h1234);
    rd_addr = 16'h1234; #1;
    check("no hit while filling", !rd_hit);
    wait_fill();
    check_line(16'h1234);
    // repeated prefetch of the same line issues no request
    r0 = n_req;
    prefetch(16'h1220);
    repeat (LAT + 4) @(negedge clk);
    check("redundant prefetch dropped", n_req == r0 && line_valid);
    // random single prefetches
    for (int k = 0; k < 20; k++) begin
      automatic waddr_t t = waddr_t'($urandom);
      prefetch(t);
      wait_fill();
      check_line(t);
    end
    // superseding prefetches: the last one wins
    for (int k = 0; k < 20; k++) begin
      automatic waddr_t t1 = waddr_t'($urandom);
      automatic waddr_t t2 = t1 ^ 16'h0400;
      prefetch(t1);
      repeat ($urandom % 5) @(negedge clk);
      prefetch(t2);
      // while the fill is outstanding, a hit must already show the new line
      rd_addr = {t2[15:1], 1'b0};
      for (int c = 0; c < 3 * LAT; c++) begin
        @(negedge clk); #1;
        if (rd_hit) check("no stale data", rd_instr[0] == ls_word(int'(rd_addr)));
      end
      wait_fill();
      check_line(t2);
      rd_addr = t1; #1;
      check("old line gone", !rd_hit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
