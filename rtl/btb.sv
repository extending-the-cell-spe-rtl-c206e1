// btb: direct-mapped Branch Target Buffer.
//
// Each entry holds a tag, the 16-bit target word address of the branch and
// its two-bit bimodal counter, as in the original BTB layout: the entry is
// indexed by the least significant log2(ENTRIES) bits of the branch's word
// address and the remaining 16 - log2(ENTRIES) bits are the tag, so a branch
// that aliases onto another branch's entry misses instead of taking its
// prediction. A valid bit per entry (cleared at reset) is an addition of
// this implementation, so that the array content after power-up is never used.
//
// Lookup port: lk_valid_i/lk_addr_i in cycle t, result in cycle t+1
// (synchronous read, like a small SRAM): lk_rvalid_o, lk_hit_o, lk_ctr_o,
// lk_target_o. On a miss lk_ctr_o reads CTR_WEAK_NT, i.e. predict not taken.
//
// Update port: up_valid_i with the resolved branch's address, outcome and
// target. The entry is read and rewritten in the same cycle: on a hit the
// counter steps (bimodal_counter) and, for a taken branch, the target is
// replaced; on a miss the entry is (re)allocated as if its old counter had
// been weakly not taken, so one taken outcome gives a weakly taken entry and
// one not-taken outcome a strongly not-taken one. Allocating on every
// resolved branch, and the initial state, are choices of this implementation. A
// lookup of the entry being written in the same cycle returns the old content.
module btb
  import spe_bp_pkg::*;
#(
  parameter int unsigned ENTRIES = 256
) (
  input  logic   clk,
  input  logic   rst_n,
  // lookup
  input  logic   lk_valid_i,
  input  waddr_t lk_addr_i,
  output logic   lk_rvalid_o,
  output logic   lk_hit_o,
  output ctr_t   lk_ctr_o,
  output waddr_t lk_target_o,
  // update
  input  logic   up_valid_i,
  input  waddr_t up_addr_i,
  input  logic   up_taken_i,
  input  waddr_t up_target_i
);

  localparam int unsigned IDX_W = $clog2(ENTRIES);
  localparam int unsigned TAG_W = WADDR_W - IDX_W;

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;

  logic   valid_q  [ENTRIES];
  tag_t   tag_q    [ENTRIES];
  waddr_t target_q [ENTRIES];
  ctr_t   ctr_q    [ENTRIES];

  function automatic idx_t idx_of(waddr_t a);
    return a[IDX_W-1:0];
  endfunction

  function automatic tag_t tag_of(waddr_t a);
    return a[WADDR_W-1:IDX_W];
  endfunction

  // ---------------- lookup ----------------
  logic   rd_valid_q;
  tag_t   rd_tag_q;
  logic   rd_entry_valid_q;
  tag_t   rd_entry_tag_q;
  waddr_t rd_entry_target_q;
  ctr_t   rd_entry_ctr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid_q <= 1'b0;
    else        rd_valid_q <= lk_valid_i;
  end

  always_ff @(posedge clk) begin
    if (lk_valid_i) begin
      rd_tag_q          <= tag_of(lk_addr_i);
      rd_entry_valid_q  <= valid_q[idx_of(lk_addr_i)];
      rd_entry_tag_q    <= tag_q[idx_of(lk_addr_i)];
      rd_entry_target_q <= target_q[idx_of(lk_addr_i)];
      rd_entry_ctr_q    <= ctr_q[idx_of(lk_addr_i)];
    end
  end

  assign lk_rvalid_o = rd_valid_q;
  assign lk_hit_o    = rd_valid_q && rd_entry_valid_q && (rd_entry_tag_q == rd_tag_q);
  assign lk_ctr_o    = lk_hit_o ? rd_entry_ctr_q : CTR_WEAK_NT;
  assign lk_target_o = rd_entry_target_q;

  // ---------------- update ----------------
  idx_t up_idx;
  logic up_hit;
  ctr_t up_old_ctr, up_new_ctr;
  logic unused_taken, unused_strong;

  assign up_idx     = idx_of(up_addr_i);
  assign up_hit     = valid_q[up_idx] && (tag_q[up_idx] == tag_of(up_addr_i));
  assign up_old_ctr = up_hit ? ctr_q[up_idx] : CTR_WEAK_NT;

  bimodal_counter u_ctr (
    .state_i (up_old_ctr),
    .taken_i (up_taken_i),
    .next_o  (up_new_ctr),
    .taken_o (unused_taken),
    .strong_o(unused_strong)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) valid_q[i] <= 1'b0;
    end else if (up_valid_i) begin
      valid_q[up_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (up_valid_i) begin
      tag_q[up_idx] <= tag_of(up_addr_i);
      ctr_q[up_idx] <= up_new_ctr;
      if (up_taken_i || !up_hit) target_q[up_idx] <= up_target_i;
    end
  end

endmodule
