// spe_bp_pkg: types and constants shared by the SPE branch prediction blocks.
//
// Addresses are local-store word addresses. The local store is 256 KB, so a
// byte address has 18 bits; with 4-byte instructions the word address has the
// 16 bits 0..15 of the big-endian byte address (bits 16-17 are the byte
// offset), which is also the width of the target field kept in the BTB.
// The ILB fetches lines of 32 instructions. The bimodal counter encoding
// (00 strongly not taken .. 11 strongly taken, first bit = direction)
// follows the original state diagram; the scheme enumeration names the
// three proposed prediction schemes.
package spe_bp_pkg;

  localparam int unsigned WADDR_W       = 16;  // LS word address width
  localparam int unsigned INSTR_W       = 32;  // SPU instruction width
  localparam int unsigned LINE_INSTRS   = 32;  // instructions per ILB line
  localparam int unsigned LINE_OFS_W    = $clog2(LINE_INSTRS);
  localparam int unsigned LINE_ADDR_W   = WADDR_W - LINE_OFS_W;

  typedef logic [WADDR_W-1:0]     waddr_t;
  typedef logic [INSTR_W-1:0]     instr_t;
  typedef logic [LINE_ADDR_W-1:0] line_addr_t;

  // Two-bit bimodal counter. Bit 1 is the direction, a state whose two bits
  // are equal is a strong state.
  typedef enum logic [1:0] {
    CTR_STRONG_NT = 2'b00,
    CTR_WEAK_NT   = 2'b01,
    CTR_WEAK_T    = 2'b10,
    CTR_STRONG_T  = 2'b11
  } ctr_t;

  // Prediction scheme.
  //   SCHEME_SBP        : pre-decode in IB1, BTB lookup in IB2, hints ignored
  //   SCHEME_SBP_OH_NLS : as SBP, plus hints, which are not loaded when the
  //                       BTB predicts the hinted branch strongly not taken
  //   SCHEME_BWP_OH_NLS : BTB read only for hints and branch warnings (hints
  //                       with target 0); a warned, predicted-taken branch's
  //                       target line is prefetched into an extra ILB line
  typedef enum logic [1:0] {
    SCHEME_SBP        = 2'd0,
    SCHEME_SBP_OH_NLS = 2'd1,
    SCHEME_BWP_OH_NLS = 2'd2
  } scheme_t;

  // Where the prediction attached to a branch came from.
  typedef enum logic [1:0] {
    SRC_NONE = 2'd0,   // not predicted (falls through)
    SRC_BTB  = 2'd1,   // BTB lookup at IB2, fetch redirected
    SRC_HINT = 2'd2,   // loaded hint, target already fetched by the SPU
    SRC_WARN = 2'd3    // branch warning, target in the extra ILB line
  } pred_src_t;

  // Prediction carried with a branch down the pipeline.
  typedef struct packed {
    logic      valid;      // a branch was found in the pair
    waddr_t    addr;       // word address of the branch
    logic      taken;      // predicted direction
    waddr_t    target;     // predicted target (valid when taken)
    pred_src_t src;
  } pred_t;

  // A resolved branch from the branch execution stage.
  typedef struct packed {
    logic   valid;
    waddr_t addr;
    logic   taken;
    waddr_t target;        // actual target
    logic   pred_taken;    // prediction that travelled with the branch
    waddr_t pred_target;
  } resolve_t;

  function automatic logic ctr_taken(ctr_t c);
    return c >= CTR_WEAK_T;
  endfunction

  function automatic logic ctr_strong(ctr_t c);
    return c[1] == c[0];
  endfunction

endpackage
