// cf_pkg: types and constants shared by the control flow checkers.
//
// The CFI-method checker keeps one micro-instruction per checked control
// flow instruction (CFI) in three memories: the CFI address (sAdrRam), its
// target (jAdrRam) and a control word (ctrlRam). The control word holds the
// kind of entry and the index of the successor entry when the transfer is
// taken. The kinds follow the document (branch, jump, call, return, checking
// start and checking end flags); their binary encoding is this design's own.
// The CF-method (basic block) checker uses its own entry kinds, also below,
// and a CRC-16 signature of each block's instruction words (CRC-16-CCITT,
// polynomial x^16+x^12+x^5+1, preset to all ones, word fed MSB first; the
// choice of CRC is this design's, the document leaves it open).
package cf_pkg;

  // Kind of a ctrlRam entry (3 bits).
  typedef enum logic [2:0] {
    CT_BRANCH = 3'd0,  // direct conditional branch: taken -> ctrl.next, not taken -> CUPC+1
    CT_JUMP   = 3'd1,  // direct unconditional jump: must go to the target
    CT_CALL   = 3'd2,  // direct call: like a jump, and pushes the return point
    CT_RET    = 3'd3,  // return from subroutine: target comes from the return stack
    CT_START  = 3'd4,  // checking start address: activates the checker
    CT_END    = 3'd5   // checking end address: deactivates the checker
  } cfi_kind_e;

  localparam int unsigned CTRL_KIND_W = 3;

  // Reason for an error report.
  typedef enum logic [1:0] {
    ERR_NONE      = 2'd0,
    ERR_SEQ       = 2'd1,  // comparator a failed outside a checked CFI
    ERR_TARGET    = 2'd2,  // checked CFI went neither to its target nor (branch) straight on
    ERR_UNDERFLOW = 2'd3   // return with an empty return stack
  } cf_err_e;

  // Kind of a basic block entry of the CF-method checker (2 bits): how the
  // block is left.
  typedef enum logic [1:0] {
    BB_FALL   = 2'd0,  // block ends without a CFI, next block follows
    BB_BRANCH = 2'd1,  // ends in a direct branch: successor or next block
    BB_JUMP   = 2'd2,  // ends in a direct jump: successor only
    BB_END    = 2'd3   // last block of the checked segment
  } bb_kind_e;

  localparam int unsigned  SIG_W    = 16;
  localparam logic [15:0]  SIG_POLY = 16'h1021;
  localparam logic [15:0]  SIG_INIT = 16'hFFFF;

  // Signature after feeding one 32-bit instruction word into 'sig'.
  function automatic logic [SIG_W-1:0] sig_update(logic [SIG_W-1:0] sig, logic [31:0] word);
    logic [SIG_W-1:0] c;
    c = sig;
    for (int i = 31; i >= 0; i--) begin
      if (c[SIG_W-1] ^ word[i]) c = {c[SIG_W-2:0], 1'b0} ^ SIG_POLY;
      else                      c = {c[SIG_W-2:0], 1'b0};
    end
    return c;
  endfunction

endpackage
