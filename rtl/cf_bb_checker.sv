// cf_bb_checker: control flow checker for the CF (basic block) method.
//
// The program is split offline into basic blocks, numbered in ascending
// address order. For each block one memory word holds the address of its
// last instruction, how it is left (fall through, direct branch, direct jump
// or end of the checked segment) and the index of its taken successor. A
// block's start address is not stored: it is the previous block's end
// address plus one, and the first block starts at the global start address
// seg_start. The checker follows the block index k through the program:
// inside a block every step must be PC_n+1 == PC_n + 1; at the end address a
// branch must go to the start of block S_k (then k <= S_k) or fall through
// (k <= k+1), a jump must go to the start of S_k and a fall-through block to
// the next address. Any other pair is an error, optionally followed by a
// re-execution request as in the CFI-method checker.
//
// Entering a block takes two reads of the single-port table: the block's own
// word (end address, kind, successor) and then the word of block S_k - 1,
// whose end address plus one is the taken target. The second read is done
// while the block executes; only when a block is one instruction long is its
// end reached before the target is known, and the checker then holds the
// pipeline for one cycle with stall_o. All of this follows the document. The
// word layout, the segment start port, the enable input and the re-execution
// handshake (shared with cf_checker_core) are this design's choices.
//
// Instruction integrity (SIG_CHECK): the document's extension of the CF
// method. Each table word also holds a precomputed CRC-16 signature of the
// block's instruction words (cf_pkg::sig_update). The checker folds the word
// of every accepted pair (instr, the instruction at PC_n) into a running
// signature and compares it when the block is left; a mismatch raises
// sig_error_o. The block has already executed then, so no restart is
// requested. The running signature is kept for the last DELAY_SLOTS pairs
// so that a restart at the CFI, DELAY_SLOTS before the end, replays those
// instructions without counting them twice.
//
// Addresses are instruction word addresses. With DELAY_SLOTS > 0 the stored
// end address is that of the last delay slot, where control actually leaves
// the block, and the restart address after an error is PC_n - DELAY_SLOTS.
// Table word: {signature[15:0] (only with SIG_CHECK), kind[1:0],
// successor[IDX_W-1:0], end_address[ADDR_W-1:0]}.
// Timing: a pair presented with stall_o low is consumed in that cycle;
// error_o/reexec_o/sig_error_o are registered and follow one cycle later.
module cf_bb_checker
  import cf_pkg::*;
#(
  parameter int unsigned ADDR_W      = 30,
  parameter int unsigned BLOCKS      = 512,
  parameter int unsigned DELAY_SLOTS = 1,
  parameter bit          REEXEC      = 1'b1,
  parameter bit          SIG_CHECK   = 1'b1,
  parameter string       INIT_FILE   = "",
  localparam int unsigned IDX_W      = (BLOCKS > 1) ? $clog2(BLOCKS) : 1,
  localparam int unsigned WORD_W     = (SIG_CHECK ? SIG_W : 0) + 2 + IDX_W + ADDR_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              enable,
  input  logic [ADDR_W-1:0] seg_start,
  // monitored program counters
  input  logic              pc_valid,
  input  logic [ADDR_W-1:0] pc_n,
  input  logic [ADDR_W-1:0] pc_n1,
  input  logic [31:0]       instr,
  output logic              stall_o,
  // table load port
  input  logic              cfg_we,
  input  logic [IDX_W-1:0]  cfg_addr,
  input  logic [WORD_W-1:0] cfg_wdata,
  output logic [WORD_W-1:0] cfg_rdata,
  // status and reaction
  output logic              active_o,
  output logic [IDX_W-1:0]  block_o,
  output logic              error_o,
  output logic [ADDR_W-1:0] err_pc_o,
  output logic              reexec_o,
  output logic [ADDR_W-1:0] reexec_pc_o,
  output logic              sig_error_o
);

  localparam int unsigned BASE_W = 2 + IDX_W + ADDR_W;
  localparam int unsigned HIST_N = (DELAY_SLOTS > 0) ? DELAY_SLOTS : 1;

  typedef enum logic [1:0] {PH_CUR, PH_TGT, PH_READY} phase_e;

  logic [IDX_W-1:0]  ram_addr, k_q, k_d, s_q, s_cur;
  logic [WORD_W-1:0] ram_q;
  phase_e            ph_q, ph_d;
  bb_kind_e          kind_q, kind_cur;
  logic [ADDR_W-1:0] e_q, e_cur, tgt_q, tgt_cur, restart_q, restart_d;
  logic              active_q, active_d, wait_q, wait_d, take, err, enter;
  logic              cmp_a, at_end;
  logic [ADDR_W-1:0] restart_pc;
  logic [SIG_W-1:0]  sig_q, sig_d, sig_new, gold_q, gold_cur;
  logic [SIG_W-1:0]  hist_q [HIST_N];
  logic              sig_err, restart_back, upd;

  cf_dpram #(.DEPTH(BLOCKS), .WIDTH(WORD_W), .INIT_FILE(INIT_FILE)) u_bb_ram (
    .clk, .a_addr(ram_addr), .a_rdata(ram_q),
    .b_en(1'b1), .b_we(cfg_we), .b_addr(cfg_addr), .b_wdata(cfg_wdata), .b_rdata(cfg_rdata)
  );

  // Current block word: straight from the memory in the first cycle of a
  // block, from the registers afterwards.
  always_comb begin
    if (ph_q == PH_CUR) begin
      kind_cur = bb_kind_e'(ram_q[BASE_W-1 -: 2]);
      s_cur    = ram_q[ADDR_W +: IDX_W];
      e_cur    = ram_q[ADDR_W-1:0];
      gold_cur = SIG_CHECK ? SIG_W'(ram_q[WORD_W-1 -: SIG_W]) : '0;
    end else begin
      gold_cur = gold_q;
      kind_cur = kind_q;
      s_cur    = s_q;
      e_cur    = e_q;
    end
    // Taken target: start of block S = end of block S-1 plus one.
    if (s_q == '0)              tgt_cur = seg_start;
    else if (ph_q == PH_TGT)    tgt_cur = ram_q[ADDR_W-1:0] + 1'b1;
    else                        tgt_cur = tgt_q;
  end

  assign cmp_a  = (pc_n1 == pc_n + 1'b1);
  assign at_end = (pc_n == e_cur);
  // One-instruction block: its end comes before the target is read.
  assign stall_o = active_q && pc_valid && !wait_q && ph_q == PH_CUR && at_end &&
                   kind_cur != BB_END && kind_cur != BB_FALL;
  // Restart address after an error: at the end of a block left by a CFI the
  // CFI (DELAY_SLOTS before the end) is re-executed; after any other fault
  // the instruction in decode is fetched again.
  assign restart_back = at_end && (kind_cur == BB_BRANCH || kind_cur == BB_JUMP);
  assign restart_pc   = restart_back ? pc_n - ADDR_W'(DELAY_SLOTS) : pc_n;
  assign sig_new      = sig_update(sig_q, instr);
  assign take   = pc_valid && !stall_o && (!wait_q || pc_n == restart_q);

  always_comb begin
    active_d  = active_q;
    k_d       = k_q;
    wait_d    = wait_q;
    restart_d = restart_q;
    err       = 1'b0;
    enter     = 1'b0;
    sig_d     = sig_q;
    sig_err   = 1'b0;
    upd       = 1'b0;
    if (!active_q) begin
      if (enable && pc_valid && pc_n == seg_start) begin
        active_d = 1'b1;
        k_d      = '0;
        enter    = 1'b1;
        sig_d    = sig_update(SIG_INIT, instr);
      end
    end else if (!enable) begin
      active_d = 1'b0;
    end else if (take) begin
      wait_d = 1'b0;
      if (at_end) begin
        unique case (kind_cur)
          BB_END:    active_d = 1'b0;
          BB_FALL:   if (cmp_a) begin k_d = k_q + 1'b1; enter = 1'b1; end else err = 1'b1;
          BB_BRANCH: if (pc_n1 == tgt_cur) begin k_d = s_cur; enter = 1'b1; end
                     else if (cmp_a) begin k_d = k_q + 1'b1; enter = 1'b1; end
                     else err = 1'b1;
          default:   if (pc_n1 == tgt_cur) begin k_d = s_cur; enter = 1'b1; end else err = 1'b1;
        endcase
      end else if (!cmp_a) begin
        err = 1'b1;
      end
      if (REEXEC && err) begin
        wait_d    = 1'b1;
        restart_d = restart_pc;
      end
      // running signature of the block
      if (err) begin
        if (REEXEC && restart_back && DELAY_SLOTS > 0) sig_d = hist_q[HIST_N-1];
      end else if (at_end) begin
        sig_err = SIG_CHECK && (sig_new != gold_cur);
        sig_d   = SIG_INIT;
        upd     = 1'b1;
      end else begin
        sig_d = sig_new;
        upd   = 1'b1;
      end
    end
    // Next read: the new block's word, then the word before its successor.
    if (enter)                 ph_d = PH_CUR;
    else if (ph_q == PH_CUR)   ph_d = PH_TGT;
    else                       ph_d = PH_READY;
    if (enter)                 ram_addr = k_d;
    else if (ph_q == PH_CUR)   ram_addr = s_cur - 1'b1;
    else                       ram_addr = k_q;
  end



  always_ff @(posedge clk) begin
    if (rst) begin
      active_q    <= 1'b0;
      k_q         <= '0;
      ph_q        <= PH_READY;
      kind_q      <= BB_END;
      s_q         <= '0;
      e_q         <= '0;
      tgt_q       <= '0;
      wait_q      <= 1'b0;
      restart_q   <= '0;
      error_o     <= 1'b0;
      sig_error_o <= 1'b0;
      sig_q       <= SIG_INIT;
      gold_q      <= '0;
      for (int i = 0; i < HIST_N; i++) hist_q[i] <= SIG_INIT;
      err_pc_o    <= '0;
      reexec_o    <= 1'b0;
      reexec_pc_o <= '0;
    end else begin
      active_q  <= active_d;
      k_q       <= k_d;
      ph_q      <= ph_d;
      wait_q    <= wait_d;
      restart_q <= restart_d;
      sig_q <= sig_d;
      if (upd) begin
        hist_q[0] <= sig_q;
        for (int i = 1; i < HIST_N; i++) hist_q[i] <= hist_q[i-1];
      end
      if (ph_q == PH_CUR) begin
        gold_q <= gold_cur;
        kind_q <= kind_cur;
        s_q    <= s_cur;
        e_q    <= e_cur;
      end
      if (ph_q == PH_TGT) tgt_q <= tgt_cur;
      error_o     <= err;
      sig_error_o <= sig_err;
      reexec_o    <= REEXEC && err;
      if (err || sig_err) err_pc_o <= pc_n;
      if (err)            reexec_pc_o <= restart_pc;
    end
  end

  assign active_o = active_q;
  assign block_o  = k_q;

endmodule
