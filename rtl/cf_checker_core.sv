// cf_checker_core: control flow checking logic of the CFI-method checker.
//
// The CPU presents, once per instruction leaving the decode stage, the pair
// (PC_n, PC_n+1): the address of the instruction in decode and the address
// fetched after it. The core holds the checker unit program counter (CUPC),
// which selects the memory entry of the next control flow instruction (CFI)
// to expect: its address 'from' (sAdrRam), its target 'to' (jAdrRam) and a
// control word (ctrlRam) with the entry kind and the successor index.
// Three comparisons decide every pair, as in the document's architecture:
//   a: PC_n+1 == PC_n + 1  (straight-line execution)
//   b: PC_n   == from      (the expected CFI is reached)
//   c: PC_n+1 == to        (the CFI went to its target)
// Away from the expected CFI only (a) may hold. At the expected CFI a jump or
// call needs (c); a branch needs (c), then CUPC <= successor, or (a), then
// CUPC <= CUPC + 1; a return must go to the top of the return stack and
// restores the CUPC saved by the matching call. START and END entries switch
// checking on and off at their address. Any other outcome is an error; with
// re-execution enabled the core then asks the CPU to restart fetching at the
// faulty CFI and ignores the pairs of the annulled wrong path until the
// restart address comes through decode.
//
// Traps and interrupts (TRAP_CHECK, needs the return stack): a step that is
// not straight-line and not an expected transfer but lands on a vector of
// the trap table (TRAP_VECTORS vectors of TRAP_VEC_WORDS words from
// trap_base, the SPARC layout) is accepted as a trap. Like a call, it pushes
// the displaced instruction PC_n + 1 with the current CUPC, and checking
// pauses (trap_o) while the unlisted handler runs. The first jump to the
// stacked address pops it and resumes checking where it stopped. A trap on
// the pair of an expected transfer is reported as a wrong target.
//
// Addresses are instruction word addresses (a SPARC PC without its two low
// bits), so the straight-line increment is 1. DELAY_SLOTS is the number of
// delay slot instructions after a CFI (1 on SPARC): the transfer is checked
// on the pair whose PC_n is 'from + DELAY_SLOTS'. A failed transfer is
// re-executed from its CFI ('from'); any other fault from the instruction in
// decode (PC_n). Neither pair has changed the checker state, so the checker
// needs no rollback. The CPU is expected to restore the PC/nPC state it had
// when it fetched the restart instruction. The document gives the comparators, the RAM contents,
// the CUPC update, the flags, the return stack and re-execution. The entry
// encoding, saving the CUPC on the return stack, the treatment of an empty
// stack, the delay slot handling, the wait after a restart request and the
// trap vector layout and return point are this design's choices.
//
// Timing: the memories are read synchronously at the next CUPC, so the entry
// for the next pair is ready one cycle after a CFI: checking adds no stall.
// error_o, err_cause_o, err_pc_o, reexec_o and reexec_pc_o are registered and
// appear in the cycle after the offending pair. Reset is synchronous.
module cf_checker_core
  import cf_pkg::*;
#(
  parameter int unsigned ADDR_W        = 30,
  parameter int unsigned ENTRIES       = 512,
  parameter int unsigned DELAY_SLOTS   = 1,
  parameter bit          RETURN_STACK  = 1'b1,
  parameter bit          REEXEC        = 1'b1,
  parameter bit          TRAP_CHECK    = 1'b1,
  parameter int unsigned TRAP_VECTORS  = 256,
  parameter int unsigned TRAP_VEC_WORDS = 4,
  localparam int unsigned IDX_W        = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned CTRL_W       = CTRL_KIND_W + IDX_W,
  localparam int unsigned STK_W        = ADDR_W + IDX_W
) (
  input  logic              clk,
  input  logic              rst,
  // monitored program counters
  input  logic              pc_valid,
  input  logic [ADDR_W-1:0] pc_n,
  input  logic [ADDR_W-1:0] pc_n1,
  // base word address of the trap table
  input  logic [ADDR_W-1:0] trap_base,
  // checker memories (synchronous read at ram_addr)
  output logic [IDX_W-1:0]  ram_addr,
  input  logic [ADDR_W-1:0] from_addr,
  input  logic [ADDR_W-1:0] to_addr,
  input  logic [CTRL_W-1:0] ctrl_word,
  // return stack
  output logic              stk_push,
  output logic [STK_W-1:0]  stk_push_data,
  output logic              stk_pop,
  input  logic [STK_W-1:0]  stk_top,
  input  logic              stk_empty,
  // status and reaction
  output logic              active_o,
  output logic              trap_o,
  output logic [IDX_W-1:0]  cupc_o,
  output logic              error_o,
  output cf_err_e           err_cause_o,
  output logic [ADDR_W-1:0] err_pc_o,
  output logic              reexec_o,
  output logic [ADDR_W-1:0] reexec_pc_o
);

  cfi_kind_e        kind;
  logic [IDX_W-1:0] next_idx;
  logic [IDX_W-1:0] cupc_q, cupc_d;
  logic             active_q, active_d;
  logic             wait_q, wait_d;
  logic             trap_q, trap_d;
  logic             trap_vec;
  logic [ADDR_W-1:0] trap_off;
  logic [ADDR_W-1:0] restart_q, restart_d;
  logic             cmp_a, cmp_b, cmp_c, at_flag, is_cfi, take;
  logic             err;
  logic [ADDR_W-1:0] restart_pc;
  cf_err_e          cause;
  logic [ADDR_W-1:0] ret_addr;
  logic [IDX_W-1:0]  ret_cupc;

  assign kind     = cfi_kind_e'(ctrl_word[CTRL_W-1 -: CTRL_KIND_W]);
  assign next_idx = ctrl_word[IDX_W-1:0];
  assign is_cfi   = (kind == CT_BRANCH) || (kind == CT_JUMP) ||
                    (kind == CT_CALL)   || (kind == CT_RET);
  assign {ret_addr, ret_cupc} = stk_top;

  // The three comparators.
  assign cmp_a   = (pc_n1 == pc_n + 1'b1);
  assign cmp_b   = (pc_n == from_addr + ADDR_W'(DELAY_SLOTS));
  assign cmp_c   = (pc_n1 == to_addr);
  assign at_flag = (pc_n == from_addr);   // START/END entries sit on their own address

  // PC_n+1 is the start of one of the trap table's vectors.
  localparam int unsigned VEC_LSB = (TRAP_VEC_WORDS > 1) ? $clog2(TRAP_VEC_WORDS) : 1;
  assign trap_off = pc_n1 - trap_base;
  assign trap_vec = TRAP_CHECK && RETURN_STACK &&
                    (trap_off < ADDR_W'(TRAP_VECTORS * TRAP_VEC_WORDS)) &&
                    (TRAP_VEC_WORDS == 1 || trap_off[VEC_LSB-1:0] == '0);

  // A pair is evaluated unless we are waiting for a requested restart.
  // Restart address after an error: a failed transfer is re-executed from
  // its CFI; after any other fault the instruction in decode is fetched again.
  assign restart_pc = (is_cfi && cmp_b) ? from_addr : pc_n;

  assign take = pc_valid && (!wait_q || pc_n == restart_q);

  always_comb begin
    cupc_d        = cupc_q;
    active_d      = active_q;
    wait_d        = wait_q;
    trap_d        = trap_q;
    restart_d     = restart_q;
    err           = 1'b0;
    cause         = ERR_NONE;
    stk_push      = 1'b0;
    stk_pop       = 1'b0;
    stk_push_data = {pc_n + 1'b1, cupc_q + 1'b1};
    if (take) begin
      wait_d = 1'b0;
      if (trap_q) begin
        // in a trap handler: wait for the jump back to the stacked address
        if (!stk_empty && !cmp_a && pc_n1 == ret_addr) begin
          stk_pop  = 1'b1;
          cupc_d   = ret_cupc;
          active_d = 1'b1;
          trap_d   = 1'b0;
        end
      end else if (!active_q) begin
        if (kind == CT_START && at_flag) begin
          active_d = 1'b1;
          cupc_d   = next_idx;
        end
      end else if ((kind == CT_START || kind == CT_END) && at_flag) begin
        active_d = (kind == CT_START);
        cupc_d   = next_idx;
      end else if (is_cfi && cmp_b) begin
        unique case (kind)
          CT_BRANCH: begin
            if (cmp_c)      cupc_d = next_idx;
            else if (cmp_a) cupc_d = cupc_q + 1'b1;
            else begin err = 1'b1; cause = ERR_TARGET; end
          end
          CT_JUMP: begin
            if (cmp_c) cupc_d = next_idx;
            else begin err = 1'b1; cause = ERR_TARGET; end
          end
          CT_CALL: begin
            if (cmp_c) begin
              cupc_d   = next_idx;
              stk_push = RETURN_STACK;
            end else begin
              err = 1'b1; cause = ERR_TARGET;
            end
          end
          default: begin  // CT_RET
            if (!RETURN_STACK) begin
              // without a return stack a return leaves the checked region
              active_d = 1'b0;
              cupc_d   = next_idx;
            end else if (stk_empty) begin
              err      = 1'b1;
              cause    = ERR_UNDERFLOW;
              active_d = 1'b0;
              cupc_d   = next_idx;
            end else if (pc_n1 == ret_addr) begin
              stk_pop = 1'b1;
              cupc_d  = ret_cupc;
            end else begin
              err = 1'b1; cause = ERR_TARGET;
            end
          end
        endcase
      end else if (!cmp_a) begin
        if (trap_vec) begin
          // trap or interrupt: the displaced instruction PC_n + 1 is the
          // return point; checking pauses until the handler jumps back
          stk_push      = 1'b1;
          stk_push_data = {pc_n + 1'b1, cupc_q};
          active_d      = 1'b0;
          trap_d        = 1'b1;
        end else begin
          err = 1'b1; cause = ERR_SEQ;
        end
      end
      if (REEXEC && err && cause != ERR_UNDERFLOW) begin
        wait_d    = 1'b1;
        restart_d = restart_pc;
      end
    end
  end

  assign ram_addr = cupc_d;
  assign active_o = active_q;
  assign trap_o   = trap_q;
  assign cupc_o   = cupc_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cupc_q      <= '0;
      active_q    <= 1'b0;
      wait_q      <= 1'b0;
      trap_q      <= 1'b0;
      restart_q   <= '0;
      error_o     <= 1'b0;
      err_cause_o <= ERR_NONE;
      err_pc_o    <= '0;
      reexec_o    <= 1'b0;
      reexec_pc_o <= '0;
    end else begin
      cupc_q      <= cupc_d;
      active_q    <= active_d;
      wait_q      <= wait_d;
      trap_q      <= trap_d;
      restart_q   <= restart_d;
      error_o     <= err;
      reexec_o    <= REEXEC && err && cause != ERR_UNDERFLOW;
      if (err) begin
        err_cause_o <= cause;
        err_pc_o    <= pc_n;
        reexec_pc_o <= restart_pc;
      end
    end
  end

endmodule
