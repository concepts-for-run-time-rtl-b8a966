// cpu_pc_model: behavioural model of the monitored CPU's program counter
// stream, with fault injection, for the checker testbenches.
//
// It executes a cf_tb_pkg program the way a CPU with D delay slots fetches
// it: each instruction decides the address fetched D+1 positions after it.
// Every cycle it presents the pair (PC_n, PC_n+1) of decode and fetch, holds
// the pair while 'stall' is high, and inserts random bubbles. While the
// checker is active it sometimes corrupts the fetched address (a bit flip,
// never landing on an address the program may legally go to), keeps running
// fetching straight on along the wrong path for 0-2 more pairs (pipeline
// latency), and on the
// checker's restart request rolls back to its saved state at the restart
// address, as a CPU annulling its pipeline would. A corrupted transfer of a
// CFI must be restarted at the CFI, any other corrupted pair at its PC_n. It checks that every
// corrupted pair, and nothing else, is reported one cycle later with the
// right error address and restart address, and that a return with an empty
// stack is reported without a restart. With TRAP_PCT > 0 it also takes
// traps at straight-line points: the fetch after PC_n goes to a random
// vector of the trap table at TRAP_BASE (256 vectors of 4 words), a handler
// of TRAP_LEN straight instructions runs and jumps back to the displaced
// instruction PC_n + 1; it checks that an active checker pauses during the
// handler and is active again after the jump back, with no error. It counts
// the mechanisms it has seen.
module cpu_pc_model
  import cf_tb_pkg::*;
#(
  parameter int ADDR_W     = 30,
  parameter int D          = 1,
  parameter int INJECT_PCT = 4,
  parameter int ROUNDS     = 4,
  parameter int SEED       = 1,
  parameter int TRAP_PCT   = 0,
  parameter int TRAP_BASE  = 'h4000,
  parameter int TRAP_LEN   = 3
) (
  input  logic              clk,
  input  logic              rst,
  output logic              pc_valid,
  output logic [ADDR_W-1:0] pc_n,
  output logic [ADDR_W-1:0] pc_n1,
  input  logic              stall,
  input  logic              chk_active,
  input  logic              error,
  input  logic [ADDR_W-1:0] err_pc,
  input  logic              reexec,
  input  logic [ADDR_W-1:0] reexec_pc,
  output logic              done,
  output int                checks,
  output int                failures,
  output int                n_faults,
  output int                n_detected,
  output int                n_pairs,
  output int                n_stalls,
  output int                n_taken,
  output int                n_nottaken,
  output int                n_jumps,
  output int                n_calls,
  output int                n_rets,
  output int                n_uf,
  output int                n_reexec,
  output int                n_wrong_path,
  output int                n_restart_ok,
  output int                n_traps,
  output int                n_trap_rets
);

  cf_prog  prog;
  int      q[$];
  int      stk[$];
  cpu_snap hist[$];
  int      rounds, flush_left, bubbles, noinj, fault_idx, exp_restart, exp_back, rb_addr;
  bit      rb_pending, outstanding, cur_faulty, cur_wrong, cur_uf, cur_active, stall_s;
  bit      cur_trap_in, cur_trap_out, trap_active;
  int      trap_left, th_pc, saved_q[$];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL (D=%0d) %s at %0t", D, what, $time);
    end
  endtask

  function automatic bit legal_next(int pcn, int cand);
    instr_t src;
    src = prog.get(pcn - D);
    if (cand == pcn + 1) return 1;
    if (src.op inside {OP_BR, OP_JMP, OP_CALL} && cand == src.target) return 1;
    return 0;
  endfunction

  initial begin
    void'($urandom(SEED));
    prog = new;
    prog.build(D);
  end

  always @(posedge clk) stall_s <= stall;

  always @(negedge clk) begin
    if (rst) begin
      q.delete(); stk.delete(); hist.delete();
      for (int i = 0; i <= D; i++) q.push_back(prog.first_pc + i);
      rounds = 0; flush_left = 0; bubbles = 0; noinj = 0; rb_pending = 0; outstanding = 0;
      cur_faulty = 0; cur_wrong = 0; cur_uf = 0; cur_active = 0;
      cur_trap_in = 0; cur_trap_out = 0; trap_active = 0; trap_left = 0; th_pc = 0;
      saved_q.delete(); n_traps = 0; n_trap_rets = 0;
      pc_valid <= 0; pc_n <= '0; pc_n1 <= '0; done <= 0;
      checks = 0; failures = 0; n_faults = 0; n_detected = 0; n_pairs = 0; n_stalls = 0;
      n_taken = 0; n_nottaken = 0; n_jumps = 0; n_calls = 0; n_rets = 0; n_uf = 0;
      n_reexec = 0; n_wrong_path = 0; n_restart_ok = 0;
    end else begin
      bit consumed;
      consumed = pc_valid && !stall_s;
      if (pc_valid && stall_s) begin
        n_stalls++;
        check(!error, "no error while stalled");
      end else if (!pc_valid) begin
        check(!error, "no error without a pair");
      end
      if (consumed) begin
        bit exp_err;
        n_pairs++;
        if (cur_wrong) n_wrong_path++;
        exp_err = cur_faulty || (cur_uf && cur_active);
        check(error == exp_err, $sformatf("error=%0b expected %0b for pair %h->%h",
                                          error, exp_err, pc_n, pc_n1));
        if (cur_trap_in && cur_active) check(!chk_active, "checking pauses in a trap handler");
        if (cur_trap_out && trap_active) begin
          check(chk_active, "checking resumes after the jump back from a trap");
          if (chk_active) n_trap_rets++;
        end
        if (cur_faulty) begin
          if (error) n_detected++;
          check(err_pc == ADDR_W'(pc_n), "error address");
          check(reexec && reexec_pc == ADDR_W'(exp_restart),
                $sformatf("restart request %0b at %h, expected %h", reexec, reexec_pc, exp_restart));
          if (reexec) begin
            n_reexec++;
            rb_pending = 1;
            rb_addr    = int'(reexec_pc);
            flush_left = $urandom_range(0, 2);
          end
        end else begin
          if (exp_err && error) n_uf++;
          check(!reexec, "no restart request");
        end
      end
      if (consumed || !pc_valid) begin
        instr_t ins;
        int     nxt;
        if (rb_pending && flush_left == 0) begin
          int idx;
          idx = -1;
          for (int i = fault_idx; i >= 0; i--)
            if (hist[i].q[0] == rb_addr) begin idx = i; break; end
          check(idx == fault_idx - exp_back, "restart at the faulty CFI or at PC_n");
          if (idx == fault_idx - exp_back) n_restart_ok++;
          if (idx < 0) idx = fault_idx;
          q = hist[idx].q;
          stk = hist[idx].stk;
          while (hist.size() > idx) void'(hist.pop_back());
          rb_pending = 0; outstanding = 0;
          bubbles = $urandom_range(0, 2);
          noinj = D + 1;
        end
        if (bubbles > 0 || done) begin
          if (bubbles > 0) bubbles--;
          pc_valid <= 0;
        end else if ($urandom_range(0, 9) == 0 && !rb_pending) begin
          pc_valid <= 0;  // random pipeline bubble
        end else if (trap_left > 0) begin
          // inside the trap handler: straight-line code, then the jump back
          cur_faulty = 0; cur_wrong = 0; cur_uf = 0; cur_trap_in = 0;
          cur_active = chk_active;
          pc_n <= ADDR_W'(th_pc);
          if (trap_left == 1) begin
            pc_n1 <= ADDR_W'(saved_q[0]);
            q = saved_q;
            hist.delete();
            noinj = D + 2;
            cur_trap_out = 1;
          end else begin
            pc_n1 <= ADDR_W'(th_pc + 1);
            cur_trap_out = 0;
          end
          th_pc++;
          trap_left--;
          pc_valid <= 1;
        end else begin
          cpu_snap s;
          s = new;
          s.q = q;
          s.stk = stk;
          ins = prog.get(q[0]);
          if (ins.op == OP_LOOP && !rb_pending) rounds++;
          if (ins.op == OP_LOOP && rounds >= ROUNDS) begin
            done <= 1;
            pc_valid <= 0;
          end else begin
            hist.push_back(s);
            // the wrong path after a corrupted fetch is fetched straight on
            if (rb_pending) ins.op = OP_NOP;
            unique case (ins.op)
              OP_BR: begin
                if ($urandom_range(0, 99) < ins.prob) begin
                  nxt = ins.target; if (!rb_pending) n_taken++;
                end else begin
                  nxt = q[$] + 1;   if (!rb_pending) n_nottaken++;
                end
              end
              OP_JMP, OP_LOOP: begin nxt = ins.target; if (!rb_pending) n_jumps++; end
              OP_CALL: begin
                stk.push_back(q[0] + 1 + D);
                nxt = ins.target;
                if (!rb_pending) n_calls++;
              end
              OP_RET: begin
                if (stk.size() > 0) nxt = stk.pop_back();
                else nxt = ins.target;
                if (!rb_pending) n_rets++;
              end
              default: nxt = q[$] + 1;
            endcase
            q.push_back(nxt);
            cur_uf     = prog.get(q[0]).uf;
            cur_active = chk_active;
            cur_faulty = 0;
            cur_trap_in = 0;
            cur_trap_out = 0;
            cur_wrong  = rb_pending;
            begin
              int pn, pn1;
              instr_t here, src_ins;
              pn  = q[0];
              void'(q.pop_front());
              pn1 = q[0];
              here = prog.get(pn);
              src_ins = prog.get(pn - D);
              if (rb_pending) begin
                flush_left--;
              end else if (noinj > 0) begin
                noinj--;
              end else if (TRAP_PCT > 0 && !outstanding && pn1 == pn + 1 && !here.start &&
                           !here.stop && !here.uf && src_ins.op == OP_NOP &&
                           int'($urandom_range(0, 99)) < TRAP_PCT) begin
                // trap or interrupt: fetch from a trap vector instead of pn1
                saved_q     = q;
                th_pc       = TRAP_BASE + 4 * $urandom_range(0, 255);
                pn1         = th_pc;
                trap_left   = TRAP_LEN;
                trap_active = chk_active;
                cur_trap_in = 1;
                n_traps++;
              end else if (!outstanding && hist.size() > D && chk_active && !here.start &&
                           !here.stop && !here.uf && int'($urandom_range(0, 99)) < INJECT_PCT) begin
                int corr;
                do corr = pn1 ^ (1 << $urandom_range(3, 7));
                // the short wrong path (corr .. corr+3) must not pass the restart address
                while (legal_next(pn, corr) || corr == pn1 || (corr <= pn && corr + 3 >= pn - D));
                q[0] = corr;
                pn1 = corr;
                cur_faulty = 1;
                outstanding = 1;
                n_faults++;
                fault_idx = hist.size() - 1;
                // a failed transfer restarts at its CFI, anything else at PC_n
                src_ins     = prog.get(pn - D);
                exp_back    = (src_ins.op inside {OP_BR, OP_JMP, OP_CALL, OP_RET}) ? D : 0;
                exp_restart = hist[fault_idx - exp_back].q[0];
              end
              pc_n  <= ADDR_W'(pn);
              pc_n1 <= ADDR_W'(pn1);
            end
            pc_valid <= 1;
            if (hist.size() > 256) begin
              void'(hist.pop_front());
              fault_idx--;
            end
          end
        end
      end
    end
  end

endmodule
