// tb_cfc_top: end-to-end test of cfc_top, with no delay slots so that the basic block
// checker meets one-instruction blocks and its one-cycle stall.
//
// Both checkers watch their own copy of the same CPU model running the test
// programs of cf_tb_pkg for several rounds, with random bubbles and random
// corrupted fetch addresses. The CFI-method table is loaded and read back
// over APB, the basic block table through the load port. The CPU models
// check that every corrupted pair is reported with the right addresses, that
// nothing else is, and that re-execution puts the program back on track;
// the CFI-method model also takes traps into the trap table set over APB;
// the basic block checker gets each instruction's word and checks block
// signatures, and a final directed run corrupts one word;
// this bench checks the tables, the APB status registers and that every
// mechanism of the design occurred at least once.
module tb_cfc_top;
  import cf_pkg::*;
  import cf_tb_pkg::*;

  localparam int ADDR_W = 30, ENTRIES = 512, BLOCKS = 512, D = 0;
  localparam int IDX_W = $clog2(ENTRIES), PA_W = IDX_W + 4;
  localparam int BB_IDX_W = $clog2(BLOCKS), BB_WORD_W = 16 + 2 + BB_IDX_W + ADDR_W;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic                 cfi_pc_valid, bb_pc_valid, bb_stall, bb_enable, bb_cfg_we;
  logic [ADDR_W-1:0]    cfi_pc_n, cfi_pc_n1, bb_pc_n, bb_pc_n1, bb_seg_start;
  logic                 cfi_error, cfi_reexec, cfi_active, bb_active, bb_error, bb_reexec;
  cf_err_e              cfi_err_cause;
  logic [ADDR_W-1:0]    cfi_err_pc, cfi_reexec_pc, bb_err_pc, bb_reexec_pc;
  logic                 psel, penable, pwrite, pready, pslverr;
  logic [PA_W-1:0]      paddr;
  logic [31:0]          pwdata, prdata;
  logic [BB_IDX_W-1:0]  bb_cfg_addr, bb_block;
  logic [BB_WORD_W-1:0] bb_cfg_wdata, bb_cfg_rdata;

  logic [31:0]          bb_instr;
  logic                 bb_sig_error;
  // the basic block checker's pairs come from its CPU model, or from the
  // bench in the final directed signature test
  logic                 m_bb_valid, d_bb_valid, dir_mode, d_flip;
  logic [ADDR_W-1:0]    m_bb_pc_n, m_bb_pc_n1, d_bb_pc_n, d_bb_pc_n1;
  assign bb_pc_valid = dir_mode ? d_bb_valid : m_bb_valid;
  assign bb_pc_n     = dir_mode ? d_bb_pc_n  : m_bb_pc_n;
  assign bb_pc_n1    = dir_mode ? d_bb_pc_n1 : m_bb_pc_n1;
  assign bb_instr    = 32'(instr_word(int'(bb_pc_n))) ^ ((dir_mode && d_flip) ? 32'h0000_0100 : 32'h0);

  cfc_top #(.DELAY_SLOTS(0)) dut (.*);

  // ---- CPU models ----
  logic cfi_done, bb_done;
  int c_checks, c_fail, c_faults, c_det, c_pairs, c_stalls, c_taken, c_nt, c_jmp, c_call, c_ret,
      c_uf, c_reexec, c_wp, c_rs, c_traps, c_trets;
  int b_checks, b_fail, b_faults, b_det, b_pairs, b_stalls, b_taken, b_nt, b_jmp, b_call, b_ret,
      b_uf, b_reexec, b_wp, b_rs, b_traps, b_trets;
  logic run;
  logic bb_stall_dummy;

  cpu_pc_model #(.ADDR_W(ADDR_W), .D(D), .INJECT_PCT(4), .ROUNDS(60), .SEED(11),
                 .TRAP_PCT(2), .TRAP_BASE('h4000)) cpu_cfi (
    .clk, .rst(!run), .pc_valid(cfi_pc_valid), .pc_n(cfi_pc_n), .pc_n1(cfi_pc_n1),
    .stall(1'b0), .chk_active(cfi_active), .error(cfi_error), .err_pc(cfi_err_pc),
    .reexec(cfi_reexec), .reexec_pc(cfi_reexec_pc), .done(cfi_done),
    .checks(c_checks), .failures(c_fail), .n_faults(c_faults), .n_detected(c_det),
    .n_pairs(c_pairs), .n_stalls(c_stalls), .n_taken(c_taken), .n_nottaken(c_nt),
    .n_jumps(c_jmp), .n_calls(c_call), .n_rets(c_ret), .n_uf(c_uf), .n_reexec(c_reexec),
    .n_wrong_path(c_wp), .n_restart_ok(c_rs), .n_traps(c_traps), .n_trap_rets(c_trets));

  cpu_pc_model #(.ADDR_W(ADDR_W), .D(D), .INJECT_PCT(4), .ROUNDS(60), .SEED(23)) cpu_bb (
    .clk, .rst(!run), .pc_valid(m_bb_valid), .pc_n(m_bb_pc_n), .pc_n1(m_bb_pc_n1),
    .stall(bb_stall), .chk_active(bb_active), .error(bb_error), .err_pc(bb_err_pc),
    .reexec(bb_reexec), .reexec_pc(bb_reexec_pc), .done(bb_done),
    .checks(b_checks), .failures(b_fail), .n_faults(b_faults), .n_detected(b_det),
    .n_pairs(b_pairs), .n_stalls(b_stalls), .n_taken(b_taken), .n_nottaken(b_nt),
    .n_jumps(b_jmp), .n_calls(b_call), .n_rets(b_ret), .n_uf(b_uf), .n_reexec(b_reexec),
    .n_wrong_path(b_wp), .n_restart_ok(b_rs), .n_traps(b_traps), .n_trap_rets(b_trets));

  int checks = 0, failures = 0;
  int n_apb_wr = 0, n_apb_rd = 0, n_cfi_on = 0, n_cfi_off = 0, n_bb_on = 0, n_bb_off = 0;
  int n_err_seq = 0, n_err_tgt = 0, n_err_uf = 0, n_sig_ok = 0, n_sig_err = 0;
  bit bb_end_q = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic apb_write(input int region, input int idx, input logic [31:0] data);
    @(negedge clk);
    psel = 1; penable = 0; pwrite = 1; paddr = PA_W'((region << (IDX_W + 2)) | (idx << 2)); pwdata = data;
    @(negedge clk);
    penable = 1;
    @(negedge clk);
    psel = 0; penable = 0; pwrite = 0;
    n_apb_wr++;
  endtask

  task automatic apb_read(input int region, input int idx, output logic [31:0] data);
    @(negedge clk);
    psel = 1; penable = 0; pwrite = 0; paddr = PA_W'((region << (IDX_W + 2)) | (idx << 2));
    @(negedge clk);
    penable = 1;
    @(posedge clk);
    data = prdata;
    check(pready && !pslverr, "APB ready");
    @(negedge clk);
    psel = 0; penable = 0;
    n_apb_rd++;
  endtask

  // mechanism monitors
  logic cfi_active_q, bb_active_q;
  always @(posedge clk) begin
    cfi_active_q <= cfi_active;
    bb_active_q  <= bb_active;
    if (cfi_active && !cfi_active_q) n_cfi_on++;
    if (!cfi_active && cfi_active_q) n_cfi_off++;
    if (bb_active && !bb_active_q) n_bb_on++;
    if (!bb_active && bb_active_q) n_bb_off++;
    if (cfi_error && cfi_err_cause == ERR_SEQ) n_err_seq++;
    if (cfi_error && cfi_err_cause == ERR_TARGET) n_err_tgt++;
    if (cfi_error && cfi_err_cause == ERR_UNDERFLOW) n_err_uf++;
    // signature verdicts of the basic block checker, one cycle after the pair
    if (bb_sig_error && !rst) n_sig_err++;
    if (!rst && !dir_mode) check(!bb_sig_error, "no signature error with intact instruction words");
    if (bb_end_q && !bb_sig_error) n_sig_ok++;
    bb_end_q = 0;
    if (bb_pc_valid && !bb_stall && bb_active && !dir_mode)
      foreach (p.bb[i]) if (bb_pc_n == ADDR_W'(p.bb[i].e) && !bb_error) bb_end_q = 1;
  end

  task automatic seen(input int n, input string what);
    check(n > 0, {"mechanism never occurred: ", what});
    $display("  %-34s %0d", what, n);
  endtask

  initial begin
    #(2000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + c_checks + b_checks, failures + c_fail + b_fail);
    $finish;
  end

  cf_prog p;

  initial begin
    logic [31:0] rd;
    p = new;
    p.build(D);
    dir_mode = 0; d_bb_valid = 0; d_bb_pc_n = '0; d_bb_pc_n1 = '0; d_flip = 0;
    run = 0; psel = 0; penable = 0; pwrite = 0; paddr = '0; pwdata = '0;
    bb_enable = 0; bb_cfg_we = 0; bb_cfg_addr = '0; bb_cfg_wdata = '0; bb_seg_start = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // CFI-method table over APB
    foreach (p.cfi[i]) begin
      apb_write(0, i, 32'(p.cfi[i].from));
      apb_write(1, i, 32'(p.cfi[i].to));
      apb_write(2, i, 32'((p.cfi[i].kind << IDX_W) | p.cfi[i].next));
    end
    foreach (p.cfi[i]) begin
      apb_read(0, i, rd); check(rd == 32'(p.cfi[i].from), "sAdrRam read back");
      apb_read(1, i, rd); check(rd == 32'(p.cfi[i].to), "jAdrRam read back");
      apb_read(2, i, rd); check(rd == 32'((p.cfi[i].kind << IDX_W) | p.cfi[i].next), "ctrlRam read back");
    end
    apb_read(3, 0, rd); check(rd == 0, "status idle after reset");
    apb_read(3, 3, rd); check(rd == 0, "TRAPBASE reset value");
    apb_write(3, 3, 32'h4000);
    apb_read(3, 3, rd); check(rd == 32'h4000, "TRAPBASE written");
    // basic block table through the load port
    foreach (p.bb[i]) begin
      @(negedge clk);
      bb_cfg_we = 1; bb_cfg_addr = BB_IDX_W'(i);
      bb_cfg_wdata = {16'(p.bb[i].sig), 2'(p.bb[i].kind), BB_IDX_W'(p.bb[i].succ), ADDR_W'(p.bb[i].e)};
    end
    @(negedge clk);
    bb_cfg_we = 0;
    foreach (p.bb[i]) begin
      bb_cfg_addr = BB_IDX_W'(i);
      @(negedge clk);
      check(bb_cfg_rdata == {16'(p.bb[i].sig), 2'(p.bb[i].kind), BB_IDX_W'(p.bb[i].succ), ADDR_W'(p.bb[i].e)},
            "basic block table read back");
    end
    bb_seg_start = ADDR_W'(p.seg_start);
    bb_enable = 1;
    // run the programs
    @(negedge clk);
    run = 1;
    wait (cfi_done && bb_done);
    repeat (5) @(negedge clk);
    // directed: restart the basic block checker and run block 0 with its
    // first instruction word corrupted; the block end must report it
    dir_mode = 1;
    bb_enable = 0;
    @(negedge clk);
    bb_enable = 1;
    for (int a = p.seg_start; a <= p.bb[0].e; a++) begin
      d_bb_valid = 1; d_bb_pc_n = ADDR_W'(a); d_bb_pc_n1 = ADDR_W'(a + 1);
      d_flip = (a == p.seg_start);
      @(negedge clk);
      check(bb_sig_error == (a == p.bb[0].e), "directed: signature error exactly after the block end");
    end
    d_bb_valid = 0;
    check(bb_sig_error && bb_err_pc == ADDR_W'(p.bb[0].e) && !bb_error,
          "directed: corrupted word reported at the end of block 0");
    @(negedge clk);
    check(!bb_sig_error, "directed: one signature error");
    dir_mode = 0;
    // status registers
    apb_read(3, 0, rd); check(rd[1] == 1'b1, "error seen flag set");
    apb_read(3, 1, rd); check(rd == 32'(cfi_err_pc), "ERRPC register");
    apb_write(3, 0, 32'h2);
    apb_read(3, 0, rd); check(rd[1] == 1'b0, "error seen flag cleared");
    check(c_det == c_faults && b_det == b_faults, "every injected fault detected");
    $display("CFI-method checker (D=%0d): %0d pairs, %0d faults injected, %0d detected",
             D, c_pairs, c_faults, c_det);
    seen(n_cfi_on,  "checking start (activation)");
    seen(n_cfi_off, "checking end (deactivation)");
    seen(c_taken,   "branch taken");
    seen(c_nt,      "branch not taken");
    seen(c_jmp,     "direct jump");
    seen(c_call,    "call (return stack push)");
    seen(c_ret,     "return (return stack pop)");
    seen(n_err_seq, "error: straight-line step");
    seen(n_err_tgt, "error: wrong CFI target");
    seen(n_err_uf,  "error: return stack underflow");
    seen(c_reexec,  "re-execution");
    seen(c_traps,   "trap entry (return stack push)");
    seen(c_trets,   "checked jump back from a trap");
    seen(c_wp,      "wrong-path pair ignored");
    seen(c_rs,      "restart at the right instruction");
    seen(n_apb_wr,  "APB write");
    seen(n_apb_rd,  "APB read");
    $display("CF-method checker (D=%0d): %0d pairs, %0d faults injected, %0d detected",
             D, b_pairs, b_faults, b_det);
    seen(n_bb_on,   "bb: activation at segment start");
    seen(n_bb_off,  "bb: end block");
    seen(b_reexec,  "bb: re-execution");
    seen(n_sig_ok,  "bb: block signature matched");
    seen(n_sig_err, "bb: block signature mismatch");
    seen(b_stalls,  "bb: stall for one-instruction block");
    $display("TB_RESULT checks=%0d failures=%0d", checks + c_checks + b_checks, failures + c_fail + b_fail);
    $finish;
  end
endmodule
