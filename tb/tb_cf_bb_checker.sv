// tb_cf_bb_checker: the CF-method (basic block) checker without delay slots,
// its table written through the load port and read back, then watching the
// CPU model run the example loop for many rounds with fault injection. The
// loop contains a one-instruction block (the loop-back jump), so the checker
// must stall: every stall must last exactly one cycle, occur only at the
// end of that block, and the number of stalls must equal the number of times
// the block was entered with no bubble in between. Its instruction words are
// intact, so no signature error may occur, restarts included.
// A second checker instance (dut_s) watches a second CPU model without
// address faults while the bench flips a bit of the instruction word on
// random accepted pairs: exactly the blocks that contained a flipped word
// must raise sig_error_o at their last pair, one cycle later.
module tb_cf_bb_checker;
  import cf_pkg::*;
  import cf_tb_pkg::*;

  localparam int ADDR_W = 30, BLOCKS = 512, D = 0;
  localparam int IDX_W = $clog2(BLOCKS), WORD_W = 16 + 2 + IDX_W + ADDR_W;

  logic clk = 0, rst = 1, run = 0;
  always #5 clk = ~clk;

  logic              enable, pc_valid, stall_o, cfg_we, active_o, error_o, reexec_o;
  logic [ADDR_W-1:0] seg_start, pc_n, pc_n1, err_pc_o, reexec_pc_o;
  logic [IDX_W-1:0]  cfg_addr, block_o;
  logic [WORD_W-1:0] cfg_wdata, cfg_rdata;
  logic [31:0]       instr;
  logic              sig_error_o;

  assign instr = 32'(instr_word(int'(pc_n)));
  cf_bb_checker #(.DELAY_SLOTS(D)) dut (.*);

  // second instance: instruction word corruption
  logic              s_valid, s_stall, s_active, s_error, s_reexec, s_sig_error, s_done, s_flip;
  logic [ADDR_W-1:0] s_pc_n, s_pc_n1, s_err_pc, s_reexec_pc;
  logic [IDX_W-1:0]  s_block;
  logic [WORD_W-1:0] s_rdata;
  logic [31:0]       s_instr;
  int                s_checks, s_fail, s_flip_bit, s_dummy[14];

  assign s_instr = 32'(instr_word(int'(s_pc_n))) ^ (s_flip ? (32'd1 << s_flip_bit) : 32'd0);
  cf_bb_checker #(.DELAY_SLOTS(D)) dut_s (
    .clk, .rst, .enable, .seg_start, .pc_valid(s_valid), .pc_n(s_pc_n), .pc_n1(s_pc_n1),
    .instr(s_instr), .stall_o(s_stall), .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata(s_rdata),
    .active_o(s_active), .block_o(s_block), .error_o(s_error), .err_pc_o(s_err_pc),
    .reexec_o(s_reexec), .reexec_pc_o(s_reexec_pc), .sig_error_o(s_sig_error));
  cpu_pc_model #(.ADDR_W(ADDR_W), .D(D), .INJECT_PCT(0), .ROUNDS(40), .SEED(9)) cpu_s (
    .clk, .rst(!run), .pc_valid(s_valid), .pc_n(s_pc_n), .pc_n1(s_pc_n1), .stall(s_stall),
    .chk_active(s_active), .error(s_error), .err_pc(s_err_pc), .reexec(s_reexec),
    .reexec_pc(s_reexec_pc), .done(s_done), .checks(s_checks), .failures(s_fail),
    .n_faults(s_dummy[0]), .n_detected(s_dummy[1]), .n_pairs(s_dummy[2]), .n_stalls(s_dummy[3]),
    .n_taken(s_dummy[4]), .n_nottaken(s_dummy[5]), .n_jumps(s_dummy[6]), .n_calls(s_dummy[7]),
    .n_rets(s_dummy[8]), .n_uf(s_dummy[9]), .n_reexec(s_dummy[10]), .n_wrong_path(s_dummy[11]),
    .n_restart_ok(s_dummy[12]), .n_traps(s_dummy[13]), .n_trap_rets());

  logic done;
  int m_checks, m_fail, n_faults, n_det, n_pairs, n_stalls, n_taken, n_nt, n_jmp, n_call, n_ret,
      n_uf, n_reexec, n_wp, n_rs;
  int n_traps_unused, n_trets_unused;   // no traps in this bench
  cpu_pc_model #(.ADDR_W(ADDR_W), .D(D), .INJECT_PCT(5), .ROUNDS(40), .SEED(3)) cpu (
    .clk, .rst(!run), .pc_valid, .pc_n, .pc_n1, .stall(stall_o), .chk_active(active_o),
    .error(error_o), .err_pc(err_pc_o), .reexec(reexec_o), .reexec_pc(reexec_pc_o), .done,
    .checks(m_checks), .failures(m_fail), .n_faults, .n_detected(n_det), .n_pairs, .n_stalls,
    .n_taken, .n_nottaken(n_nt), .n_jumps(n_jmp), .n_calls(n_call), .n_rets(n_ret), .n_uf,
    .n_reexec, .n_wrong_path(n_wp), .n_restart_ok(n_rs), .n_traps(n_traps_unused),
    .n_trap_rets(n_trets_unused));

  int checks = 0, failures = 0, stall_run = 0, n_stall_cycles = 0;
  int n_flips = 0, n_sig_err = 0, n_sig_ok = 0;
  bit blk_bad = 0, exp_sig = 0, is_end;
  cf_prog p;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // signature expectations of dut_s, judged one cycle after each pair
  always @(posedge clk) begin
    if (run) begin
      check(s_sig_error == exp_sig, $sformatf("signature error %0b, expected %0b", s_sig_error, exp_sig));
      if (s_sig_error) n_sig_err++;
      exp_sig = 0;
      if (s_valid && !s_stall && (s_active || (enable && s_pc_n == seg_start))) begin
        if (s_flip) begin blk_bad = 1; n_flips++; end
        is_end = 0;
        foreach (p.bb[i]) if (s_pc_n == ADDR_W'(p.bb[i].e)) is_end = 1;
        if (is_end) begin
          exp_sig = blk_bad;
          if (!blk_bad) n_sig_ok++;
          blk_bad = 0;
        end
      end
    end
    if (!rst) check(!sig_error_o, "no signature error with intact instruction words");
  end

  always @(negedge clk) begin
    s_flip     <= ($urandom_range(0, 99) < 3);
    s_flip_bit <= $urandom_range(0, 31);
  end

  always @(posedge clk) begin
    if (stall_o) begin
      n_stall_cycles++;
      stall_run++;
      check(stall_run == 1, "a stall lasts one cycle");
      check(pc_n == ADDR_W'(p.bb[4].e), "stall only at the end of the one-instruction block");
    end else begin
      stall_run = 0;
    end
  end

  initial begin
    #(1000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks + s_checks, failures + m_fail + s_fail);
    $finish;
  end

  initial begin
    p = new;
    p.build(D);
    enable = 0; seg_start = '0; cfg_we = 0; cfg_addr = '0; cfg_wdata = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (p.bb[i]) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = IDX_W'(i);
      cfg_wdata = {16'(p.bb[i].sig), 2'(p.bb[i].kind), IDX_W'(p.bb[i].succ), ADDR_W'(p.bb[i].e)};
    end
    @(negedge clk);
    cfg_we = 0;
    foreach (p.bb[i]) begin
      cfg_addr = IDX_W'(i);
      @(negedge clk);
      check(cfg_rdata == {16'(p.bb[i].sig), 2'(p.bb[i].kind), IDX_W'(p.bb[i].succ), ADDR_W'(p.bb[i].e)},
            "table read back");
    end
    seg_start = ADDR_W'(p.seg_start);
    enable = 1;
    @(negedge clk);
    run = 1;
    wait (done && s_done);
    check(n_faults > 10 && n_det == n_faults, "faults injected and all detected");
    check(n_stalls > 0 && n_stalls == n_stall_cycles, "stalls seen by the CPU model");
    check(n_reexec > 0 && n_rs == n_reexec, "restarts at the right instruction");
    check(n_flips > 0 && n_sig_err > 0 && n_sig_ok > 0, "blocks with and without flipped words");
    $display("%0d pairs, %0d faults, %0d detected, %0d stalls", n_pairs, n_faults, n_det, n_stalls);
    $display("%0d flipped instruction words, %0d signature errors, %0d intact blocks passed",
             n_flips, n_sig_err, n_sig_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks + s_checks, failures + m_fail + s_fail);
    $finish;
  end
endmodule
