// tb_cf_checker_core: the checker core alone, with its three memories
// modelled in the bench (synchronous read) and the RTL return stack, watching
// the CPU model run the test programs with one delay slot. The CPU model
// checks each pair's verdict one cycle after the pair, the error and restart
// addresses, and the underflow report; this bench also checks that the
// core's memory address follows the CUPC and that all entry kinds were used.
// The model also takes traps into a trap table at word address 0x4000; the
// bench checks that trap entries and checked jumps back occurred.
module tb_cf_checker_core;
  import cf_pkg::*;
  import cf_tb_pkg::*;

  localparam int ADDR_W = 30, ENTRIES = 512, D = 1;
  localparam int IDX_W = $clog2(ENTRIES), CTRL_W = 3 + IDX_W, STK_W = ADDR_W + IDX_W;

  logic clk = 0, rst = 1, run = 0;
  always #5 clk = ~clk;

  logic              pc_valid, stk_push, stk_pop, stk_empty, active_o, error_o, reexec_o, trap_o;
  logic [ADDR_W-1:0] trap_base;
  assign trap_base = ADDR_W'('h4000);
  logic [ADDR_W-1:0] pc_n, pc_n1, from_addr, to_addr, err_pc_o, reexec_pc_o;
  logic [IDX_W-1:0]  ram_addr, cupc_o;
  logic [CTRL_W-1:0] ctrl_word;
  logic [STK_W-1:0]  stk_push_data, stk_top;
  cf_err_e           err_cause_o;

  logic [ADDR_W-1:0] sram [ENTRIES];
  logic [ADDR_W-1:0] jram [ENTRIES];
  logic [CTRL_W-1:0] cram [ENTRIES];

  cf_checker_core #(.ADDR_W(ADDR_W), .ENTRIES(ENTRIES), .DELAY_SLOTS(D)) dut (.*);
  cf_return_stack #(.DEPTH(32), .WIDTH(STK_W)) u_stack (
    .clk, .rst, .push(stk_push), .push_data(stk_push_data), .pop(stk_pop),
    .top(stk_top), .empty(stk_empty));

  always @(posedge clk) begin
    from_addr <= sram[ram_addr];
    to_addr   <= jram[ram_addr];
    ctrl_word <= cram[ram_addr];
  end

  logic done;
  int m_checks, m_fail, n_faults, n_det, n_pairs, n_stalls, n_taken, n_nt, n_jmp, n_call, n_ret,
      n_uf, n_reexec, n_wp, n_rs, n_traps, n_trets;
  cpu_pc_model #(.ADDR_W(ADDR_W), .D(D), .INJECT_PCT(5), .ROUNDS(30), .SEED(5), .TRAP_PCT(3),
                 .TRAP_BASE('h4000)) cpu (
    .clk, .rst(!run), .pc_valid, .pc_n, .pc_n1, .stall(1'b0), .chk_active(active_o),
    .error(error_o), .err_pc(err_pc_o), .reexec(reexec_o), .reexec_pc(reexec_pc_o), .done,
    .checks(m_checks), .failures(m_fail), .n_faults, .n_detected(n_det), .n_pairs, .n_stalls,
    .n_taken, .n_nottaken(n_nt), .n_jumps(n_jmp), .n_calls(n_call), .n_rets(n_ret), .n_uf,
    .n_reexec, .n_wrong_path(n_wp), .n_restart_ok(n_rs), .n_traps, .n_trap_rets(n_trets));

  int checks = 0, failures = 0, kinds_seen[6];
  logic [IDX_W-1:0] cupc_next_q;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // the memory is always read at the CUPC of the next cycle
  always @(posedge clk) begin
    cupc_next_q <= ram_addr;
    if (run && !rst) begin
      check(cupc_o == cupc_next_q, "memory address is the next CUPC");
      if (pc_valid && int'(ctrl_word[CTRL_W-1 -: 3]) < 6)
        kinds_seen[int'(ctrl_word[CTRL_W-1 -: 3])]++;
    end
  end

  initial begin
    #(1000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks, failures + m_fail);
    $finish;
  end

  initial begin
    cf_prog p;
    p = new;
    p.build(D);
    for (int i = 0; i < ENTRIES; i++) begin sram[i] = '0; jram[i] = '0; cram[i] = '0; end
    foreach (p.cfi[i]) begin
      sram[i] = ADDR_W'(p.cfi[i].from);
      jram[i] = ADDR_W'(p.cfi[i].to);
      cram[i] = {3'(p.cfi[i].kind), IDX_W'(p.cfi[i].next)};
    end
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    run = 1;
    wait (done);
    check(n_faults > 10 && n_det == n_faults, "faults injected and all detected");
    check(n_taken > 0 && n_nt > 0 && n_call > 0 && n_ret > 0 && n_uf > 0 && n_reexec > 0,
          "branches both ways, calls, returns, underflow and restarts occurred");
    check(n_traps > 0 && n_trets > 0, "traps taken and checked jumps back");
    for (int k = 0; k < 6; k++) check(kinds_seen[k] > 0, $sformatf("entry kind %0d used", k));
    $display("%0d pairs, %0d faults, %0d detected, %0d traps, %0d checked trap returns",
             n_pairs, n_faults, n_det, n_traps, n_trets);
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks, failures + m_fail);
    $finish;
  end
endmodule
