// tb_cf_checker: the checker unit with its memories, return stack and APB
// port, in two configurations sharing one APB bus (both receive the writes):
//  - version C (return stack, re-execution) without delay slots, loaded over
//    APB (trap table base included) and run against the CPU model with
//    fault injection and traps;
//  - version A (neither) driven with directed pairs: a wrong branch target
//    is reported without a restart request, and a return leaves the checked
//    region instead of being checked.
module tb_cf_checker;
  import cf_pkg::*;
  import cf_tb_pkg::*;

  localparam int ADDR_W = 30, ENTRIES = 512, D = 0;
  localparam int IDX_W = $clog2(ENTRIES), PA_W = IDX_W + 4;

  logic clk = 0, rst = 1, run = 0;
  always #5 clk = ~clk;

  logic              psel, penable, pwrite, pready, pslverr, a_pready, a_pslverr;
  logic [PA_W-1:0]   paddr;
  logic [31:0]       pwdata, prdata, a_prdata;
  // version C
  logic              pc_valid, error_o, reexec_o, active_o;
  logic [ADDR_W-1:0] pc_n, pc_n1, err_pc_o, reexec_pc_o;
  cf_err_e           err_cause_o;
  // version A
  logic              a_valid, a_error, a_reexec, a_active;
  logic [ADDR_W-1:0] a_pc_n, a_pc_n1, a_err_pc, a_reexec_pc;
  cf_err_e           a_cause;

  cf_checker #(.DELAY_SLOTS(D)) dut_c (.*);

  cf_checker #(.DELAY_SLOTS(D), .RETURN_STACK(1'b0), .REEXEC(1'b0)) dut_a (
    .clk, .rst, .pc_valid(a_valid), .pc_n(a_pc_n), .pc_n1(a_pc_n1),
    .error_o(a_error), .err_cause_o(a_cause), .err_pc_o(a_err_pc), .reexec_o(a_reexec),
    .reexec_pc_o(a_reexec_pc), .active_o(a_active),
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata(a_prdata), .pready(a_pready),
    .pslverr(a_pslverr));

  logic done;
  int m_checks, m_fail, n_faults, n_det, n_pairs, n_stalls, n_taken, n_nt, n_jmp, n_call, n_ret,
      n_uf, n_reexec, n_wp, n_rs, n_traps, n_trets;
  cpu_pc_model #(.ADDR_W(ADDR_W), .D(D), .INJECT_PCT(5), .ROUNDS(20), .SEED(7), .TRAP_PCT(3),
                 .TRAP_BASE('h4000)) cpu (
    .clk, .rst(!run), .pc_valid, .pc_n, .pc_n1, .stall(1'b0), .chk_active(active_o),
    .error(error_o), .err_pc(err_pc_o), .reexec(reexec_o), .reexec_pc(reexec_pc_o), .done,
    .checks(m_checks), .failures(m_fail), .n_faults, .n_detected(n_det), .n_pairs, .n_stalls,
    .n_taken, .n_nottaken(n_nt), .n_jumps(n_jmp), .n_calls(n_call), .n_rets(n_ret), .n_uf,
    .n_reexec, .n_wrong_path(n_wp), .n_restart_ok(n_rs), .n_traps, .n_trap_rets(n_trets));

  int checks = 0, failures = 0;

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
  endtask

  // one directed pair into version A; its verdict is checked a cycle later
  task automatic pair_a(input int a, input int b, input bit exp_err);
    @(negedge clk);
    a_valid = 1; a_pc_n = ADDR_W'(a); a_pc_n1 = ADDR_W'(b);
    @(negedge clk);
    a_valid = 0;
    check(a_error == exp_err, $sformatf("version A verdict for %h->%h", a, b));
    check(!a_reexec, "version A never requests a restart");
    if (exp_err) check(a_cause == ERR_TARGET && a_err_pc == ADDR_W'(a), "version A error cause/address");
  endtask

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
    psel = 0; penable = 0; pwrite = 0; paddr = '0; pwdata = '0;
    a_valid = 0; a_pc_n = '0; a_pc_n1 = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    apb_write(3, 3, 32'h4000);   // TRAPBASE
    foreach (p.cfi[i]) begin
      apb_write(0, i, 32'(p.cfi[i].from));
      apb_write(1, i, 32'(p.cfi[i].to));
      apb_write(2, i, 32'((p.cfi[i].kind << IDX_W) | p.cfi[i].next));
    end
    // version A, directed (addresses of program 1 and 2 with no delay slot)
    pair_a('h100, 'h101, 0);  check(a_active, "version A activated at start address");
    pair_a('h101, 'h102, 0);
    pair_a('h102, 'h103, 0);
    pair_a('h103, 'h104, 0);  // A not taken
    pair_a('h104, 'h105, 0);
    pair_a('h105, 'h125, 1);  // B to a wrong target
    pair_a('h105, 'h109, 0);  // B taken
    pair_a('h109, 'h102, 0);  // C
    pair_a('h102, 'h103, 0);
    pair_a('h103, 'h10a, 0);  // A taken
    pair_a('h10a, 'h10b, 0);
    pair_a('h10b, 'h10c, 0);
    pair_a('h10c, 'h10d, 0);  check(!a_active, "version A deactivated at end address");
    pair_a('h10d, 'h200, 0);  // unchecked jump
    pair_a('h200, 'h201, 0);
    pair_a('h201, 'h202, 0);
    pair_a('h202, 'h203, 0);
    pair_a('h203, 'h300, 0);  // call, nothing pushed
    pair_a('h300, 'h301, 0);
    pair_a('h301, 'h310, 0);
    pair_a('h310, 'h311, 0);
    pair_a('h311, 'h302, 0);  check(!a_active, "version A leaves checking at a return");
    pair_a('h302, 'h377, 0);  // unchecked
    // version C against the CPU model
    @(negedge clk);
    run = 1;
    wait (done);
    check(n_faults > 10 && n_det == n_faults, "faults injected and all detected");
    check(n_call > 0 && n_ret > 0 && n_uf > 0 && n_reexec > 0 && n_rs == n_reexec,
          "calls, returns, underflow and correct restarts occurred");
    check(n_traps > 0 && n_trets > 0, "traps taken and checked jumps back");
    $display("%0d pairs, %0d faults, %0d detected", n_pairs, n_faults, n_det);
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks, failures + m_fail);
    $finish;
  end
endmodule
