// tb_cf_checker_sizes: the checker unit (version C, one delay slot) at the
// larger checker memory sizes of the overhead comparison: 1024, 2048 and
// 4096 entries. Each size gets its own checker, APB master and CPU model
// with fault injection and traps. The test programs' table is loaded over
// APB at the top of each memory: entry 0 (the first checking start) stays
// at index 0 and entries 1..n move to ENTRIES-16+1..n, so the upper index
// bits of the CUPC, the return stack entries and the APB address decode
// are all used. The CPU models check every verdict; this bench checks that
// every size ran its programs and detected every injected fault.
module tb_cf_checker_sizes;
  import cf_pkg::*;
  import cf_tb_pkg::*;

  localparam int ADDR_W = 30, D = 1, N = 3;
  localparam int SIZES [N] = '{1024, 2048, 4096};

  logic clk = 0, rst = 1, run = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int m_checks [N], m_fail [N], n_faults [N], n_det [N], n_pairs [N], n_traps [N];
  logic done [N];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int total_checks();
    int s = checks;
    for (int i = 0; i < N; i++) s += m_checks[i];
    return s;
  endfunction

  function automatic int total_failures();
    int s = failures;
    for (int i = 0; i < N; i++) s += m_fail[i];
    return s;
  endfunction

  for (genvar g = 0; g < N; g++) begin : g_size
    localparam int ENTRIES = SIZES[g];
    localparam int IDX_W = $clog2(ENTRIES), PA_W = IDX_W + 4;

    logic              psel, penable, pwrite, pready, pslverr;
    logic [PA_W-1:0]   paddr;
    logic [31:0]       pwdata, prdata;
    logic              pc_valid, error_o, reexec_o, active_o;
    logic [ADDR_W-1:0] pc_n, pc_n1, err_pc_o, reexec_pc_o;
    cf_err_e           err_cause_o;
    int                u [13];
    bit                loaded = 0;

    cf_checker #(.ENTRIES(ENTRIES), .DELAY_SLOTS(D)) dut (
      .clk, .rst, .pc_valid, .pc_n, .pc_n1, .error_o, .err_cause_o, .err_pc_o, .reexec_o,
      .reexec_pc_o, .active_o, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready,
      .pslverr);

    cpu_pc_model #(.ADDR_W(ADDR_W), .D(D), .INJECT_PCT(5), .ROUNDS(10), .SEED(31 + g),
                   .TRAP_PCT(2), .TRAP_BASE('h4000)) cpu (
      .clk, .rst(!run), .pc_valid, .pc_n, .pc_n1, .stall(1'b0), .chk_active(active_o),
      .error(error_o), .err_pc(err_pc_o), .reexec(reexec_o), .reexec_pc(reexec_pc_o),
      .done(done[g]), .checks(m_checks[g]), .failures(m_fail[g]), .n_faults(n_faults[g]),
      .n_detected(n_det[g]), .n_pairs(n_pairs[g]), .n_stalls(u[0]), .n_taken(u[1]),
      .n_nottaken(u[2]), .n_jumps(u[3]), .n_calls(u[4]), .n_rets(u[5]), .n_uf(u[6]),
      .n_reexec(u[7]), .n_wrong_path(u[8]), .n_restart_ok(u[9]), .n_traps(n_traps[g]),
      .n_trap_rets(u[10]));

    function automatic int place(int i);
      return (i == 0) ? 0 : ENTRIES - 16 + i;
    endfunction

    task automatic apb(input bit wr, input int region, input int idx, input logic [31:0] d,
                       output logic [31:0] rd);
      @(negedge clk);
      psel = 1; penable = 0; pwrite = wr; pwdata = d;
      paddr = PA_W'((region << (IDX_W + 2)) | (idx << 2));
      @(negedge clk);
      penable = 1;
      @(posedge clk);
      rd = prdata;
      @(negedge clk);
      psel = 0; penable = 0; pwrite = 0;
    endtask

    initial begin
      cf_prog p;
      logic [31:0] rd, ctrl;
      p = new;
      p.build(D);
      psel = 0; penable = 0; pwrite = 0; paddr = '0; pwdata = '0;
      wait (!rst);
      apb(1, 3, 3, 32'h4000, rd);
      foreach (p.cfi[i]) begin
        ctrl = 32'((p.cfi[i].kind << IDX_W) | place(p.cfi[i].next));
        apb(1, 0, place(i), 32'(p.cfi[i].from), rd);
        apb(1, 1, place(i), 32'(p.cfi[i].to), rd);
        apb(1, 2, place(i), ctrl, rd);
      end
      foreach (p.cfi[i]) begin
        ctrl = 32'((p.cfi[i].kind << IDX_W) | place(p.cfi[i].next));
        apb(0, 2, place(i), 0, rd);
        check(rd == ctrl, $sformatf("%0d entries: ctrlRam entry %0d read back", ENTRIES, place(i)));
      end
      loaded = 1;
    end
  end

  initial begin
    #(3000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures());
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wait (g_size[0].loaded && g_size[1].loaded && g_size[2].loaded);
    @(negedge clk);
    run = 1;
    wait (done[0] && done[1] && done[2]);
    for (int i = 0; i < N; i++) begin
      check(n_faults[i] > 5 && n_det[i] == n_faults[i] && n_traps[i] > 0,
            $sformatf("%0d entries: faults injected and detected, traps taken", SIZES[i]));
      $display("%0d entries: %0d pairs, %0d faults, %0d detected, %0d traps",
               SIZES[i], n_pairs[i], n_faults[i], n_det[i], n_traps[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures());
    $finish;
  end
endmodule
