// tb_cf_apb_if: the APB slave with three bench memories behind its memory
// port. Random APB writes and reads to the three memory regions are checked
// against a reference; register reads return the status inputs; the sticky
// error flag is set by an error pulse and cleared by writing 1; the trap
// flag shows in STATUS; TRAPBASE resets to its parameter and is written and
// read back; no memory
// is enabled by a register access; every transfer completes without wait
// states and without PSLVERR.
module tb_cf_apb_if;
  localparam int ADDR_W = 30, ENTRIES = 16, IDX_W = 4, CTRL_W = 3 + IDX_W, PA_W = IDX_W + 4;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic              psel, penable, pwrite, pready, pslverr, s_en, j_en, c_en, m_we;
  logic [PA_W-1:0]   paddr;
  logic [31:0]       pwdata, prdata, m_wdata;
  logic [IDX_W-1:0]  m_addr, cupc;
  logic [ADDR_W-1:0] s_rdata, j_rdata, err_pc;
  logic [CTRL_W-1:0] c_rdata;
  logic              active, error, in_trap;
  logic [ADDR_W-1:0] trap_base;

  cf_apb_if #(.ADDR_W(ADDR_W), .ENTRIES(ENTRIES), .TRAP_BASE(30'h100)) dut (.*);

  logic [ADDR_W-1:0] smem [ENTRIES], jmem [ENTRIES];
  logic [CTRL_W-1:0] cmem [ENTRIES];
  logic [31:0]       ref_mem [3][ENTRIES];

  always @(posedge clk) begin
    if (s_en) begin if (m_we) smem[m_addr] <= m_wdata[ADDR_W-1:0]; s_rdata <= smem[m_addr]; end
    if (j_en) begin if (m_we) jmem[m_addr] <= m_wdata[ADDR_W-1:0]; j_rdata <= jmem[m_addr]; end
    if (c_en) begin if (m_we) cmem[m_addr] <= m_wdata[CTRL_W-1:0]; c_rdata <= cmem[m_addr]; end
  end

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic apb(input bit wr, input int region, input int idx, input logic [31:0] wd,
                     output logic [31:0] rd);
    @(negedge clk);
    psel = 1; penable = 0; pwrite = wr; paddr = PA_W'((region << (IDX_W + 2)) | (idx << 2)); pwdata = wd;
    #1;
    check((int'(s_en) + int'(j_en) + int'(c_en)) == ((region < 3 && !wr) ? 1 : 0), "memory enables in setup phase");
    @(negedge clk);
    penable = 1;
    #1;
    check((int'(s_en) + int'(j_en) + int'(c_en)) == ((region < 3 && wr) ? 1 : 0), "memory enables in access phase");
    @(posedge clk);
    rd = prdata;
    check(pready && !pslverr, "zero wait states, no error");
    @(negedge clk);
    psel = 0; penable = 0; pwrite = 0;
  endtask

  initial begin
    #(200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    psel = 0; penable = 0; pwrite = 0; paddr = '0; pwdata = '0;
    active = 0; error = 0; err_pc = '0; cupc = '0; in_trap = 0;
    for (int i = 0; i < ENTRIES; i++) begin
      smem[i] = '0; jmem[i] = '0; cmem[i] = '0;
      for (int r = 0; r < 3; r++) ref_mem[r][i] = '0;
    end
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      int r, i;
      logic [31:0] d;
      r = $urandom_range(0, 2);
      i = $urandom_range(0, ENTRIES - 1);
      d = $urandom;
      if ($urandom_range(0, 1) == 0) begin
        apb(1, r, i, d, rd);
        ref_mem[r][i] = d & ((r == 2) ? 32'((1 << CTRL_W) - 1) : 32'((1 << ADDR_W) - 1));
      end else begin
        apb(0, r, i, 0, rd);
        check(rd == ref_mem[r][i], $sformatf("read region %0d index %0d: %h exp %h", r, i, rd, ref_mem[r][i]));
      end
    end
    // registers
    active = 1; err_pc = 30'h1234567; cupc = 4'd9;
    apb(0, 3, 0, 0, rd); check(rd == 32'h1, "STATUS: active, no error");
    @(negedge clk); error = 1; @(negedge clk); error = 0;
    apb(0, 3, 0, 0, rd); check(rd == 32'h3, "STATUS: error flag set by pulse");
    apb(1, 3, 0, 32'h0, rd);
    apb(0, 3, 0, 0, rd); check(rd == 32'h3, "STATUS: writing 0 keeps the flag");
    apb(1, 3, 0, 32'h2, rd);
    apb(0, 3, 0, 0, rd); check(rd == 32'h1, "STATUS: writing 1 clears the flag");
    apb(0, 3, 1, 0, rd); check(rd == 32'h1234567, "ERRPC");
    apb(0, 3, 2, 0, rd); check(rd == 32'd9, "CUPC");
    in_trap = 1;
    apb(0, 3, 0, 0, rd); check(rd == 32'h5, "STATUS: trap flag");
    in_trap = 0;
    apb(0, 3, 3, 0, rd); check(rd == 32'h100 && trap_base == 30'h100, "TRAPBASE after reset");
    apb(1, 3, 3, 32'hFFFF_1234, rd);
    check(trap_base == 30'h3FFF_1234, "TRAPBASE written");
    apb(0, 3, 3, 0, rd); check(rd == 32'h3FFF_1234, "TRAPBASE read back");
    apb(0, 3, 1, 0, rd); check(rd == 32'h1234567, "ERRPC unchanged by TRAPBASE write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
