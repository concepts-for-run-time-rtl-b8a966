// cf_checker: control flow checker unit for the CFI method (version C).
//
// Attached beside the first pipeline stages of a RISC CPU, it watches the
// address pair (PC_n, PC_n+1) of decode and fetch and checks every direct
// branch, jump and call and every return against a table of the program's
// control flow instructions built offline from the unmodified binary. The
// table sits in three memories addressed by the checker program counter
// (CUPC): sAdrRam holds each CFI's address, jAdrRam its target and ctrlRam
// its kind and successor index. A wrong transfer raises error_o and, with
// REEXEC set, reexec_o with the address to fetch again, so the CPU can annul
// the wrong path and re-execute the CFI. A 32-entry return stack checks the
// targets of returns (RETURN_STACK). The memories can be preloaded from hex
// files (S_INIT, J_INIT, C_INIT) or written at run time over APB.
// With TRAP_CHECK a jump into the trap table (base in the APB register
// TRAPBASE, reset value TRAP_BASE) is accepted as a trap, and the jump back
// from its handler is checked against the return stack (see cf_checker_core).
//
// The three configurations of the document map to the parameters:
// version A = no return stack, no re-execution; version B = return stack;
// version C (the default) = return stack and re-execution. The memory depth
// ENTRIES defaults to 512, the smallest size the document reports.
//
// APB write data above a memory's width (bits 31:30 for the address
// memories) is ignored.
//
// Timing: see cf_checker_core (results one cycle after the pair, no stall)
// and cf_apb_if (zero-wait-state APB). Reset is synchronous, active high.
module cf_checker
  import cf_pkg::*;
#(
  parameter int unsigned ADDR_W       = 30,
  parameter int unsigned ENTRIES      = 512,
  parameter int unsigned STACK_DEPTH  = 32,
  parameter int unsigned DELAY_SLOTS  = 1,
  parameter bit          RETURN_STACK = 1'b1,
  parameter bit          REEXEC       = 1'b1,
  parameter bit          TRAP_CHECK   = 1'b1,
  parameter logic [ADDR_W-1:0] TRAP_BASE = '0,
  parameter string       S_INIT       = "",
  parameter string       J_INIT       = "",
  parameter string       C_INIT       = "",
  localparam int unsigned IDX_W       = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned CTRL_W      = CTRL_KIND_W + IDX_W,
  localparam int unsigned PA_W        = IDX_W + 4
) (
  input  logic              clk,
  input  logic              rst,
  // monitored program counters (decode and fetch stage)
  input  logic              pc_valid,
  input  logic [ADDR_W-1:0] pc_n,
  input  logic [ADDR_W-1:0] pc_n1,
  // reaction
  output logic              error_o,
  output cf_err_e           err_cause_o,
  output logic [ADDR_W-1:0] err_pc_o,
  output logic              reexec_o,
  output logic [ADDR_W-1:0] reexec_pc_o,
  output logic              active_o,
  // APB slave
  input  logic              psel,
  input  logic              penable,
  input  logic              pwrite,
  input  logic [PA_W-1:0]   paddr,
  input  logic [31:0]       pwdata,
  output logic [31:0]       prdata,
  output logic              pready,
  output logic              pslverr
);

  localparam int unsigned STK_W = ADDR_W + IDX_W;

  logic [IDX_W-1:0]  ram_addr, cupc, m_addr;
  logic [ADDR_W-1:0] from_addr, to_addr, s_rdata, j_rdata;
  logic [CTRL_W-1:0] ctrl_word, c_rdata;
  logic [31:0]       m_wdata;
  logic              s_en, j_en, c_en, m_we;
  logic              stk_push, stk_pop, stk_empty;
  logic [STK_W-1:0]  stk_push_data, stk_top;
  logic [ADDR_W-1:0] trap_base;
  logic              in_trap;

  cf_checker_core #(
    .ADDR_W(ADDR_W), .ENTRIES(ENTRIES), .DELAY_SLOTS(DELAY_SLOTS),
    .RETURN_STACK(RETURN_STACK), .REEXEC(REEXEC), .TRAP_CHECK(TRAP_CHECK)
  ) u_core (
    .clk, .rst, .pc_valid, .pc_n, .pc_n1, .trap_base,
    .ram_addr, .from_addr, .to_addr, .ctrl_word,
    .stk_push, .stk_push_data, .stk_pop, .stk_top, .stk_empty,
    .active_o, .trap_o(in_trap), .cupc_o(cupc), .error_o, .err_cause_o, .err_pc_o,
    .reexec_o, .reexec_pc_o
  );

  cf_dpram #(.DEPTH(ENTRIES), .WIDTH(ADDR_W), .INIT_FILE(S_INIT)) u_sadr_ram (
    .clk, .a_addr(ram_addr), .a_rdata(from_addr),
    .b_en(s_en), .b_we(m_we), .b_addr(m_addr), .b_wdata(m_wdata[ADDR_W-1:0]), .b_rdata(s_rdata)
  );

  cf_dpram #(.DEPTH(ENTRIES), .WIDTH(ADDR_W), .INIT_FILE(J_INIT)) u_jadr_ram (
    .clk, .a_addr(ram_addr), .a_rdata(to_addr),
    .b_en(j_en), .b_we(m_we), .b_addr(m_addr), .b_wdata(m_wdata[ADDR_W-1:0]), .b_rdata(j_rdata)
  );

  cf_dpram #(.DEPTH(ENTRIES), .WIDTH(CTRL_W), .INIT_FILE(C_INIT)) u_ctrl_ram (
    .clk, .a_addr(ram_addr), .a_rdata(ctrl_word),
    .b_en(c_en), .b_we(m_we), .b_addr(m_addr), .b_wdata(m_wdata[CTRL_W-1:0]), .b_rdata(c_rdata)
  );

  if (RETURN_STACK) begin : g_stack
    cf_return_stack #(.DEPTH(STACK_DEPTH), .WIDTH(STK_W)) u_stack (
      .clk, .rst, .push(stk_push), .push_data(stk_push_data), .pop(stk_pop),
      .top(stk_top), .empty(stk_empty)
    );
  end else begin : g_no_stack
    assign stk_top   = '0;
    assign stk_empty = 1'b1;
  end

  cf_apb_if #(.ADDR_W(ADDR_W), .ENTRIES(ENTRIES), .TRAP_BASE(TRAP_BASE)) u_apb (
    .clk, .rst, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .m_addr, .m_wdata, .s_en, .j_en, .c_en, .m_we,
    .s_rdata, .j_rdata, .c_rdata,
    .active(active_o), .in_trap, .error(error_o), .err_pc(err_pc_o), .cupc,
    .trap_base
  );

endmodule
