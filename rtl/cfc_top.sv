// cfc_top: the two control flow checker architectures side by side.
//
// The CFI-method checker unit (cf_checker, configured as version C: return
// stack and re-execution) is the main design; the CF-method basic block
// checker (cf_bb_checker) is the second architecture for the same task. They
// are alternatives, not parts of one system, so each has its own monitored
// program counter inputs, its own reaction outputs and its own table access:
// APB for the CFI checker, a plain load port for the basic block checker.
// Both expect the same kind of CPU interface: the (PC_n, PC_n+1) pair of the
// decode and fetch stages as instruction word addresses, and a restart
// request to annul the wrong path and fetch again. The basic block checker
// also takes the instruction word in decode (bb_instr) for its per-block
// signature check.
module cfc_top
  import cf_pkg::*;
#(
  parameter int unsigned ADDR_W      = 30,
  parameter int unsigned ENTRIES     = 512,
  parameter int unsigned STACK_DEPTH = 32,
  parameter int unsigned BLOCKS      = 512,
  parameter int unsigned DELAY_SLOTS = 1,
  localparam int unsigned IDX_W      = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned PA_W       = IDX_W + 4,
  localparam int unsigned BB_IDX_W   = (BLOCKS > 1) ? $clog2(BLOCKS) : 1,
  localparam int unsigned BB_WORD_W  = SIG_W + 2 + BB_IDX_W + ADDR_W
) (
  input  logic                 clk,
  input  logic                 rst,
  // ---- CFI-method checker unit ----
  input  logic                 cfi_pc_valid,
  input  logic [ADDR_W-1:0]    cfi_pc_n,
  input  logic [ADDR_W-1:0]    cfi_pc_n1,
  output logic                 cfi_error,
  output cf_err_e              cfi_err_cause,
  output logic [ADDR_W-1:0]    cfi_err_pc,
  output logic                 cfi_reexec,
  output logic [ADDR_W-1:0]    cfi_reexec_pc,
  output logic                 cfi_active,
  input  logic                 psel,
  input  logic                 penable,
  input  logic                 pwrite,
  input  logic [PA_W-1:0]      paddr,
  input  logic [31:0]          pwdata,
  output logic [31:0]          prdata,
  output logic                 pready,
  output logic                 pslverr,
  // ---- CF-method (basic block) checker ----
  input  logic                 bb_enable,
  input  logic [ADDR_W-1:0]    bb_seg_start,
  input  logic                 bb_pc_valid,
  input  logic [ADDR_W-1:0]    bb_pc_n,
  input  logic [ADDR_W-1:0]    bb_pc_n1,
  input  logic [31:0]          bb_instr,
  output logic                 bb_stall,
  input  logic                 bb_cfg_we,
  input  logic [BB_IDX_W-1:0]  bb_cfg_addr,
  input  logic [BB_WORD_W-1:0] bb_cfg_wdata,
  output logic [BB_WORD_W-1:0] bb_cfg_rdata,
  output logic                 bb_active,
  output logic [BB_IDX_W-1:0]  bb_block,
  output logic                 bb_error,
  output logic [ADDR_W-1:0]    bb_err_pc,
  output logic                 bb_reexec,
  output logic [ADDR_W-1:0]    bb_reexec_pc,
  output logic                 bb_sig_error
);

  cf_checker #(
    .ADDR_W(ADDR_W), .ENTRIES(ENTRIES), .STACK_DEPTH(STACK_DEPTH),
    .DELAY_SLOTS(DELAY_SLOTS), .RETURN_STACK(1'b1), .REEXEC(1'b1)
  ) u_cfi_checker (
    .clk, .rst,
    .pc_valid(cfi_pc_valid), .pc_n(cfi_pc_n), .pc_n1(cfi_pc_n1),
    .error_o(cfi_error), .err_cause_o(cfi_err_cause), .err_pc_o(cfi_err_pc),
    .reexec_o(cfi_reexec), .reexec_pc_o(cfi_reexec_pc), .active_o(cfi_active),
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr
  );

  cf_bb_checker #(
    .ADDR_W(ADDR_W), .BLOCKS(BLOCKS), .DELAY_SLOTS(DELAY_SLOTS), .REEXEC(1'b1), .SIG_CHECK(1'b1)
  ) u_bb_checker (
    .clk, .rst, .enable(bb_enable), .seg_start(bb_seg_start),
    .pc_valid(bb_pc_valid), .pc_n(bb_pc_n), .pc_n1(bb_pc_n1), .instr(bb_instr),
    .stall_o(bb_stall),
    .cfg_we(bb_cfg_we), .cfg_addr(bb_cfg_addr), .cfg_wdata(bb_cfg_wdata), .cfg_rdata(bb_cfg_rdata),
    .active_o(bb_active), .block_o(bb_block), .error_o(bb_error), .err_pc_o(bb_err_pc),
    .reexec_o(bb_reexec), .reexec_pc_o(bb_reexec_pc), .sig_error_o(bb_sig_error)
  );

endmodule
