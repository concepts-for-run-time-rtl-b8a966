// cf_apb_if: AMBA APB slave giving the processor access to the checker.
//
// Through it the processor (or a debugger) reads and writes the three checker
// memories, so they can be loaded or changed at run time, and reads the
// checker status. The document states that such an AMBA bus interface exists
// and what it is for; the choice of APB (AMBA 3, with PREADY/PSLVERR), the
// address map and the status word are this design's.
//
// Address map (byte addresses, 32-bit words, IDX_W = log2 of the entries):
//   region = PADDR[IDX_W+3:IDX_W+2], index = PADDR[IDX_W+1:2]
//   region 0: sAdrRam   (CFI addresses,  ADDR_W bits)
//   region 1: jAdrRam   (CFI targets,    ADDR_W bits)
//   region 2: ctrlRam   ({kind[2:0], next index}, CTRL_W bits)
//   region 3: registers, index 0 STATUS  bit0 active, bit1 error seen
//                                        (sticky, write 1 to clear),
//                                        bit2 in a trap handler
//                        index 1 ERRPC   word address of the last error
//                        index 2 CUPC    current checker program counter
//                        index 3 TRAPBASE word address of the trap table
//                                        (read/write, reset TRAP_BASE)
// Timing: no wait states. A read starts the memory read in the setup phase
// and returns the word in the access phase; a write is done in the access
// phase. PSLVERR is never raised. Reset is synchronous, active high.
module cf_apb_if #(
  parameter int unsigned ADDR_W  = 30,
  parameter int unsigned ENTRIES = 512,
  parameter logic [ADDR_W-1:0] TRAP_BASE = '0,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned CTRL_W = 3 + IDX_W,
  localparam int unsigned PA_W   = IDX_W + 4
) (
  input  logic              clk,
  input  logic              rst,
  // APB slave
  input  logic              psel,
  input  logic              penable,
  input  logic              pwrite,
  input  logic [PA_W-1:0]   paddr,
  input  logic [31:0]       pwdata,
  output logic [31:0]       prdata,
  output logic              pready,
  output logic              pslverr,
  // memory port B, address and write data shared by the three memories
  output logic [IDX_W-1:0]  m_addr,
  output logic [31:0]       m_wdata,
  output logic              s_en, j_en, c_en,
  output logic              m_we,
  input  logic [ADDR_W-1:0] s_rdata,
  input  logic [ADDR_W-1:0] j_rdata,
  input  logic [CTRL_W-1:0] c_rdata,
  // checker status
  input  logic              active,
  input  logic              in_trap,
  input  logic              error,
  input  logic [ADDR_W-1:0] err_pc,
  input  logic [IDX_W-1:0]  cupc,
  output logic [ADDR_W-1:0] trap_base
);

  logic [1:0] region;
  logic       setup_rd, access_wr, clr_err, err_seen, wr_tbase;

  assign region    = paddr[PA_W-1 -: 2];
  assign m_addr    = paddr[IDX_W+1:2];
  assign m_wdata   = pwdata;
  assign setup_rd  = psel && !penable && !pwrite;
  assign access_wr = psel && penable && pwrite;
  assign m_we      = access_wr;

  assign s_en = (region == 2'd0) && (setup_rd || access_wr);
  assign j_en = (region == 2'd1) && (setup_rd || access_wr);
  assign c_en = (region == 2'd2) && (setup_rd || access_wr);

  assign clr_err = access_wr && region == 2'd3 && m_addr == '0 && pwdata[1];

  assign wr_tbase = access_wr && region == 2'd3 && m_addr == IDX_W'(3);

  always_ff @(posedge clk) begin
    if (rst)           trap_base <= TRAP_BASE;
    else if (wr_tbase) trap_base <= pwdata[ADDR_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst)            err_seen <= 1'b0;
    else if (error)     err_seen <= 1'b1;
    else if (clr_err)   err_seen <= 1'b0;
  end

  always_comb begin
    prdata = '0;
    unique case (region)
      2'd0: prdata[ADDR_W-1:0] = s_rdata;
      2'd1: prdata[ADDR_W-1:0] = j_rdata;
      2'd2: prdata[CTRL_W-1:0] = c_rdata;
      default: begin
        if (m_addr == IDX_W'(0))      prdata[2:0]        = {in_trap, err_seen, active};
        else if (m_addr == IDX_W'(1)) prdata[ADDR_W-1:0] = err_pc;
        else if (m_addr == IDX_W'(2)) prdata[IDX_W-1:0]  = cupc;
        else if (m_addr == IDX_W'(3)) prdata[ADDR_W-1:0] = trap_base;
      end
    endcase
  end

  assign pready  = 1'b1;
  assign pslverr = 1'b0;

  // APB protocol rule: an access phase follows a setup phase with the same
  // address and direction, so the read data fetched in setup belongs to it.
  a_apb_stable: assert property (@(posedge clk) disable iff (rst)
    (psel && !penable) |=> (psel && penable && $stable(paddr) && $stable(pwrite)));

endmodule
