// cf_dpram: one checker memory (sAdrRam, jAdrRam or ctrlRam).
//
// The checker reads its current entry through port A while the bus interface
// reads and writes entries through port B, so the memory can be loaded at run
// time. It may also be preloaded from a hex file at elaboration, which stands
// for initialising the block RAM contents at synthesis time. Both ports are
// synchronous: the data of an address presented in one cycle appears in the
// next. That the checker memories are block RAMs with a bus port follows the
// document; the two-port organisation and the read-during-write behaviour
// (port A returns the old word) are this design's choices.
module cf_dpram #(
  parameter int unsigned DEPTH     = 512,
  parameter int unsigned WIDTH     = 30,
  parameter string       INIT_FILE = "",
  localparam int unsigned AW       = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  // port A: checker read port
  input  logic [AW-1:0]    a_addr,
  output logic [WIDTH-1:0] a_rdata,
  // port B: bus read/write port
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end

endmodule
