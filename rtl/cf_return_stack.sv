// cf_return_stack: hardware return stack of the checker (version B and C).
//
// On a checked call the checker pushes the return point; on a checked return
// it compares the actual target with the top entry and pops it. Traps push
// their return point the same way. The document
// gives the function and the depth (32 entries). This design's choices: an
// entry holds the return address together with the checker program counter
// (CUPC) to resume with, the stack is a circular buffer, and a push into a
// full stack overwrites the oldest entry (the count saturates at DEPTH), so
// deep recursion loses the oldest return points instead of blocking. A push
// and a pop in the same cycle replace the top entry.
//
// Timing: top/empty are combinational from the registered state; push and
// pop take effect at the next rising clock edge. Reset is synchronous.
module cf_return_stack #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 39,
  localparam int unsigned PW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [WIDTH-1:0] push_data,
  input  logic             pop,
  output logic [WIDTH-1:0] top,
  output logic             empty
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    tos;    // index of the top entry
  logic [PW:0]      count;  // valid entries, saturates at DEPTH
  logic             full;

  // Index arithmetic modulo DEPTH (DEPTH need not be a power of two).
  function automatic logic [PW-1:0] inc(input logic [PW-1:0] i);
    return (i == PW'(DEPTH - 1)) ? '0 : i + 1'b1;
  endfunction
  function automatic logic [PW-1:0] dec(input logic [PW-1:0] i);
    return (i == '0) ? PW'(DEPTH - 1) : i - 1'b1;
  endfunction

  assign top   = mem[tos];
  assign empty = (count == '0);
  assign full  = (count == (PW+1)'(DEPTH));

  always_ff @(posedge clk) begin
    if (rst) begin
      tos   <= PW'(DEPTH - 1);
      count <= '0;
    end else if (push && pop && !empty) begin
      mem[tos] <= push_data;
    end else if (push) begin
      mem[inc(tos)] <= push_data;
      tos           <= inc(tos);
      if (!full) count <= count + 1'b1;
    end else if (pop && !empty) begin
      tos   <= dec(tos);
      count <= count - 1'b1;
    end
  end

  // A pop of an empty stack is a caller error: the checker tests 'empty' first.
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(pop && !push && empty));

endmodule
