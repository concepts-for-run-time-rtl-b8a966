// tb_cf_return_stack: pushes and pops against a reference queue, including
// a fill past the 32-entry depth (oldest entries are lost, the newest 32
// come back in LIFO order) and simultaneous push and pop.
module tb_cf_return_stack;
  localparam int DEPTH = 32, WIDTH = 39;
  logic clk = 0, rst, push, pop, empty;
  logic [WIDTH-1:0] push_data, top;
  logic [WIDTH-1:0] model [$];
  int checks = 0, failures = 0;

  cf_return_stack #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step(input logic do_push, input logic do_pop, input logic [WIDTH-1:0] d);
    push = do_push; pop = do_pop; push_data = d;
    @(posedge clk);
    if (do_push && do_pop && model.size() > 0) model[$] = d;
    else if (do_push) begin
      model.push_back(d);
      if (model.size() > DEPTH) void'(model.pop_front());
    end else if (do_pop && model.size() > 0) void'(model.pop_back());
    @(negedge clk);
    push = 0; pop = 0;
    check(empty == (model.size() == 0), "empty flag");
    if (model.size() > 0) check(top == model[$], $sformatf("top %h exp %h", top, model[$]));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; push = 0; pop = 0; push_data = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    check(empty, "empty after reset");
    // simple nesting
    for (int i = 0; i < 5; i++) step(1, 0, WIDTH'(100 + i));
    for (int i = 0; i < 5; i++) step(0, 1, '0);
    check(empty, "empty after balanced calls");
    // overflow: 40 pushes, then 32 pops give the last 32 in reverse
    for (int i = 0; i < 40; i++) step(1, 0, WIDTH'(1000 + i));
    for (int i = 0; i < 32; i++) begin
      check(top == WIDTH'(1000 + 39 - i), "LIFO after overflow");
      step(0, 1, '0);
    end
    check(empty, "empty after draining overflowed stack");
    // random traffic
    for (int n = 0; n < 600; n++) begin
      logic pu, po;
      pu = 1'($urandom_range(0, 1));
      po = (model.size() > 0) ? 1'($urandom_range(0, 1)) : 1'b0;
      step(pu, po, {7'($urandom), 32'($urandom)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
