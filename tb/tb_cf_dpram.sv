// tb_cf_dpram: random writes and reads on both ports of one checker memory,
// compared against a reference array; checks the one-cycle read latency and
// that port A sees words written through port B.
module tb_cf_dpram;
  localparam int DEPTH = 16, WIDTH = 12;
  logic clk = 0, b_en, b_we;
  logic [3:0] a_addr, b_addr;
  logic [WIDTH-1:0] b_wdata, a_rdata, b_rdata;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  cf_dpram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [WIDTH-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] exp_a, exp_b;
    b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; b_wdata = 0;
    for (int i = 0; i < DEPTH; i++) ref_mem[i] = '0;
    @(negedge clk);
    // memory starts cleared
    for (int i = 0; i < DEPTH; i++) begin
      a_addr = 4'(i);
      @(negedge clk);
      check(a_rdata, '0, "initial zero");
    end
    // fill through port B
    for (int i = 0; i < DEPTH; i++) begin
      b_en = 1; b_we = 1; b_addr = 4'(i); b_wdata = WIDTH'(i * 37 + 5);
      ref_mem[i] = b_wdata;
      @(negedge clk);
    end
    b_we = 0;
    // random mixed traffic
    for (int n = 0; n < 400; n++) begin
      a_addr  = 4'($urandom_range(0, DEPTH-1));
      b_addr  = 4'($urandom_range(0, DEPTH-1));
      b_en    = 1'($urandom_range(0, 1));
      b_we    = b_en && ($urandom_range(0, 2) == 0);
      b_wdata = WIDTH'($urandom);
      exp_a   = ref_mem[a_addr];     // port A returns the old word
      exp_b   = ref_mem[b_addr];
      @(posedge clk);
      if (b_en && b_we) ref_mem[b_addr] = b_wdata;
      @(negedge clk);
      check(a_rdata, exp_a, "port A read");
      if (b_en) check(b_rdata, exp_b, "port B read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
