// tb_pasta_adder - self-checking test of the iterative half-adder adder.
// For corner and random operands it checks the sum and carry out against
// the + operator, and checks the number of cycles from start to done
// against the carry-chain length computed independently: one iteration
// more than the longest run of positions a carry has to ripple through
// (one cycle when no carry is generated at all).
module tb_pasta_adder;
  localparam int W = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start, cin, busy, done, cout;
  logic [W-1:0] a, b, sum;

  pasta_adder #(.W(W)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // iterations needed: simulate the carry vector until it is zero
  function automatic int iters(logic [W-1:0] x, logic [W-1:0] y, logic ci);
    logic [W-1:0] s, c, sh;
    logic         p;
    int           n;
    s = x ^ y; c = x & y; p = ci; n = 0;
    while (c != '0 || p) begin
      sh = {c[W-2:0], p};
      c  = s & sh;
      s  = s ^ sh;
      p  = 1'b0;
      n++;
    end
    return n;
  endfunction

  task automatic add(logic [W-1:0] x, logic [W-1:0] y, logic ci);
    logic [W:0] r;
    int         cyc, exp_cyc;
    @(negedge clk);
    a = x; b = y; cin = ci; start = 1;
    @(negedge clk);
    start = 0;
    a = '0; b = '0; cin = 0;     // operands are captured at start
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    r = {1'b0, x} + {1'b0, y} + (W+1)'(ci);
    exp_cyc = iters(x, y, ci) + 1;
    checks++;
    if ({cout, sum} !== r) begin
      failures++;
      $display("FAIL %h + %h + %0d = %h, expected %h", x, y, ci, {cout, sum}, r);
    end
    checks++;
    if (cyc != exp_cyc || exp_cyc > W + 2) begin
      failures++;
      $display("FAIL %h + %h + %0d took %0d cycles, expected %0d", x, y, ci, cyc, exp_cyc);
    end
  endtask

  initial begin
    start = 0; a = '0; b = '0; cin = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    add(16'h0000, 16'h0000, 0);
    add(16'h00f0, 16'h0f00, 0);     // no carries: done after one cycle
    add(16'hffff, 16'h0001, 0);     // longest ripple
    add(16'hffff, 16'h0000, 1);
    add(16'hffff, 16'hffff, 1);
    add(16'h8000, 16'h8000, 0);
    add(16'h5555, 16'h5555, 0);
    for (int i = 0; i < 3000; i++) add(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
