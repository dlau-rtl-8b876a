// tb_stream_fifo - self-checking test of the stream FIFO. Pushes a counted
// sequence with random valid and random ready, checks order and content
// against a queue model, checks that the FIFO fills to DEPTH and no further,
// that it runs at one word per cycle when both sides are always ready, and
// the one-cycle latency of an empty FIFO.
module tb_stream_fifo;
  localparam int DEPTH = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  logic [3:0]  count;
  logic [15:0] q [$];
  int          sent, got, max_count;
  bit          rand_in, rand_out;
  int          p_in, p_out;

  stream_fifo #(.T(logic [15:0]), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid && out_ready) begin
        checks++;
        if (q.size() == 0 || out_data !== q[0]) begin
          failures++;
          $display("FAIL got %h expected %h", out_data, q.size() ? q[0] : 16'h0);
        end
        if (q.size()) void'(q.pop_front());
        got++;
      end
      if (in_valid && in_ready) begin
        q.push_back(in_data);
        sent++;
      end
      if (int'(count) > max_count) max_count = int'(count);
    end
  end

  task automatic run(int n, int pin, int pout);
    int start_sent;
    start_sent = sent;
    p_in = pin; p_out = pout;
    while (sent < start_sent + n) begin
      @(negedge clk);
      if (!(in_valid && !in_ready)) begin
        in_valid = (($urandom % 100) < p_in);
        in_data  = 16'($urandom);
      end
      out_ready = (($urandom % 100) < p_out);
    end
    @(negedge clk) in_valid = 0;
    out_ready = 1;
    while (q.size() != 0) @(negedge clk);
  endtask

  initial begin
    int t0;
    in_valid = 0; out_ready = 0; in_data = 0; sent = 0; got = 0; max_count = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill with the output blocked: must hold exactly DEPTH words
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      in_valid = 1; in_data = 16'(100 + i);
    end
    @(negedge clk) in_valid = 1; in_data = 16'hf00d;
    checks++;
    if (count != 4'(DEPTH) || in_ready != 1'b0) begin
      failures++; $display("FAIL full count %0d ready %0d", count, in_ready);
    end
    // push while full and popping at the same edge
    @(negedge clk) out_ready = 1;
    #1;
    checks++;
    if (!in_ready) begin failures++; $display("FAIL no pass-through when full and popped"); end
    @(negedge clk) in_valid = 0;
    while (q.size() != 0) @(negedge clk);
    // latency: a word written into an empty FIFO is visible after one edge
    in_valid = 1; in_data = 16'h1234; out_ready = 0;
    @(negedge clk) in_valid = 0;
    #1;
    checks++;
    if (!out_valid || out_data != 16'h1234) begin failures++; $display("FAIL one-cycle latency"); end
    out_ready = 1;
    @(negedge clk);
    // full-rate streaming: 100 words in 100 cycles
    t0 = got;
    in_valid = 1;
    for (int i = 0; i < 100; i++) begin in_data = 16'(i); @(negedge clk); end
    in_valid = 0;
    @(negedge clk);
    checks++;
    if (got - t0 != 100) begin failures++; $display("FAIL throughput %0d", got - t0); end
    run(500, 70, 40);
    run(500, 40, 90);
    run(500, 100, 100);
    checks++;
    if (max_count != DEPTH) begin failures++; $display("FAIL max count %0d", max_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
