// tb_afau - self-checking test of the sigmoid unit. Sends corner values
// (0, +-8 and their neighbours, far out of range) and random sums in
// [-10, 10], with and without random output back-pressure, and compares each
// result with round(256 * 1/(1+exp(-x))) computed in real arithmetic,
// allowing 2 LSB for the piecewise linear approximation; values beyond +-8
// must be exactly 256 / 0. Also checks the three-cycle latency and one
// result per cycle.
module tb_afau;
  import dlau_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid, in_ready, out_valid, out_ready;
  nsum_t in_data;
  act_t  out_data;
  acc_t  sent_q [$];
  int    n_out, cyc;
  bit    rand_ready;

  afau dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_y(acc_t x);
    real xr, s;
    xr = real'(x) / 65536.0;
    if (xr > 8.0) return 256;
    if (xr <= -8.0) return 0;
    s = 1.0 / (1.0 + $exp(-xr));
    return int'($floor(s * 256.0 + 0.5));
  endfunction

  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      acc_t x;
      int   e, g;
      x = sent_q.pop_front();
      e = expect_y(x);
      g = int'(out_data.y);
      checks++;
      if ((real'(x) > 8.0 * 65536.0 || real'(x) <= -8.0 * 65536.0) ? (g != e) : (g > e + 2 || g < e - 2)) begin
        failures++;
        $display("FAIL x=%f y=%0d expected %0d", real'(x) / 65536.0, g, e);
      end
      n_out++;
    end
  end

  always @(negedge clk) out_ready = rand_ready ? 1'($urandom % 3 != 0) : 1'b1;

  task automatic send(acc_t x);
    in_valid = 1; in_data.sum = x; in_data.eol = 0;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    sent_q.push_back(x);
    #1 in_valid = 0;
  endtask

  initial begin
    acc_t pts [$];
    int   t0, base;
    in_valid = 0; in_data = '0; n_out = 0; rand_ready = 0; cyc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // latency: one value in, result three edges later
    in_valid = 1; in_data.sum = acc_t'(1) <<< 16; in_data.eol = 1;
    sent_q.push_back(in_data.sum);
    t0 = cyc;
    @(negedge clk) in_valid = 0;
    while (!out_valid) @(negedge clk);
    checks++;
    if (cyc - t0 != 3) begin failures++; $display("FAIL latency %0d", cyc - t0); end
    // corners
    pts = '{0, 1, -1, 32768, -32768, 524288, 524289, 524287, -524288, -524287, -524289,
            1 << 20, -(1 << 20), 40'sh7f_ffff_ffff, -40'sh7f_ffff_ffff, 98304, -98304};
    @(negedge clk);
    foreach (pts[i]) send(pts[i]);
    // continuous stream at full rate: 200 values in 200 cycles
    while (sent_q.size() != 0) @(negedge clk);
    base = n_out;
    t0 = cyc;
    in_valid = 1;
    for (int i = 0; i < 200; i++) begin
      in_data.sum = acc_t'($signed($urandom % 1310720) - 655360);
      sent_q.push_back(in_data.sum);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (n_out - base != 200) begin failures++; $display("FAIL throughput %0d in %0d cycles", n_out - base, cyc - t0); end
    // random values under back-pressure
    rand_ready = 1;
    for (int i = 0; i < 500; i++) send(acc_t'($signed($urandom % 1310720) - 655360));
    rand_ready = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (sent_q.size() != 0) begin failures++; $display("FAIL %0d results missing", sent_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
