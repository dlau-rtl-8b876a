// tb_psau - self-checking test of the part-sum accumulation unit. Streams
// the part sums of several layers (tile outer, neuron inner) with random
// signed values, including a one-neuron layer (the same neuron on
// consecutive cycles) and a one-tile layer, and compares each finished sum
// and its end-of-layer flag with sums computed in the testbench. With the
// output always ready it checks that a part sum is accepted every cycle;
// then repeats with random valid and ready.
module tb_psau;
  import dlau_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid, in_ready, out_valid, out_ready;
  psum_t in_data;
  nsum_t out_data;
  nsum_t exp_q [$];
  bit    rand_mode;
  int    stall_cycles;

  psau #(.MAX_OUT(64)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      nsum_t e;
      e = exp_q.pop_front();
      checks++;
      if (out_data !== e) begin
        failures++;
        $display("FAIL sum %0d eol %0d expected %0d eol %0d", out_data.sum, out_data.eol, e.sum, e.eol);
      end
    end
    if (rst_n && in_valid && !in_ready) stall_cycles++;
  end

  always @(negedge clk) out_ready = rand_mode ? 1'($urandom % 4 != 0) : 1'b1;

  task automatic layer(int n_out, int n_tiles);
    acc_t tot [];
    tot = new[n_out];
    foreach (tot[j]) tot[j] = '0;
    for (int t = 0; t < n_tiles; t++) begin
      for (int j = 0; j < n_out; j++) begin
        psum_t p;
        p.first = (t == 0);
        p.last  = (t == n_tiles - 1);
        p.eol   = p.last && (j == n_out - 1);
        p.idx   = idx_t'(j);
        p.sum   = acc_t'($signed($urandom % 2000001) - 1000000) <<< 4;
        tot[j] += p.sum;
        if (p.last) exp_q.push_back('{eol: p.eol, sum: tot[j]});
        if (rand_mode) while ($urandom % 3 == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_data = p;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
      end
    end
    in_valid = 0;
  endtask

  initial begin
    int c0;
    in_valid = 0; in_data = '0; rand_mode = 0; stall_cycles = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // full rate: 8 neurons x 6 tiles = 48 part sums in 48 cycles, no stall
    c0 = $time;
    layer(8, 6);
    checks++;
    if (($time - c0) / 10 != 48 || stall_cycles != 0) begin
      failures++; $display("FAIL rate: %0d cycles, %0d stalls", ($time - c0) / 10, stall_cycles);
    end
    layer(1, 7);
    layer(5, 1);
    layer(64, 3);
    rand_mode = 1;
    layer(13, 4);
    layer(1, 5);
    layer(40, 2);
    rand_mode = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d sums missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
