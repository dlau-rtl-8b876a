// tb_tmmu_lanes8 - the tiled matrix multiplication unit built with 8 lanes
// (tiles of 8 inputs) instead of 32; otherwise the same test as tb_tmmu.
// Loads random Q8.8 weight matrices, streams random Q8.8 inputs and compares
// every part sum (value, neuron index, first/last/end-of-layer tags) with
// tile sums computed in the testbench. Layers cover several tiles with a
// short last tile, a single tile, a single neuron, and random valid/ready
// on all streams. For a layer with enough neurons and inputs arriving one
// per cycle, checks that the part sums leave without a gap after the first
// (the two input register sets hide the loading of the next tile).
module tb_tmmu_lanes8;
  import dlau_pkg::*;
  localparam int MAX_IN = 96, MAX_OUT = 64;
  localparam int LN = 8;         // lanes of the unit under test
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  idx_t  cfg_n_in, cfg_n_out;
  logic  w_start, w_valid, w_ready, w_busy;
  data_t w_data;
  logic  start, x_valid, x_ready, busy;
  data_t x_data;
  logic  ps_valid, ps_ready;
  psum_t ps_data;

  tmmu #(.MAX_IN(MAX_IN), .MAX_OUT(MAX_OUT), .LANES(LN)) dut (.*);

  data_t W [MAX_IN][MAX_OUT];
  data_t X [MAX_IN];
  psum_t exp_q [$];
  bit    rand_mode;
  longint first_t, last_t;
  int    n_ps;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) ps_ready = rand_mode ? 1'($urandom % 3 != 0) : 1'b1;

  always @(posedge clk) begin
    if (rst_n && ps_valid && ps_ready) begin
      psum_t e;
      acc_t  gs, es;
      e = exp_q.pop_front();
      gs = ps_data.sum;
      es = e.sum;
      checks++;
      if (ps_data !== e) begin
        failures++;
        $display("FAIL part sum idx %0d f%0d l%0d e%0d = %0d, expected idx %0d f%0d l%0d e%0d = %0d",
                 ps_data.idx, ps_data.first, ps_data.last, ps_data.eol, gs,
                 e.idx, e.first, e.last, e.eol, es);
      end
      if (n_ps == 0) first_t = $time;
      last_t = $time;
      n_ps++;
    end
  end

  function automatic data_t rnd();
    return data_t'($signed($urandom % 1025) - 512);   // -2.0 .. 2.0
  endfunction

  task automatic load_weights(int n_in, int n_out);
    @(negedge clk);
    cfg_n_in = idx_t'(n_in); cfg_n_out = idx_t'(n_out); w_start = 1;
    @(negedge clk) w_start = 0;
    for (int i = 0; i < n_in; i++)
      for (int j = 0; j < n_out; j++) begin
        W[i][j] = rnd();
        if (rand_mode) while ($urandom % 4 == 0) begin w_valid = 0; @(negedge clk); end
        w_valid = 1; w_data = W[i][j];
        @(posedge clk);
        while (!w_ready) @(posedge clk);
        @(negedge clk);
      end
    w_valid = 0;
    checks++;
    if (w_busy) begin failures++; $display("FAIL weight load did not finish"); end
  endtask

  task automatic run_layer(int n_in, int n_out, bit check_rate);
    int nt;
    nt = (n_in + LN - 1) / LN;
    for (int i = 0; i < n_in; i++) X[i] = rnd();
    for (int t = 0; t < nt; t++)
      for (int j = 0; j < n_out; j++) begin
        psum_t p;
        acc_t  s;
        s = '0;
        for (int l = 0; l < LN; l++)
          if (t * LN + l < n_in) s += acc_t'(W[t*LN+l][j]) * acc_t'(X[t*LN+l]);
        p.first = (t == 0); p.last = (t == nt - 1); p.eol = p.last && (j == n_out - 1);
        p.idx = idx_t'(j); p.sum = s;
        exp_q.push_back(p);
      end
    n_ps = 0;
    @(negedge clk);
    cfg_n_in = idx_t'(n_in); cfg_n_out = idx_t'(n_out); start = 1;
    @(negedge clk) start = 0;
    for (int i = 0; i < n_in; i++) begin
      if (rand_mode) while ($urandom % 3 == 0) begin x_valid = 0; @(negedge clk); end
      x_valid = 1; x_data = X[i];
      @(posedge clk);
      while (!x_ready) @(posedge clk);
      @(negedge clk);
    end
    x_valid = 0;
    while (busy) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d part sums missing", exp_q.size()); end
    if (check_rate) begin
      checks++;
      if ((last_t - first_t) / 10 != nt * n_out - 1) begin
        failures++;
        $display("FAIL rate: %0d part sums over %0d cycles", nt * n_out, (last_t - first_t) / 10 + 1);
      end
    end
  endtask

  initial begin
    w_start = 0; w_valid = 0; w_data = '0; start = 0; x_valid = 0; x_data = '0;
    cfg_n_in = '0; cfg_n_out = '0; rand_mode = 0; n_ps = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_weights(96, 48);
    run_layer(96, 48, 1);
    run_layer(96, 48, 1);
    load_weights(70, 40);
    run_layer(70, 40, 1);
    load_weights(32, 1);
    run_layer(32, 1, 0);
    load_weights(5, 64);
    run_layer(5, 64, 0);
    rand_mode = 1;
    load_weights(77, 9);
    run_layer(77, 9, 0);
    load_weights(96, 64);
    run_layer(96, 64, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
