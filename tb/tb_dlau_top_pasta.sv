// tb_dlau_top_pasta - end-to-end test of the DLAU with the PSAU built on
// the iterative half-adder adder (ADDER_PASTA) instead of the Brent-Kung
// adder, at the default sizes otherwise. Same layers, output checks and
// mechanism counters as the default end-to-end test; the cycle check is
// reversed: each part sum now costs several adder iterations, so the
// 256 x 256 layer must take at least two cycles per part sum, and at most
// ACC_W + 3.
module tb_dlau_top_pasta;
  import dlau_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  idx_t  cfg_n_in, cfg_n_out;
  logic  w_start, w_valid, w_ready, w_busy;
  data_t w_data;
  logic  start, x_valid, x_ready;
  data_t x_data;
  logic  y_valid, y_ready, y_last, busy, done;
  data_t y_data;

  dlau_top #(.ADDER(ADDER_PASTA)) dut (.*);

  data_t W [256][256];
  data_t X [256];
  int    exp_y [$];
  data_t got_y [$];
  bit    rand_mode;
  bit    hold_y;
  longint cyc;

  // mechanism counters
  int n_wload, n_layer, n_swap, n_short_tile, n_accum, n_stall, n_fifo_full;
  int n_sat_hi, n_sat_lo, n_pos, n_neg, n_done;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;

  always @(negedge clk) y_ready = hold_y ? 1'b0 : rand_mode ? 1'($urandom % 3 != 0) : 1'b1;

  // output checker
  always @(posedge clk) begin
    if (rst_n && y_valid && y_ready) begin
      int e;
      e = exp_y.pop_front();
      got_y.push_back(y_data);
      checks++;
      if (int'(y_data) > e + 2 || int'(y_data) < e - 2) begin
        failures++;
        $display("FAIL y = %0d expected %0d", y_data, e);
      end
      checks++;
      if (y_last != (exp_y.size() == 0)) begin
        failures++;
        $display("FAIL y_last %0d with %0d outputs left", y_last, exp_y.size());
      end
    end
  end

  // mechanism monitors (internal signals)
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_tmmu.rel_v) n_swap++;
      if (dut.u_tmmu.s1_v && dut.u_tmmu.en && dut.u_tmmu.xlen[dut.u_tmmu.s1_m.set] != 6'(TILE)) n_short_tile++;
      if (dut.u_psau.accept && !dut.u_psau.in_data.first) n_accum++;
      if (dut.u_tmmu.ps_valid && !dut.u_tmmu.ps_ready) n_stall++;
      if (!dut.u_ps_fifo.in_ready || !dut.u_y_fifo.in_ready || !dut.u_ns_fifo.in_ready) n_fifo_full++;
      if (dut.u_afau.en && dut.u_afau.s2_v) begin
        case (dut.u_afau.s2_seg)
          dut.u_afau.SAT_HI:  n_sat_hi++;
          dut.u_afau.SAT_LO:  n_sat_lo++;
          dut.u_afau.SEG_POS: n_pos++;
          default:            n_neg++;
        endcase
      end
      if (done) n_done++;
    end
  end

  function automatic int sigmoid_q88(longint s);
    real x;
    x = real'(s) / 65536.0;
    if (x > 8.0) return 256;
    if (x <= -8.0) return 0;
    return int'($floor(256.0 / (1.0 + $exp(-x)) + 0.5));
  endfunction

  task automatic load_weights(int n_in, int n_out, int wmax);
    @(negedge clk);
    cfg_n_in = idx_t'(n_in); cfg_n_out = idx_t'(n_out); w_start = 1;
    @(negedge clk) w_start = 0;
    for (int i = 0; i < n_in; i++)
      for (int j = 0; j < n_out; j++) begin
        W[i][j] = data_t'($signed($urandom % (2 * wmax + 1)) - wmax);
        if (rand_mode) while ($urandom % 5 == 0) begin w_valid = 0; @(negedge clk); end
        w_valid = 1; w_data = W[i][j];
        @(posedge clk);
        while (!w_ready) @(posedge clk);
        @(negedge clk);
      end
    w_valid = 0;
    while (w_busy) @(negedge clk);
    n_wload++;
  endtask

  // X must hold the inputs; returns the cycles from start to done
  task automatic run_layer(int n_in, int n_out, output longint cycles);
    longint t0;
    got_y.delete();
    for (int j = 0; j < n_out; j++) begin
      longint s;
      s = 0;
      for (int i = 0; i < n_in; i++) s += longint'(W[i][j]) * longint'(X[i]);
      exp_y.push_back(sigmoid_q88(s));
    end
    @(negedge clk);
    cfg_n_in = idx_t'(n_in); cfg_n_out = idx_t'(n_out); start = 1;
    t0 = cyc;
    @(negedge clk) start = 0;
    for (int i = 0; i < n_in; i++) begin
      if (rand_mode) while ($urandom % 4 == 0) begin x_valid = 0; @(negedge clk); end
      x_valid = 1; x_data = X[i];
      @(posedge clk);
      while (!x_ready) @(posedge clk);
      @(negedge clk);
    end
    x_valid = 0;
    while (busy) @(negedge clk);
    cycles = cyc - t0;
    n_layer++;
    checks++;
    if (exp_y.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_y.size()); end
  endtask

  task automatic rand_inputs(int n_in, int xmax);
    for (int i = 0; i < n_in; i++) X[i] = data_t'($signed($urandom % (2 * xmax + 1)) - xmax);
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("mechanism %-28s %0d", what, n);
  endtask

  initial begin
    longint cycles;
    w_start = 0; w_valid = 0; w_data = '0; start = 0; x_valid = 0; x_data = '0;
    cfg_n_in = '0; cfg_n_out = '0; rand_mode = 0; hold_y = 0; cyc = 0;
    {n_wload, n_layer, n_swap, n_short_tile, n_accum, n_stall, n_fifo_full} = '0;
    {n_sat_hi, n_sat_lo, n_pos, n_neg, n_done} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. full-size layer 256 x 256, free-running output: rate check
    load_weights(256, 256, 24);
    rand_inputs(256, 256);
    run_layer(256, 256, cycles);
    checks++;
    if (cycles < 2 * 8 * 256 || cycles > 32 + 8 * 256 * (ACC_W + 3)) begin
      failures++; $display("FAIL 256x256 layer took %0d cycles", cycles);
    end
    $display("256x256 layer: %0d cycles", cycles);

    // 2. two-layer network 100 -> 64 -> 10: layer 2 reads layer 1's outputs
    load_weights(100, 64, 200);
    rand_inputs(100, 256);
    run_layer(100, 64, cycles);
    for (int i = 0; i < 64; i++) X[i] = got_y[i];
    load_weights(64, 10, 300);
    run_layer(64, 10, cycles);

    // 3. random gaps and back-pressure, short last tile
    rand_mode = 1;
    load_weights(45, 70, 512);
    rand_inputs(45, 400);
    run_layer(45, 70, cycles);
    load_weights(32, 1, 64);
    rand_inputs(32, 256);
    run_layer(32, 1, cycles);
    load_weights(200, 33, 32);
    rand_inputs(200, 300);
    run_layer(200, 33, cycles);
    rand_mode = 0;

    // 4. output blocked until the back-pressure reaches the TMMU
    load_weights(32, 200, 128);
    rand_inputs(32, 256);
    fork
      run_layer(32, 200, cycles);
      begin
        hold_y = 1;
        @(negedge clk);
        while (n_stall == 0) @(negedge clk);
        repeat (20) @(negedge clk);
        hold_y = 0;
      end
    join
    @(negedge clk);

    expect_seen("weight load", n_wload);
    expect_seen("layer run / done", n_done);
    expect_seen("input set swap", n_swap);
    expect_seen("short tile masked", n_short_tile);
    expect_seen("multi-tile accumulation", n_accum);
    expect_seen("back-pressure stall", n_stall);
    expect_seen("FIFO full", n_fifo_full);
    expect_seen("sigmoid saturates to 1", n_sat_hi);
    expect_seen("sigmoid saturates to 0", n_sat_lo);
    expect_seen("sigmoid x > 0 segment", n_pos);
    expect_seen("sigmoid x <= 0 symmetry", n_neg);
    checks++;
    if (n_done != n_layer) begin failures++; $display("FAIL done pulses %0d for %0d layers", n_done, n_layer); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
