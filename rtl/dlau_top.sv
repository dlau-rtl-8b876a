// dlau_top - DLAU deep learning accelerator: one fully connected layer with
// sigmoid activation, y_j = sigmoid(sum_i w[i][j] * x[i]).
//
// Three processing units work as a stream pipeline, each with a FIFO buffer
// in front of and behind it so that different momentary rates lose no data:
//
//   w stream -> [FIFO] -+
//   x stream -> [FIFO] -+-> TMMU -> [FIFO] -> PSAU -> [FIFO] -> AFAU -> [FIFO] -> y stream
//
// TMMU multiplies input tiles of 32 nodes with the weights cached in its 32
// banks and emits one part sum per neuron and tile; PSAU accumulates the
// part sums of each neuron over the tiles; AFAU applies the sigmoid. The w,
// x and y streams are where a DMA engine would move data between external
// memory and the accelerator; the host processor drives the control ports.
//
// Use: set cfg_n_in / cfg_n_out (1 .. MAX_IN / MAX_OUT), pulse w_start and
// send n_in*n_out weights (row i = input node outer, neuron j inner, Q8.8);
// wait until w_busy falls. Then pulse start and send the n_in node values
// (Q8.8); the n_out outputs (Q8.8 in [0, 1]) come out on y in neuron order,
// the last one with y_last, and done pulses when it is taken. busy is high
// from start to done. Several layers run one after another by reloading
// weights and feeding a layer's outputs back as the next layer's inputs.
//
// Parameters: MAX_IN / MAX_OUT bound the layer size (weight cache and
// accumulation buffer), LANES is the tile size of the TMMU, FIFO_DEPTH the
// depth of every buffer, and ADDER selects the PSAU adder (Brent-Kung by
// default, or the iterative half-adder adder).
//
// All valid/ready handshakes move a word when both are high at a rising
// edge. After the first tile, the pipeline produces one output per cycle in
// the steady state once a layer has at least ~36 neurons; the first output
// appears about 40 cycles after the first input.
//
// The three-unit pipeline, FIFO buffers, 32-wide tiling and the two adder
// options follow the accelerator description; the stream ports, control
// pulses, FIFO depth and number formats are this design's choices.
module dlau_top
  import dlau_pkg::*;
#(
  parameter int MAX_IN     = 256,
  parameter int MAX_OUT    = 256,
  parameter int FIFO_DEPTH = 32,
  parameter int LANES      = TILE,
  parameter adder_e ADDER  = ADDER_BRENT_KUNG
) (
  input  logic  clk,
  input  logic  rst_n,
  input  idx_t  cfg_n_in,
  input  idx_t  cfg_n_out,
  input  logic  w_start,
  input  logic  w_valid,
  output logic  w_ready,
  input  data_t w_data,
  output logic  w_busy,
  input  logic  start,
  input  logic  x_valid,
  output logic  x_ready,
  input  data_t x_data,
  output logic  y_valid,
  input  logic  y_ready,
  output data_t y_data,
  output logic  y_last,
  output logic  busy,
  output logic  done
);

  localparam int CW = $clog2(FIFO_DEPTH) + 1;

  logic  wf_v, wf_r;  data_t wf_d;
  logic  xf_v, xf_r;  data_t xf_d;
  logic  ps_v, ps_r;  psum_t ps_d;
  logic  pf_v, pf_r;  psum_t pf_d;
  logic  ns_v, ns_r;  nsum_t ns_d;
  logic  nf_v, nf_r;  nsum_t nf_d;
  logic  ac_v, ac_r;  act_t  ac_d;
  act_t  yf_d;
  logic  tmmu_busy, tmmu_wbusy;
  logic [CW-1:0] c_w, c_x, c_p, c_n, c_y;

  stream_fifo #(.T(data_t), .DEPTH(FIFO_DEPTH)) u_w_fifo (
    .clk, .rst_n, .in_valid(w_valid), .in_ready(w_ready), .in_data(w_data),
    .out_valid(wf_v), .out_ready(wf_r), .out_data(wf_d), .count(c_w));

  stream_fifo #(.T(data_t), .DEPTH(FIFO_DEPTH)) u_x_fifo (
    .clk, .rst_n, .in_valid(x_valid), .in_ready(x_ready), .in_data(x_data),
    .out_valid(xf_v), .out_ready(xf_r), .out_data(xf_d), .count(c_x));

  tmmu #(.MAX_IN(MAX_IN), .MAX_OUT(MAX_OUT), .LANES(LANES)) u_tmmu (
    .clk, .rst_n, .cfg_n_in, .cfg_n_out,
    .w_start, .w_valid(wf_v), .w_ready(wf_r), .w_data(wf_d), .w_busy(tmmu_wbusy),
    .start, .x_valid(xf_v), .x_ready(xf_r), .x_data(xf_d),
    .ps_valid(ps_v), .ps_ready(ps_r), .ps_data(ps_d), .busy(tmmu_busy));

  stream_fifo #(.T(psum_t), .DEPTH(FIFO_DEPTH)) u_ps_fifo (
    .clk, .rst_n, .in_valid(ps_v), .in_ready(ps_r), .in_data(ps_d),
    .out_valid(pf_v), .out_ready(pf_r), .out_data(pf_d), .count(c_p));

  psau #(.MAX_OUT(MAX_OUT), .ADDER(ADDER)) u_psau (
    .clk, .rst_n, .in_valid(pf_v), .in_ready(pf_r), .in_data(pf_d),
    .out_valid(ns_v), .out_ready(ns_r), .out_data(ns_d));

  stream_fifo #(.T(nsum_t), .DEPTH(FIFO_DEPTH)) u_ns_fifo (
    .clk, .rst_n, .in_valid(ns_v), .in_ready(ns_r), .in_data(ns_d),
    .out_valid(nf_v), .out_ready(nf_r), .out_data(nf_d), .count(c_n));

  afau u_afau (
    .clk, .rst_n, .in_valid(nf_v), .in_ready(nf_r), .in_data(nf_d),
    .out_valid(ac_v), .out_ready(ac_r), .out_data(ac_d));

  stream_fifo #(.T(act_t), .DEPTH(FIFO_DEPTH)) u_y_fifo (
    .clk, .rst_n, .in_valid(ac_v), .in_ready(ac_r), .in_data(ac_d),
    .out_valid(y_valid), .out_ready(y_ready), .out_data(yf_d), .count(c_y));

  assign y_data = yf_d.y;
  assign y_last = yf_d.eol;
  // weights still queued in the FIFO count as loading
  assign w_busy = tmmu_wbusy || (c_w != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
      end else if (y_valid && y_ready && y_last) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  // a finished layer leaves no data behind in any buffer or unit
  a_drained: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> (!tmmu_busy && c_x == '0 && c_p == '0 && c_n == '0 && c_y == '0))
    else $error("dlau_top: layer done with data still in flight");

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !w_busy) else $error("dlau_top: layer started while weights are loading");

endmodule
