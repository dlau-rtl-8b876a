// psau - Part Sum Accumulation Unit.
//
// Adds up, for every output neuron, the part sums the TMMU produces for it
// over the input tiles. The running sums live in an accumulation buffer
// with one entry per output neuron (MAX_OUT entries), indexed by the neuron
// index carried with each part sum. A part sum marked `first` starts a new
// sum; otherwise it is added to the stored one. A part sum marked `last`
// completes the neuron: the total goes to the output register (towards the
// AFAU through a FIFO) instead of back into the buffer.
//
// ADDER selects the adder. ADDER_BRENT_KUNG (the default) uses a
// single-cycle Brent-Kung adder: the buffer is read combinationally and
// written at the clock edge, and the same neuron cannot come back before the
// next cycle, so the unit accepts one part sum every cycle, matching the
// TMMU's rate. ADDER_PASTA uses the iterative half-adder adder instead: a
// part sum is started in the adder when it arrives and accepted when the
// adder signals completion, so each part sum takes 2 + (longest carry chain)
// cycles and the TMMU is slowed down by back-pressure.
//
// Interface: valid/ready stream of dlau_pkg::psum_t in, nsum_t out. The
// input is also stalled while a finished sum waits in the output register.
// Latency: a finished sum is valid one cycle after its last part sum is
// accepted. One part sum per cycle with the Brent-Kung adder and the
// alternative self-timed adder follow the accelerator description; the
// buffer organisation and the first/last tags are this design's choices.
module psau
  import dlau_pkg::*;
#(
  parameter int     MAX_OUT = 256,
  parameter adder_e ADDER   = ADDER_BRENT_KUNG
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  psum_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output nsum_t out_data
);

  localparam int AW = $clog2(MAX_OUT);

  acc_t acc_mem [MAX_OUT];
  acc_t prev, total;
  logic add_done;            // adder result for in_data is ready
  logic accept;

  assign in_ready = (!out_valid || out_ready) && add_done;
  assign accept   = in_valid && in_ready;
  assign prev     = in_data.first ? '0 : acc_mem[AW'(in_data.idx)];

  if (ADDER == ADDER_PASTA) begin : g_pasta
    logic pa_busy, pa_done, pa_start, pend;
    // pend: the adder holds (or works on) the sum of the current input word
    assign pa_start = in_valid && !pend;
    assign add_done = pend && pa_done;
    pasta_adder #(.W(ACC_W)) u_add (
      .clk   (clk),
      .rst_n (rst_n),
      .start (pa_start),
      .a     (prev),
      .b     (in_data.sum),
      .cin   (1'b0),
      .busy  (pa_busy),
      .done  (pa_done),
      .sum   (total),
      .cout  ()
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)        pend <= 1'b0;
      else if (accept)   pend <= 1'b0;
      else if (pa_start) pend <= 1'b1;
    end
  end else begin : g_bk
    assign add_done = 1'b1;
    brent_kung_adder #(.W(ACC_W)) u_add (
      .a    (prev),
      .b    (in_data.sum),
      .cin  (1'b0),
      .sum  (total),
      .cout ()
    );
  end

  always_ff @(posedge clk) begin
    if (accept && !in_data.last) acc_mem[AW'(in_data.idx)] <= total;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else if (accept && in_data.last) begin
      out_valid <= 1'b1;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (accept && in_data.last) begin
      out_data.eol <= in_data.eol;
      out_data.sum <= total;
    end
  end

  a_idx_range: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (in_data.idx < idx_t'(MAX_OUT)))
    else $error("psau: neuron index out of range");

endmodule
