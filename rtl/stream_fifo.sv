// stream_fifo - synchronous FIFO buffer between two DLAU processing units.
//
// Every processing unit reads its operands from an input FIFO and writes its
// results to an output FIFO, so that units running at different momentary
// rates do not lose data. Both sides use a valid/ready handshake: a word moves
// when valid and ready are high at the same rising clock edge. The FIFO holds
// DEPTH words in a register array with read and write pointers one bit wider
// than the address, so full and empty are told apart (DEPTH must be a power
// of two). The head word is read
// combinationally, so a word written at one edge can leave at the next edge
// (one cycle of latency) and the FIFO passes one word per cycle. A full FIFO
// still accepts a word in the cycle in which it gives one away. The buffering
// follows the accelerator description; depth, handshake and the
// same-cycle read/write behaviour are this design's choices. Reset is
// asynchronous, active low, and empties the FIFO.
module stream_fifo #(
  parameter type T     = logic [7:0],
  parameter int  DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  T                         in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output T                         out_data,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int AW = $clog2(DEPTH);

  T            mem [DEPTH];
  logic [AW:0] wr_ptr, rd_ptr;
  logic        push, pop;

  assign count     = wr_ptr - rd_ptr;
  assign out_valid = (count != '0);
  assign in_ready  = (count != (AW+1)'(DEPTH)) || out_ready;
  assign out_data  = mem[rd_ptr[AW-1:0]];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (pop)  rd_ptr <= rd_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr[AW-1:0]] <= in_data;
  end

  if (DEPTH != (1 << AW) || DEPTH < 2) begin : g_bad_depth
    $error("stream_fifo: DEPTH must be a power of two, at least 2");
  end

  // A word offered on the input must stay until it is taken.
  property p_hold_in;
    @(posedge clk) disable iff (!rst_n) (in_valid && !in_ready) |=> (in_valid && $stable(in_data));
  endproperty
  a_hold_in: assert property (p_hold_in) else $error("stream_fifo: input dropped before accepted");

endmodule
