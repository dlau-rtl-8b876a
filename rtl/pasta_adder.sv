// pasta_adder - parallel adder built from half adders that iterate until no
// carry is left (clocked rendering of a parallel self-timed adder, PASTA).
//
// Every bit position has one half adder and a two-input multiplexer in
// front of it. In the initial phase (start, SEL = 0) the multiplexers pass
// the operands and each half adder forms sum s_i = a_i XOR b_i and carry
// c_i = a_i AND b_i. In the iterative phase (SEL = 1) the multiplexers feed
// back each position's sum and the carry of the position below, and the half
// adders run again: s_i' = s_i XOR c_(i-1), c_i' = s_i AND c_(i-1). This
// repeats until all carries are zero; then s is the sum. The carry out of
// the top position is collected as cout. The carry input enters as the carry
// below bit 0 in the first iteration.
//
// In the self-timed original, each iteration is separated by gate delays and
// completion is seen when all carry signals settle at zero. Here each
// iteration takes one clock cycle and the completion detector is the
// zero test of the carry register. The number of iterations is one more than
// the longest carry chain of the operands: done can rise one cycle after
// start (no carries) and at most W+1 cycles after it.
//
// Interface: pulse start with a, b, cin valid; busy is high while it
// iterates; done is high (and sum/cout valid) from completion until the next
// start. The half-adder iteration, the SEL multiplexing and the all-carries-
// zero completion follow the adder description; clocking the iterations and
// the start/busy/done interface are this design's choices.
module pasta_adder #(
  parameter int W = 40
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W-1:0] s, c;      // half-adder sum and carry registers
  logic         c_in;      // carry still to enter at bit 0
  logic         run;
  logic [W-1:0] c_sh;      // carries moved one position up (SEL = 1 inputs)

  assign c_sh = {c[W-2:0], c_in};
  assign busy = run && ((c != '0) || c_in);
  assign done = run && (c == '0) && !c_in;
  assign sum  = s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run  <= 1'b0;
      s    <= '0;
      c    <= '0;
      c_in <= 1'b0;
      cout <= 1'b0;
    end else if (start) begin
      // initial phase: half adders on the operands
      run  <= 1'b1;
      s    <= a ^ b;
      c    <= a & b;
      c_in <= cin;
      cout <= 1'b0;
    end else if (busy) begin
      // iterative phase: half adders on sums and shifted carries
      s    <= s ^ c_sh;
      c    <= s & c_sh;
      c_in <= 1'b0;
      cout <= cout | c[W-1];
    end
  end

endmodule
