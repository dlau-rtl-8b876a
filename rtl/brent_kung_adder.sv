// brent_kung_adder - combinational W-bit Brent-Kung parallel-prefix adder.
//
// The PSAU adds every incoming part sum to a running sum with this adder.
// It works in the two stages of a prefix adder. Pre-processing forms, for
// every bit, propagate p = a XOR b and generate g = a AND b (the carry input
// is folded into bit 0's generate). The generation stage then combines
// (g, p) pairs in a Brent-Kung tree: an up-sweep builds the group signals of
// aligned blocks of 2, 4, 8 ... bits, and a down-sweep fills in the carries of
// the remaining bit positions from those blocks, giving 2*log2(W)-1 levels of
// carry logic with few cells. The carry into bit i is the group generate of
// bits 0..i-1, and sum[i] = p[i] XOR carry[i]. W need not be a power of two:
// the tree is built for the next power of two, with the upper inputs tied to
// zero. The pre-processing and generation stages follow the adder
// description; the cin/cout ports are this design's choice. No clock.
module brent_kung_adder #(
  parameter int W = 40
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int L = (W > 1) ? $clog2(W) : 1;
  localparam int N = 1 << L;

  localparam int LV = 2 * L;          // prefix levels + level 0

  logic [N-1:0] p0;                   // bit propagate
  logic [N-1:0] g0;                   // bit generate
  logic [N-1:0] gf;                   // prefix generate after the last level

  // pre-processing stage: equations (1) and (2), carry in folded into bit 0
  always_comb begin
    p0        = '0;
    g0        = '0;
    p0[W-1:0] = a ^ b;
    g0[W-1:0] = a & b;
    g0[0]     = (a[0] & b[0]) | ((a[0] ^ b[0]) & cin);
  end

  // generation stage: level v combines node i with node i - D where active;
  // levels 1..L are the up-sweep, L+1..2L-1 the down-sweep
  for (genvar v = 1; v < LV; v++) begin : g_lvl
    localparam int D = (v <= L) ? (1 << (v - 1)) : (1 << (2 * L - 1 - v));
    logic [N-1:0] gi, pi, go, po;
    if (v == 1) begin : g_first
      assign gi = g0;
      assign pi = p0;
    end else begin : g_next
      assign gi = g_lvl[v-1].go;
      assign pi = g_lvl[v-1].po;
    end
    for (genvar i = 0; i < N; i++) begin : g_bit
      localparam bit ACT = (v <= L) ? (((i + 1) % (2 * D)) == 0)
                                    : ((i >= 3 * D - 1) && (((i + 1 - D) % (2 * D)) == 0));
      if (ACT) begin : g_cell
        assign go[i] = gi[i] | (pi[i] & gi[i-D]);
        assign po[i] = pi[i] & pi[i-D];
      end else begin : g_pass
        assign go[i] = gi[i];
        assign po[i] = pi[i];
      end
    end
  end

  if (LV > 1) begin : g_tree
    assign gf = g_lvl[LV-1].go;
  end else begin : g_single
    assign gf = g0;
  end

  // sum: carry into bit i is the prefix generate of bits 0 .. i-1
  assign sum  = p0[W-1:0] ^ {gf[W-2:0], cin};
  assign cout = gf[W-1];

endmodule
