// afau - Activation Function Acceleration Unit: pipelined sigmoid.
//
// The sigmoid is approximated by piecewise linear interpolation,
// y = a[i]*x + b[i], over segments of width k = 0.5. The unit exploits the
// symmetry sigmoid(x) = 1 - sigmoid(-x) and the bounded range:
//   x <= -8      : y = 0
//   -8 < x <= 0  : y = 1 - (a[i]*(-x) + b[i]),  i = floor(-x / k)
//   0 < x <= 8   : y = a[i]*x + b[i],           i = floor(x / k)  (i = 16 at x = 8 uses segment 15)
//   x > 8        : y = 1
// so only the 16 segments of (0, 8] are stored. a and b are Q0.16 and sit in
// a 16-word block-RAM ROM read from LUT_FILE; each segment is the chord of
// the sigmoid between its end points: a[i] = (s(x1) - s(x0)) / k,
// b[i] = s(x0) - a[i]*x0 with x0 = i*k, x1 = x0 + k.
//
// Input: a weighted sum in signed Q24.16 (dlau_pkg::nsum_t). Output: y in
// Q8.8 (0 .. 256 meaning 0 .. 1.0), rounded to nearest. Three pipeline
// stages (range/index, table read, multiply-add/symmetry), one result per
// cycle, latency three cycles; a valid/ready handshake on both sides stalls
// the whole pipeline when the output is not taken. The four-segment scheme,
// the table-driven multiply-add and the one-per-cycle pipeline follow the
// accelerator description; k, the number formats and the rounding are this
// design's choices.
module afau
  import dlau_pkg::*;
#(
  parameter string LUT_FILE = "rtl/afau_sigmoid_lut.hex",
  parameter int    SEGS     = 16            // segments in (0, 8]: 8 / k
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  nsum_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output act_t  out_data
);

  localparam int   SW    = $clog2(SEGS);
  localparam int   KSH   = ACC_FRAC + 3 - SW;          // log2(k) in input LSBs
  localparam acc_t EIGHT = acc_t'(8) <<< ACC_FRAC;
  localparam int   XW    = ACC_FRAC + 4;               // |x| <= 8 fits

  typedef enum logic [1:0] {SEG_POS, SEG_NEG, SAT_LO, SAT_HI} seg_e;

  logic [31:0] lut [SEGS];   // {a, b}, both Q0.16
  initial $readmemh(LUT_FILE, lut);

  logic en;
  assign en       = !out_valid || out_ready;
  assign in_ready = en;

  // ---- stage 1: range, |x| and segment index
  logic          s1_v, s1_eol;
  seg_e          s1_seg;
  logic [XW-1:0] s1_xabs;
  logic [SW-1:0] s1_idx;

  seg_e          c1_seg;
  acc_t          c1_abs;
  logic [SW:0]   c1_idx;
  always_comb begin
    if (in_data.sum > EIGHT)           c1_seg = SAT_HI;
    else if (in_data.sum <= -EIGHT)    c1_seg = SAT_LO;
    else if (in_data.sum > 0)          c1_seg = SEG_POS;
    else                               c1_seg = SEG_NEG;
    c1_abs = (in_data.sum < 0) ? -in_data.sum : in_data.sum;
    c1_idx = (SW+1)'(c1_abs >>> KSH);
    if (c1_idx > (SW+1)'(SEGS-1)) c1_idx = (SW+1)'(SEGS-1);
  end

  // ---- stage 2: table read
  logic          s2_v, s2_eol;
  seg_e          s2_seg;
  logic [XW-1:0] s2_xabs;
  logic [15:0]   s2_a, s2_b;

  // ---- stage 3: y = a*|x| + b, then symmetry / saturation (Q0.32 internally)
  logic [47:0] c3_pos, c3_y;
  logic [15:0] c3_q88;
  always_comb begin
    c3_pos = 48'(s2_a) * 48'(s2_xabs) + (48'(s2_b) << ACC_FRAC);
    case (s2_seg)
      SAT_HI:  c3_y = 48'(1) << 32;
      SAT_LO:  c3_y = '0;
      SEG_NEG: c3_y = (48'(1) << 32) - c3_pos;
      default: c3_y = c3_pos;
    endcase
    c3_q88 = 16'((c3_y + (48'(1) << 23)) >> 24);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0;
      s2_v <= 1'b0;
      out_valid <= 1'b0;
    end else if (en) begin
      s1_v <= in_valid;
      s2_v <= s1_v;
      out_valid <= s2_v;
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      s1_eol  <= in_data.eol;
      s1_seg  <= c1_seg;
      s1_xabs <= XW'(c1_abs);
      s1_idx  <= c1_idx[SW-1:0];
      s2_eol  <= s1_eol;
      s2_seg  <= s1_seg;
      s2_xabs <= s1_xabs;
      {s2_a, s2_b} <= lut[s1_idx];
      out_data.eol <= s2_eol;
      out_data.y   <= data_t'(c3_q88);
    end
  end

endmodule
