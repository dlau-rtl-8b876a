// tmmu - Tiled Matrix Multiplication Unit.
//
// Computes the weighted sums of one fully connected layer, s_j = sum_i
// w[i][j] * x[i], tile by tile: the inputs are cut into tiles of LANES (32)
// nodes, and for every tile the unit emits one part sum per output neuron,
// in the order tile 0 (j = 0 .. n_out-1), tile 1, ... The PSAU adds the part
// sums of a neuron over the tiles.
//
// Weights. The whole weight matrix of the layer is cached in LANES block-RAM
// banks (weight_bram). While loading, weights arrive row by row (input node i
// outer, output neuron j inner) and w[i][j] is written to bank i % LANES at
// address (i / LANES) * MAX_OUT + j. Reading address t * MAX_OUT + j from all
// banks at once gives the LANES weights of tile t for neuron j in one cycle.
//
// Inputs. Node values are kept in two register sets of LANES values each. One
// set feeds the multipliers for the current tile while the other is filled
// with the next tile from the input stream, and the roles swap at each tile,
// so after the first tile the computation does not wait for input data as
// long as a tile takes longer to compute (n_out cycles) than to load. A set is
// released for refilling once the last product of its tile has been formed.
// A last, short tile (n_in not a multiple of LANES) masks its unused lanes.
//
// Pipeline (one part sum per cycle): issue address -> bank read (1 cycle) ->
// LANES multipliers (registered) -> adder tree into the output register. A
// single enable stalls every stage when the output is not taken. Latency from
// issue to part sum: 3 cycles.
//
// Control: w_start (one cycle) begins loading n_in*n_out weights from the w
// stream; start (one cycle) begins a layer that takes n_in node values from
// the x stream and produces n_tiles*n_out part sums. cfg_n_in and cfg_n_out
// are sampled at those pulses (1 .. MAX_IN and 1 .. MAX_OUT). Weights must be
// loaded before a layer starts and not while it runs.
//
// LANES (a power of two) sets the tile size: fewer lanes cost fewer
// multipliers and banks and take more cycles per layer.
//
// The banking rule (i % 32), the parallel read of 32 weights and the two
// alternating input register sets follow the accelerator description. The
// load order, address map, pipeline depth, handshakes and the partial-tile
// masking are this design's choices.
module tmmu
  import dlau_pkg::*;
#(
  parameter int MAX_IN  = 256,
  parameter int MAX_OUT = 256,
  parameter int LANES   = TILE    // inputs per tile = banks = multipliers
) (
  input  logic  clk,
  input  logic  rst_n,
  input  idx_t  cfg_n_in,
  input  idx_t  cfg_n_out,
  // weight loading
  input  logic  w_start,
  input  logic  w_valid,
  output logic  w_ready,
  input  data_t w_data,
  output logic  w_busy,
  // layer computation
  input  logic  start,
  input  logic  x_valid,
  output logic  x_ready,
  input  data_t x_data,
  output logic  ps_valid,
  input  logic  ps_ready,
  output psum_t ps_data,
  output logic  busy
);

  localparam int NT    = (MAX_IN + LANES - 1) / LANES;   // max tiles
  localparam int DEPTH = NT * MAX_OUT;                  // words per bank
  localparam int AW    = $clog2(DEPTH);
  localparam int LW    = $clog2(LANES);
  localparam int SUM_W = PROD_W + LW;                   // exact tile sum

  if (LANES != (1 << LW) || LANES < 2) begin : g_bad_lanes
    $error("tmmu: LANES must be a power of two, at least 2");
  end

  // ---------------------------------------------------------------- weights
  idx_t          n_in_q, n_out_q;
  logic [LW-1:0] wl_lane;      // i % LANES
  idx_t          wl_tile;      // i / LANES
  idx_t          wl_row;       // i
  idx_t          wl_col;       // j
  logic          w_push;
  logic [AW-1:0] w_addr;

  assign w_ready = w_busy;
  assign w_push  = w_valid && w_ready;
  assign w_addr  = AW'(wl_tile * MAX_OUT + wl_col);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_busy  <= 1'b0;
      wl_lane <= '0;
      wl_tile <= '0;
      wl_row  <= '0;
      wl_col  <= '0;
    end else if (w_start) begin
      w_busy  <= 1'b1;
      wl_lane <= '0;
      wl_tile <= '0;
      wl_row  <= '0;
      wl_col  <= '0;
    end else if (w_push) begin
      if (wl_col == n_out_q - 1'b1) begin
        wl_col <= '0;
        wl_row <= wl_row + 1'b1;
        if (wl_lane == LW'(LANES - 1)) begin
          wl_lane <= '0;
          wl_tile <= wl_tile + 1'b1;
        end else begin
          wl_lane <= wl_lane + 1'b1;
        end
        if (wl_row == n_in_q - 1'b1) w_busy <= 1'b0;
      end else begin
        wl_col <= wl_col + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_in_q  <= idx_t'(1);
      n_out_q <= idx_t'(1);
    end else if (w_start || start) begin
      n_in_q  <= cfg_n_in;
      n_out_q <= cfg_n_out;
    end
  end

  // ------------------------------------------------------- pipeline control
  logic en;                       // global pipeline enable
  assign en = !ps_valid || ps_ready;

  // ------------------------------------------------ input register sets
  data_t         xset [2][LANES];
  logic [LW:0]   xlen [2];         // valid lanes of the tile held in a set
  logic [1:0]    set_full;
  logic          ld_set;           // set being filled
  logic [LW-1:0] ld_lane;
  idx_t          ld_rem;           // inputs not yet loaded
  logic          ld_act;
  logic [LW:0]   ld_len;           // length of the tile being loaded
  logic          x_push;
  logic          rel_v;            // a set is released this cycle
  logic          rel_set;

  assign ld_len  = (ld_rem >= idx_t'(LANES)) ? (LW+1)'(LANES) : (LW+1)'(ld_rem);
  assign x_ready = ld_act && !set_full[ld_set];
  assign x_push  = x_valid && x_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      set_full <= '0;
      ld_set   <= 1'b0;
      ld_lane  <= '0;
      ld_rem   <= '0;
      ld_act   <= 1'b0;
      xlen[0]  <= '0;
      xlen[1]  <= '0;
    end else if (start) begin
      set_full <= '0;
      ld_set   <= 1'b0;
      ld_lane  <= '0;
      ld_rem   <= cfg_n_in;
      ld_act   <= 1'b1;
    end else begin
      if (rel_v) set_full[rel_set] <= 1'b0;
      if (x_push) begin
        if ({1'b0, ld_lane} == ld_len - 1'b1) begin
          set_full[ld_set] <= 1'b1;
          xlen[ld_set]     <= ld_len;
          ld_set           <= ~ld_set;
          ld_lane          <= '0;
          ld_rem           <= ld_rem - idx_t'(ld_len);
          if (ld_rem == idx_t'(ld_len)) ld_act <= 1'b0;
        end else begin
          ld_lane <= ld_lane + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (x_push) xset[ld_set][ld_lane] <= x_data;
  end

  // ------------------------------------------------------ stage 0: issue
  logic          iss_act;
  logic          iss_set;
  idx_t          iss_tile, iss_col;
  logic          issue;
  logic [AW-1:0] r_addr;
  idx_t          n_tiles;

  assign n_tiles = (n_in_q + idx_t'(LANES - 1)) >> LW;
  assign issue   = en && iss_act && set_full[iss_set];
  assign r_addr  = AW'(iss_tile * MAX_OUT + iss_col);

  // stage 1 (bank output), stage 2 (products), stage 3 = ps_* output
  typedef struct packed {
    logic first, last, eol, tile_end, set;
    idx_t idx;
  } meta_t;

  logic  s1_v, s2_v;
  meta_t s1_m, s2_m;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iss_act  <= 1'b0;
      iss_set  <= 1'b0;
      iss_tile <= '0;
      iss_col  <= '0;
      busy     <= 1'b0;
    end else if (start) begin
      iss_act  <= 1'b1;
      iss_set  <= 1'b0;
      iss_tile <= '0;
      iss_col  <= '0;
      busy     <= 1'b1;
    end else begin
      if (issue) begin
        if (iss_col == n_out_q - 1'b1) begin
          iss_col  <= '0;
          iss_tile <= iss_tile + 1'b1;
          iss_set  <= ~iss_set;
          if (iss_tile == n_tiles - 1'b1) iss_act <= 1'b0;
        end else begin
          iss_col <= iss_col + 1'b1;
        end
      end
      if (!iss_act && !s1_v && !s2_v && !ps_valid) busy <= 1'b0;
    end
  end

  // ------------------------------------------------------- weight banks
  data_t w_rd [LANES];
  for (genvar b = 0; b < LANES; b++) begin : g_bank
    weight_bram #(.W(DATA_W), .DEPTH(DEPTH)) u_bank (
      .clk   (clk),
      .we    (w_push && (wl_lane == LW'(b))),
      .waddr (w_addr),
      .wdata (w_data),
      .re    (en),
      .raddr (r_addr),
      .rdata (w_rd[b])
    );
  end

  // ------------------------------------------- stage 1 -> 2: multipliers
  logic signed [PROD_W-1:0] prod [LANES];
  assign rel_v   = en && s1_v && s1_m.tile_end;
  assign rel_set = s1_m.set;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v     <= 1'b0;
      s2_v     <= 1'b0;
      ps_valid <= 1'b0;
    end else if (start) begin
      s1_v     <= 1'b0;
      s2_v     <= 1'b0;
      ps_valid <= 1'b0;
    end else if (en) begin
      s1_v     <= issue;
      s2_v     <= s1_v;
      ps_valid <= s2_v;
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      s1_m.first    <= (iss_tile == '0);
      s1_m.last     <= (iss_tile == n_tiles - 1'b1);
      s1_m.eol      <= (iss_tile == n_tiles - 1'b1) && (iss_col == n_out_q - 1'b1);
      s1_m.tile_end <= (iss_col == n_out_q - 1'b1);
      s1_m.set      <= iss_set;
      s1_m.idx      <= iss_col;
      s2_m          <= s1_m;
      for (int l = 0; l < LANES; l++) begin
        prod[l] <= ((LW+1)'(l) < xlen[s1_m.set])
                   ? PROD_W'(w_rd[l]) * PROD_W'(xset[s1_m.set][l]) : '0;
      end
    end
  end

  // ----------------------------------------- stage 2 -> 3: adder tree
  // level v holds LANES >> v partial sums; level LW is the tile sum
  for (genvar v = 0; v <= LW; v++) begin : g_tree
    logic signed [SUM_W-1:0] s [LANES >> v];
    for (genvar n = 0; n < (LANES >> v); n++) begin : g_node
      if (v == 0) begin : g_leaf
        assign s[n] = SUM_W'(prod[n]);
      end else begin : g_add
        assign s[n] = g_tree[v-1].s[2*n] + g_tree[v-1].s[2*n+1];
      end
    end
  end

  logic signed [SUM_W-1:0] tree_sum;
  assign tree_sum = g_tree[LW].s[0];

  always_ff @(posedge clk) begin
    if (en) begin
      ps_data.first <= s2_m.first;
      ps_data.last  <= s2_m.last;
      ps_data.eol   <= s2_m.eol;
      ps_data.idx   <= s2_m.idx;
      ps_data.sum   <= acc_t'(tree_sum);
    end
  end

endmodule
