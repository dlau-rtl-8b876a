// dlau_pkg - number formats and stream payload types shared by the DLAU units.
//
// Node values and weights are signed Q8.8 fixed point (16 bits, 8 fraction
// bits). A product of two of them is Q16.16, and part sums and accumulated
// sums are kept as signed Q24.16 in 40 bits, wide enough that a 32-lane tile
// sum and the accumulation over many tiles cannot overflow for realistic
// layers. The activation output is again Q8.8, so a layer's outputs can be fed
// back as the next layer's inputs. The tile width of 32 follows the
// accelerator's 32 weight banks; the number formats are this design's choice.
package dlau_pkg;

  parameter int DATA_W   = 16;           // node value / weight width (Q8.8)
  parameter int FRAC_W   = 8;            // fraction bits of DATA_W values
  parameter int PROD_W   = 2 * DATA_W;   // product width (Q16.16)
  parameter int ACC_W    = 40;           // part-sum / accumulator width (Q24.16)
  parameter int ACC_FRAC = 2 * FRAC_W;   // fraction bits of ACC_W values
  parameter int TILE     = 32;           // weight banks = inputs per tile
  parameter int IDX_W    = 16;           // width of neuron indices and sizes

  // adder used by the PSAU for its accumulation
  typedef enum logic {
    ADDER_BRENT_KUNG,   // single-cycle parallel-prefix adder (default)
    ADDER_PASTA         // iterative half-adder adder, several cycles per add
  } adder_e;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic [IDX_W-1:0]         idx_t;

  // TMMU -> PSAU: one part sum of output neuron idx over one input tile.
  typedef struct packed {
    logic first;   // first tile: start a new accumulation
    logic last;    // last tile: the accumulation is complete after this
    logic eol;     // last part sum of the whole layer
    idx_t idx;     // output neuron index
    acc_t sum;     // part sum (Q24.16)
  } psum_t;

  // PSAU -> AFAU: a finished weighted sum of one output neuron.
  typedef struct packed {
    logic eol;     // last neuron of the layer
    acc_t sum;     // Q24.16
  } nsum_t;

  // AFAU -> memory: one activated output value.
  typedef struct packed {
    logic  eol;    // last neuron of the layer
    data_t y;      // Q8.8, in [0, 1]
  } act_t;

endpackage
