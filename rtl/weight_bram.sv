// weight_bram - one bank of the TMMU weight cache.
//
// The TMMU keeps the whole weight matrix between two adjacent layers on chip,
// spread over 32 such banks: row i of the matrix (the weights leaving input
// node i) is stored in bank i % 32, so one read cycle yields 32 weights for 32
// consecutive input nodes. Each bank is a simple dual-port block RAM: one
// write port used while the weights are loaded and one read port used while
// the layer is computed. The read is registered (one cycle latency) and its
// output register only loads when re is high, so a stalled pipeline keeps the
// word it already read. The banking rule follows the accelerator
// description; the dual-port organisation and the read enable are this
// design's choices. The memory has no reset, like a block RAM.
module weight_bram #(
  parameter int W     = 16,
  parameter int DEPTH = 2048
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
