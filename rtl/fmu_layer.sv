// fmu_layer: one layer of the TCAM, K cascaded SRAM blocks and N K-input ANDs.
//
// Block j (0-based) is addressed by subword Csw(j). On a search all K blocks
// read the row given by their subword; column c of the layer matches when bit
// c of every block's row is 1, i.e. every subword of the key is present in the
// word stored at that column. The N AND outputs are the match lines of the
// layer's addresses base..base+N-1.
//
// On an update (we) all K blocks write the same column, each with its own
// ternary subword, in one cycle. Timing: the match lines follow the registered
// block outputs, so they are valid the cycle after re. Structure follows the
// document; the subword-to-block order follows its mapping example.
module fmu_layer
  import fmu_pkg::*;
#(
  parameter int unsigned SUB_W = DEF_SUB_W,
  parameter int unsigned K     = DEF_K,
  parameter int unsigned N     = DEF_N,
  localparam int unsigned COL_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    we,
  input  logic                    re,
  input  logic [COL_W-1:0]        col,
  input  logic [K-1:0][SUB_W-1:0] csw,
  input  logic [K-1:0][SUB_W-1:0] cmask,
  input  logic                    store,
  output logic [N-1:0]            match
);

  logic [K-1:0][N-1:0] rd;

  for (genvar j = 0; j < K; j++) begin : g_blk
    fmu_sram_block #(.SUB_W(SUB_W), .N(N)) u_sram (
      .clk      (clk),
      .rst_n    (rst_n),
      .we       (we),
      .wr_col   (col),
      .wr_sub   (csw[j]),
      .wr_mask  (cmask[j]),
      .wr_store (store),
      .re       (re),
      .rd_row   (csw[j]),
      .rd_q     (rd[j])
    );
  end

  always_comb begin
    match = '1;
    for (int unsigned j = 0; j < K; j++) match &= rd[j];
  end

endmodule
