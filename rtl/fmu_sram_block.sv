// fmu_sram_block: one SRAM block (SRAM l,j) of a layer.
//
// The block has 2**SUB_W rows of N bits. Bit c of row r is 1 when the word
// stored at column c of this layer has, in this block's subword position, a
// subword that matches the value r. Searching is a plain memory read: the
// search subword is the row address, and the N bits read out say which of the
// layer's N addresses hold that subword.
//
// Mapping/updating writes one column: every row r gets bit c = 1 if r matches
// the ternary subword (value, mask; mask bit 1 = don't care), otherwise 0. The
// old contents of the column are therefore overwritten in the same cycle, so an
// update takes one cycle whatever the CAM depth and needs no knowledge of the
// word stored before; with store = 0 the column is cleared (address deleted).
// A binary subword sets exactly one row, a subword with x don't-care bits sets
// 2**x rows.
//
// Timing: writes and the registered read happen on the rising edge when we /
// re are high; rd_q holds the last row read. Reset clears the whole block
// (no address matches anything). Row addressing by subword and setting the
// addressed bit follow the document; the column-wide ternary write and the
// reset are this design's choices, which make the block a register array with
// a per-row write enable rather than a single-port block RAM.
module fmu_sram_block
  import fmu_pkg::*;
#(
  parameter int unsigned SUB_W = DEF_SUB_W,
  parameter int unsigned N     = DEF_N,
  localparam int unsigned COL_W = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned ROWS  = 2 ** SUB_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // update port
  input  logic             we,
  input  logic [COL_W-1:0] wr_col,
  input  logic [SUB_W-1:0] wr_sub,
  input  logic [SUB_W-1:0] wr_mask,
  input  logic             wr_store,
  // search port
  input  logic             re,
  input  logic [SUB_W-1:0] rd_row,
  output logic [N-1:0]     rd_q
);

  logic [N-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned r = 0; r < ROWS; r++) mem[r] <= '0;
    end else if (we) begin
      for (int unsigned r = 0; r < ROWS; r++)
        mem[r][wr_col] <= wr_store && ternary_hit(32'(r), 32'(wr_sub), 32'(wr_mask));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  rd_q <= '0;
    else if (re) rd_q <= mem[rd_row];
  end

endmodule
