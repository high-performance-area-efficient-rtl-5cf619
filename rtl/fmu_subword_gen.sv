// fmu_subword_gen: request register and CAM-word splitter (clock period t1).
//
// Every operation of the TCAM starts here. On the rising clock edge the request
// (write/update or search), its address, the CAM word and the don't-care mask
// are captured, and the word is cut into K equal subwords Csw(0)..Csw(K-1) of
// SUB_W bits, Csw(0) being the least significant bits. Subword j later
// addresses SRAM block j+1 of every layer. This register is also the search
// data register of a classical CAM.
//
// Timing: one cycle; outputs are valid the cycle after the request. If wr and
// srch are raised together the write is taken and the search is dropped (an
// assertion flags it). A search carries no mask: mask_q is cleared for it.
// Dividing the word in t1 follows the document; the request encoding, the
// store/delete flag 'valid' and the reset are this design's choices.
module fmu_subword_gen
  import fmu_pkg::*;
#(
  parameter int unsigned SUB_W  = DEF_SUB_W,
  parameter int unsigned K      = DEF_K,
  parameter int unsigned ADDR_W = 9
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr,
  input  logic                   srch,
  input  logic [ADDR_W-1:0]      addr,
  input  logic [K*SUB_W-1:0]     word,
  input  logic [K*SUB_W-1:0]     mask,
  input  logic                   valid,
  output op_e                    op_q,
  output logic [ADDR_W-1:0]      addr_q,
  output logic [K-1:0][SUB_W-1:0] csw_q,
  output logic [K-1:0][SUB_W-1:0] cmask_q,
  output logic                   valid_q
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      op_q    <= OP_IDLE;
      addr_q  <= '0;
      csw_q   <= '0;
      cmask_q <= '0;
      valid_q <= 1'b0;
    end else begin
      op_q    <= wr ? OP_WRITE : (srch ? OP_SEARCH : OP_IDLE);
      addr_q  <= addr;
      valid_q <= valid;
      for (int unsigned j = 0; j < K; j++) begin
        csw_q[j]   <= word[j*SUB_W +: SUB_W];
        cmask_q[j] <= wr ? mask[j*SUB_W +: SUB_W] : '0;
      end
    end
  end

  // One operation per cycle.
  a_one_op : assert property (@(posedge clk) disable iff (!rst_n) !(wr && srch))
    else $error("fmu_subword_gen: write and search requested in the same cycle");

endmodule
