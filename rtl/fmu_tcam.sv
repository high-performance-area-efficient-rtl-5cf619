// fmu_tcam: SRAM-based ternary CAM with fast mapping and updating.
//
// A DEPTH x WIDTH TCAM (DEPTH = L*N, WIDTH = K*SUB_W; 512 x 36 by default) is
// built from L layers of K memory blocks instead of match-line CAM cells. The
// CAM word is cut into K subwords; each subword is used directly as the row
// address of its block, and the N columns of a layer stand for the layer's N
// CAM addresses. A word is present at an address when the addressed bit is 1 in
// all K blocks, which a K-input AND per column checks. A priority encoder picks
// the lowest matching address.
//
// Operations (one per cycle, wr has priority over srch):
//   update: wr with wr_addr, key (value), mask (1 = don't care), store
//           (1 = store, 0 = delete). Cycle t1 registers and splits the word;
//           cycle t2 rewrites column (wr_addr mod N) of the single layer
//           wr_addr / N. wr_done pulses after t2; a search issued in the cycle
//           after wr already sees the new contents. Latency 2 cycles at any
//           depth, and any address can be updated in any order.
//   search: srch with key. t1 registers and splits the key, t2 reads one row
//           of every block. srch_done pulses with match_lines (one bit per
//           address), match_found and match_addr 2 cycles after srch. A new
//           search can be issued every cycle.
// Reset (rst_n low, synchronous) empties the TCAM.
//
// The layer/block organisation, direct subword addressing, the ANDing of the
// blocks' bits, the two-cycle mapping and the one-layer update follow the
// document. Ternary storage by setting all rows a don't-care subword covers,
// the column-wide rewrite that makes updates independent of the old contents,
// the port list and the reset are this design's choices.
module fmu_tcam
  import fmu_pkg::*;
#(
  parameter int unsigned SUB_W = DEF_SUB_W,
  parameter int unsigned K     = DEF_K,
  parameter int unsigned N     = DEF_N,
  parameter int unsigned L     = DEF_L,
  localparam int unsigned WIDTH  = K * SUB_W,
  localparam int unsigned DEPTH  = L * N,
  localparam int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned COL_W  = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [WIDTH-1:0]  mask,
  input  logic              store,
  input  logic              srch,
  input  logic [WIDTH-1:0]  key,
  output logic              wr_done,
  output logic              srch_done,
  output logic [DEPTH-1:0]  match_lines,
  output logic              match_found,
  output logic [ADDR_W-1:0] match_addr
);

  op_e                     op_q;
  logic [ADDR_W-1:0]       addr_q;
  logic [K-1:0][SUB_W-1:0] csw_q, cmask_q;
  logic                    store_q;

  // t1: request register and subword generation
  fmu_subword_gen #(.SUB_W(SUB_W), .K(K), .ADDR_W(ADDR_W)) u_swgen (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr      (wr),
    .srch    (srch),
    .addr    (wr_addr),
    .word    (key),
    .mask    (mask),
    .valid   (store),
    .op_q    (op_q),
    .addr_q  (addr_q),
    .csw_q   (csw_q),
    .cmask_q (cmask_q),
    .valid_q (store_q)
  );

  logic [L-1:0]     layer_we, layer_re;
  logic [COL_W-1:0] col;

  fmu_layer_ctrl #(.L(L), .N(N), .ADDR_W(ADDR_W)) u_ctrl (
    .op       (op_q),
    .addr     (addr_q),
    .layer_we (layer_we),
    .layer_re (layer_re),
    .col      (col)
  );

  // t2: layers
  for (genvar l = 0; l < L; l++) begin : g_layer
    fmu_layer #(.SUB_W(SUB_W), .K(K), .N(N)) u_layer (
      .clk   (clk),
      .rst_n (rst_n),
      .we    (layer_we[l]),
      .re    (layer_re[l]),
      .col   (col),
      .csw   (csw_q),
      .cmask (cmask_q),
      .store (store_q),
      .match (match_lines[l*N +: N])
    );
  end

  fmu_priority_encoder #(.W(DEPTH)) u_pe (
    .lines (match_lines),
    .found (match_found),
    .idx   (match_addr)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_done   <= 1'b0;
      srch_done <= 1'b0;
    end else begin
      wr_done   <= (op_q == OP_WRITE);
      srch_done <= (op_q == OP_SEARCH);
    end
  end

endmodule
