// fmu_layer_ctrl: control logic on top of the layers.
//
// The CAM address space is cut into L layers of N consecutive addresses: layer
// l holds addresses l*N .. l*N+N-1. For an update the address is decoded into a
// one-hot write enable, so only the one layer that holds the address is
// written and all other layers stay idle, and into the column (address mod N)
// inside that layer. A search enables the read port of every layer.
//
// Purely combinational; it acts on the request registered by fmu_subword_gen
// (clock period t2). The layer selection by address follows the document; the
// address layout (layer = address / N) is this design's choice. An address
// beyond L*N-1 enables no layer.
module fmu_layer_ctrl
  import fmu_pkg::*;
#(
  parameter int unsigned L      = DEF_L,
  parameter int unsigned N      = DEF_N,
  parameter int unsigned ADDR_W = $clog2(DEF_L * DEF_N),
  localparam int unsigned COL_W = (N > 1) ? $clog2(N) : 1
) (
  input  op_e               op,
  input  logic [ADDR_W-1:0] addr,
  output logic [L-1:0]      layer_we,
  output logic [L-1:0]      layer_re,
  output logic [COL_W-1:0]  col
);

  always_comb begin
    layer_we = '0;
    layer_re = '0;
    col      = COL_W'(int'(addr) % int'(N));
    for (int unsigned l = 0; l < L; l++) begin
      if (op == OP_WRITE && int'(addr) / int'(N) == int'(l)) layer_we[l] = 1'b1;
      if (op == OP_SEARCH) layer_re[l] = 1'b1;
    end
  end

  // An update never enables more than one layer.
  a_one_layer : assert final ($onehot0(layer_we))
    else $error("fmu_layer_ctrl: more than one layer selected for update");

endmodule
