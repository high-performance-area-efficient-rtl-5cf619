// fmu_pkg: types and default sizes shared by the SRAM-based TCAM with fast
// mapping and updating.
//
// The default geometry is the 512-entry by 36-bit CAM built from 64 block RAMs
// of 18 Kbit: L = 16 layers, each of K = 4 cascaded blocks of 512 rows
// (SUB_W = 9 address bits per subword) and N = 32 valid columns. The CAM depth
// is L*N and the CAM word width is K*SUB_W. The operation encoding is a choice
// of this design.
package fmu_pkg;

  localparam int unsigned DEF_SUB_W = 9;   // rows per block = 2**SUB_W = 512
  localparam int unsigned DEF_K     = 4;   // SRAM blocks per layer
  localparam int unsigned DEF_N     = 32;  // valid columns per block = addresses per layer
  localparam int unsigned DEF_L     = 16;  // layers

  // Operation carried through the two-cycle pipeline.
  typedef enum logic [1:0] {
    OP_IDLE   = 2'd0,
    OP_SEARCH = 2'd1,
    OP_WRITE  = 2'd2
  } op_e;

  // True when every cared-for bit of the ternary subword (value, mask) equals
  // the corresponding bit of row index 'row'. mask bit 1 means "don't care".
  function automatic logic ternary_hit(input logic [31:0] row,
                                       input logic [31:0] value,
                                       input logic [31:0] mask);
    return ((row ^ value) & ~mask) == 32'd0;
  endfunction

endpackage
