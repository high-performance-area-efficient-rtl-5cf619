// tb_fmu_layer_ctrl: exhaustive check of the layer control at its default size
// (16 layers of 32 addresses). For every address and every operation the
// write enables must be one-hot on layer addr[8:5] for a write and all zero
// otherwise, the read enables all one for a search, and the column addr[4:0].
// Addresses are also checked against the layer address ranges l*N..l*N+N-1.
module tb_fmu_layer_ctrl;
  import fmu_pkg::*;
  localparam int unsigned L = DEF_L, N = DEF_N, ADDR_W = 9;
  op_e op;
  logic [ADDR_W-1:0] addr;
  logic [L-1:0] layer_we, layer_re;
  logic [4:0] col;
  int checks = 0, failures = 0;

  fmu_layer_ctrl #(.L(L), .N(N), .ADDR_W(ADDR_W)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 3; o++) begin
      for (int a = 0; a < 512; a++) begin
        automatic logic [L-1:0] ewe = '0, ere = '0;
        op = op_e'(o); addr = ADDR_W'(a);
        #1;
        if (o == int'(OP_WRITE)) ewe[addr[8:5]] = 1'b1;
        if (o == int'(OP_SEARCH)) ere = '1;
        checks++;
        if (layer_we != ewe || layer_re != ere || col != addr[4:0]) begin
          failures++;
          $display("op %0d addr %0d: we %h re %h col %0d", o, a, layer_we, layer_re, col);
        end
        // the one enabled layer's address range holds the address
        for (int l = 0; l < int'(L); l++) if (layer_we[l]) begin
          checks++;
          if (!(a >= l * int'(N) && a <= l * int'(N) + int'(N) - 1)) begin
            failures++; $display("addr %0d outside layer %0d", a, l);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
