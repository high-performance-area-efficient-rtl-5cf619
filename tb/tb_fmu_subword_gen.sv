// tb_fmu_subword_gen: checks the request register and word splitter at its
// default size (36-bit words, four 9-bit subwords). Random writes, searches,
// idle cycles and resets are applied; one cycle later the registered operation,
// address, store flag, every subword and every subword mask are compared with
// values cut out of the driven word by shifting. A search must clear the mask.
module tb_fmu_subword_gen;
  import fmu_pkg::*;
  localparam int unsigned SUB_W = DEF_SUB_W, K = DEF_K, ADDR_W = 9;
  localparam int unsigned W = K * SUB_W;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, wr, srch, valid;
  logic [ADDR_W-1:0] addr;
  logic [W-1:0] word, mask;
  op_e op_q;
  logic [ADDR_W-1:0] addr_q;
  logic [K-1:0][SUB_W-1:0] csw_q, cmask_q;
  logic valid_q;
  int checks = 0, failures = 0;

  fmu_subword_gen #(.SUB_W(SUB_W), .K(K), .ADDR_W(ADDR_W)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; wr = 0; srch = 0; valid = 0; addr = '0; word = '0; mask = '0;
    @(posedge clk); #1;
    checks++;
    if (op_q != OP_IDLE || csw_q != '0) begin failures++; $display("reset"); end
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      automatic int kind = $urandom_range(2);
      automatic logic [W-1:0] w = W'({$urandom, $urandom});
      automatic logic [W-1:0] m = W'({$urandom, $urandom});
      automatic logic [ADDR_W-1:0] a = ADDR_W'($urandom);
      automatic logic v = 1'($urandom);
      @(negedge clk);
      wr = (kind == 1); srch = (kind == 2); word = w; mask = m; addr = a; valid = v;
      @(posedge clk); #1;
      checks++;
      if (op_q != (kind == 1 ? OP_WRITE : kind == 2 ? OP_SEARCH : OP_IDLE) ||
          addr_q != a || valid_q != v) begin
        failures++; $display("op/addr mismatch at %0d", i);
      end
      for (int j = 0; j < int'(K); j++) begin
        automatic logic [SUB_W-1:0] es = SUB_W'(w >> (j * SUB_W));
        automatic logic [SUB_W-1:0] em = (kind == 1) ? SUB_W'(m >> (j * SUB_W)) : '0;
        checks++;
        if (csw_q[j] != es || cmask_q[j] != em) begin
          failures++;
          $display("subword %0d: got %h/%h exp %h/%h", j, csw_q[j], cmask_q[j], es, em);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
