// tb_fmu_layer: checks one layer in the small geometry of the mapping example:
// K = 2 blocks of 8 rows (3-bit subwords, 6-bit words) and N = 4 columns.
// First the example word is mapped to column 1 (subword 6 in the first block,
// 5 in the second) and only key {5,6} may match column 1, also next to a fully
// don't-care word in column 2. Then random ternary
// stores, deletes and searches follow; a column matches the key exactly when
// its last stored word, compared bit by bit outside the don't-care mask,
// equals the key. Match lines are checked one cycle after re.
module tb_fmu_layer;
  localparam int unsigned SUB_W = 3, K = 2, N = 4, W = K * SUB_W;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, we, re, store;
  logic [1:0] col;
  logic [K-1:0][SUB_W-1:0] csw, cmask;
  logic [N-1:0] match;
  logic [W-1:0] mval [N], mmsk [N];
  logic mvld [N];
  int checks = 0, failures = 0;

  fmu_layer #(.SUB_W(SUB_W), .K(K), .N(N)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr_col(input int c, input logic [W-1:0] v, input logic [W-1:0] m, input logic st);
    @(negedge clk);
    we = 1; re = 0; col = 2'(c); store = st; csw = v; cmask = m;
    mval[c] = v; mmsk[c] = m; mvld[c] = st;
    @(negedge clk); we = 0;
  endtask

  task automatic search(input logic [W-1:0] k);
    automatic logic [N-1:0] e;
    for (int c = 0; c < int'(N); c++) begin
      e[c] = mvld[c];
      for (int b = 0; b < int'(W); b++) if (!mmsk[c][b] && mval[c][b] != k[b]) e[c] = 1'b0;
    end
    @(negedge clk);
    we = 0; re = 1; csw = k; cmask = '0;
    @(posedge clk); #1;
    checks++;
    if (match != e) begin failures++; $display("key %h: match %b expected %b", k, match, e); end
    @(negedge clk); re = 0;
  endtask

  initial begin
    rst_n = 0; we = 0; re = 0; store = 0; col = '0; csw = '0; cmask = '0;
    for (int c = 0; c < int'(N); c++) begin mval[c] = '0; mmsk[c] = '0; mvld[c] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wr_col(1, {3'd5, 3'd6}, '0, 1'b1);
    search({3'd5, 3'd6});
    search({3'd5, 3'd7});
    search({3'd4, 3'd6});
    // the example word must sit in column 1 only: a fully don't-care word in
    // column 2 matches every key, the example key then matches columns 1 and 2
    wr_col(2, '0, '1, 1'b1);
    search({3'd5, 3'd6});
    search({3'd0, 3'd6});
    wr_col(2, '0, '0, 1'b0);
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(2) == 0)
        wr_col($urandom_range(N - 1), W'($urandom),
               ($urandom_range(1) == 0) ? '0 : W'($urandom & $urandom), ($urandom_range(9) != 0));
      else if ($urandom_range(1) == 0)
        search(mval[$urandom_range(N - 1)] ^ (W'($urandom) & mmsk[$urandom_range(N - 1)]));
      else
        search(W'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
