// tb_fmu_sram_block: checks one SRAM block (16 rows x 8 columns here) against a
// bit-array model. Random column updates with random ternary subwords and
// random store/delete flags are mixed with reads; a read returns, one cycle
// later, the row addressed, and row r bit c of the model is 1 exactly when the
// last update of column c stored a subword whose cared-for bits equal r. Reads
// with re low must hold the previous output, and reset must clear the block.
module tb_fmu_sram_block;
  localparam int unsigned SUB_W = 4, N = 8, ROWS = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, we, wr_store, re;
  logic [2:0] wr_col;
  logic [SUB_W-1:0] wr_sub, wr_mask, rd_row;
  logic [N-1:0] rd_q;
  logic [N-1:0] model [ROWS];
  int checks = 0, failures = 0;

  fmu_sram_block #(.SUB_W(SUB_W), .N(N)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; we = 0; re = 0; wr_store = 0; wr_col = '0; wr_sub = '0; wr_mask = '0; rd_row = '0;
    for (int r = 0; r < int'(ROWS); r++) model[r] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // the mapping example: column 1 gets subword 6, a single '1' in row 6
    @(negedge clk); we = 1; wr_col = 3'd1; wr_sub = 4'd6; wr_mask = '0; wr_store = 1;
    model[6][1] = 1'b1;
    for (int i = 0; i < 6000; i++) begin
      automatic int kind = $urandom_range(9);
      @(negedge clk);
      we = 0; re = 0;
      if (kind < 4) begin
        automatic logic [2:0] c = 3'($urandom);
        automatic logic [SUB_W-1:0] s = SUB_W'($urandom);
        automatic logic [SUB_W-1:0] m = ($urandom_range(1) == 0) ? '0 : SUB_W'($urandom);
        automatic logic st = ($urandom_range(7) != 0);
        we = 1; wr_col = c; wr_sub = s; wr_mask = m; wr_store = st;
        for (int r = 0; r < int'(ROWS); r++) begin
          automatic logic hit = 1'b1;
          for (int b = 0; b < int'(SUB_W); b++)
            if (!m[b] && (r >> b) % 2 != int'(s[b])) hit = 1'b0;
          model[r][c] = st && hit;
        end
      end else if (kind < 9) begin
        automatic logic [SUB_W-1:0] rr = SUB_W'($urandom);
        automatic logic [N-1:0] e = model[rr];
        re = 1; rd_row = rr;
        @(posedge clk); #1;
        checks++;
        if (rd_q != e) begin
          failures++; $display("row %0d: read %b expected %b", rr, rd_q, e);
        end
      end else begin
        // no read: output must hold
        automatic logic [N-1:0] held = rd_q;
        rd_row = SUB_W'($urandom);
        @(posedge clk); #1;
        checks++;
        if (rd_q != held) begin failures++; $display("output changed without re"); end
      end
    end
    // reset empties the block
    @(negedge clk); we = 0; re = 0; rst_n = 0;
    @(negedge clk); rst_n = 1;
    for (int r = 0; r < int'(ROWS); r++) begin
      @(negedge clk); re = 1; rd_row = SUB_W'(r);
      @(posedge clk); #1;
      checks++;
      if (rd_q != '0) begin failures++; $display("row %0d not cleared", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
