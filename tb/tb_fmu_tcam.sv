// tb_fmu_tcam: end-to-end test of the SRAM-based TCAM against a reference model.
//
// Three instances are tested. dut_f is the 8 x 6 TCAM of the mapping example
// (two layers of two 8-row blocks, four columns each): the word with subwords
// 6 and 5 is mapped to address 1 (row 6 of the first and row 5 of the second
// block of layer 1); a second word goes to address 4 in layer 2; each key must
// raise only its own match line, and the key with subwords swapped must miss. dut_s is the 4 x 4 TCAM of the classical search
// example (four 4-bit entries 0100, 0111, 011X, 11XX; key 0111 matches
// addresses 1 and 2, the priority encoder reports 1). dut is a reduced
// 32 x 8 TCAM (L=4 layers, K=2 blocks of 16 rows, N=8 columns) driven with
// random stores, ternary stores, in-place updates, deletes and searches; every
// search result (all match lines, found flag, address, 2-cycle latency) is
// compared with a behavioural table of (value, mask, valid) entries.
// Mechanisms counted: binary store, ternary store, update of a used address,
// delete, multiple matches, miss, search in the cycle right after a write,
// back-to-back searches. Each must occur at least once.

module tb_fmu_tcam;
  localparam int unsigned SUB_W = 4;
  localparam int unsigned K     = 2;
  localparam int unsigned N     = 8;
  localparam int unsigned L     = 4;
  localparam int unsigned WIDTH  = K * SUB_W;
  localparam int unsigned DEPTH  = L * N;
  localparam int unsigned ADDR_W = $clog2(DEPTH);
  localparam int unsigned NOPS   = 4000;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    #(10 * (NOPS * 4 + 2000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ dut
  logic              wr, srch, store;
  logic [ADDR_W-1:0] wr_addr;
  logic [WIDTH-1:0]  key, mask;
  logic              wr_done, srch_done, match_found;
  logic [DEPTH-1:0]  match_lines;
  logic [ADDR_W-1:0] match_addr;

  fmu_tcam #(.SUB_W(SUB_W), .K(K), .N(N), .L(L)) dut (
    .clk, .rst_n, .wr, .wr_addr, .mask, .store, .srch, .key,
    .wr_done, .srch_done, .match_lines, .match_found, .match_addr
  );

  // ----------------------------------------------- classical 4x4 example
  logic       s_wr, s_srch, s_store;
  logic [1:0] s_addr;
  logic [3:0] s_key, s_mask;
  logic       s_wr_done, s_srch_done, s_found;
  logic [3:0] s_lines;
  logic [1:0] s_maddr;

  fmu_tcam #(.SUB_W(2), .K(2), .N(4), .L(1)) dut_s (
    .clk, .rst_n, .wr(s_wr), .wr_addr(s_addr), .mask(s_mask), .store(s_store),
    .srch(s_srch), .key(s_key), .wr_done(s_wr_done), .srch_done(s_srch_done),
    .match_lines(s_lines), .match_found(s_found), .match_addr(s_maddr)
  );

  // ------------------------------ 8 x 6 mapping example (L = 2, K = 2)
  logic       f_wr, f_srch, f_done_w, f_done_s, f_found;
  logic [2:0] f_addr, f_maddr;
  logic [5:0] f_key;
  logic [7:0] f_lines;

  fmu_tcam #(.SUB_W(3), .K(2), .N(4), .L(2)) dut_f (
    .clk, .rst_n, .wr(f_wr), .wr_addr(f_addr), .mask(6'd0), .store(1'b1),
    .srch(f_srch), .key(f_key), .wr_done(f_done_w), .srch_done(f_done_s),
    .match_lines(f_lines), .match_found(f_found), .match_addr(f_maddr)
  );

  // -------------------------------------------------- reference model
  logic [WIDTH-1:0] ref_val [DEPTH];
  logic [WIDTH-1:0] ref_msk [DEPTH];
  logic             ref_vld [DEPTH];

  function automatic logic [DEPTH-1:0] ref_lines(input logic [WIDTH-1:0] k);
    logic [DEPTH-1:0] v = '0;
    for (int a = 0; a < int'(DEPTH); a++)
      v[a] = ref_vld[a] && (((k ^ ref_val[a]) & ~ref_msk[a]) == '0);
    return v;
  endfunction

  // Expected results queued at issue time, checked when srch_done pulses.
  typedef struct packed {
    logic [DEPTH-1:0] lines;
    int               issue_cyc;
  } exp_t;
  exp_t exp_q[$];

  int n_bin = 0, n_tern = 0, n_upd = 0, n_del = 0, n_multi = 0, n_miss = 0,
      n_raw = 0, n_b2b = 0, n_wr_lat = 0;

  // checker
  int wr_issue_q[$];
  always @(posedge clk) begin
    if (rst_n && srch_done) begin
      exp_t e;
      logic [ADDR_W-1:0] ea;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected srch_done at cycle %0d", cyc);
      end else begin
        e = exp_q.pop_front();
        ea = '0;
        for (int a = int'(DEPTH) - 1; a >= 0; a--) if (e.lines[a]) ea = ADDR_W'(a);
        checks++;
        if (match_lines !== e.lines || match_found !== (|e.lines) ||
            ((|e.lines) && match_addr !== ea) || (cyc - e.issue_cyc) != 2) begin
          failures++;
          $display("search mismatch: lines %h exp %h found %0b addr %0d exp %0d latency %0d",
                   match_lines, e.lines, match_found, match_addr, ea, cyc - e.issue_cyc);
        end
        if ($countones(e.lines) > 1) n_multi++;
        if (e.lines == '0) n_miss++;
      end
    end
    if (rst_n && wr_done) begin
      checks++;
      if (wr_issue_q.size() == 0 || (cyc - wr_issue_q.pop_front()) != 2) begin
        failures++; $display("write latency wrong at cycle %0d", cyc);
      end else n_wr_lat++;
    end
  end

  task automatic idle();
    wr = 0; srch = 0; store = 0; key = '0; mask = '0; wr_addr = '0;
  endtask

  // drive one operation for one cycle (inputs change after the negedge)
  task automatic do_write(input logic [ADDR_W-1:0] a, input logic [WIDTH-1:0] v,
                          input logic [WIDTH-1:0] m, input logic st);
    @(negedge clk);
    wr = 1; srch = 0; wr_addr = a; key = v; mask = m; store = st;
    wr_issue_q.push_back(cyc);
    if (!st) n_del++;
    else if (ref_vld[a]) n_upd++;
    if (st && m == '0) n_bin++;
    if (st && m != '0) n_tern++;
    ref_val[a] = v; ref_msk[a] = m; ref_vld[a] = st;
  endtask

  task automatic do_search(input logic [WIDTH-1:0] k);
    exp_t e;
    @(negedge clk);
    wr = 0; srch = 1; key = k; mask = '0;
    e.lines = ref_lines(k);
    e.issue_cyc = cyc;
    exp_q.push_back(e);
  endtask

  logic prev_wr, prev_srch;
  always @(posedge clk) begin
    if (rst_n && srch && prev_wr) n_raw++;
    if (rst_n && srch && prev_srch) n_b2b++;
    prev_wr   <= wr;
    prev_srch <= srch;
  end

  // pick a key near a stored entry so searches hit often
  function automatic logic [WIDTH-1:0] pick_key();
    int a = $urandom_range(DEPTH - 1);
    logic [WIDTH-1:0] r = WIDTH'({$urandom, $urandom});
    if ($urandom_range(3) == 0) return r;
    return (ref_val[a] & ~ref_msk[a]) | (r & ref_msk[a]);
  endfunction

  initial begin
    for (int a = 0; a < int'(DEPTH); a++) begin
      ref_val[a] = '0; ref_msk[a] = '0; ref_vld[a] = 1'b0;
    end
    idle();
    s_wr = 0; s_srch = 0; s_store = 0; s_addr = '0; s_key = '0; s_mask = '0;
    f_wr = 0; f_srch = 0; f_addr = '0; f_key = '0;
    prev_wr = 0; prev_srch = 0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // ---- classical example: 0100, 0111, 011X, 11XX; key 0111 -> address 1
    begin
      static logic [3:0] vals [4] = '{4'b0100, 4'b0111, 4'b0110, 4'b1100};
      static logic [3:0] msks [4] = '{4'b0000, 4'b0000, 4'b0001, 4'b0011};
      for (int a = 0; a < 4; a++) begin
        @(negedge clk);
        s_wr = 1; s_addr = 2'(a); s_key = vals[a]; s_mask = msks[a]; s_store = 1;
      end
      @(negedge clk);
      s_wr = 0; s_srch = 1; s_key = 4'b0111; s_mask = '0;
      @(negedge clk);
      s_srch = 0;
      @(posedge clk); #1;
      checks++;
      if (!(s_srch_done && s_found && s_maddr == 2'd1 && s_lines == 4'b0110)) begin
        failures++;
        $display("classical example: done %0b found %0b addr %0d lines %b",
                 s_srch_done, s_found, s_maddr, s_lines);
      end
    end

    // ---- mapping example: address 1 <- subwords (6, 5), address 4 <- (4, 1)
    begin
      @(negedge clk); f_wr = 1; f_addr = 3'd1; f_key = {3'd5, 3'd6};
      @(negedge clk); f_wr = 1; f_addr = 3'd4; f_key = {3'd1, 3'd4};
      @(negedge clk); f_wr = 0; f_srch = 1; f_key = {3'd5, 3'd6};
      @(negedge clk); f_srch = 1; f_key = {3'd1, 3'd4};
      @(posedge clk); #1;
      checks++;
      if (!(f_done_s && f_found && f_maddr == 3'd1 && f_lines == 8'b0000_0010)) begin
        failures++; $display("mapping example: address 1 not found (%b)", f_lines);
      end
      @(negedge clk); f_srch = 1; f_key = {3'd6, 3'd5};
      @(posedge clk); #1;
      checks++;
      if (!(f_done_s && f_found && f_maddr == 3'd4 && f_lines == 8'b0001_0000)) begin
        failures++; $display("mapping example: address 4 not found (%b)", f_lines);
      end
      @(negedge clk); f_srch = 0;
      @(posedge clk); #1;
      checks++;
      if (!(f_done_s && !f_found && f_lines == 8'b0)) begin
        failures++; $display("mapping example: swapped subwords matched (%b)", f_lines);
      end
    end

    // ---- directed: every CAM address, binary, then search each
    for (int a = 0; a < int'(DEPTH); a++) do_write(ADDR_W'(a), WIDTH'(a * 37 + 5), '0, 1'b1);
    for (int a = 0; a < int'(DEPTH); a++) do_search(WIDTH'(a * 37 + 5));
    // ---- directed: in-place update of address 3 then delete of address 4
    do_write(ADDR_W'(3), WIDTH'(8'hA5), '0, 1'b1);
    do_search(WIDTH'(3 * 37 + 5));
    do_search(WIDTH'(8'hA5));
    do_write(ADDR_W'(4), '0, '0, 1'b0);
    do_search(WIDTH'(4 * 37 + 5));
    // ---- directed: all-don't-care entry matches every key
    do_write(ADDR_W'(DEPTH - 1), '0, '1, 1'b1);
    do_search(WIDTH'(8'h3C));

    // ---- random mix
    for (int i = 0; i < int'(NOPS); i++) begin
      automatic int r = $urandom_range(99);
      if (r < 35) begin
        automatic logic [WIDTH-1:0] m = ($urandom_range(1) == 0) ? '0 : WIDTH'({$urandom, $urandom} & {$urandom, $urandom});
        do_write(ADDR_W'($urandom_range(DEPTH - 1)), WIDTH'({$urandom, $urandom}), m, 1'b1);
      end else if (r < 40) begin
        do_write(ADDR_W'($urandom_range(DEPTH - 1)), WIDTH'({$urandom, $urandom}), '0, 1'b0);
      end else if (r < 90) begin
        do_search(pick_key());
      end else begin
        @(negedge clk); idle();
      end
    end
    @(negedge clk); idle();
    repeat (5) @(posedge clk);

    checks++;
    if (exp_q.size() != 0 || wr_issue_q.size() != 0) begin
      failures++; $display("operations left without a result");
    end
    $display("mechanisms: binary=%0d ternary=%0d update=%0d delete=%0d multi=%0d miss=%0d search_after_write=%0d back_to_back=%0d",
             n_bin, n_tern, n_upd, n_del, n_multi, n_miss, n_raw, n_b2b);
    if (n_bin == 0)   begin failures++; $display("no binary store");     end
    if (n_tern == 0)  begin failures++; $display("no ternary store");    end
    if (n_upd == 0)   begin failures++; $display("no update");           end
    if (n_del == 0)   begin failures++; $display("no delete");           end
    if (n_multi == 0) begin failures++; $display("no multiple match");   end
    if (n_miss == 0)  begin failures++; $display("no miss");             end
    if (n_raw == 0)   begin failures++; $display("no search after write"); end
    if (n_b2b == 0)   begin failures++; $display("no back-to-back search"); end
    checks += 8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
