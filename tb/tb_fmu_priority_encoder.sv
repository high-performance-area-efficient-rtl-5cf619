// tb_fmu_priority_encoder: checks the match-line priority encoder at its
// default width of 512 lines. Directed cases: no line, each single line, the
// classical example (lines 1 and 2 set -> address 1) and all lines. Then random
// vectors of varying density. The expected address is the lowest set line,
// found by a scan from address 0 upward.
module tb_fmu_priority_encoder;
  localparam int unsigned W = 512;
  logic [W-1:0] lines;
  logic found;
  logic [8:0] idx;
  int checks = 0, failures = 0;

  fmu_priority_encoder #(.W(W)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] v);
    int e = -1;
    lines = v;
    #1;
    for (int i = 0; i < int'(W); i++) if (v[i] && e < 0) e = i;
    checks++;
    if (found != (e >= 0) || (e >= 0 && int'(idx) != e)) begin
      failures++;
      $display("lines with lowest %0d: found %0b idx %0d", e, found, idx);
    end
  endtask

  initial begin
    check('0);
    for (int i = 0; i < int'(W); i++) check(W'(1) << i);
    check(W'(4'b0110));
    check('1);
    for (int n = 0; n < 3000; n++) begin
      automatic logic [W-1:0] v;
      for (int w = 0; w < int'(W) / 32; w++) v[w*32 +: 32] = $urandom & $urandom & $urandom;
      if (n % 2 == 1) v = v & ~((W'(1) << $urandom_range(W - 1)) - 1);
      check(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
