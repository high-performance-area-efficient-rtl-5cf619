// fmu_priority_encoder: match lines to match address.
//
// Several TCAM entries can match one key, so the match lines of all L*N
// addresses go into a priority encoder that reports whether any line is set
// (found) and the index of the set line with the lowest address, which has the
// highest priority. Purely combinational. Lowest-address-wins follows the
// document's search example; the separate found flag is this design's choice.
module fmu_priority_encoder #(
  parameter int unsigned W      = 512,
  localparam int unsigned IDX_W = (W > 1) ? $clog2(W) : 1
) (
  input  logic [W-1:0]     lines,
  output logic             found,
  output logic [IDX_W-1:0] idx
);

  always_comb begin
    found = 1'b0;
    idx   = '0;
    for (int i = int'(W) - 1; i >= 0; i--) begin
      if (lines[i]) begin
        found = 1'b1;
        idx   = IDX_W'(i);
      end
    end
  end

endmodule
