// code_lookup: the word-code-to-letter table of the decoder.
//
// Compares `word` with all NWORDS code words (hop_pkg::LEXICODE) at once, like a
// content-addressable memory, and reports `found` with the `index` of the equal
// entry. The code words are distinct, so at most one entry matches. The parallel
// exact comparison is this design's way of realising the table.
//
// Purely combinational.
module code_lookup #(
  parameter int unsigned N      = 19,         // code word bits
  parameter int unsigned NWORDS = 32,         // table entries
  localparam int unsigned XW    = (NWORDS > 1) ? $clog2(NWORDS) : 1
) (
  input  logic [N-1:0]  word,
  output logic          found,
  output logic [XW-1:0] index
);
  import hop_pkg::*;

  always_comb begin
    found = 1'b0;
    index = '0;
    for (int k = 0; k < NWORDS; k++) begin
      if (word == LEXICODE[k][N-1:0]) begin
        found = 1'b1;
        index = XW'(k);
      end
    end
  end

endmodule
