// letter_select: output selection of the decoder.
//
// The decoder looks up the recalled word in one table and its inverse in a second
// copy of the table. A hit in the direct table gives letter {idx_d, 0}; a hit in
// the inverted table gives {idx_i, 1}. If neither table finds the word, the
// associative memory settled in a state that is no code word: the error is
// detected but not corrected, and `error` is raised (with `letter` = 0). The error
// flag is this design's reading of how detection is reported.
//
// Purely combinational.
module letter_select #(
  parameter int unsigned IW = 5               // table index bits (letter bits - 1)
) (
  input  logic          found_d,
  input  logic [IW-1:0] idx_d,
  input  logic          found_i,
  input  logic [IW-1:0] idx_i,
  output logic [IW:0]   letter,
  output logic          found,
  output logic          error
);

  always_comb begin
    found = found_d || found_i;
    error = !found;
    if (found_d)      letter = {idx_d, 1'b0};
    else if (found_i) letter = {idx_i, 1'b1};
    else              letter = '0;
  end

endmodule
