// code_encoder: turns a letter into the code word sent on the channel.
//
// The table holds one code word for each pair of letters (NLETTERS/2 entries,
// hop_pkg::LEXICODE). The letter without its least significant bit addresses the
// table; the LSB selects between the word and its inverse, so letters 2m and 2m+1
// are sent as w_m and ~w_m. The choice of code words is this design's own.
//
// Purely combinational: `word` follows `letter` in the same cycle.
module code_encoder #(
  parameter int unsigned N        = 19,       // code word bits
  parameter int unsigned NLETTERS = 64,       // alphabet size (power of two)
  localparam int unsigned LB      = $clog2(NLETTERS)
) (
  input  logic [LB-1:0] letter,
  output logic [N-1:0]  word
);
  import hop_pkg::*;

  localparam int unsigned NWORDS = NLETTERS / 2;

  logic [N-1:0] table_word;
  always_comb begin
    table_word = '0;
    for (int k = 0; k < NWORDS; k++)
      if (letter[LB-1:1] == (LB-1)'(k)) table_word = LEXICODE[k][N-1:0];
    word = letter[0] ? ~table_word : table_word;   // inverter and selection
  end

endmodule
