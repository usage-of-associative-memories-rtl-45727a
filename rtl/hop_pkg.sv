// hop_pkg: constants shared by the Hopfield error detection and correction system.
//
// The code words. A message alphabet of NLETTERS letters is sent as code words of
// N bits. Only the NLETTERS/2 letters whose least significant bit is 0 own a code
// word of their own; the letter with LSB 1 is sent as the bitwise complement of
// its partner's word. So the table holds NLETTERS/2 words, and any two entries w, v
// must keep distance(w, v) >= 7 and distance(w, ~v) >= 7 for three-error correction
// and four-error detection.
//
// LEXICODE is the greedy lexicographic code with that property: entry k is the
// smallest even integer whose Hamming distance to every earlier entry, and to
// every earlier entry's N-bit complement, is at least 7. Built for N = 19, its
// first 16 entries happen to fit in 16 bits and are also the N = 16 lexicode, and
// zero-extended they remain valid for N = 23; so one table serves the 16-, 19- and
// 23-bit configurations (16 words for a 32-letter alphabet, 32 words for 64
// letters). The choice of code is this design's own: any code with the distance
// property works.
package hop_pkg;

  localparam int unsigned CODE_W_MAX = 23;   // widest word the table is valid for
  localparam int unsigned CODE_WORDS = 32;   // entries (64-letter alphabet)

  localparam logic [CODE_W_MAX-1:0] LEXICODE [CODE_WORDS] = '{
    23'h00000, 23'h000fe, 23'h00f0e, 23'h00ff0, 23'h03332, 23'h033cc, 23'h03c3c, 23'h03cc2,
    23'h05554, 23'h055aa, 23'h05a5a, 23'h05aa4, 23'h06666, 23'h06698, 23'h06968, 23'h06996,
    23'h18356, 23'h183a8, 23'h18c58, 23'h18ca6, 23'h1b064, 23'h1b09a, 23'h1bf6a, 23'h1bf94,
    23'h1d602, 23'h1d6fc, 23'h1d90c, 23'h1d9f2, 23'h1e530, 23'h1e5ce, 23'h1ea3e, 23'h1eac0
  };

  // Number of code words stored in network `net` when NWORDS words are spread
  // round-robin (word k to network k mod NNET).
  function automatic int unsigned words_in_net(int unsigned nwords, int unsigned nnet,
                                               int unsigned net);
    return nwords / nnet + ((net < nwords % nnet) ? 1 : 0);
  endfunction

  // Signed width of a weight counter that must hold +-pmax.
  function automatic int unsigned weight_width(int unsigned pmax);
    return $clog2(pmax + 1) + 1;
  endfunction

endpackage
