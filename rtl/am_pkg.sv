// am_pkg: sizes shared by the associative-memory blocks.
//
// Defaults describe the fabricated configurations: the Manhattan memory
// uses words of 16 units of 5 bits (80 stored bits, 16 x 31 = 496 distance
// levels) in banks of 64 rows, four banks giving 256 reference patterns;
// the Hamming memory holds 32 words of 768 bits.  The helper function
// gives the width needed to hold the largest distance of a word.
package am_pkg;

  // Manhattan bank-type memory
  localparam int unsigned MAN_K  = 5;   // bits per unit (element)
  localparam int unsigned MAN_W  = 16;  // units per word
  localparam int unsigned MAN_R  = 64;  // rows per bank
  localparam int unsigned MAN_NB = 4;   // banks

  // Hamming memory
  localparam int unsigned HAM_W = 768;
  localparam int unsigned HAM_R = 32;

  // Width of a word distance: the largest value is W * (2^K - 1).
  function automatic int unsigned dist_width(int unsigned w, int unsigned k);
    return $clog2(w * ((1 << k) - 1) + 1);
  endfunction

endpackage
