// Shared constants and size helpers for the memory-based address generators.
//
// An address generator maps each of k registered n-bit input vectors to a
// distinct address 1..k and every other vector to 0. It is built from
// pq-elements: memories with p address inputs and q data outputs. A uniform
// LUT cascade whose first cell takes p primary inputs and whose later cells
// take q rails plus r = p - q new inputs needs ceil((n - q) / r) cells
// (the bound of the cascade construction). The dictionary sizes below are
// the ones the design is dimensioned for: 40-bit words (8 letters of 5 bits),
// at most 500 words per list, 9-bit addresses, 80-bit translations.
package mvag_pkg;

  // Number of cells of a uniform cascade with n inputs, p-input q-output cells.
  function automatic int unsigned cascade_cells(int unsigned n, int unsigned p,
                                                int unsigned q);
    int unsigned r;
    r = p - q;
    if (n <= p) return 1;
    return (n - q + r - 1) / r;
  endfunction

  // Width of a cell-select field for s cells (at least one bit).
  function automatic int unsigned sel_width(int unsigned s);
    return (s > 1) ? $clog2(s) : 1;
  endfunction

  // English-Japanese dictionary dimensions.
  localparam int unsigned DICT_LISTS    = 3;   // word lists A, B, C
  localparam int unsigned DICT_LETTERS  = 8;   // letters kept per word
  localparam int unsigned LETTER_BITS   = 5;   // bits per letter
  localparam int unsigned DICT_WORD_W   = DICT_LETTERS * LETTER_BITS;  // 40
  localparam int unsigned DICT_WORDS    = 500; // words per list
  localparam int unsigned DICT_ADDR_W   = 9;   // ceil(log2(500 + 1))
  localparam int unsigned DICT_JP_W     = 80;  // translation width

endpackage
