// booth_pkg: types shared by the radix-8 Booth multiplier.
//
// A radix-8 Booth digit takes the values 0, +-1, +-2, +-3 and +-4. It is
// carried as a sign flag and a magnitude, the form in which the partial
// product generator uses it: the magnitude selects a multiple of the
// multiplicand and the sign flag inverts it. The tree_e enum selects the
// compressor used in the Wallace tree of a multiplier. The digit encoding
// is this design's own choice; the digit values are those of the standard
// radix-8 recoding table.
package booth_pkg;

  typedef struct packed {
    logic       neg;  // digit is negative (never set for a zero digit)
    logic [2:0] mag;  // magnitude 0..4
  } booth_digit_t;

  typedef enum logic {
    TREE_3_2 = 1'b0,  // Wallace tree of 3:2 compressors (carry-save adders)
    TREE_4_2 = 1'b1   // Wallace tree of 4:2 compressors
  } tree_e;

  // Number of radix-8 digits (partial products) of an n-bit signed multiplier.
  function automatic int unsigned num_digits(int unsigned n);
    return (n + 2) / 3;
  endfunction

  // Rows left after one level of 3:2 compressors acting on r rows.
  function automatic int unsigned rows_after_3_2(int unsigned r);
    return 2 * (r / 3) + (r % 3);
  endfunction

  // Rows left after one level of 4:2 compressors acting on r rows; a group
  // of three leftover rows goes through one 3:2 compressor row.
  function automatic int unsigned rows_after_4_2(int unsigned r);
    return 2 * (r / 4) + ((r % 4) == 3 ? 2 : (r % 4));
  endfunction

  // Number of levels needed to bring r rows down to two.
  function automatic int unsigned levels_3_2(int unsigned r);
    int unsigned n = 0;
    while (r > 2) begin
      r = rows_after_3_2(r);
      n++;
    end
    return n;
  endfunction

  function automatic int unsigned levels_4_2(int unsigned r);
    int unsigned n = 0;
    while (r > 2) begin
      r = rows_after_4_2(r);
      n++;
    end
    return n;
  endfunction

  // Rows present after l levels, starting from r rows.
  function automatic int unsigned rows_at_level_3_2(int unsigned r, int unsigned l);
    for (int unsigned i = 0; i < l; i++) r = rows_after_3_2(r);
    return r;
  endfunction

  function automatic int unsigned rows_at_level_4_2(int unsigned r, int unsigned l);
    for (int unsigned i = 0; i < l; i++) r = rows_after_4_2(r);
    return r;
  endfunction

endpackage
