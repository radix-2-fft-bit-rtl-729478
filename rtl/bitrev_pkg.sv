// bitrev_pkg: bit-manipulation helpers shared by the parallel bit-reversal
// circuit and its testbenches.
//
// rev_bits(x, w)   reverses the low w bits of x (bits above w come out zero).
//                  This is the BR() operator used for the switching pattern
//                  J(t) = BR(floor(t / (N/P^2))) and for the even-symbol
//                  address of the controller.
// drop_bit(x, pos) deletes bit 'pos' of x and closes the gap, so the result is
//                  one bit narrower. The odd-symbol memory address is the cycle
//                  counter with bit c_beta deleted, because c_beta (with c_beta+1)
//                  selects the memory group instead.
// Both work on a fixed 32-bit container so that the FFT length can be chosen
// at run time; they are pure combinational functions.
package bitrev_pkg;

  localparam int unsigned WORD_W = 32;
  typedef logic [WORD_W-1:0] word_t;

  function automatic word_t rev_bits(input word_t x, input int unsigned w);
    word_t r;
    for (int i = 0; i < WORD_W; i++) r[i] = x[WORD_W-1-i];
    // full 32-bit reversal, then move the w reversed bits down to bit 0
    if (w == 0) return '0;
    return r >> (WORD_W - w);
  endfunction

  function automatic word_t drop_bit(input word_t x, input int unsigned pos);
    word_t low_mask;
    low_mask = (word_t'(1) << pos) - word_t'(1);
    return ((x >> (pos + 1)) << pos) | (x & low_mask);
  endfunction

endpackage
