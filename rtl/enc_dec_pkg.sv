// Shared sizes of the crosstalk-reducing bus code.
//
// A DATA_W-bit word is sent as one majority line (ED) plus up to NUM_SLOTS
// position codes of CODE_W bits each. A position code p in 1..DATA_W names
// data line p-1 as flipped against ED; the code 0 names no line. Because ED
// is the majority value of an odd-width word, at most (DATA_W-1)/2 lines can
// differ from it, which is why NUM_SLOTS slots always suffice.
//
// The 7-bit word, the 3-bit codes and the three registers are the sizes the
// design is built around; the formulas that tie them together are this
// implementation's way of keeping the modules consistent.
package enc_dec_pkg;

  // Width of the data word.
  localparam int unsigned DATA_W = 7;

  // Width of a position code: enough for codes 0..w.
  function automatic int unsigned code_w(int unsigned w);
    return $clog2(w + 1);
  endfunction

  // Number of position-code registers: the most lines that can differ from
  // the majority value of a w-bit word.
  function automatic int unsigned num_slots(int unsigned w);
    return (w - 1) / 2;
  endfunction

  // Width of a slot index.
  function automatic int unsigned sel_w(int unsigned w);
    return (num_slots(w) > 1) ? $clog2(num_slots(w)) : 1;
  endfunction

endpackage
