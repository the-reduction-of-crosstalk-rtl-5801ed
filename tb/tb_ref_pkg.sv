// Reference model of the majority / position-code bus code, written
// independently of the RTL for use by the testbenches.
//
// For a 7-bit word d: ED is 1 when d has four or more ones. The flipped lines
// are those whose value differs from ED, listed from line 0 upward; the
// position code of line i is i+1 and unused slots carry code 0.
package tb_ref_pkg;

  typedef logic [2:0] code_t;
  typedef code_t      frame_t [3];

  function automatic bit ref_ed(logic [6:0] d);
    return $countones(d) >= 4;
  endfunction

  function automatic frame_t ref_codes(logic [6:0] d);
    frame_t f;
    int     n;
    logic [6:0] fl;
    f  = '{3'd0, 3'd0, 3'd0};
    fl = ref_ed(d) ? ~d : d;
    n  = 0;
    for (int i = 0; i < 7; i++)
      if (fl[i]) begin
        f[n] = code_t'(i + 1);
        n++;
      end
    return f;
  endfunction

  function automatic int ref_nflips(logic [6:0] d);
    return ref_ed(d) ? 7 - $countones(d) : $countones(d);
  endfunction

  function automatic logic [6:0] ref_decode(bit ed, frame_t f);
    logic [6:0] w;
    w = ed ? 7'h7f : 7'h00;
    foreach (f[s])
      if (f[s] != 0) w[f[s] - 1] = ~w[f[s] - 1];
    return w;
  endfunction

endpackage
