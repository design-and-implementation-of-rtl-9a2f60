// mixer_pkg: types and constant functions shared by the complex multiplier.
//
// mix_mode_e names the three operating modes of the mixer. The mode names
// follow the design description; their 2-bit encoding is this design's own
// choice. The wt_* functions describe the shape of the Wallace tree: at each
// layer the vectors are taken three at a time and every group of three becomes
// a sum and a carry vector, so a layer with n vectors leaves 2*(n/3) + n%3.
// They are evaluated at elaboration time to size the generate loops.
package mixer_pkg;

  typedef enum logic [1:0] {
    MIX_NORMAL   = 2'd0,  // data multiplied by the NCO cos/sin
    MIX_DIS_OSC  = 2'd1,  // oscillator replaced by constants: data passes through
    MIX_DIS_DATA = 2'd2   // data replaced by constants: NCO passes through
  } mix_mode_e;

  // Number of vectors after one 3:2 layer.
  function automatic int wt_next(input int n);
    return 2 * (n / 3) + (n % 3);
  endfunction

  // Number of vectors entering layer `lvl` (layer 0 = the input vectors).
  function automatic int wt_count(input int m, input int lvl);
    int n;
    n = m;
    for (int l = 0; l < lvl; l++) n = wt_next(n);
    return n;
  endfunction

  // Number of 3:2 layers needed to bring m vectors down to two.
  function automatic int wt_levels(input int m);
    int n, l;
    n = m;
    l = 0;
    while (n > 2) begin
      n = wt_next(n);
      l++;
    end
    return l;
  endfunction

endpackage
