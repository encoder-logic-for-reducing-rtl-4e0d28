// vdbs_pkg: constants and helper functions shared by the VDBS
// (value-deviation-bounded serial) encoder blocks.
//
// A VDBS encoder replaces an l-bit sample s by a nearby word t, no further
// than m away in value, whose serialized bit pattern toggles the line fewer
// times. The functions here count those toggles and turn a deviation given
// as a fraction of full-scale range (FSR) into the integer bound m.
//
// The 0.5 % FSR step and the eleven settings from 0 % to 5 % follow the
// deviation sweep the encoder was evaluated with; turning a percentage into
// an integer by rounding down is this design's own choice.
package vdbs_pkg;

  // Widest word the helper functions handle.
  localparam int unsigned MAX_L = 32;

  // Deviation step between neighbouring settings, in tenths of a percent
  // of full-scale range (5 = 0.5 % FSR).
  localparam int unsigned STEP_PERMIL = 5;

  // Number of deviation settings: 0 %, 0.5 %, ... 5.0 % of FSR.
  localparam int unsigned N_SETTINGS = 11;

  // Serial transitions of the low l bits of w: the number of positions i
  // in 0..l-2 where bit i differs from bit i+1.
  function automatic int unsigned serial_transitions(logic [MAX_L-1:0] w,
                                                     int unsigned l);
    int unsigned n;
    n = 0;
    for (int unsigned i = 0; i + 1 < MAX_L; i++) begin
      if (i + 1 < l && (w[i] ^ w[i+1])) n++;
    end
    return n;
  endfunction

  // Maximum deviation m of setting k for l-bit words:
  // floor(k * STEP_PERMIL / 1000 * 2^l). Exact in 32 bits for
  // k * STEP_PERMIL * 2^l < 2^32 (k <= 10 and l <= 26 with the defaults).
  function automatic int unsigned setting_m(int unsigned k, int unsigned l);
    return ((k * STEP_PERMIL) << l) / 1000;
  endfunction

endpackage
