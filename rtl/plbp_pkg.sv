// plbp_pkg -- shared constants and arithmetic helpers of the piecewise
// linear branch predictor.
//
// The defaults are the 256 KB configuration of the predictor: history
// length h = 51, n = 8 speculative shift vectors (first index of W, taken
// from the branch address modulo n) and m = 603 weight blocks (second index
// of W, branch address modulo m). Weights are 8-bit two's-complement values
// that saturate at +127 and -128; partial sums are 10 bits wide.
//
// The training threshold is theta = 2.14 * (h + 1) + 20.58, rounded down to
// an integer here (the rounding is this design's choice). Saturating helpers
// are written for a generic width so the modules can be built at other
// widths.
package plbp_pkg;

  // Defaults: 256 KB configuration.
  localparam int unsigned H_DEFAULT      = 51;   // history length h
  localparam int unsigned N_DEFAULT      = 8;    // shift vectors, W first index
  localparam int unsigned M_DEFAULT      = 603;  // weight blocks, W second index
  localparam int unsigned WBITS_DEFAULT  = 8;    // weight width
  localparam int unsigned SBITS_DEFAULT  = 10;   // partial-sum width
  localparam int unsigned ADDR_W_DEFAULT = 32;   // branch address width
  localparam int unsigned QDEPTH_DEFAULT = 16;   // in-flight branches
  localparam int unsigned BIM_ENTRIES_DEFAULT = 2048; // first-level bimodal

  // theta = floor(2.14 * (h + 1) + 20.58), evaluated in hundredths.
  function automatic int unsigned theta_of(int unsigned h);
    return (214 * (h + 1) + 2058) / 100;
  endfunction

  // Largest and smallest value of a signed field of the given width.
  function automatic int sat_max(int unsigned bits);
    return (1 <<< (bits - 1)) - 1;
  endfunction

  function automatic int sat_min(int unsigned bits);
    return -(1 <<< (bits - 1));
  endfunction

  // Clamp an integer into a signed field of the given width.
  function automatic int clamp(int v, int unsigned bits);
    if (v > sat_max(bits)) return sat_max(bits);
    if (v < sat_min(bits)) return sat_min(bits);
    return v;
  endfunction

endpackage
