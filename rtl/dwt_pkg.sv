// dwt_pkg - constants and helpers shared by the 9/7 DWT datapath.
//
// The integer 9/7 analysis filters used throughout the design:
//   low pass  h = {27, -17, -80, 273, 617, 273, -80, -17, 27}  (coefficient * 1024)
//   high pass g = {47, -29, -303, 569, -303, -29, 47}          (coefficient * 512)
// Both are symmetric, which the modified DA filter exploits by pre-adding the
// two samples that share a coefficient. A filter output is the exact integer
// sum of products; the 1D processor scales it back by LP_SHIFT / HP_SHIFT with
// round-half-up.
//
// Also holds the choice of 1D filter architecture (modified DA or mux + split DA)
// and the function that computes a DA look-up table entry at elaboration time.
package dwt_pkg;

  // Filter architecture of a 1D DWT processor.
  typedef enum logic [0:0] {
    ARCH_MODIFIED_DA = 1'b0,  // symmetric pre-add + PISO + split LUTs (main design)
    ARCH_MUX_DA      = 1'b1   // 2:1 muxes for the first taps + split DA for the last four
  } arch_e;

  localparam int COEF_W  = 12;          // signed width holding every integer coefficient
  localparam int LP_TAPS = 9;
  localparam int HP_TAPS = 7;
  localparam int LP_SHIFT = 10;         // low-pass coefficients are scaled by 2^10
  localparam int HP_SHIFT = 9;          // high-pass coefficients are scaled by 2^9

  typedef logic signed [COEF_W-1:0] coef_t;

  // Taps in order h[0] .. h[8]; zero-padded to 9 entries for the high pass.
  localparam coef_t LP_COEF [9] = '{12'sd27, -12'sd17, -12'sd80, 12'sd273, 12'sd617,
                                    12'sd273, -12'sd80, -12'sd17, 12'sd27};
  localparam coef_t HP_COEF [9] = '{12'sd47, -12'sd29, -12'sd303, 12'sd569, -12'sd303,
                                    -12'sd29, 12'sd47, 12'sd0, 12'sd0};

  // Sum of the coefficients selected by the set bits of addr, starting at tap `first`.
  // This is the content of one DA look-up table entry.
  function automatic int lut_entry(input coef_t coefs [9], input int first,
                                   input int nbits, input int addr);
    int s;
    s = 0;
    for (int b = 0; b < nbits; b++)
      if (((addr >> b) & 1) == 1) s += int'(coefs[first + b]);
    return s;
  endfunction

endpackage
