// da_lut - distributed-arithmetic look-up table (ROM) of pre-computed partial products.
//
// Entry `a` holds the sum of the coefficients COEFS[FIRST + b] for every set bit b of a,
// i.e. every combination of NBITS coefficients that one bit slice of NBITS input samples
// can select. The table is built at elaboration time from the coefficient parameter, so
// it becomes a constant ROM of 2**NBITS words of LUT_W bits; the read is combinational.
// In the filters one such ROM is addressed by the LSBs of two or three PISO/SISO
// registers, which is the split-LUT arrangement of the modified DA architecture.
module da_lut
  import dwt_pkg::*;
#(
  parameter coef_t COEFS [9] = LP_COEF,  // coefficient set (taps 0..8)
  parameter int    FIRST     = 0,        // first tap served by this LUT
  parameter int    NBITS     = 2,        // address width = number of taps served
  parameter int    LUT_W     = 14        // signed word width
) (
  input  logic [NBITS-1:0]        addr,
  output logic signed [LUT_W-1:0] data
);

  localparam int DEPTH = 2 ** NBITS;

  function automatic logic [DEPTH-1:0][LUT_W-1:0] build_rom();
    logic [DEPTH-1:0][LUT_W-1:0] r;
    for (int a = 0; a < DEPTH; a++)
      r[a] = LUT_W'(lut_entry(COEFS, FIRST, NBITS, a));
    return r;
  endfunction

  localparam logic [DEPTH-1:0][LUT_W-1:0] ROM = build_rom();

  assign data = $signed(ROM[addr]);

endmodule
