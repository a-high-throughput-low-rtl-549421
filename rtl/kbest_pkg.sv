// kbest_pkg: constants shared by the K-Best MIMO detector.
//
// The detector works on the complex-valued tree of an NT x NT system after
// QR decomposition. The antenna count (4x4) and the 64-QAM constellation of
// the architecture figure are the defaults; the list size K, the number of
// row-enumerated "Level-2" nodes per parent (RSE_NUM) and every word width
// are this design's own choices.
//
// Fixed point: z_bar, r_bar and e are two's complement (e unsigned) with
// FRAC fractional bits. A constellation coordinate is an odd integer in
// [-(SQRT_M-1), SQRT_M-1] held as a plain signed integer of SW bits.
// A partial Euclidean distance (PED) is unsigned with FRAC fractional bits
// and saturates at its all-ones value.
package kbest_pkg;

  localparam int DEF_NT      = 4;    // transmit antennas = tree levels
  localparam int DEF_SQRT_M  = 8;    // 64-QAM: 8 rows x 8 columns
  localparam int DEF_K       = 10;   // survivors per level
  localparam int DEF_RSE_NUM = 3;    // Level-2 nodes per parent in layers NT-1..2
  localparam int DEF_DW      = 16;   // z_bar, r_bar, e word width
  localparam int DEF_FRAC    = 10;   // fractional bits of DW, L and PED values
  localparam int DEF_PW      = 32;   // PED width

  // width of a signed coordinate able to hold +-(sqrt_m-1)
  function automatic int sym_w(int sqrt_m);
    return $clog2(sqrt_m) + 1;
  endfunction

  // width of the interference-cancelled centre L (same scaling as z_bar):
  // z_bar minus up to nt-1 complex products r_bar * s
  function automatic int l_w(int dw, int sqrt_m, int nt);
    return dw + sym_w(sqrt_m) + $clog2(nt) + 2;
  endfunction

endpackage
