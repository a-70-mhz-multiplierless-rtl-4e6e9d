// hilbert_mcm: multiplierless multiple-constant-multiplication block.
//
// Forms the eight products p[m] = x * COEF[m] (COEF = 645, 198, 100, 55, 29,
// 14, 6, 3 for n = 1, 3, ..., 15) with shifts and eight adders/subtracters.
// Plain canonic-signed-digit (CSD) shift-add would need 15 adders; common
// subexpressions cut this to 8:
//   a = x + (x<<2)                   =   5x   (CSD pattern 1 0 1)
//   b = (x<<2) - x                   =   3x   (CSD pattern 1 0 -1)
//   p0 = a + (a<<7)                  = 645x   (pattern 101 used twice)
//   p1 = (b<<1) + (b<<6)             = 198x   (pattern 10-1 used twice)
//   p2 = (a<<2) + (a<<4)             = 100x
//   p5 = (b<<2) + (x<<1)             =  14x
//   p3 = (p5<<2) - x                 =  55x   (reuses the 14x product)
//   p4 = (x<<5) - b                  =  29x
//   p6 = b<<1                        =   6x   (no adder)
//   p7 = b                           =   3x   (no adder)
// Sharing both patterns within one coefficient (horizontal) and results across
// coefficients (vertical) follows the approach of the chip; the particular
// network is this design's own, derived for the coefficient set in
// hilbert_pkg. The network is fixed: changing COEF requires a new network.
//
// Purely combinational; x is a signed Q1.7 sample, every p[m] is signed and
// PROD_W bits wide, scaled by 2^COEF_FRAC. Low bits of the even products
// (198x, 100x, 14x, 6x) are constant zero by construction.
module hilbert_mcm
  import hilbert_pkg::*;
(
  input  sample_t x,
  output prod_t   p [NUM_COEF]
);

  prod_t xe, a, b, p14;

  always_comb begin
    xe  = prod_t'(x);                 // sign-extend once
    a   = xe + (xe <<< 2);            // 5x
    b   = (xe <<< 2) - xe;            // 3x
    p14 = (b <<< 2) + (xe <<< 1);     // 14x
    p[0] = a + (a <<< 7);             // 645x
    p[1] = (b <<< 1) + (b <<< 6);     // 198x
    p[2] = (a <<< 2) + (a <<< 4);     // 100x
    p[3] = (p14 <<< 2) - xe;          // 55x
    p[4] = (xe <<< 5) - b;            // 29x
    p[5] = p14;                       // 14x
    p[6] = b <<< 1;                   // 6x
    p[7] = b;                         // 3x
  end

endmodule
