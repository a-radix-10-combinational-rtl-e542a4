// Shared types and constants of the radix-10 multiplier.
//
// A BCD digit is four bits holding 0..9. Digit vectors are packed arrays of
// digits, index 0 being the least-significant digit. The recoding of a
// multiplier digit y_i = y_H + y_L uses y_H in {0,5,10} and y_L in
// {-2,-1,0,1,2}; the two enums below name the multiple of x that each part
// selects. Their encodings are this design's own choice.
package dec_pkg;

  // Operand width in decimal digits (16 digits in the reference configuration).
  localparam int unsigned N_DIGITS = 16;

  typedef logic [3:0] bcd_t;

  // Places where the multiplier can be cut by pipeline registers, one bit
  // each in a cut mask. They follow the delay breakdown of the datapath:
  //   0  after precomputation of 2x, 5x and the complements
  //   1  after the partial-product digit muxes
  //   2  after the partial-product CSA
  //   3..8 after adder-tree levels 1..6
  //   9  inside the converter, after its prefix carry network
  //   10 after the converter (output register)
  localparam int unsigned N_CUTS = 11;
  typedef logic [N_CUTS-1:0] cut_mask_t;

  localparam int unsigned CUT_PRECOMP  = 0;
  localparam int unsigned CUT_PP_MUX   = 1;
  localparam int unsigned CUT_PP_CSA   = 2;
  localparam int unsigned CUT_TREE_L1  = 3;   // tree level l: CUT_TREE_L1 + l - 1
  localparam int unsigned CUT_CONV_MID = 9;
  localparam int unsigned CUT_OUT      = 10;

  // Purely combinational unit.
  localparam cut_mask_t CUTS_COMB = '0;
  // Four stages for a 1 ns clock: PP generation | tree levels 1-3 |
  // tree levels 4-6 | converter.
  localparam cut_mask_t CUTS_4_STAGE = cut_mask_t'((1 << CUT_PP_CSA) | (1 << (CUT_TREE_L1 + 2)) |
                                                   (1 << (CUT_TREE_L1 + 5)) | (1 << CUT_OUT));
  // Eleven stages for a 0.4 ns clock: every boundary cut, the converter in two.
  localparam cut_mask_t CUTS_11_STAGE = '1;

  // Selects of the 3:1 mux (multiples of 5).
  typedef enum logic [1:0] {
    YH_0  = 2'd0,
    YH_5  = 2'd1,
    YH_10 = 2'd2
  } yh_sel_e;

  // Selects of the 5:1 mux (small multiples, possibly negative).
  typedef enum logic [2:0] {
    YL_0  = 3'd0,
    YL_P1 = 3'd1,
    YL_P2 = 3'd2,
    YL_M1 = 3'd5,
    YL_M2 = 3'd6
  } yl_sel_e;

endpackage
