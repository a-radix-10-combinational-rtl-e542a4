// Digit-wise 9's complement of a BCD vector.
//
// y_i = 9 - a_i for every digit. Together with a 1 added at the least
// significant position this gives the radix-10 (10's) complement, which the
// partial-product generator uses for -x and -2x; the 1 is not added here but
// travels as the carry bit b of the partial product. Purely combinational.
//
// Ports: a and y are W BCD digits.
module r10_nines_comp #(
  parameter int unsigned W = 17
) (
  input  logic [W-1:0][3:0] a,
  output logic [W-1:0][3:0] y
);

  always_comb begin
    for (int i = 0; i < W; i++) y[i] = 4'd9 - a[i];
  end

endmodule
