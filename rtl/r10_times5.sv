// Multiplication of a BCD number by 5 without carry propagation.
//
// 5x is computed as (10x)/2: shifting x one digit up gives e = 10x, and each
// digit of e is halved on its own. An odd digit leaves a half, worth 5 in the
// digit below. Digit i of the result is therefore
//     g_i = floor(x_(i-1) / 2) + 5 * (x_i odd),      x_(-1) = x_N = 0,
// which is at most 4 + 5 = 9, so no carry is ever produced. Purely
// combinational, one digit cell deep.
//
// Ports: x is N BCD digits; x5 is 5*x as N+1 BCD digits.
module r10_times5 #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0][3:0] x,
  output logic [N:0][3:0]   x5
);

  always_comb begin
    for (int i = 0; i <= N; i++) begin
      logic [3:0] half;
      logic       odd;
      half = 4'd0;
      odd  = 1'b0;
      if (i > 0) half = x[i-1] >> 1;
      if (i < N) odd  = x[i][0];
      x5[i] = half + (odd ? 4'd5 : 4'd0);
    end
  end

endmodule
