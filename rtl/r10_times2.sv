// Doubling of a BCD number without carry propagation.
//
// Every digit is doubled; 2*x_i is at most 18, so it splits into a units digit
// (2*x_i mod 10, always even) and a carry of 1 when x_i >= 5. The carry only
// enters the next digit's even units digit, so the sum is at most 9 and never
// carries further. The result therefore has one more digit than the input and
// a depth of one digit cell. Purely combinational.
//
// Ports: x is N BCD digits; x2 is 2*x as N+1 BCD digits.
module r10_times2 #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0][3:0] x,
  output logic [N:0][3:0]   x2
);

  always_comb begin
    for (int i = 0; i <= N; i++) begin
      logic [3:0] units;
      logic       carry_in;
      units    = 4'd0;
      carry_in = 1'b0;
      if (i < N)  units    = 4'((5'(x[i]) << 1) - ((x[i] >= 4'd5) ? 5'd10 : 5'd0));
      if (i > 0)  carry_in = (x[i-1] >= 4'd5);
      x2[i] = units + {3'b000, carry_in};
    end
  end

endmodule
