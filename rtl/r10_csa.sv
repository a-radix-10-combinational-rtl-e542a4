// W-digit radix-10 carry-save adder.
//
// Adds two BCD digit vectors a and b and one bit vector d of the same weights.
// Each digit position computes a_i + b_i + d_i (at most 19) and splits it into
// a sum digit s_i in 0..9 and a carry bit of weight 10^(i+1). Carries do not
// propagate: the carry of digit i is simply passed out as c[i+1], so the
// result (s, c) is again a radix-10 carry-save number. Position 0 of c has no
// carry of its own and takes cin instead (0 inside the adder tree, the +1 of a
// radix-10 complement in partial-product generation). The carry of the top
// digit leaves on cout. Purely combinational, one digit cell deep.
module r10_csa #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0][3:0] a,
  input  logic [W-1:0][3:0] b,
  input  logic [W-1:0]      d,
  input  logic              cin,
  output logic [W-1:0][3:0] s,
  output logic [W-1:0]      c,
  output logic              cout
);

  logic [W:0] carry;

  always_comb begin
    carry[0] = cin;
    for (int i = 0; i < W; i++) begin
      logic [4:0] t;
      t = 5'(a[i]) + 5'(b[i]) + 5'(d[i]);
      if (t >= 5'd10) begin
        s[i]       = 4'(t - 5'd10);
        carry[i+1] = 1'b1;
      end else begin
        s[i]       = t[3:0];
        carry[i+1] = 1'b0;
      end
    end
  end

  assign c    = carry[W-1:0];
  assign cout = carry[W];

endmodule
