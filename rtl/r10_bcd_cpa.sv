// BCD carry-propagate adder built from a radix-10 CSA and the carry-save to
// BCD converter.
//
// A CSA without its bit-vector input reduces the two BCD operands to a
// radix-10 carry-save number (one digit and one carry bit per position), the
// carry-in filling the empty carry position 0. The converter then resolves
// the carries with its parallel-prefix network. At most one of the two stages
// can produce a carry out of the top digit, so the carry out is their OR.
// Purely combinational.
//
// Ports: a, b and s are W BCD digits; cin and cout are the decimal carries.
module r10_bcd_cpa #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0][3:0] a,
  input  logic [W-1:0][3:0] b,
  input  logic              cin,
  output logic [W-1:0][3:0] s,
  output logic              cout
);

  logic [W-1:0][3:0] cs_s;
  logic [W-1:0]      cs_c;
  logic              csa_cout, conv_cout;

  r10_csa #(.W(W)) u_csa (
    .a    (a),
    .b    (b),
    .d    ('0),
    .cin  (cin),
    .s    (cs_s),
    .c    (cs_c),
    .cout (csa_cout)
  );

  r10_cs2bcd #(.W(W)) u_conv (
    .clk  (1'b0),
    .a    (cs_s),
    .d    (cs_c),
    .cin  (1'b0),
    .s    (s),
    .cout (conv_cout)
  );

  assign cout = csa_cout | conv_cout;

endmodule
