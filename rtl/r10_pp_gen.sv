// Generator of one radix-10 carry-save partial product x * y_i.
//
// The multiplier digit y_i is recoded into y_H in {0,5,10} and y_L in
// {-2,-1,0,1,2}. A 3:1 digit mux picks x*y_H from {10x, 5x, 0} and a 5:1 digit
// mux picks x*y_L from {-2x, -x, 0, x, 2x}, negatives being the 9's
// complement of x or 2x. A radix-10 carry-save adder adds the two (N+1)-digit
// terms; the +1 that completes a 10's complement is placed in the empty
// least-significant position of the carry vector. All multiples come from a
// shared precomputation (10x is x shifted one digit).
//
// The true partial product is below 10^(N+1), but with a complemented term the
// carry-save sum is x*y_i + 10^(N+1). Dropping the top digit's carry removes
// that excess only if the carry is generated in the top digit itself; when
// the top digit sum is 9 and the carry arrives from the digit below, it would
// stay. This design therefore folds the carry bit of the top position into
// the top sum digit, (s_N + c_N) mod 10, and clears c_N. That is exact for
// every multiplicand with a nonzero leading digit (normalized operands);
// with a leading zero the result for y_i in {3,4,8,9} may be wrong.
//
// Ports: x (N digits) and its precomputed multiples x2 = 2x, x5 = 5x,
// xn = 9's complement of x, x2n = 9's complement of 2x (N+1 digits each);
// yi is the multiplier digit. Output: s (N+1 digits) and c (N+1 bits) with
// s + c = x*y_i. Combinational, unless REG_MUX = 1 places a pipeline
// register between the digit muxes and the CSA (clk is unused otherwise).
module r10_pp_gen
  import dec_pkg::*;
#(
  parameter int unsigned N       = 16,
  parameter bit          REG_MUX = 1'b0
) (
  input  logic              clk,
  input  logic [N-1:0][3:0] x,
  input  logic [N:0][3:0]   x2,
  input  logic [N:0][3:0]   x5,
  input  logic [N:0][3:0]   xn,
  input  logic [N:0][3:0]   x2n,
  input  logic [3:0]        yi,
  output logic [N:0][3:0]   s,
  output logic [N:0]        c
);

  yh_sel_e yh;
  yl_sel_e yl;
  logic    neg;

  logic [N:0][3:0] mult_h;   // x * y_H
  logic [N:0][3:0] mult_l;   // x * y_L, complemented when negative
  logic [N:0][3:0] csa_s;
  logic [N:0]      csa_c;
  logic            csa_cout;

  r10_recoder u_rec (
    .yi  (yi),
    .yh  (yh),
    .yl  (yl),
    .neg (neg)
  );

  // 3:1 digit mux.
  always_comb begin
    unique case (yh)
      YH_5:    mult_h = x5;
      YH_10:   mult_h = {x, 4'd0};
      default: mult_h = '0;
    endcase
  end

  // 5:1 digit mux.
  always_comb begin
    unique case (yl)
      YL_P1:   mult_l = {4'd0, x};
      YL_P2:   mult_l = x2;
      YL_M1:   mult_l = xn;
      YL_M2:   mult_l = x2n;
      default: mult_l = '0;
    endcase
  end

  // Optional pipeline cut after the muxes.
  logic [N:0][3:0] mult_h_q, mult_l_q;
  logic            neg_q;

  dec_pipe_reg #(.W(2 * 4 * (N + 1) + 1), .ENABLE(REG_MUX)) u_reg (
    .clk (clk),
    .d   ({mult_h, mult_l, neg}),
    .q   ({mult_h_q, mult_l_q, neg_q})
  );

  r10_csa #(.W(N + 1)) u_csa (
    .a    (mult_h_q),
    .b    (mult_l_q),
    .d    ('0),
    .cin  (neg_q),
    .s    (csa_s),
    .c    (csa_c),
    .cout (csa_cout)
  );

  // Fold the top carry bit into the top digit; the carry out of the top
  // digit (csa_cout) is the 10^(N+1) excess of the complement and is dropped.
  always_comb begin
    s       = csa_s;
    c       = csa_c;
    s[N]    = (csa_s[N] + 4'(csa_c[N]) >= 4'd10) ? 4'd0 : csa_s[N] + 4'(csa_c[N]);
    c[N]    = 1'b0;
  end

endmodule
