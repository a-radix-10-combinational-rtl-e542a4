// Radix-10 carry-save to BCD converter (a simplified decimal carry-propagate
// adder).
//
// Input: W digits a_i in 0..9 and W bits d_i of the same weights (the carry
// vector of a radix-10 carry-save number), plus a carry into digit 0.
// Output: the same value as W BCD digits and a carry out.
//
// Three steps, all combinational:
//   1. per digit, with t = a_i + d_i (at most 10): propagate p_i = (t == 9),
//      generate g_i = (t == 10), and both candidate digits
//      s0_i = t mod 10 and s1_i = (t + 1) mod 10;
//   2. a Kogge-Stone parallel-prefix network turns (g, p) into the carry
//      into every digit in log2(W) levels;
//   3. each digit selects s1_i if a carry enters it, else s0_i.
// The prefix topology is this design's choice; any parallel prefix works.
// REG_MID = 1 registers the carries and both candidate digits, splitting the
// converter into two pipeline stages before the select; with the default 0
// the unit is combinational and clk is unused.
module r10_cs2bcd #(
  parameter int unsigned W       = 32,
  parameter bit          REG_MID = 1'b0
) (
  input  logic              clk,
  input  logic [W-1:0][3:0] a,
  input  logic [W-1:0]      d,
  input  logic              cin,
  output logic [W-1:0][3:0] s,
  output logic              cout
);

  localparam int unsigned LG = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0][3:0] s0, s1;
  logic [W-1:0]      g, p;
  logic [W:0]         carry;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      logic [4:0] t;
      t     = 5'(a[i]) + 5'(d[i]);
      p[i]  = (t == 5'd9);
      g[i]  = (t == 5'd10);
      s0[i] = (t >= 5'd10) ? 4'(t - 5'd10) : t[3:0];
      s1[i] = (t >= 5'd9)  ? 4'(t - 5'd9)  : 4'(t + 5'd1);
    end
  end

  // Fold cin into digit 0 so that the prefix results are the carries out.
  logic [W-1:0] g_in;
  always_comb begin
    g_in    = g;
    g_in[0] = g[0] | (p[0] & cin);
  end

  // Kogge-Stone: after level k, (gk[i], pk[i]) covers digits
  // max(0, i-2^k+1) .. i.
  always_comb begin
    logic [W-1:0] gk, pk, gn, pn;
    gk = g_in;
    pk = p;
    for (int k = 0; k < LG; k++) begin
      for (int i = 0; i < W; i++) begin
        if (i >= (1 << k)) begin
          gn[i] = gk[i] | (pk[i] & gk[i - (1 << k)]);
          pn[i] = pk[i] & pk[i - (1 << k)];
        end else begin
          gn[i] = gk[i];
          pn[i] = pk[i];
        end
      end
      gk = gn;
      pk = pn;
    end
    carry = {gk, cin};
  end

  logic [W:0]        carry_q;
  logic [W-1:0][3:0] s0_q, s1_q;

  dec_pipe_reg #(.W(W + 1 + 8 * W), .ENABLE(REG_MID)) u_reg (
    .clk (clk),
    .d   ({carry, s0, s1}),
    .q   ({carry_q, s0_q, s1_q})
  );

  always_comb begin
    for (int i = 0; i < W; i++) s[i] = carry_q[i] ? s1_q[i] : s0_q[i];
  end

  assign cout = carry_q[W];

endmodule
