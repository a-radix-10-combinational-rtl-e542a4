// 16-digit radix-10 (BCD) multiplier, combinational or pipelined.
//
// p = x * y for two N-digit BCD magnitudes gives a 2N-digit BCD product,
// without truncation or rounding. The multiplicand must have a nonzero
// leading digit (normalized operand); the multiplier may be any BCD value.
//
// Datapath:
//   precomputation  2x (digit-local doubling), 5x (10x halved digit by
//                   digit) and the 9's complements of x and 2x, shared by
//                   all partial products; none of them propagates a carry.
//   PP generation   one generator per multiplier digit y_i recodes it as
//                   y_H + y_L (y_H in {0,5,10}, y_L in {-2..2}), selects
//                   x*y_H and x*y_L and adds them in one radix-10 carry-save
//                   adder, giving N+1 digits plus N+1 carry bits.
//   adder tree      radix-10 CSAs and two carry counters reduce the N
//                   partial products to one 2N-digit carry-save number in
//                   six levels (for N = 16).
//   converter       a parallel-prefix radix-10 carry-save to BCD converter.
//
// Timing. PIPE_CUTS is a mask of the eleven places where a pipeline register
// may go (see dec_pkg): after precomputation, after the PP muxes, after the
// PP CSA, after each of the six tree levels, inside the converter and at
// the output. The latency in clock cycles is the number of bits set, and a
// new operation can enter every cycle. The default CUTS_COMB is the plain
// combinational multiplier: p follows x and y, out_valid equals in_valid,
// clk and rst_n are unused. CUTS_4_STAGE (latency 4) and CUTS_11_STAGE
// (latency 11) are balanced cuts for a 1 ns and a 0.4 ns clock. in_valid
// travels beside the data and is cleared by the asynchronous active-low
// reset rst_n; the data registers have no reset.
//
// Also in this top, with its own ports and always combinational: an N-digit
// BCD carry-propagate adder (add_*) built from the same CSA and converter.
module dec_mult
  import dec_pkg::*;
#(
  parameter int unsigned N         = N_DIGITS,
  parameter cut_mask_t   PIPE_CUTS = CUTS_COMB
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [N-1:0][3:0]     x,
  input  logic [N-1:0][3:0]     y,
  output logic                  out_valid,
  output logic [2*N-1:0][3:0]   p,
  // BCD carry-propagate adder
  input  logic [N-1:0][3:0]     add_a,
  input  logic [N-1:0][3:0]     add_b,
  input  logic                  add_cin,
  output logic [N-1:0][3:0]     add_s,
  output logic                  add_cout
);

  localparam int unsigned LAT = $countones(PIPE_CUTS);

  // ---------------- precomputation ----------------
  logic [N:0][3:0]   x2, x5, xn, x2n;
  logic [N:0][3:0]   x2_q, x5_q, xn_q, x2n_q;
  logic [N-1:0][3:0] x_q, y_q;

  r10_times2 #(.N(N)) u_x2 (.x(x), .x2(x2));
  r10_times5 #(.N(N)) u_x5 (.x(x), .x5(x5));
  r10_nines_comp #(.W(N + 1)) u_xn  (.a({4'd0, x}), .y(xn));
  r10_nines_comp #(.W(N + 1)) u_x2n (.a(x2),        .y(x2n));

  dec_pipe_reg #(.W(4 * (6 * N + 4)), .ENABLE(PIPE_CUTS[CUT_PRECOMP])) u_reg_pre (
    .clk (clk),
    .d   ({x, y, x2, x5, xn, x2n}),
    .q   ({x_q, y_q, x2_q, x5_q, xn_q, x2n_q})
  );

  // ---------------- partial-product generation ----------------
  logic [N-1:0][N:0][3:0] pps, pps_q;
  logic [N-1:0][N:0]      ppc, ppc_q;

  for (genvar i = 0; i < N; i++) begin : g_pp
    r10_pp_gen #(.N(N), .REG_MUX(PIPE_CUTS[CUT_PP_MUX])) u_pp (
      .clk (clk),
      .x   (x_q),
      .x2  (x2_q),
      .x5  (x5_q),
      .xn  (xn_q),
      .x2n (x2n_q),
      .yi  (y_q[i]),
      .s   (pps[i]),
      .c   (ppc[i])
    );
  end

  dec_pipe_reg #(.W($bits(pps) + $bits(ppc)), .ENABLE(PIPE_CUTS[CUT_PP_CSA])) u_reg_pp (
    .clk (clk),
    .d   ({pps, ppc}),
    .q   ({pps_q, ppc_q})
  );

  // ---------------- adder tree and converter ----------------
  logic [2*N-1:0][3:0] ts, prod;
  logic [2*N-1:0]      tc;
  logic                unused_cout;

  r10_adder_tree #(.N(N), .REG_AFTER(PIPE_CUTS[CUT_TREE_L1 +: 6])) u_tree (
    .clk (clk),
    .pps (pps_q),
    .ppc (ppc_q),
    .ps  (ts),
    .pc  (tc)
  );

  r10_cs2bcd #(.W(2 * N), .REG_MID(PIPE_CUTS[CUT_CONV_MID])) u_conv (
    .clk  (clk),
    .a    (ts),
    .d    (tc),
    .cin  (1'b0),
    .s    (prod),
    .cout (unused_cout)
  );

  dec_pipe_reg #(.W($bits(prod)), .ENABLE(PIPE_CUTS[CUT_OUT])) u_reg_out (
    .clk (clk),
    .d   (prod),
    .q   (p)
  );

  // ---------------- operation valid ----------------
  if (LAT == 0) begin : g_vld_comb
    assign out_valid = in_valid;
  end else begin : g_vld_pipe
    logic [LAT-1:0] vld;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld <= '0;
      else        vld <= (vld << 1) | LAT'(in_valid);
    end
    assign out_valid = vld[LAT-1];
  end

  // ---------------- BCD carry-propagate adder ----------------
  r10_bcd_cpa #(.W(N)) u_cpa (
    .a    (add_a),
    .b    (add_b),
    .cin  (add_cin),
    .s    (add_s),
    .cout (add_cout)
  );

endmodule
