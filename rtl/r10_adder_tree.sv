// Radix-10 carry-save adder tree for N partial products.
//
// Input: N partial products x*y_i, each in radix-10 carry-save form (N+1 sum
// digits, N+1 carry bits), partial product i weighted 10^i. Output: their sum
// as one 2N-digit carry-save number (ps digits, pc bits).
//
// A radix-10 CSA reduces two digit vectors and one bit vector, so two
// carry-save operands leave one carry vector over. The tree is arranged as:
//   level 1       N/2 CSAs add pp(2j+1).s + pp(2j).s + pp(2j).c; the N/2
//                 carry vectors pp(2j+1).c go to the first carry counter
//                 (working in parallel), whose digit output is called s1_8.
//   levels 2..L   (L = log2 N) a binary tree of CSAs on the level-1 results,
//                 each CSA leaving the odd operand's carry vector over; these
//                 N/2-1 vectors are collected for the second carry counter
//                 (N/2 inputs, the last tied to 0).
//   level L+1     one CSA adds s1_8 to the tree's result, while the second
//                 carry counter counts the collected vectors.
//   level L+2     one CSA adds the second counter's output.
// For N = 16 this is the six-level tree: 8, 4, 2, 1 CSAs, then two more.
// Every vector is held in a 2N-digit frame at its true weight, so no
// re-alignment is needed between levels; digits outside a vector's own span
// are constant zero and disappear in synthesis (the live widths for N = 16
// are 18, 20, 24 and 32 digits after levels 1 to 4). Carries out of the
// 2N-th digit are dropped: the product is below 10^(2N), so the sum modulo
// 10^(2N) is exact.
//
// REG_AFTER[l-1] = 1 puts a pipeline register on everything alive after
// level l (l = 1..6; for N < 16, bits past level L+2 are ignored). With the
// default all-zero mask the tree is purely combinational and clk is unused.
module r10_adder_tree #(
  parameter int unsigned N         = 16,
  parameter logic [5:0]  REG_AFTER = 6'b000000
) (
  input  logic                      clk,
  input  logic [N-1:0][N:0][3:0]    pps,
  input  logic [N-1:0][N:0]         ppc,
  output logic [2*N-1:0][3:0]       ps,
  output logic [2*N-1:0]            pc
);

  localparam int unsigned L  = $clog2(N);
  localparam int unsigned F  = 2 * N;
  localparam int unsigned K  = N / 2;
  localparam int unsigned NL = L + 2;   // number of levels

  initial assert (N >= 4 && N <= 16 && (1 << L) == N)
    else $error("r10_adder_tree: N=%0d must be 4, 8 or 16", N);

  // Everything that is alive between two levels.
  typedef struct packed {
    logic [N-1:0][F-1:0][3:0] s;       // operand digit vectors
    logic [N-1:0][F-1:0]      c;       // operand carry vectors
    logic [F-1:0][3:0]        cc1_z;   // first counter's output (s1_8)
    logic [K-1:0][F-1:0]      cc2_v;   // vectors collected for counter 2
    logic [F-1:0][3:0]        cc2_z;   // second counter's output
  } tree_state_t;

  // Index of the first second-counter input fed by tree level l (l >= 2).
  function automatic int unsigned cc2_base(int unsigned l);
    int unsigned b = 0;
    for (int unsigned m = 2; m < l; m++) b += N >> m;
    return b;
  endfunction

  // Level 0: place each partial product at its weight.
  tree_state_t st0;
  always_comb begin
    st0 = '0;
    for (int i = 0; i < N; i++) begin
      for (int k = 0; k <= N; k++) begin
        st0.s[i][i+k] = pps[i][k];
        st0.c[i][i+k] = ppc[i][k];
      end
    end
  end

  for (genvar l = 1; l <= NL; l++) begin : g_lv
    localparam int unsigned CNT = (l <= L) ? (N >> l) : 1;
    tree_state_t prev, nxt, q;
    logic [CNT-1:0][F-1:0][3:0] a_op, b_op, sum_s;
    logic [CNT-1:0][F-1:0]      d_op, sum_c;
    logic [CNT-1:0]             unused_cout;
    logic [F-1:0][3:0]          cc_z;

    if (l == 1) begin : g_first
      assign prev = st0;
    end else begin : g_next
      assign prev = g_lv[l-1].q;
    end

    // Operands of this level's CSAs.
    always_comb begin
      for (int j = 0; j < CNT; j++) begin
        if (l <= L) begin
          a_op[j] = prev.s[2*j+1];
          b_op[j] = prev.s[2*j];
          d_op[j] = prev.c[2*j];
        end else begin
          a_op[j] = (l == L + 1) ? prev.cc1_z : prev.cc2_z;
          b_op[j] = prev.s[0];
          d_op[j] = prev.c[0];
        end
      end
    end

    for (genvar j = 0; j < CNT; j++) begin : g_csa
      r10_csa #(.W(F)) u_csa (
        .a    (a_op[j]),
        .b    (b_op[j]),
        .d    (d_op[j]),
        .cin  (1'b0),
        .s    (sum_s[j]),
        .c    (sum_c[j]),
        .cout (unused_cout[j])
      );
    end

    // Carry counters: the first in level 1, the second in level L+1.
    if (l == 1 || l == L + 1) begin : g_cc
      logic [K-1:0][F-1:0] cv;
      always_comb begin
        for (int k = 0; k < K; k++) cv[k] = (l == 1) ? prev.c[2*k+1] : prev.cc2_v[k];
      end
      r10_cc #(.K(K), .M(F)) u_cc (
        .cv (cv),
        .z  (cc_z)
      );
    end else begin : g_no_cc
      assign cc_z = '0;
    end

    always_comb begin
      nxt   = '0;
      nxt.cc1_z = prev.cc1_z;
      nxt.cc2_v = prev.cc2_v;
      nxt.cc2_z = prev.cc2_z;
      for (int j = 0; j < CNT; j++) begin
        nxt.s[j] = sum_s[j];
        nxt.c[j] = sum_c[j];
      end
      if (l == 1) nxt.cc1_z = cc_z;
      if (l >= 2 && l <= L)
        for (int j = 0; j < CNT; j++) nxt.cc2_v[cc2_base(l) + j] = prev.c[2*j+1];
      if (l == L + 1) nxt.cc2_z = cc_z;
    end

    // Cut bit: tree levels beyond L+2 do not exist for small N, and for
    // N < 16 the last two levels use the last two bits.
    localparam int unsigned RB = (l <= L) ? (l - 1) : (l - L + 3);
    dec_pipe_reg #(.W($bits(tree_state_t)), .ENABLE(REG_AFTER[RB])) u_reg (
      .clk (clk),
      .d   (nxt),
      .q   (q)
    );
  end

  assign ps = g_lv[NL].q.s[0];
  assign pc = g_lv[NL].q.c[0];

endmodule
