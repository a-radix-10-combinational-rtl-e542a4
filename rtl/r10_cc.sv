// M-digit radix-10 carry counter.
//
// Takes K carry vectors of M bits whose bits in one column have the same
// weight, and replaces them by one BCD digit vector: digit j is the number of
// ones in column j (0..K, so K may be at most 9). In the adder tree it takes
// the carry vectors that the radix-10 carry-save adders leave over, eight at a
// time. The counter is built here as a plain per-column population count.
// Purely combinational.
//
// Ports: cv[k] is carry vector k; z is the M-digit count vector.
module r10_cc #(
  parameter int unsigned K = 8,
  parameter int unsigned M = 32
) (
  input  logic [K-1:0][M-1:0] cv,
  output logic [M-1:0][3:0]   z
);

  initial assert (K <= 9) else $error("r10_cc: K=%0d does not fit a decimal digit", K);

  always_comb begin
    for (int j = 0; j < M; j++) begin
      z[j] = 4'd0;
      for (int k = 0; k < K; k++) z[j] = z[j] + 4'(cv[k][j]);
    end
  end

endmodule
