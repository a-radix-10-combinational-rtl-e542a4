// Self-checking test of r10_cc: every output digit must equal the number of
// ones among the eight carry vectors in its column (0..8).
module tb_r10_cc;
  import tb_bcd_pkg::*;
  localparam int K = 8;
  localparam int M = 32;
  logic [K-1:0][M-1:0] cv;
  logic [M-1:0][3:0]   z;
  int checks = 0, failures = 0;

  r10_cc #(.K(K), .M(M)) dut (.cv(cv), .z(z));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      // Vary the density so that counts 0 and 8 both appear.
      automatic int dens = $urandom_range(4);
      for (int k = 0; k < K; k++)
        for (int j = 0; j < M; j++)
          cv[k][j] = (dens == 0) ? 1'b0 : (dens == 4) ? 1'b1 : ($urandom_range(3) < dens);
      #1;
      for (int j = 0; j < M; j++) begin
        automatic int n = 0;
        for (int k = 0; k < K; k++) n += int'(cv[k][j]);
        checks++;
        if (int'(z[j]) != n) begin
          failures++;
          $display("FAIL column %0d count %0d got %0d", j, n, z[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
