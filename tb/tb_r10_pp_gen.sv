// Self-checking test of r10_pp_gen. The testbench computes 2x, 5x and the
// 9's complements itself and feeds them in, then checks s + c == x * y_i for
// all ten multiplier digits and random normalized multiplicands, with extra
// weight on leading digit 1 (the case where the top-digit fold matters).
// It also counts how often the fold corrected a top digit of 9 plus an
// incoming carry, and fails if that never happened.
module tb_r10_pp_gen;
  import tb_bcd_pkg::*;
  localparam int N = 16;
  logic [N-1:0][3:0] x;
  logic [N:0][3:0]   x2, x5, xn, x2n, s;
  logic [N:0]        c;
  logic [3:0]        yi;
  int checks = 0, failures = 0, folds = 0;

  r10_pp_gen #(.N(N)) dut (.clk(1'b0), .x(x), .x2(x2), .x5(x5), .xn(xn), .x2n(x2n), .yi(yi), .s(s), .c(c));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input u128_t xd);
    u128_t xv = bcd_val(xd, N);
    x   = xd[4*N-1:0];
    x2  = to_bcd(2 * xv, N + 1);
    x5  = to_bcd(5 * xv, N + 1);
    xn  = to_bcd(pow10(N + 1) - 1 - xv, N + 1);
    x2n = to_bcd(pow10(N + 1) - 1 - 2 * xv, N + 1);
    for (int v = 0; v < 10; v++) begin
      yi = 4'(v);
      #1;
      checks++;
      if (dut.csa_c[N] && dut.csa_s[N] == 4'd9) folds++;
      if (bcd_val(u128_t'(s), N + 1) + bits_val(u128_t'(c), N + 1) != xv * v || !is_bcd(u128_t'(s), N + 1)) begin
        failures++;
        $display("FAIL x=%h y=%0d s=%h c=%h", x, v, s, c);
      end
    end
  endtask

  initial begin
    run(to_bcd(pow10(N - 1), N));            // 1000...0
    run(to_bcd(pow10(N) - 1, N));            // 9999...9
    for (int t = 0; t < 300; t++) begin
      automatic u128_t xd = rand_bcd(N, 1'b1);
      if (t % 2 == 0) xd[4*(N-1) +: 4] = 4'd1;
      run(xd);
    end
    checks++;
    if (folds == 0) begin
      failures++;
      $display("FAIL top-digit fold never exercised");
    end
    $display("folds=%0d", folds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
