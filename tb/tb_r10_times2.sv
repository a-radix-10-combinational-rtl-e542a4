// Self-checking test of r10_times2: random 16-digit BCD operands plus all
// single-digit values; the result must be valid BCD and equal 2x.
module tb_r10_times2;
  import tb_bcd_pkg::*;
  localparam int N = 16;
  logic [N-1:0][3:0] x;
  logic [N:0][3:0]   x2;
  int checks = 0, failures = 0;

  r10_times2 #(.N(N)) dut (.x(x), .x2(x2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input u128_t xv);
    x = xv[4*N-1:0];
    #1;
    checks++;
    if (!is_bcd(u128_t'(x2), N + 1) || bcd_val(u128_t'(x2), N + 1) != 2 * bcd_val(xv, N)) begin
      failures++;
      $display("FAIL x=%h 2x=%h", x, x2);
    end
  endtask

  initial begin
    for (int v = 0; v < 10; v++) check(to_bcd(u128_t'(v) * 1111111111111111, N));
    for (int t = 0; t < 2000; t++) check(rand_bcd(N, 1'b0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
