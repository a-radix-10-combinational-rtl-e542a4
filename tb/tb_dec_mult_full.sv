// Test of dec_mult exactly as delivered (all parameters at their defaults:
// 16 digits, combinational). Multiplies the worked example 0.1963 x 0.8145,
// the extreme operands and a batch of random normalized operands, and checks
// every 32-digit product, together with the BCD adder of the top.
module tb_dec_mult_full;
  import tb_bcd_pkg::*;
  localparam int N = 16;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b1;
  logic [N-1:0][3:0]   x, y, add_a, add_b, add_s;
  logic [2*N-1:0][3:0] p;
  logic add_cin = 1'b0, add_cout, out_valid;
  int checks = 0, failures = 0;

  dec_mult dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y), .out_valid(out_valid), .p(p),
    .add_a(add_a), .add_b(add_b), .add_cin(add_cin), .add_s(add_s), .add_cout(add_cout)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mul(input u128_t xd, input u128_t yd);
    u128_t want = bcd_val(xd, N) * bcd_val(yd, N);
    u128_t sum;
    x = xd[4*N-1:0];
    y = yd[4*N-1:0];
    add_a = xd[4*N-1:0];
    add_b = yd[4*N-1:0];
    #10;
    sum = bcd_val(xd, N) + bcd_val(yd, N);
    checks++;
    if (u128_t'(p) != to_bcd(want, 2 * N) || !out_valid) begin
      failures++;
      $display("FAIL x=%h y=%h p=%h want %h", x, y, p, to_bcd(want, 2 * N));
    end
    checks++;
    if (u128_t'(add_s) != to_bcd(sum, N) || add_cout != (sum >= pow10(N))) begin
      failures++;
      $display("FAIL add x=%h y=%h s=%h", x, y, add_s);
    end
  endtask

  initial begin
    add_a = '0; add_b = '0;
    mul(to_bcd(u128_t'(1963) * pow10(N - 4), N), to_bcd(u128_t'(8145) * pow10(N - 4), N));
    $display("0.%h x 0.%h = 0.%h", x, y, p);
    mul(to_bcd(pow10(N) - 1, N), to_bcd(pow10(N) - 1, N));
    mul(to_bcd(pow10(N - 1), N), to_bcd(pow10(N - 1), N));
    for (int t = 0; t < 1000; t++) mul(rand_bcd(N, 1'b1), rand_bcd(N, 1'b1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
