// Self-checking test of r10_csa: random digit vectors, bit vector and carry
// in; (s, c, cout) must be valid and hold the exact sum a + b + d + cin.
// Includes the all-nines case where every digit produces a carry.
module tb_r10_csa;
  import tb_bcd_pkg::*;
  localparam int W = 16;
  logic [W-1:0][3:0] a, b, s;
  logic [W-1:0]      d, c;
  logic              cin, cout;
  int checks = 0, failures = 0;

  r10_csa #(.W(W)) dut (.a(a), .b(b), .d(d), .cin(cin), .s(s), .c(c), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    u128_t want, got;
    #1;
    want = bcd_val(u128_t'(a), W) + bcd_val(u128_t'(b), W) + bits_val(u128_t'(d), W) + u128_t'(cin);
    got  = bcd_val(u128_t'(s), W) + bits_val(u128_t'(c), W) + (cout ? pow10(W) : 0);
    checks++;
    if (want != got || !is_bcd(u128_t'(s), W) || c[0] != cin) begin
      failures++;
      $display("FAIL a=%h b=%h d=%h cin=%0b s=%h c=%h", a, b, d, cin, s, c);
    end
  endtask

  initial begin
    a = to_bcd(pow10(W) - 1, W); b = a; d = '1; cin = 1'b1;
    check();
    for (int t = 0; t < 2000; t++) begin
      a   = rand_bcd(W, 1'b0);
      b   = rand_bcd(W, 1'b0);
      d   = rand_bits(W);
      cin = 1'($urandom_range(1));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
