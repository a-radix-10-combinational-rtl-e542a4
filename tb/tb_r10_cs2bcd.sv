// Self-checking test of r10_cs2bcd: random carry-save inputs and the
// longest carry chains (all digits 9 with a carry entering at digit 0, or
// a 10 at digit 0 followed by 9s). The BCD output and carry out must equal
// the value of (a, d, cin) modulo and divided by 10^32.
module tb_r10_cs2bcd;
  import tb_bcd_pkg::*;
  localparam int W = 32;
  logic [W-1:0][3:0] a, s;
  logic [W-1:0]      d;
  logic              cin, cout;
  int checks = 0, failures = 0;

  r10_cs2bcd #(.W(W)) dut (.clk(1'b0), .a(a), .d(d), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    u128_t v;
    #1;
    v = bcd_val(u128_t'(a), W) + bits_val(u128_t'(d), W) + u128_t'(cin);
    checks++;
    if (u128_t'(s) != to_bcd(v, W) || cout != (v >= pow10(W))) begin
      failures++;
      $display("FAIL a=%h d=%h cin=%0b s=%h cout=%0b", a, d, cin, s, cout);
    end
  endtask

  initial begin
    a = to_bcd(pow10(W) - 1, W); d = '0; cin = 1'b1; check();
    a = to_bcd(pow10(W) - 1, W); d = '0; cin = 1'b0; check();
    a = to_bcd(pow10(W) - 10, W); d = 1; cin = 1'b0; check();
    a = to_bcd(pow10(W) - 1, W); a[0] = 4'd9; d = 1; cin = 1'b0; check();
    for (int t = 0; t < 3000; t++) begin
      a   = rand_bcd(W, 1'b0);
      d   = W'(rand_bits(W));
      cin = 1'($urandom_range(1));
      // Bias some digits towards 9 to form long propagate runs.
      if (t % 3 == 0) for (int i = 0; i < W; i++) if ($urandom_range(3) != 0) begin a[i] = 4'd9; d[i] = 1'b0; end
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
