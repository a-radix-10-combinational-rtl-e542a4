// Self-checking test of r10_bcd_cpa: random 16-digit BCD operands and carry
// in, plus the full-length carry chain 999...9 + 0 + 1; the sum and carry out
// must equal a + b + cin.
module tb_r10_bcd_cpa;
  import tb_bcd_pkg::*;
  localparam int W = 16;
  logic [W-1:0][3:0] a, b, s;
  logic              cin, cout;
  int checks = 0, failures = 0;

  r10_bcd_cpa #(.W(W)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    u128_t v;
    #1;
    v = bcd_val(u128_t'(a), W) + bcd_val(u128_t'(b), W) + u128_t'(cin);
    checks++;
    if (u128_t'(s) != to_bcd(v, W) || cout != (v >= pow10(W))) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0b s=%h cout=%0b", a, b, cin, s, cout);
    end
  endtask

  initial begin
    a = to_bcd(pow10(W) - 1, W); b = '0; cin = 1'b1; check();
    a = to_bcd(pow10(W) - 1, W); b = a;  cin = 1'b1; check();
    for (int t = 0; t < 3000; t++) begin
      a   = rand_bcd(W, 1'b0);
      b   = rand_bcd(W, 1'b0);
      cin = 1'($urandom_range(1));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
