// Self-checking test of r10_nines_comp: for random 17-digit vectors, a plus
// its complement must be 10^17 - 1 and every digit must be 9 - a_i.
module tb_r10_nines_comp;
  import tb_bcd_pkg::*;
  localparam int W = 17;
  logic [W-1:0][3:0] a, y;
  int checks = 0, failures = 0;

  r10_nines_comp #(.W(W)) dut (.a(a), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      a = rand_bcd(W, 1'b0);
      #1;
      checks++;
      if (bcd_val(u128_t'(a), W) + bcd_val(u128_t'(y), W) != pow10(W) - 1 || !is_bcd(u128_t'(y), W)) begin
        failures++;
        $display("FAIL a=%h y=%h", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
