// Self-checking test of r10_recoder against the recoding table
// y_i = y_H + y_L, y_H in {0,5,10}, y_L in {-2..2}, for all ten digits.
module tb_r10_recoder;
  import dec_pkg::*;
  logic [3:0] yi;
  yh_sel_e    yh;
  yl_sel_e    yl;
  logic       neg;
  int checks = 0, failures = 0;

  r10_recoder dut (.yi(yi), .yh(yh), .yl(yl), .neg(neg));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected table, indexed by y_i.
  int exp_h [10] = '{0, 0, 0, 5, 5, 5, 5, 5, 10, 10};
  int exp_l [10] = '{0, 1, 2, -2, -1, 0, 1, 2, -2, -1};

  initial begin
    for (int v = 0; v < 10; v++) begin
      int h, l;
      yi = 4'(v);
      #1;
      case (yh)
        YH_0: h = 0;  YH_5: h = 5;  YH_10: h = 10;  default: h = 99;
      endcase
      case (yl)
        YL_0: l = 0;  YL_P1: l = 1;  YL_P2: l = 2;  YL_M1: l = -1;  YL_M2: l = -2;  default: l = 99;
      endcase
      checks++;
      if (h != exp_h[v] || l != exp_l[v] || neg != (exp_l[v] < 0)) begin
        failures++;
        $display("FAIL y=%0d got H=%0d L=%0d neg=%0b", v, h, l, neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
