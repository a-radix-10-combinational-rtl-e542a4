// Recoder of one multiplier digit.
//
// Splits y_i in 0..9 into y_H in {0,5,10} and y_L in {-2,-1,0,1,2} so that
// y_i = y_H + y_L, following this table:
//     y_i : 0 1 2  3  4 5 6 7  8  9
//     y_H : 0 0 0  5  5 5 5 5 10 10
//     y_L : 0 1 2 -2 -1 0 1 2 -2 -1
// Only 2x and 5x then need to be precomputed (10x is a shift). neg is 1 when
// y_L < 0; it becomes the +1 of the radix-10 complement. Combinational.
// Codes 10..15 are not BCD; they are mapped to y_H = y_L = 0 (own choice).
module r10_recoder
  import dec_pkg::*;
(
  input  logic [3:0] yi,
  output yh_sel_e    yh,
  output yl_sel_e    yl,
  output logic       neg
);

  always_comb begin
    unique case (yi)
      4'd0:    begin yh = YH_0;  yl = YL_0;  end
      4'd1:    begin yh = YH_0;  yl = YL_P1; end
      4'd2:    begin yh = YH_0;  yl = YL_P2; end
      4'd3:    begin yh = YH_5;  yl = YL_M2; end
      4'd4:    begin yh = YH_5;  yl = YL_M1; end
      4'd5:    begin yh = YH_5;  yl = YL_0;  end
      4'd6:    begin yh = YH_5;  yl = YL_P1; end
      4'd7:    begin yh = YH_5;  yl = YL_P2; end
      4'd8:    begin yh = YH_10; yl = YL_M2; end
      4'd9:    begin yh = YH_10; yl = YL_M1; end
      default: begin yh = YH_0;  yl = YL_0;  end
    endcase
    neg = (yl == YL_M1) || (yl == YL_M2);
  end

endmodule
