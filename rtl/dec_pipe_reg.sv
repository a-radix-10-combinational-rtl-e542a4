// Optional pipeline register.
//
// With ENABLE = 1, q takes d on every rising clock edge (no reset: data
// registers of the multiplier do not need one, validity is tracked apart).
// With ENABLE = 0 it is a plain wire and clk is unused. Used at every place
// where the multiplier may be cut into pipeline stages.
module dec_pipe_reg #(
  parameter int unsigned W      = 1,
  parameter bit          ENABLE = 1'b1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (ENABLE) begin : g_ff
    always_ff @(posedge clk) q <= d;
  end else begin : g_wire
    assign q = d;
  end

endmodule
