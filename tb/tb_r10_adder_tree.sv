// Self-checking test of r10_adder_tree: the default instance (N = 16,
// combinational) and a fully registered small one (N = 4, a register after
// every level, so 4 cycles of latency). Partial products are random
// carry-save numbers (any digits, any carry bits); the tree output must be
// valid and equal sum_i pp_i * 10^i modulo 10^(2N). A new set of inputs is
// applied every clock; the registered instance must show set t exactly
// 4 clocks after it was applied.
module tb_r10_adder_tree;
  import tb_bcd_pkg::*;
  localparam int N    = 16;
  localparam int NS   = 4;
  localparam int LATS = 4;
  logic clk = 1'b0;
  logic [N-1:0][N:0][3:0]   pps;
  logic [N-1:0][N:0]        ppc;
  logic [2*N-1:0][3:0]      ps;
  logic [2*N-1:0]           pc;
  logic [NS-1:0][NS:0][3:0] pps4;
  logic [NS-1:0][NS:0]      ppc4;
  logic [2*NS-1:0][3:0]     ps4;
  logic [2*NS-1:0]          pc4;
  u128_t hist4 [$];
  int checks = 0, failures = 0;

  r10_adder_tree #(.N(N)) dut (.clk(clk), .pps(pps), .ppc(ppc), .ps(ps), .pc(pc));
  r10_adder_tree #(.N(NS), .REG_AFTER(6'b111111)) dut4 (.clk(clk), .pps(pps4), .ppc(ppc4), .ps(ps4), .pc(pc4));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic u128_t ref_sum16();
    u128_t v = '0;
    for (int i = 0; i < N; i++)
      v += (bcd_val(u128_t'(pps[i]), N + 1) + bits_val(u128_t'(ppc[i]), N + 1)) * pow10(i);
    return v % pow10(2 * N);
  endfunction

  function automatic u128_t ref_sum4();
    u128_t v = '0;
    for (int i = 0; i < NS; i++)
      v += (bcd_val(u128_t'(pps4[i]), NS + 1) + bits_val(u128_t'(ppc4[i]), NS + 1)) * pow10(i);
    return v % pow10(2 * NS);
  endfunction

  initial begin
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        pps[i] = rand_bcd(N + 1, 1'b0);
        ppc[i] = (N + 1)'(rand_bits(N + 1));
      end
      for (int i = 0; i < NS; i++) begin
        pps4[i] = rand_bcd(NS + 1, 1'b0);
        ppc4[i] = (NS + 1)'(rand_bits(NS + 1));
      end
      #1;
      hist4.push_back(ref_sum4());
      checks++;
      if ((bcd_val(u128_t'(ps), 2 * N) + bits_val(u128_t'(pc), 2 * N)) % pow10(2 * N) != ref_sum16()
          || !is_bcd(u128_t'(ps), 2 * N)) begin
        failures++;
        $display("FAIL N=16 ps=%h pc=%h", ps, pc);
      end
      if (t >= LATS) begin
        checks++;
        if ((bcd_val(u128_t'(ps4), 2 * NS) + bits_val(u128_t'(pc4), 2 * NS)) % pow10(2 * NS) != hist4[t - LATS]) begin
          failures++;
          $display("FAIL N=4 t=%0d ps=%h pc=%h", t, ps4, pc4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
