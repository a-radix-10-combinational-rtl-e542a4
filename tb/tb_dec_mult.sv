// End-to-end test of dec_mult: the combinational default, the 4-stage and
// the 11-stage pipelined variants side by side, plus the BCD adder.
//
// Operands: a known example (0.1963 x 0.8145), extreme values (leading digit
// 1, all nines) and random normalized multiplicands with random multipliers.
// The combinational product is checked in the same cycle; the pipelined
// ones are issued back to back, with random bubbles, and must appear
// exactly 4 and 11 clocks later with out_valid. Each mechanism of the design is counted and a
// mechanism that never occurred is a failure:
//   negative recoded digit (complemented -x / -2x), y_H = 10 (shifted x),
//   top-digit fold in a partial product, carry counters holding counts of 4
//   or more, a carry chain of 8 or more digits in the converter, pipeline
//   back-to-back issue, pipeline bubble, reset clearing out_valid, and a
//   decimal carry out of the BCD adder.
module tb_dec_mult;
  import tb_bcd_pkg::*;
  localparam int N   = 16;
  localparam int LAT4  = 4;
  localparam int LAT11 = 11;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  logic [N-1:0][3:0]   x, y, add_a, add_b, add_s, add_s_p;
  logic [2*N-1:0][3:0] p_c, p_p, p_q;
  logic [N-1:0][3:0]   add_s_q;
  logic add_cin, add_cout, add_cout_p, add_cout_q, vld_c, vld_p, vld_q;

  dec_mult u_comb (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y), .out_valid(vld_c), .p(p_c),
    .add_a(add_a), .add_b(add_b), .add_cin(add_cin), .add_s(add_s), .add_cout(add_cout)
  );

  dec_mult #(.PIPE_CUTS(dec_pkg::CUTS_4_STAGE)) u_pipe (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y), .out_valid(vld_p), .p(p_p),
    .add_a(add_a), .add_b(add_b), .add_cin(add_cin), .add_s(add_s_p), .add_cout(add_cout_p)
  );

  dec_mult #(.PIPE_CUTS(dec_pkg::CUTS_11_STAGE)) u_pipe11 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y), .out_valid(vld_q), .p(p_q),
    .add_a(add_a), .add_b(add_b), .add_cin(add_cin), .add_s(add_s_q), .add_cout(add_cout_q)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_neg = 0, n_shift = 0, n_fold = 0, n_cc1 = 0, n_cc2 = 0, n_chain = 0;
  int n_b2b = 0, n_bubble = 0, n_reset = 0, n_addc = 0;

  // Probes of internal events of the combinational instance.
  logic [N-1:0] fold_ev;
  for (genvar i = 0; i < N; i++) begin : g_probe
    assign fold_ev[i] = u_comb.g_pp[i].u_pp.csa_c[N] && (u_comb.g_pp[i].u_pp.csa_s[N] == 4'd9);
  end

  function automatic bit long_chain(input logic [2*N:0] cy);
    int run = 0;
    for (int i = 0; i <= 2 * N; i++) begin
      run = cy[i] ? run + 1 : 0;
      if (run >= 8) return 1'b1;
    end
    return 1'b0;
  endfunction

  function automatic int max_digit(input logic [2*N-1:0][3:0] z);
    int m = 0;
    for (int i = 0; i < 2 * N; i++) if (int'(z[i]) > m) m = int'(z[i]);
    return m;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // Every applied operation, one entry per clock (valid flag + product).
  u128_t exp_p [$];
  bit    exp_v [$];
  bit    prev_valid = 1'b0;

  // Entry t must be at the output of a pipeline of latency lat when entry
  // t + lat is being applied.
  task automatic check_pipe(input string name, input int lat, input bit vld, input u128_t got);
    int t = exp_v.size() - 1 - lat;
    checks++;
    if (t < 0) begin
      if (vld) begin failures++; $display("FAIL %s valid before any operation", name); end
    end else if (vld != exp_v[t] || (exp_v[t] && got != exp_p[t])) begin
      failures++;
      $display("FAIL %s entry %0d valid=%0b/%0b p=%h want %h", name, t, vld, exp_v[t], got, exp_p[t]);
    end
  endtask

  task automatic apply(input u128_t xd, input u128_t yd, input bit v);
    u128_t want;
    @(negedge clk);
    x = xd[4*N-1:0];
    y = yd[4*N-1:0];
    in_valid = v;
    add_a = rand_bcd(N, 1'b0);
    add_b = rand_bcd(N, 1'b0);
    add_cin = 1'($urandom_range(1));
    #1;
    want = bcd_val(xd, N) * bcd_val(yd, N);
    // Combinational instance.
    checks++;
    if (u128_t'(p_c) != to_bcd(want, 2 * N) || vld_c != v) begin
      failures++;
      $display("FAIL comb x=%h y=%h p=%h", x, y, p_c);
    end
    // Adder.
    begin
      u128_t s = bcd_val(u128_t'(add_a), N) + bcd_val(u128_t'(add_b), N) + u128_t'(add_cin);
      checks++;
      if (u128_t'(add_s) != to_bcd(s, N) || add_cout != (s >= pow10(N))) begin
        failures++;
        $display("FAIL adder a=%h b=%h", add_a, add_b);
      end
      if (add_cout) n_addc++;
    end
    // Mechanism counters.
    for (int i = 0; i < N; i++) begin
      if (y[i] inside {4'd3, 4'd4, 4'd8, 4'd9}) n_neg++;
      if (y[i] inside {4'd8, 4'd9}) n_shift++;
    end
    n_fold += $countones(fold_ev);
    if (max_digit(u_comb.u_tree.g_lv[1].cc_z) >= 4) n_cc1++;
    if (max_digit(u_comb.u_tree.g_lv[5].cc_z) >= 4) n_cc2++;
    if (long_chain(u_comb.u_conv.carry)) n_chain++;
    if (v && prev_valid) n_b2b++;
    if (!v) n_bubble++;
    prev_valid = v;
    exp_p.push_back(to_bcd(want, 2 * N));
    exp_v.push_back(v);
    check_pipe("4-stage", LAT4, vld_p, u128_t'(p_p));
    check_pipe("11-stage", LAT11, vld_q, u128_t'(p_q));
  endtask

  initial begin
    in_valid = 1'b0;
    x = '0; y = '0; add_a = '0; add_b = '0; add_cin = 1'b0;
    // Reset while valid operands are presented: out_valid must stay low.
    @(negedge clk); in_valid = 1'b1; x = to_bcd(pow10(N - 1), N); y = x;
    repeat (6) @(negedge clk);
    checks++;
    if (vld_p || vld_q) begin failures++; $display("FAIL out_valid during reset"); end
    else n_reset++;
    in_valid = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    // Known example: 0.1963 * 0.8145 = 0.15988635.
    apply(to_bcd(u128_t'(1963) * pow10(N - 4), N), to_bcd(u128_t'(8145) * pow10(N - 4), N), 1'b1);
    apply(to_bcd(pow10(N) - 1, N), to_bcd(pow10(N) - 1, N), 1'b1);
    apply(to_bcd(pow10(N - 1), N), to_bcd(pow10(N) - 1, N), 1'b1);
    apply(to_bcd(pow10(N - 1), N), to_bcd(u128_t'(4444444444444444), N), 1'b1);
    apply(to_bcd(pow10(N - 1), N), '0, 1'b1);
    for (int t = 0; t < 3000; t++) begin
      automatic u128_t xd = rand_bcd(N, 1'b1);
      automatic u128_t yd = rand_bcd(N, 1'b0);
      if (t % 4 == 0) xd[4*(N-1) +: 4] = 4'd1;
      apply(xd, yd, $urandom_range(7) != 0);
    end
    // Drain the pipeline.
    for (int t = 0; t < LAT11 + 1; t++) apply('0, '0, 1'b0);
    @(negedge clk);
    $display("events: neg=%0d shift=%0d fold=%0d cc1>=4:%0d cc2>=4:%0d chain>=8:%0d b2b=%0d bubble=%0d reset=%0d addcarry=%0d",
             n_neg, n_shift, n_fold, n_cc1, n_cc2, n_chain, n_b2b, n_bubble, n_reset, n_addc);
    if (n_neg == 0)    begin failures++; $display("FAIL no negative recoding"); end
    if (n_shift == 0)  begin failures++; $display("FAIL no 10x selection"); end
    if (n_fold == 0)   begin failures++; $display("FAIL no top-digit fold"); end
    if (n_cc1 == 0)    begin failures++; $display("FAIL counter 1 never counted 4+"); end
    if (n_cc2 == 0)    begin failures++; $display("FAIL counter 2 never counted 4+"); end
    if (n_chain == 0)  begin failures++; $display("FAIL no long carry chain"); end
    if (n_b2b == 0)    begin failures++; $display("FAIL no back-to-back issue"); end
    if (n_bubble == 0) begin failures++; $display("FAIL no pipeline bubble"); end
    if (n_reset == 0)  begin failures++; $display("FAIL reset not seen"); end
    if (n_addc == 0)   begin failures++; $display("FAIL adder never carried out"); end
    checks += 10;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
