// Reference arithmetic for the testbenches: conversions between packed BCD
// digit vectors, carry-bit vectors and binary integers of up to 128 bits
// (enough for 38 decimal digits), and random BCD operands.
package tb_bcd_pkg;

  typedef logic [127:0] u128_t;

  // Value of the first nd BCD digits of d (digit i in bits 4i+3..4i).
  function automatic u128_t bcd_val(input u128_t d, input int nd);
    u128_t v = '0;
    for (int i = nd - 1; i >= 0; i--) v = v * 10 + u128_t'(d[4*i +: 4]);
    return v;
  endfunction

  // Value of a bit vector whose bit i has weight 10^i.
  function automatic u128_t bits_val(input u128_t b, input int nb);
    u128_t v = '0;
    for (int i = nb - 1; i >= 0; i--) v = v * 10 + u128_t'(b[i]);
    return v;
  endfunction

  // nd-digit BCD encoding of v (v modulo 10^nd).
  function automatic u128_t to_bcd(input u128_t v, input int nd);
    u128_t d = '0;
    for (int i = 0; i < nd; i++) begin
      d[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return d;
  endfunction

  function automatic u128_t pow10(input int e);
    u128_t v = 1;
    for (int i = 0; i < e; i++) v = v * 10;
    return v;
  endfunction

  // True when every one of the nd digits is 0..9.
  function automatic bit is_bcd(input u128_t d, input int nd);
    for (int i = 0; i < nd; i++) if (d[4*i +: 4] > 4'd9) return 1'b0;
    return 1'b1;
  endfunction

  // Random nd-digit BCD vector; with lead_nz the top digit is 1..9.
  function automatic u128_t rand_bcd(input int nd, input bit lead_nz);
    u128_t d = '0;
    for (int i = 0; i < nd; i++) d[4*i +: 4] = 4'($urandom_range(9));
    if (lead_nz) d[4*(nd-1) +: 4] = 4'($urandom_range(9, 1));
    return d;
  endfunction

  // Random nd-bit vector.
  function automatic u128_t rand_bits(input int nb);
    u128_t b = '0;
    for (int i = 0; i < nb; i++) b[i] = 1'($urandom_range(1));
    return b;
  endfunction

endpackage
