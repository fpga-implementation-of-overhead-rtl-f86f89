// eedc_ref_pkg: bit-level reference model of the EEDC code for the testbenches.
//
// Written independently of the RTL, position by position: data position p
// (1..D, counted from the most significant valid bit) is data[D-p]; check j
// is the even parity of the positions whose index has bit j set; the checks
// follow the data in the order check 0, check 1, ..., and when the sizing
// rule D + r + 1 <= 2^r asks for one bit more than the number of checks, that
// last bit is the even parity of the checks. Codewords are right-aligned in a
// 128-bit vector.
package eedc_ref_pkg;

  function automatic int ref_r(input int d);
    int r;
    r = 1;
    while (d + r + 1 > (1 << r)) r++;
    return r;
  endfunction

  function automatic int ref_k(input int d);
    int k;
    k = 0;
    while ((1 << k) <= d) k++;
    return k;
  endfunction

  // Redundancy field, right-aligned in ref_r(d) bits.
  function automatic logic [127:0] ref_field(input logic [127:0] data, input int d);
    int r, k;
    logic [127:0] f;
    logic         par, all;
    r   = ref_r(d);
    k   = ref_k(d);
    f   = '0;
    all = 1'b0;
    for (int j = 0; j < k; j++) begin
      par = 1'b0;
      for (int p = 1; p <= d; p++) if (((p >> j) & 1) == 1) par ^= data[d - p];
      f[r - 1 - j] = par;
      all ^= par;
    end
    if (r > k) f[0] = all;
    return f;
  endfunction

  function automatic logic [127:0] ref_code(input logic [127:0] data, input int d);
    logic [127:0] m;
    m = '0;
    for (int i = 0; i < d; i++) m[i] = data[i];
    return (m << ref_r(d)) | ref_field(data, d);
  endfunction

endpackage
