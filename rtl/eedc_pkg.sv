// eedc_pkg: shared sizes and helper functions of the EEDC codec.
//
// The EEDC code appends r redundancy bits after a D-bit data word instead of
// scattering them at power-of-two positions as a Hamming code does. The number
// of redundancy bits is the least r that satisfies D + r + 1 <= 2^r. Data bit
// positions are numbered 1..D from the most significant (first sent) bit; the
// first K redundancy bits are even parities over the positions whose index has
// bit j set (K = bits needed to write the number D). When r exceeds K by one,
// the last redundancy bit is the even parity of the other r-1 redundancy bits.
//
// The largest data word is 64 bits, the 8-byte data field of a CAN 2.0A frame,
// which is the largest size the design is evaluated with. The functions below
// are used both at elaboration (to size the buses) and inside the identifier.
package eedc_pkg;

  // Largest data word in bits (8 bytes).
  localparam int unsigned MAX_DATA_W = 64;

  // Least r with d + r + 1 <= 2^r.
  function automatic int unsigned r_for_len(input int unsigned d);
    int unsigned r;
    r = 1;
    while ((d + r + 1) > (32'd1 << r)) r++;
    return r;
  endfunction

  // Number of bits needed to write the position index d (positions 1..d).
  function automatic int unsigned k_for_len(input int unsigned d);
    int unsigned k;
    k = 0;
    while ((32'd1 << k) <= d) k++;
    return k;
  endfunction

  // Width of a data-length field that can hold 0..max_d.
  function automatic int unsigned len_w(input int unsigned max_d);
    return $clog2(max_d + 1);
  endfunction

endpackage
