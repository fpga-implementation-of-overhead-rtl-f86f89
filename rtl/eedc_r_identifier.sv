// eedc_r_identifier: redundancy-bit identifier of the EEDC encoder.
//
// For the data length presented on len (in bits, 0..MAX_D) it finds the least
// number of redundancy bits r that satisfies D + r + 1 <= 2^r, the sizing rule
// of the EEDC code. It also reports k, the number of bits needed to write the
// largest data position D; the first k redundancy bits are position parities.
// r is either k or k + 1. When it is k + 1, has_extra is set and the last
// redundancy bit is the parity of the other ones.
//
// The search is a fixed loop over every candidate r up to the largest needed
// for MAX_D, so the block is purely combinational (no clock, zero latency).
// Taking the length as a run-time input, so that one circuit serves every
// frame size up to MAX_D, is this design's choice; the sizing rule itself is
// the code's.
module eedc_r_identifier
  import eedc_pkg::*;
#(
  parameter int unsigned MAX_D = MAX_DATA_W,
  localparam int unsigned LEN_W = len_w(MAX_D),
  localparam int unsigned MAX_R = r_for_len(MAX_D),
  localparam int unsigned CNT_W = $clog2(MAX_R + 1)
) (
  input  logic [LEN_W-1:0] len,        // data length in bits
  output logic [CNT_W-1:0] r_count,    // redundancy bits needed
  output logic [CNT_W-1:0] k_count,    // position-parity bits among them
  output logic             has_extra   // r_count == k_count + 1
);

  always_comb begin
    r_count = CNT_W'(MAX_R);
    // Walk down so that the least r meeting the rule is the one kept.
    for (int unsigned r = MAX_R; r >= 1; r--) begin
      if ((32'(len) + r + 1) <= (32'd1 << r)) r_count = CNT_W'(r);
    end
    k_count = '0;
    for (int unsigned k = 1; k <= MAX_R; k++) begin
      if ((32'd1 << (k - 1)) <= 32'(len)) k_count = CNT_W'(k);
    end
  end

  assign has_extra = (r_count != k_count);

endmodule
