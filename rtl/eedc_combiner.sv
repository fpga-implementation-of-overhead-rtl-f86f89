// eedc_combiner: joins data and redundancy bits into one EEDC codeword.
//
// It forms the codeword polynomial G(x) + r(x), where G(x) = D(x) * x^r: the
// len valid data bits are shifted up by r_count places and the r_count
// redundancy bits fill the places below them. The codeword is right-aligned
// in code; code_len = len + r_count is its length in bits, and bits at and
// above code_len are zero. The first bit to send is code[code_len-1].
// Data bits above len are masked off here. Combinational.
// Appending the checks after the data (rather than at power-of-two positions)
// is the EEDC code itself; the parallel, right-aligned output with a separate
// length is this design's format.
module eedc_combiner
  import eedc_pkg::*;
#(
  parameter int unsigned MAX_D = MAX_DATA_W,
  localparam int unsigned LEN_W  = len_w(MAX_D),
  localparam int unsigned MAX_R  = r_for_len(MAX_D),
  localparam int unsigned CNT_W  = $clog2(MAX_R + 1),
  localparam int unsigned CODE_W = MAX_D + MAX_R,
  localparam int unsigned CLEN_W = len_w(CODE_W)
) (
  input  logic [MAX_D-1:0]  data,
  input  logic [LEN_W-1:0]  len,
  input  logic [MAX_R-1:0]  r_field,
  input  logic [CNT_W-1:0]  r_count,
  output logic [CODE_W-1:0] code,
  output logic [CLEN_W-1:0] code_len
);

  logic [MAX_D-1:0] data_m;
  logic [MAX_R-1:0] r_m;

  always_comb begin
    for (int unsigned i = 0; i < MAX_D; i++) data_m[i] = data[i] & (i < 32'(len));
    for (int unsigned i = 0; i < MAX_R; i++) r_m[i]    = r_field[i] & (i < 32'(r_count));
  end

  assign code     = (CODE_W'(data_m) << r_count) | CODE_W'(r_m);
  assign code_len = CLEN_W'(len) + CLEN_W'(r_count);

endmodule
