// eedc_r_generator: redundancy-bit generator of the EEDC encoder.
//
// Data positions are numbered 1..len from the most significant valid bit of
// data (the first bit sent). Position parity j (idx_par[j]) is the even parity
// of every data position whose binary index has bit j set: j = 0 covers
// positions 1, 3, 5, 7, ..., j = 1 covers 2, 3, 6, 7, ... and so on. Unlike a
// Hamming code no position is kept free for a check bit: every position from
// 1 up carries data and the checks go after the data.
//
// r_field is the redundancy field as it is sent, right-aligned in r_count
// bits: its most significant bit is idx_par[0], then idx_par[1], ..., and,
// when has_extra is set, its least significant bit is the even parity of the
// position parities. Bits at and above r_count are zero.
//
// Implementation: the valid data is left-aligned so that position p sits at a
// fixed bit, then each parity is one XOR tree over a constant mask. The block
// is combinational. The parity sets and the order of the field follow the
// worked 7-bit example of the EEDC code; the left-alignment is this design's.
module eedc_r_generator
  import eedc_pkg::*;
#(
  parameter int unsigned MAX_D = MAX_DATA_W,
  localparam int unsigned LEN_W = len_w(MAX_D),
  localparam int unsigned MAX_R = r_for_len(MAX_D),
  localparam int unsigned CNT_W = $clog2(MAX_R + 1)
) (
  input  logic [MAX_D-1:0] data,       // data word, right-aligned, len bits valid
  input  logic [LEN_W-1:0] len,        // data length in bits
  input  logic [CNT_W-1:0] r_count,    // from the identifier
  input  logic [CNT_W-1:0] k_count,    // from the identifier
  output logic [MAX_R-1:0] idx_par,    // position parities, j = 0 .. MAX_R-1
  output logic [MAX_R-1:0] r_field     // redundancy field, right-aligned
);

  // Bit i of the left-aligned word holds position MAX_D - i.
  function automatic logic [MAX_D-1:0] pos_mask(input int unsigned j);
    logic [MAX_D-1:0] m;
    for (int unsigned i = 0; i < MAX_D; i++) m[i] = (((MAX_D - i) >> j) & 1) == 1;
    return m;
  endfunction

  logic [MAX_D-1:0] aligned;
  logic             extra_par;

  // Shifting left by MAX_D - len drops the unused upper bits and fills the
  // positions beyond len with zeros, which do not change any parity.
  assign aligned = data << (MAX_D - 32'(len));

  always_comb begin
    for (int unsigned j = 0; j < MAX_R; j++) idx_par[j] = ^(aligned & pos_mask(j));
  end

  always_comb begin
    extra_par = 1'b0;
    for (int unsigned j = 0; j < MAX_R; j++) begin
      if (j < 32'(k_count)) extra_par ^= idx_par[j];
    end
    r_field = '0;
    for (int unsigned b = 0; b < MAX_R; b++) begin
      if (b < 32'(r_count)) begin
        if ((32'(r_count) - 1 - b) < 32'(k_count)) r_field[b] = idx_par[32'(r_count) - 1 - b];
        else                                      r_field[b] = extra_par;
      end
    end
  end

endmodule
