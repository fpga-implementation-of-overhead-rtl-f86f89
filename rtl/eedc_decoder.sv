// eedc_decoder: EEDC receiver, checks a codeword and corrects what it can.
//
// The receiver runs the encoder's algorithm again: the identifier gives r and
// k for the known data length, the data part of the codeword goes through the
// same redundancy-bit generator, and the recomputed position parities are
// compared with the received ones. The k-bit difference is the syndrome s.
// When the code has an extra bit (r = k + 1), the received extra bit is also
// checked against the parity of the received position parities.
//
//   s = 0, extra ok              no error
//   s = 0, extra bad             the extra bit itself was hit; data is good
//   extra present, extra bad,    one position-parity bit was hit; data good
//     s a power of two
//   extra ok (or absent),        data position s was hit and is flipped back
//     1 <= s <= len, and not a
//     power of two when there
//     is no extra bit
//   anything else                error detected, not corrected
//
// Because no position is reserved for a check bit, a single error in data
// position 1, 2, 4, ... and a single error in a position-parity bit give the
// same syndrome. The extra bit tells them apart; without it (for instance at
// 8 or 64 data bits) such an error is reported as detected but uncorrectable.
// The code only describes the receiver as applying the same algorithm to
// check, recover and correct; this syndrome table is this design's reading.
//
// Interface: code (right-aligned, len + r bits long) and len with in_valid;
// one clock later out_valid with the data (right-aligned), err_detected,
// err_corrected and err_uncorrectable. Bits of code above len + r are ignored.
// One word per clock, synchronous active-low reset.
module eedc_decoder
  import eedc_pkg::*;
#(
  parameter int unsigned MAX_D = MAX_DATA_W,
  localparam int unsigned LEN_W  = len_w(MAX_D),
  localparam int unsigned MAX_R  = r_for_len(MAX_D),
  localparam int unsigned CNT_W  = $clog2(MAX_R + 1),
  localparam int unsigned CODE_W = MAX_D + MAX_R
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [CODE_W-1:0] code,
  input  logic [LEN_W-1:0]  len,
  output logic              out_valid,
  output logic [MAX_D-1:0]  data,
  output logic              err_detected,
  output logic              err_corrected,
  output logic              err_uncorrectable,
  output logic [MAX_R-1:0]  syndrome
);

  logic [CNT_W-1:0] r_count, k_count;
  logic             has_extra;
  logic [MAX_R-1:0] idx_par, unused_field;
  logic [MAX_D-1:0] rx_data, fixed_data;
  logic [MAX_R-1:0] rx_r, rx_idx, s;
  logic             rx_extra, extra_bad, s_pow2, s_in_range;
  logic             det, corr_data, corr_check, uncorr;

  eedc_r_identifier #(.MAX_D(MAX_D)) u_ident (
    .len(len), .r_count(r_count), .k_count(k_count), .has_extra(has_extra)
  );

  // Split the codeword: r bits at the bottom, data above them.
  always_comb begin
    logic [CODE_W-1:0] up;
    up = code >> r_count;
    for (int unsigned i = 0; i < MAX_R; i++) rx_r[i]    = code[i] & (i < 32'(r_count));
    for (int unsigned i = 0; i < MAX_D; i++) rx_data[i] = up[i]   & (i < 32'(len));
  end

  eedc_r_generator #(.MAX_D(MAX_D)) u_gen (
    .data(rx_data), .len(len), .r_count(r_count), .k_count(k_count),
    .idx_par(idx_par), .r_field(unused_field)
  );

  always_comb begin
    // Received position parity j sits at field bit r_count-1-j.
    rx_idx   = '0;
    rx_extra = 1'b0;
    for (int unsigned j = 0; j < MAX_R; j++) begin
      if (j < 32'(k_count)) rx_idx[j] = rx_r[32'(r_count) - 1 - j];
    end
    if (has_extra) rx_extra = rx_r[0];
    s          = rx_idx ^ idx_par;
    extra_bad  = has_extra & (rx_extra ^ (^rx_idx));
    s_pow2     = (s != '0) && ((s & (s - 1'b1)) == '0);
    s_in_range = (s != '0) && (32'(s) <= 32'(len));

    corr_data  = 1'b0;
    corr_check = 1'b0;
    uncorr     = 1'b0;
    det        = (s != '0) || extra_bad;
    if (s == '0) begin
      corr_check = extra_bad;
    end else if (has_extra) begin
      if (extra_bad) begin
        if (s_pow2) corr_check = 1'b1;
        else        uncorr     = 1'b1;
      end else if (s_in_range) corr_data = 1'b1;
      else                     uncorr    = 1'b1;
    end else begin
      if (s_in_range && !s_pow2) corr_data = 1'b1;
      else                       uncorr    = 1'b1;
    end

    // Position p is bit len - p of the right-aligned data word.
    fixed_data = rx_data;
    if (corr_data) fixed_data[32'(len) - 32'(s)] = ~rx_data[32'(len) - 32'(s)];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid         <= 1'b0;
      data              <= '0;
      err_detected      <= 1'b0;
      err_corrected     <= 1'b0;
      err_uncorrectable <= 1'b0;
      syndrome          <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        data              <= fixed_data;
        err_detected      <= det;
        err_corrected     <= corr_data | corr_check;
        err_uncorrectable <= uncorr;
        syndrome          <= s;
      end
    end
  end

  a_len_range: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (32'(len) >= 1 && 32'(len) <= MAX_D));

endmodule
