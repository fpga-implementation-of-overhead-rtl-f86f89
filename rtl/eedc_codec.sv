// eedc_codec: EEDC transmitter and receiver side by side.
//
// The transmitter (eedc_encoder) turns a data word of up to MAX_D bits into
// the EEDC codeword: the data followed by r redundancy bits, r being the least
// number with D + r + 1 <= 2^r. The receiver (eedc_decoder) takes a codeword
// and the data length, recomputes the redundancy bits, and reports and, where
// the syndrome allows, corrects an error. The two halves share nothing but
// the clock and reset; wire tx_code to rx_code (through a channel) to close
// the loop. The default MAX_D = 64 covers data fields of 1 to 8 bytes, as in
// a CAN 2.0A data frame; the rest of the CAN frame is outside this design.
//
// Timing: each half takes one word per clock and answers one clock later.
// The transmitter follows the EEDC block diagram; the receiver applies the
// same computation as the code prescribes, with a syndrome decision table
// that is this design's (see eedc_decoder).
module eedc_codec
  import eedc_pkg::*;
#(
  parameter int unsigned MAX_D = MAX_DATA_W,
  localparam int unsigned LEN_W  = len_w(MAX_D),
  localparam int unsigned MAX_R  = r_for_len(MAX_D),
  localparam int unsigned CODE_W = MAX_D + MAX_R,
  localparam int unsigned CLEN_W = len_w(CODE_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  // transmitter
  input  logic              tx_valid,
  input  logic [MAX_D-1:0]  tx_data,
  input  logic [LEN_W-1:0]  tx_len,
  output logic              tx_code_valid,
  output logic [CODE_W-1:0] tx_code,
  output logic [CLEN_W-1:0] tx_code_len,
  // receiver
  input  logic              rx_valid,
  input  logic [CODE_W-1:0] rx_code,
  input  logic [LEN_W-1:0]  rx_len,
  output logic              rx_data_valid,
  output logic [MAX_D-1:0]  rx_data,
  output logic              rx_err_detected,
  output logic              rx_err_corrected,
  output logic              rx_err_uncorrectable,
  output logic [MAX_R-1:0]  rx_syndrome
);

  eedc_encoder #(.MAX_D(MAX_D)) u_tx (
    .clk(clk), .rst_n(rst_n), .in_valid(tx_valid), .data(tx_data), .len(tx_len),
    .out_valid(tx_code_valid), .code(tx_code), .code_len(tx_code_len)
  );

  eedc_decoder #(.MAX_D(MAX_D)) u_rx (
    .clk(clk), .rst_n(rst_n), .in_valid(rx_valid), .code(rx_code), .len(rx_len),
    .out_valid(rx_data_valid), .data(rx_data), .err_detected(rx_err_detected),
    .err_corrected(rx_err_corrected), .err_uncorrectable(rx_err_uncorrectable),
    .syndrome(rx_syndrome)
  );

endmodule
