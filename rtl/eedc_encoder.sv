// eedc_encoder: EEDC transmitter, from a data word to the codeword to send.
//
// Structure (in the order the data flows):
//   redundancy-bit identifier  - r and k for the presented length
//   redundancy-bit generator   - position parities and the r field
//   two field registers        - the data word and the r bits, held
//   combiner                   - data shifted up by r, r bits appended
// All of these follow the EEDC block diagram; the register stage between the
// generator and the combiner is where this design puts its one pipeline cut.
//
// Interface: present data (right-aligned, len bits valid, 0 < len <= MAX_D)
// with in_valid high for one cycle. One clock later out_valid is high for one
// cycle with the codeword right-aligned in code and its length in code_len.
// A new word may be presented every cycle (throughput one word per clock,
// latency one clock). The code and length stay on the outputs until the next
// word is taken. Reset is synchronous and active low.
module eedc_encoder
  import eedc_pkg::*;
#(
  parameter int unsigned MAX_D = MAX_DATA_W,
  localparam int unsigned LEN_W  = len_w(MAX_D),
  localparam int unsigned MAX_R  = r_for_len(MAX_D),
  localparam int unsigned CNT_W  = $clog2(MAX_R + 1),
  localparam int unsigned CODE_W = MAX_D + MAX_R,
  localparam int unsigned CLEN_W = len_w(CODE_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [MAX_D-1:0]  data,
  input  logic [LEN_W-1:0]  len,
  output logic              out_valid,
  output logic [CODE_W-1:0] code,
  output logic [CLEN_W-1:0] code_len
);

  logic [CNT_W-1:0] r_count, k_count;
  logic             has_extra;
  logic [MAX_R-1:0] idx_par, r_field;  // idx_par is used by the receiver only

  logic [MAX_D-1:0] data_q;
  logic [LEN_W-1:0] len_q;
  logic [MAX_R-1:0] r_field_q;
  logic [CNT_W-1:0] r_count_q;

  eedc_r_identifier #(.MAX_D(MAX_D)) u_ident (
    .len(len), .r_count(r_count), .k_count(k_count), .has_extra(has_extra)
  );

  eedc_r_generator #(.MAX_D(MAX_D)) u_gen (
    .data(data), .len(len), .r_count(r_count), .k_count(k_count),
    .idx_par(idx_par), .r_field(r_field)
  );

  // "data output" holding place: the data word with its length.
  eedc_field_reg #(.W(MAX_D + LEN_W)) u_data_reg (
    .clk(clk), .rst_n(rst_n), .load(in_valid),
    .d({len, data}), .q({len_q, data_q})
  );

  // "r bits" holding place: the redundancy field with its width.
  eedc_field_reg #(.W(MAX_R + CNT_W)) u_r_reg (
    .clk(clk), .rst_n(rst_n), .load(in_valid),
    .d({r_count, r_field}), .q({r_count_q, r_field_q})
  );

  eedc_combiner #(.MAX_D(MAX_D)) u_comb (
    .data(data_q), .len(len_q), .r_field(r_field_q), .r_count(r_count_q),
    .code(code), .code_len(code_len)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  // The length must fit the data bus.
  a_len_range: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (32'(len) >= 1 && 32'(len) <= MAX_D));

  // The identifier's r is never more than one above the position-parity count.
  a_r_vs_k: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (r_count == k_count + CNT_W'(has_extra)));

endmodule
