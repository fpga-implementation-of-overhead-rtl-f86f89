// eedc_field_reg: holding register for one field of the EEDC codeword.
//
// The encoder uses two of these: one holds the data word (and its length) and
// one holds the redundancy bits (and their count) between the generator and
// the combiner. On a clock edge with load high the register takes d; with
// load low it keeps its value. Reset (active low, synchronous) clears it.
// One cycle from d to q. The two holding places are drawn in the encoder's
// block diagram; their register form and reset are this design's choice.
module eedc_field_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

endmodule
