// tb_eedc_encoder: checks the EEDC transmitter end to end.
//
// Sends the 7-bit worked example (1001110 -> 10011100110), then a stream of
// random words at random lengths, a new word on most cycles, and compares
// each codeword and its length with the reference model. Also checks the
// one-clock latency: out_valid must follow in_valid exactly one cycle later.
module tb_eedc_encoder;
  import eedc_pkg::*;
  import eedc_ref_pkg::*;

  localparam int unsigned MAX_D  = MAX_DATA_W;
  localparam int unsigned LEN_W  = len_w(MAX_D);
  localparam int unsigned MAX_R  = r_for_len(MAX_D);
  localparam int unsigned CODE_W = MAX_D + MAX_R;
  localparam int unsigned CLEN_W = len_w(CODE_W);

  logic              clk = 0, rst_n = 0, in_valid = 0;
  logic [MAX_D-1:0]  data = '0;
  logic [LEN_W-1:0]  len = 1;
  logic              out_valid;
  logic [CODE_W-1:0] code;
  logic [CLEN_W-1:0] code_len;
  int checks = 0, failures = 0;

  logic [127:0] exp_code;
  int           exp_len;
  bit           exp_valid = 0;

  eedc_encoder #(.MAX_D(MAX_D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard: the word taken on one edge must be on the outputs after it.
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (out_valid != exp_valid) begin
        failures++; $display("FAIL latency: out_valid=%0d exp=%0d", out_valid, exp_valid);
      end else if (exp_valid && (128'(code) != exp_code || int'(code_len) != exp_len)) begin
        failures++;
        $display("FAIL code=%h exp=%h len=%0d exp=%0d", code, exp_code, code_len, exp_len);
      end
    end
  end

  task automatic drive(input bit v, input logic [MAX_D-1:0] w, input int d);
    in_valid <= v;
    data     <= w;
    len      <= LEN_W'(d);
    @(posedge clk);
    exp_valid = v;
    if (v) begin
      exp_code = ref_code(128'(w), d);
      exp_len  = d + ref_r(d);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    drive(1, MAX_D'(7'b1001110), 7);
    drive(0, '0, 1);
    checks++;
    if (code[10:0] != 11'b10011100110 || code_len != 11) begin
      failures++; $display("FAIL worked example %b", code[10:0]);
    end
    for (int n = 0; n < 3000; n++)
      drive(($urandom_range(3) != 0), {$urandom, $urandom}, 1 + int'($urandom_range(MAX_D - 1)));
    for (int b = 1; b <= 8; b++) drive(1, {$urandom, $urandom}, 8 * b);
    drive(0, '0, 1);
    drive(0, '0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
