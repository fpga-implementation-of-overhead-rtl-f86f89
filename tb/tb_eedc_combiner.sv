// tb_eedc_combiner: checks G(x) + r(x) assembly and the codeword length.
//
// Feeds random data (with junk above len), random r fields (with junk above
// r_count) and random lengths, and compares with data shifted up by r_count
// with the low r_count field bits below, built bit by bit.
module tb_eedc_combiner;
  import eedc_pkg::*;

  localparam int unsigned MAX_D  = MAX_DATA_W;
  localparam int unsigned LEN_W  = len_w(MAX_D);
  localparam int unsigned MAX_R  = r_for_len(MAX_D);
  localparam int unsigned CNT_W  = $clog2(MAX_R + 1);
  localparam int unsigned CODE_W = MAX_D + MAX_R;
  localparam int unsigned CLEN_W = len_w(CODE_W);

  logic [MAX_D-1:0]  data;
  logic [LEN_W-1:0]  len;
  logic [MAX_R-1:0]  r_field;
  logic [CNT_W-1:0]  r_count;
  logic [CODE_W-1:0] code, exp;
  logic [CLEN_W-1:0] code_len;
  int checks = 0, failures = 0;

  eedc_combiner #(.MAX_D(MAX_D)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example: 1001110 followed by 0110 is 10011100110.
    data = MAX_D'(7'b1001110) | (MAX_D'(1) << 40);
    len = 7; r_field = 7'b1110110; r_count = 4;
    #1;
    checks++;
    if (code != CODE_W'(11'b10011100110) || code_len != 11) begin
      failures++; $display("FAIL worked example %b len %0d", code, code_len);
    end
    for (int n = 0; n < 3000; n++) begin
      int d, r;
      d = 1 + int'($urandom_range(MAX_D - 1));
      r = 1 + int'($urandom_range(MAX_R - 1));
      data = {$urandom, $urandom};
      r_field = MAX_R'($urandom);
      len = LEN_W'(d);
      r_count = CNT_W'(r);
      exp = '0;
      for (int i = 0; i < r; i++) exp[i] = r_field[i];
      for (int i = 0; i < d; i++) exp[i + r] = data[i];
      #1;
      checks++;
      if (code != exp || int'(code_len) != d + r) begin
        failures++;
        $display("FAIL d=%0d r=%0d code=%h exp=%h len=%0d", d, r, code, exp, code_len);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
