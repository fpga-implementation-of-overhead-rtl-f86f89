// tb_eedc_r_identifier: checks the redundancy-bit count for every length.
//
// Sweeps len over 0..MAX_D at the default size and compares r, k and the
// extra flag with the reference sizing rule, plus the two values spelled out
// for the code: 7 data bits need 4 redundancy bits, 8 data bits need 4.
module tb_eedc_r_identifier;
  import eedc_pkg::*;
  import eedc_ref_pkg::*;

  localparam int unsigned MAX_D = MAX_DATA_W;
  localparam int unsigned LEN_W = len_w(MAX_D);
  localparam int unsigned MAX_R = r_for_len(MAX_D);
  localparam int unsigned CNT_W = $clog2(MAX_R + 1);

  logic [LEN_W-1:0] len;
  logic [CNT_W-1:0] r_count, k_count;
  logic             has_extra;
  int checks = 0, failures = 0;

  eedc_r_identifier #(.MAX_D(MAX_D)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (len=%0d r=%0d k=%0d x=%0d)", what, len, r_count, k_count, has_extra);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d <= int'(MAX_D); d++) begin
      len = LEN_W'(d);
      #1;
      check(int'(r_count) == ref_r(d), "r");
      check(int'(k_count) == ref_k(d), "k");
      check(has_extra == (ref_r(d) != ref_k(d)), "extra");
    end
    len = 7;  #1; check(r_count == 4 && has_extra, "7-bit example");
    len = 8;  #1; check(r_count == 4 && !has_extra, "8-bit diagram");
    len = 64; #1; check(r_count == 7, "8-byte frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
