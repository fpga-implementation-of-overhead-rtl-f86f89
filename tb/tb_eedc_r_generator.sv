// tb_eedc_r_generator: checks the redundancy field against the reference.
//
// Drives the identifier and generator together (the generator's r and k come
// from the identifier) with the 7-bit worked example (1001110 -> 0110), then
// random words at random lengths, with junk above the valid length, and
// compares r_field with the reference model bit for bit.
module tb_eedc_r_generator;
  import eedc_pkg::*;
  import eedc_ref_pkg::*;

  localparam int unsigned MAX_D = MAX_DATA_W;
  localparam int unsigned LEN_W = len_w(MAX_D);
  localparam int unsigned MAX_R = r_for_len(MAX_D);
  localparam int unsigned CNT_W = $clog2(MAX_R + 1);

  logic [MAX_D-1:0] data;
  logic [LEN_W-1:0] len;
  logic [CNT_W-1:0] r_count, k_count;
  logic             has_extra;
  logic [MAX_R-1:0] idx_par, r_field;
  int checks = 0, failures = 0;

  eedc_r_identifier #(.MAX_D(MAX_D)) ident (.len, .r_count, .k_count, .has_extra);
  eedc_r_generator  #(.MAX_D(MAX_D)) dut (.*);

  task automatic check_word(input logic [MAX_D-1:0] w, input int d);
    logic [127:0] exp;
    data = w;
    len  = LEN_W'(d);
    #1;
    exp = ref_field(128'(w), d);
    checks++;
    if (128'(r_field) != exp) begin
      failures++;
      $display("FAIL len=%0d data=%h field=%b exp=%b", d, w, r_field, exp[MAX_R-1:0]);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example: 1001110 gives r3 r2 r1 r0 = 0 1 1 0.
    data = MAX_D'(7'b1001110);
    len  = 7;
    #1;
    checks++;
    if (r_field[3:0] != 4'b0110 || r_count != 4) begin
      failures++;
      $display("FAIL worked example: field=%b", r_field);
    end
    for (int n = 0; n < 4000; n++) begin
      int d;
      d = 1 + int'($urandom_range(MAX_D - 1));
      check_word({$urandom, $urandom}, d);
    end
    // Single set bits at every position of full-length words.
    for (int i = 0; i < int'(MAX_D); i++) check_word(MAX_D'(1) << i, MAX_D);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
