// tb_eedc_decoder: checks the EEDC receiver's detection and correction.
//
// Codewords come from the reference model. For each random word and length
// the testbench presents the clean codeword, every single-bit error, and some
// random multi-bit errors. Expected results, worked out from the positions
// hit rather than from a syndrome:
//   clean               no flag, data out = data in
//   one data bit p      corrected when the code has the extra bit or p is not
//                       a power of two; otherwise detected, uncorrectable
//   one check bit       corrected when the code has the extra bit; otherwise
//                       detected, uncorrectable (data out still the data)
//   any pattern         err_detected exactly when the received redundancy
//                       field differs from the field of the received data
module tb_eedc_decoder;
  import eedc_pkg::*;
  import eedc_ref_pkg::*;

  localparam int unsigned MAX_D  = MAX_DATA_W;
  localparam int unsigned LEN_W  = len_w(MAX_D);
  localparam int unsigned MAX_R  = r_for_len(MAX_D);
  localparam int unsigned CODE_W = MAX_D + MAX_R;

  logic              clk = 0, rst_n = 0, in_valid = 0;
  logic [CODE_W-1:0] code = '0;
  logic [LEN_W-1:0]  len = 1;
  logic              out_valid;
  logic [MAX_D-1:0]  data;
  logic              err_detected, err_corrected, err_uncorrectable;
  logic [MAX_R-1:0]  syndrome;
  int checks = 0, failures = 0;

  eedc_decoder #(.MAX_D(MAX_D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit pow2(input int v);
    return v > 0 && (v & (v - 1)) == 0;
  endfunction

  // Present one codeword; the answer is checked one clock later.
  task automatic send(input logic [127:0] c, input int d);
    code     <= CODE_W'(c);
    len      <= LEN_W'(d);
    in_valid <= 1;
    @(posedge clk);
    in_valid <= 0;
    #1;
    checks++;
    if (!out_valid) begin failures++; $display("FAIL no out_valid after one clock"); end
  endtask

  task automatic expect_result(input logic [MAX_D-1:0] dexp, input bit det, input bit cor,
                               input bit unc, input string what);
    checks++;
    if (data != dexp || err_detected != det || err_corrected != cor || err_uncorrectable != unc) begin
      failures++;
      $display("FAIL %s: data=%h exp=%h det=%0d/%0d cor=%0d/%0d unc=%0d/%0d", what, data, dexp,
               err_detected, det, err_corrected, cor, err_uncorrectable, unc);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      int d, r, k;
      bit ext;
      logic [MAX_D-1:0] w;
      logic [127:0] c;
      d = (n < 64) ? n + 1 : 1 + int'($urandom_range(MAX_D - 1));
      r = ref_r(d);
      k = ref_k(d);
      ext = (r > k);
      w = {$urandom, $urandom};
      for (int i = d; i < int'(MAX_D); i++) w[i] = 1'b0;
      c = ref_code(128'(w), d);
      send(c, d);
      expect_result(w, 0, 0, 0, "clean");
      for (int b = 0; b < d + r; b++) begin
        logic [127:0] e;
        e = c;
        e[b] = ~e[b];
        send(e, d);
        if (b >= r) begin
          int p;
          p = d - (b - r);
          if (ext || !pow2(p)) expect_result(w, 1, 1, 0, "single data bit");
          else begin
            logic [MAX_D-1:0] rx;
            rx = w;
            rx[b - r] = ~rx[b - r];
            expect_result(rx, 1, 0, 1, "single data bit, ambiguous");
          end
        end else begin
          if (ext) expect_result(w, 1, 1, 0, "single check bit");
          else     expect_result(w, 1, 0, 1, "single check bit, ambiguous");
        end
      end
      for (int m = 0; m < 10; m++) begin
        logic [127:0] e, rf;
        logic [127:0] rxd;
        e = c;
        for (int f = 0; f < 2 + int'($urandom_range(3)); f++) begin
          int b;
          b = int'($urandom_range(d + r - 1));
          e[b] = ~e[b];
        end
        send(e, d);
        rxd = e >> r;
        rf = '0;
        for (int i = 0; i < r; i++) rf[i] = e[i];
        checks++;
        if (err_detected != (ref_field(rxd, d) != rf)) begin
          failures++; $display("FAIL multi-bit detection d=%0d", d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
