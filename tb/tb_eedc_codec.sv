// tb_eedc_codec: end-to-end test of the EEDC codec at its default size.
//
// The transmitter's codeword goes through a channel model that flips chosen
// bits, then into the receiver with the same data length, one word per clock
// on both sides. Each received word is checked against what was sent:
//   no bit flipped      no flag, data intact
//   one bit flipped     detected; when corrected, data intact; reported
//                       uncorrectable only for the ambiguous positions
//   several flipped     detected exactly when the received word is not a
//                       valid codeword (reference model)
// Every mechanism is counted and must happen at least once: a clean word,
// a corrected data bit, a corrected check bit, an ambiguous single error,
// a detected multi-bit error, and back-to-back words on consecutive clocks.
// Latency of each half is checked to be one clock.
//
// Phase 2 repeats the error-detection experiment over 1..8-byte data fields:
// each word gets 1 to 4 random bit flips and the share of detected words is
// printed per size.
module tb_eedc_codec;
  import eedc_pkg::*;
  import eedc_ref_pkg::*;

  localparam int unsigned MAX_D  = MAX_DATA_W;
  localparam int unsigned LEN_W  = len_w(MAX_D);
  localparam int unsigned MAX_R  = r_for_len(MAX_D);
  localparam int unsigned CODE_W = MAX_D + MAX_R;
  localparam int unsigned CLEN_W = len_w(CODE_W);

  logic              clk = 0, rst_n = 0;
  logic              tx_valid = 0;
  logic [MAX_D-1:0]  tx_data = '0;
  logic [LEN_W-1:0]  tx_len = 1;
  logic              tx_code_valid;
  logic [CODE_W-1:0] tx_code;
  logic [CLEN_W-1:0] tx_code_len;
  logic              rx_valid = 0;
  logic [CODE_W-1:0] rx_code = '0;
  logic [LEN_W-1:0]  rx_len = 1;
  logic              rx_data_valid;
  logic [MAX_D-1:0]  rx_data;
  logic              rx_err_detected, rx_err_corrected, rx_err_uncorrectable;
  logic [MAX_R-1:0]  rx_syndrome;

  eedc_codec dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_clean = 0, n_corr_data = 0, n_corr_check = 0, n_ambiguous = 0;
  int n_multi_det = 0, n_multi_undet = 0, n_back_to_back = 0;

  typedef struct {
    logic [MAX_D-1:0] data;
    int               len;
    logic [127:0]     flip;   // channel error pattern
    int               nflip;
    int               stamp;  // clock count when presented
  } word_t;

  word_t tx_q[$], rx_q[$];
  int    cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;
  int    phase = 1;
  int    det_words[9], sent_words[9];

  function automatic bit pow2(input int v);
    return v > 0 && (v & (v - 1)) == 0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Channel: take the transmitter's word, flip bits, hand it to the receiver.
  logic prev_rx_valid = 0;
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      rx_valid <= 1'b0;
      if (tx_code_valid) begin
        word_t w;
        check(tx_q.size() > 0, "transmitter produced a word nobody sent");
        if (tx_q.size() > 0) begin
          logic [127:0] good;
          w = tx_q.pop_front();
          check(cyc == w.stamp + 1, "transmitter latency is one clock");
          good = ref_code(128'(w.data), w.len);
          check(128'(tx_code) == good && int'(tx_code_len) == w.len + ref_r(w.len),
                "transmitted codeword");
          rx_code  <= tx_code ^ CODE_W'(w.flip);
          rx_len   <= LEN_W'(w.len);
          rx_valid <= 1'b1;
          rx_q.push_back(w);
        end
      end
    end
  end

  // Receiver scoreboard.
  always @(posedge clk) begin
    #1;
    if (rst_n && rx_data_valid) begin
      word_t        w;
      logic [127:0] c, e, rf, rxd;
      int           r, k;
      w = rx_q.pop_front();
      check(cyc == w.stamp + 2, "receiver latency is one clock");
      r = ref_r(w.len);
      k = ref_k(w.len);
      c = ref_code(128'(w.data), w.len);
      e = c ^ w.flip;
      rxd = e >> r;
      rf = '0;
      for (int i = 0; i < r; i++) rf[i] = e[i];
      if (prev_rx_valid) n_back_to_back++;
      if (phase == 2) begin
        sent_words[w.len / 8]++;
        if (rx_err_detected) det_words[w.len / 8]++;
      end
      check(rx_err_detected == (ref_field(rxd, w.len) != rf), "detection matches validity");
      if (w.nflip == 0) begin
        check(!rx_err_detected && rx_data == w.data, "clean word");
        n_clean++;
      end else if (w.nflip == 1) begin
        int b;
        b = 0;
        while (!w.flip[b]) b++;
        check(rx_err_detected, "single error detected");
        if (b >= r && (r > k || !pow2(w.len - (b - r)))) begin
          check(rx_err_corrected && rx_data == w.data, "data bit corrected");
          n_corr_data++;
        end else if (b < r && r > k) begin
          check(rx_err_corrected && rx_data == w.data, "check bit corrected");
          n_corr_check++;
        end else begin
          check(rx_err_uncorrectable && !rx_err_corrected, "ambiguous single error flagged");
          n_ambiguous++;
        end
      end else begin
        if (rx_err_detected) n_multi_det++;
        else                 n_multi_undet++;
      end
    end
    prev_rx_valid = rst_n && rx_data_valid;
  end

  task automatic send(input int d, input int nflip, input bit gap);
    word_t w;
    w.len  = d;
    w.data = {$urandom, $urandom};
    for (int i = d; i < int'(MAX_D); i++) w.data[i] = 1'b0;
    w.flip = '0;
    // Distinct positions within the codeword.
    while ($countones(w.flip) < nflip) w.flip[$urandom_range(d + ref_r(d) - 1)] = 1'b1;
    w.nflip = nflip;
    w.stamp = cyc;
    tx_q.push_back(w);
    tx_valid = 1'b1;
    tx_data  = w.data | (gap ? MAX_D'(0) : ~((MAX_D'(1) << d) - 1'b1) & {$urandom, $urandom});
    tx_len   = LEN_W'(d);
    @(negedge clk);
    tx_valid = 1'b0;
    if (gap) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    // Phase 1: mixed lengths and error counts, mostly back to back.
    for (int n = 0; n < 4000; n++) begin
      int d, nf;
      d  = 1 + int'($urandom_range(MAX_D - 1));
      nf = int'($urandom_range(3));
      send(d, nf, ($urandom_range(7) == 0));
    end
    repeat (4) @(posedge clk);
    // Phase 2: error-detection rate over 1..8-byte data fields.
    phase = 2;
    for (int bytes = 1; bytes <= 8; bytes++) begin
      for (int n = 0; n < 500; n++) send(8 * bytes, 1 + int'($urandom_range(3)), 0);
    end
    repeat (4) @(posedge clk);
    check(tx_q.size() == 0 && rx_q.size() == 0, "every word came back");
    for (int bytes = 1; bytes <= 8; bytes++)
      $display("bytes=%0d  r=%0d  codeword=%0d bits  detected %0d of %0d words (%0d%%)", bytes,
               ref_r(8 * bytes), 8 * bytes + ref_r(8 * bytes), det_words[bytes], sent_words[bytes],
               (100 * det_words[bytes]) / (sent_words[bytes] == 0 ? 1 : sent_words[bytes]));
    $display("clean=%0d corrected_data=%0d corrected_check=%0d ambiguous=%0d multi_detected=%0d multi_undetected=%0d back_to_back=%0d",
             n_clean, n_corr_data, n_corr_check, n_ambiguous, n_multi_det, n_multi_undet, n_back_to_back);
    check(n_clean > 0, "mechanism: clean word");
    check(n_corr_data > 0, "mechanism: data bit corrected");
    check(n_corr_check > 0, "mechanism: check bit corrected");
    check(n_ambiguous > 0, "mechanism: ambiguous single error");
    check(n_multi_det > 0, "mechanism: multi-bit error detected");
    check(n_back_to_back > 0, "mechanism: back-to-back words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
