// tb_eedc_field_reg: checks load, hold and reset of a field register.
module tb_eedc_field_reg;
  localparam int unsigned W = 16;
  logic         clk = 0, rst_n = 0, load = 0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  eedc_field_reg #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q != '0) begin failures++; $display("FAIL reset value %h", q); end
    rst_n = 1;
    model = '0;
    for (int n = 0; n < 500; n++) begin
      load = 1'($urandom);
      d    = W'($urandom);
      @(posedge clk);
      if (load) model = d;
      #1;
      checks++;
      if (q != model) begin failures++; $display("FAIL q=%h exp=%h", q, model); end
    end
    rst_n = 0;
    @(posedge clk);
    #1;
    checks++;
    if (q != '0) begin failures++; $display("FAIL reset clear %h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
