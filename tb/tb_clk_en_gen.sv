// tb_clk_en_gen: for each of the 16 frequency codes (35..200 MHz in 11 MHz
// steps) counts the enables over 2000 base clocks and compares with
// 2000*f/200 (within one); checks that gating stops the enables.
module tb_clk_en_gen;
  logic clk = 0, rst_n = 0, gate = 0, ce;
  logic [7:0] freq_mhz;
  int checks = 0, failures = 0;

  clk_en_gen #(.BASE_MHZ(200)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    freq_mhz = 8'd200;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int code = 0; code < 16; code++) begin
      int n, expn;
      freq_mhz = 8'(35 + 11 * code);
      @(posedge clk); #1;          // new frequency in effect
      n = 0;
      for (int t = 0; t < 2000; t++) begin
        @(posedge clk); #1;
        if (ce) n++;
      end
      expn = 2000 * (35 + 11 * code) / 200;
      checks++;
      if (n < expn - 1 || n > expn + 1) begin
        failures++; $display("FAIL code %0d: %0d enables, expected %0d", code, n, expn);
      end
    end
    gate = 1;
    @(posedge clk); #1;
    begin
      int n;
      n = 0;
      for (int t = 0; t < 100; t++) begin @(posedge clk); #1; if (ce) n++; end
      checks++;
      if (n != 0) begin failures++; $display("FAIL gated: %0d enables", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
