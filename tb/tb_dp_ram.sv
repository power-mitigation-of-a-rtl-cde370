// tb_dp_ram: writes random words through both ports (each on its own
// enable pattern) and reads them back through the other port against a
// reference array; checks that nothing happens without the enable.
module tb_dp_ram;
  localparam int D = 64;
  logic clk = 0, rst_n = 0;
  logic ce_a, we_a, ce_b, we_b;
  logic [5:0] addr_a, addr_b;
  logic [31:0] wdata_a, wdata_b, rdata_a, rdata_b;
  logic [31:0] ref_m [D];
  int checks = 0, failures = 0;

  dp_ram #(.W(32), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ce_a = 0; we_a = 0; ce_b = 0; we_b = 0; addr_a = 0; addr_b = 0; wdata_a = 0; wdata_b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill: even words through A, odd words through B
    for (int i = 0; i < D; i++) begin
      ref_m[i] = $urandom;
      if (i % 2 == 0) begin ce_a = 1; we_a = 1; addr_a = 6'(i); wdata_a = ref_m[i]; end
      else            begin ce_b = 1; we_b = 1; addr_b = 6'(i); wdata_b = ref_m[i]; end
      @(posedge clk); #1;
      ce_a = 0; we_a = 0; ce_b = 0; we_b = 0;
    end
    // write attempt without enable must be ignored
    we_a = 1; ce_a = 0; addr_a = 6'd3; wdata_a = 32'hDEAD_BEEF;
    @(posedge clk); #1; we_a = 0;
    // read back through the opposite port
    for (int i = 0; i < D; i++) begin
      ce_a = 1; ce_b = 1; addr_a = 6'(i); addr_b = 6'(D - 1 - i);
      @(posedge clk); #1;
      checks += 2;
      if (rdata_a !== ref_m[i])       begin failures++; $display("FAIL A %0d", i); end
      if (rdata_b !== ref_m[D-1-i])   begin failures++; $display("FAIL B %0d", i); end
    end
    // read data holds while the enable is low
    ce_a = 0; addr_a = 6'd0;
    @(posedge clk); #1;
    checks++;
    if (rdata_a !== ref_m[D-1]) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
