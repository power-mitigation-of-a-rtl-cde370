// tb_io_buffer: checks that every output register takes the selected input
// one clock after an enabled edge and holds while en is low.
module tb_io_buffer;
  localparam int NI = 16, NO = 16;
  logic clk = 0, rst_n = 0, ce = 1, en = 0;
  logic [NI-1:0][31:0] din;
  logic [NO-1:0][3:0]  sel;
  logic [NO-1:0][31:0] dout, exp;
  int checks = 0, failures = 0;

  io_buffer #(.N_IN(NI), .N_OUT(NO), .W(32)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    din = '0; sel = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      for (int i = 0; i < NI; i++) din[i] = $urandom;
      for (int k = 0; k < NO; k++) sel[k] = 4'($urandom);
      en = (n % 5 != 4);
      if (en) for (int k = 0; k < NO; k++) exp[k] = din[sel[k]];
      @(posedge clk); #1;
      for (int k = 0; k < NO; k++) begin
        checks++;
        if (dout[k] !== exp[k]) begin
          failures++; $display("FAIL n=%0d k=%0d got %h exp %h", n, k, dout[k], exp[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
