// tb_exec_counter: jobs of random length, with the enable active every
// second clock; checks last_count equals the number of enabled clocks
// the job was active and that done pulses once per job.
module tb_exec_counter;
  logic clk = 0, rst_n = 0, ce = 0, active = 0, done;
  logic [31:0] count, last_count;
  int checks = 0, failures = 0, dones = 0;

  exec_counter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) ce <= ~ce;
  always @(posedge clk) if (rst_n && ce && done) dones++;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j < 20; j++) begin
      int len;
      len = $urandom_range(1, 300);
      @(posedge clk iff ce); #1;     // align to an enabled edge
      active = 1;
      repeat (len) @(posedge clk iff ce);
      #1 active = 0;
      repeat (3) @(posedge clk iff ce);
      #1;
      checks++;
      if (last_count !== 32'(len)) begin
        failures++; $display("FAIL job %0d: %0d, expected %0d", j, last_count, len);
      end
      checks++;
      if (dones != j + 1) begin failures++; $display("FAIL done count %0d", dones); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
