// tb_pmu: checks the reset state (all codes 15, 1.0 V), a DFS change of one
// core (gate held for 2+F_SETTLE clocks, code applied, others untouched,
// voltage nominal) and DVFS mode voltage selection for several codes
// against the 0.5-1.0 V operating points, with 2+V_SETTLE clocks of gating.
module tb_pmu;
  import harp_pkg::*;
  localparam int FS = 16, VS = 64;
  logic clk = 0, rst_n = 0, wr_en = 0, busy;
  logic [31:0] wr_data, pmu_reg;
  logic [3:0][3:0] freq_code;
  logic [3:0][2:0] vsel;
  logic [3:0] gate;
  int checks = 0, failures = 0;

  pmu #(.N(4), .F_MIN_MHZ(35), .F_STEP_MHZ(11), .F_SETTLE(FS), .V_SETTLE(VS)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected voltage code: lowest V whose fmax covers f (55,119,238 MHz)
  function automatic int vexp(int code);
    int f;
    f = 35 + 11 * code;
    if (f <= 55) return 0;
    if (f <= 119) return 1;
    return 2;
  endfunction

  task automatic write_and_measure(logic [31:0] d, int core, output int gated);
    @(negedge clk); wr_en = 1; wr_data = d;
    @(negedge clk); wr_en = 0;
    gated = 0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      if (gate[core]) gated++;
    end
  endtask

  initial begin
    wr_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(pmu_reg == 32'h0000_FFFF, "reset value");
    for (int i = 0; i < 4; i++) check(freq_code[i] == 4'hF && vsel[i] == 3'd5, "reset codes");
    // DFS: core 1 to code 5
    begin
      int g;
      write_and_measure(32'h0000_FF5F, 1, g);
      check(g == FS + 2, $sformatf("DFS gate length %0d", g));
      check(freq_code[1] == 4'd5 && vsel[1] == 3'd5, "DFS code applied, nominal voltage");
      check(freq_code[0] == 4'hF && freq_code[2] == 4'hF && freq_code[3] == 4'hF, "others unchanged");
      check(gate == 4'b0000 && !busy, "gates released");
    end
    // DVFS for several codes on core 2
    foreach (vexp_codes[n]) begin
      int g, c;
      logic [31:0] d;
      c = vexp_codes[n];
      d = 32'h0001_0000 | 32'hF05F | (32'(c) << 8);
      write_and_measure(d, 2, g);
      check(freq_code[2] == 4'(c), $sformatf("DVFS code %0d", c));
      check(int'(vsel[2]) == vexp(c), $sformatf("DVFS code %0d vsel %0d exp %0d", c, vsel[2], vexp(c)));
      if (n > 0) check(g == VS + 2, $sformatf("DVFS gate length %0d", g));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int vexp_codes [6] = '{0, 1, 2, 7, 8, 15};
endmodule
