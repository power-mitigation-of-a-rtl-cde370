// tb_fcs_engine: a closed loop against a plant model.  Each node's job
// takes fixed + work*200/f system cycles, f = 35 + 11*code MHz.  The test
// checks the worst-case choice after the first iteration, one-step code
// changes per iteration, that the worst node stays at code 15, that the
// other nodes end inside the equalization region or at code 0, and that
// retarget selects a new worst-case node.
module tb_fcs_engine;
  localparam int N = 4, MS = 5;
  logic clk = 0, rst_n = 0, ce = 1, enable = 1, retarget = 0, dvfs = 0, wr_en;
  logic [N-1:0] done = 0;
  logic [N-1:0][31:0] counts;
  logic [31:0] wr_data, target;
  logic [1:0] worst;
  logic [15:0] iterations;
  logic [N-1:0][3:0] codes;
  logic [N-1:0] in_region;
  int checks = 0, failures = 0;
  int work [N];
  int fixed_c = 100;
  logic [N-1:0][3:0] plant_code;

  fcs_engine #(.N(N), .MARGIN_SHIFT(MS)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // PMU stand-in: takes the written codes
  always @(posedge clk) if (rst_n && wr_en) plant_code <= wr_data[15:0];

  task automatic iterate();
    logic [N-1:0][3:0] prev_code;
    @(negedge clk);
    prev_code = plant_code;
    for (int i = 0; i < N; i++)
      counts[i] = 32'(fixed_c + work[i] * 200 / (35 + 11 * int'(plant_code[i])));
    // nodes report at different times
    for (int i = 0; i < N; i++) begin
      done = '0; done[i] = 1'b1;
      @(negedge clk);
      done = '0;
      @(negedge clk);
    end
    repeat (2) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      int d;
      d = int'(plant_code[i]) - int'(prev_code[i]);
      check(d >= -1 && d <= 1, $sformatf("one step per iteration node %0d", i));
    end
  endtask

  initial begin
    counts = '0;
    plant_code = {N{4'hF}};
    work = '{9985, 18039, 1931, 1685};
    repeat (2) @(posedge clk);
    rst_n = 1;
    iterate();
    check(worst == 2'd1, $sformatf("worst-case node %0d", worst));
    check(plant_code == {N{4'hF}}, "no change in first iteration");
    for (int it = 0; it < 20; it++) iterate();
    check(plant_code[1] == 4'hF, "worst node at top frequency");
    for (int i = 0; i < N; i++) begin
      int c;
      c = fixed_c + work[i] * 200 / (35 + 11 * int'(plant_code[i]));
      if (i != 1)
        check(plant_code[i] == 4'd0 ||
              (c <= int'(target) && c + (int'(target) >> MS) >= int'(target)),
              $sformatf("node %0d equalized or at minimum: code %0d count %0d target %0d",
                        i, plant_code[i], c, target));
    end
    check(iterations == 16'd21, "iteration count");
    // new task mix: node 3 becomes heaviest
    work = '{9985, 4000, 1931, 40000};
    retarget = 1; @(negedge clk); retarget = 0;
    iterate();
    check(worst == 2'd3, $sformatf("retarget worst %0d", worst));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
