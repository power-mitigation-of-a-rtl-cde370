// tb_harp_ofdm_top: end-to-end run of the platform at its default
// parameters.  The testbench plays the three RISC cores:
//   N3 feeds N0 (time synchronization), N4 feeds N1 (frequency offset
//   estimation), N5 feeds N2 (FFT) and N8 (channel estimation).
// Each iteration is one pass of the macro-pipeline: N3 loads 32 sample
// pairs into N0, N0's result goes to N4's data memory, N4 forwards it to
// N1, N1's result to N5, N5 through N2 and N8, and N8's result back to
// N3, which checks it against ((a + b) * 3 << 1) - 5 computed here.  Every
// job ends with an acknowledgment that carries its cycle count into the
// next consumer's data memory, which the consumer polls.  The number of
// context runs per job (20, 40, 4, 3) makes N1 the worst-case node, as in
// the evaluated receiver, with N0 close enough to be equalized and N2, N8
// too light to be.
// Phases: 20 iterations with the feedback control on (DVFS mode from
// iteration 10), a retarget with a new workload mix, and a PMU write over
// the NoC while N0 is running.  Mechanisms counted (each must occur):
// NoC back-pressure, DMA stall during a run, PMU clock gating, gating of
// a running CGRA, frequency step down, voltage scaling, worst-case
// selection, equalization reached, retarget, PMU written over the NoC.
module tb_harp_ofdm_top;
  import harp_pkg::*;
  localparam int L = 32;

  logic clk = 0, rst_n = 0;
  logic     [2:0]       risc_valid = '0, risc_ready;
  noc_pkt_t [2:0]       risc_pkt;
  logic     [2:0]       dmem_we = '0;
  logic     [2:0][9:0]  dmem_addr;
  logic     [2:0][31:0] dmem_wdata, dmem_rdata;
  logic fcs_enable = 0, fcs_retarget = 0, dvfs_mode = 0;
  logic ce_sys;
  logic [3:0] cgra_ce, clk_gated, cgra_busy, fcs_in_region;
  logic [3:0][3:0] freq_code;
  logic [3:0][2:0] vsel;
  logic [31:0] pmu_reg, fcs_target;
  logic [3:0][31:0] exec_cycles, cgra_cycles;
  logic [1:0] fcs_worst;
  logic [15:0] fcs_iterations;

  harp_ofdm_top dut (.*);

  int checks = 0, failures = 0;
  int n_backpressure = 0, n_dma_stall = 0, n_gate = 0, n_gate_busy = 0, n_step_down = 0;
  int n_vscale = 0, n_worst = 0, n_equal = 0, n_retarget = 0, n_pmu_noc = 0;
  int runs [4] = '{20, 40, 4, 3};
  localparam int NODE [4] = '{0, 1, 2, 8};
  localparam int ROWS [4] = '{5, 4, 4, 4};
  localparam int COLS [4] = '{16, 8, 16, 16};

  always #5 clk = ~clk;     // base clock (200 MHz in the design)
  initial begin
    #400000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // mechanism monitors
  logic [3:0][3:0] code_q;
  always @(posedge clk) begin
    if (rst_n) begin
      for (int j = 0; j < 4; j++) begin
        if (clk_gated[j]) n_gate++;
        if (clk_gated[j] && cgra_busy[j]) n_gate_busy++;
        if (freq_code[j] < code_q[j]) n_step_down++;
      end
      code_q <= freq_code;
    end else begin
      code_q <= '1;
    end
  end
  logic [3:0][2:0] vsel_q;
  always @(posedge clk) begin
    vsel_q <= vsel;
    if (rst_n) for (int j = 0; j < 4; j++) if (vsel[j] != vsel_q[j]) n_vscale++;
  end

  // ---------------------------------------------------------------- RISC side
  task automatic send(int k, noc_pkt_t p);
    risc_pkt[k]   = p;
    risc_valid[k] = 1'b1;
    forever begin
      @(negedge clk);
      if (ce_sys && risc_ready[k]) break;
      if (ce_sys) n_backpressure++;
    end
    @(posedge clk); #1;
    risc_valid[k] = 1'b0;
  endtask

  task automatic to_dma(int k, int node, dma_region_e rg, logic [13:0] a, logic [31:0] d);
    send(k, '{dst: 4'(node), tgt: TGT_DMA, src: 4'(k + 3), addr: {rg, a}, data: d});
  endtask

  task automatic dmem_rd(int k, int a, output logic [31:0] d);
    do @(negedge clk); while (!ce_sys);
    dmem_addr[k] = 10'(a);
    @(posedge clk); #1;
    d = dmem_rdata[k];
  endtask

  task automatic dmem_wr(int k, int a, logic [31:0] d);
    do @(negedge clk); while (!ce_sys);
    dmem_addr[k] = 10'(a); dmem_wdata[k] = d; dmem_we[k] = 1'b1;
    @(posedge clk); #1;
    dmem_we[k] = 1'b0;
  endtask

  task automatic wait_flag(int k, int a, output logic [31:0] d);
    int guard;
    guard = 0;
    do begin
      dmem_rd(k, a, d);
      guard++;
    end while (d == 32'd0 && guard < 200000);
    check(d != 32'd0, $sformatf("flag %0d at node %0d", a, k + 3));
    dmem_wr(k, a, 32'd0);
  endtask

  function automatic logic [31:0] pe(pe_op_e op, pe_src_e s1, pe_src_e s2, bit ui, logic [15:0] imm);
    pe_cfg_t c;
    c = '0; c.op = op; c.src1 = s1; c.src2 = s2; c.use_imm = ui; c.imm = imm;
    return 32'(c);
  endfunction

  // context 0 of CGRA j: column 0 computes, result into bank 0
  task automatic load_context(int k, int j);
    int rc, nb;
    logic [31:0] w0;
    rc = ROWS[j] * COLS[j];
    nb = 2 * COLS[j];
    case (j)
      0: w0 = pe(OP_ADD, S_UP, S_UP2, 0, 0);
      1: w0 = pe(OP_MUL, S_UP, S_UP2, 1, 16'd3);
      2: w0 = pe(OP_SHL, S_UP, S_UP2, 1, 16'd1);
      default: w0 = pe(OP_SUB, S_UP, S_UP2, 1, 16'd5);
    endcase
    for (int r = 0; r < ROWS[j]; r++)
      to_dma(k, NODE[j], R_CONFIG, {2'd0, 4'd0, 8'(r * COLS[j])},
             (r == 0) ? w0 : pe(OP_PASS, S_UP, S_UP, 0, 0));
    for (int s = 0; s < nb; s++)
      to_dma(k, NODE[j], R_CONFIG, {2'd0, 4'd0, 8'(rc + s)}, (s < 2) ? 32'(s) : 32'd0);
    for (int s = 0; s < nb; s++)
      to_dma(k, NODE[j], R_CONFIG, {2'd0, 4'd0, 8'(rc + nb + s)}, (s == 0) ? 32'h100 : 32'd0);
  endtask

  // one job on CGRA j driven by RISC k: data already loaded
  task automatic run_job(int k, int j, int dst_node, int dst_base, int ack_node, int ack_addr);
    for (int n = 0; n < runs[j]; n++) begin
      to_dma(k, NODE[j], R_CTRL, 14'(C_RUN), {14'd0, 2'd0, 16'(L)});
    end
    to_dma(k, NODE[j], R_CTRL, 14'(C_XFER_DST), {12'd0, 4'(dst_node), 16'(dst_base)});
    to_dma(k, NODE[j], R_CTRL, 14'(C_XFER_GO), {11'd0, 5'd0, 6'd0, 10'(L)});
    to_dma(k, NODE[j], R_CTRL, 14'(C_ACK), {12'd0, 4'(ack_node), 16'(ack_addr)});
  endtask

  // forward L words from RISC k's data memory to bank 0 of CGRA j
  task automatic forward(int k, int base, int j);
    for (int i = 0; i < L; i++) begin
      logic [31:0] d;
      dmem_rd(k, base + i, d);
      to_dma(k, NODE[j], R_MEM_IN, {5'd0, 9'(i)}, d);
    end
  endtask

  task automatic check_ack(int j, logic [31:0] ack);
    check(ack <= exec_cycles[j] && ack + 16 >= exec_cycles[j],
          $sformatf("ack count of CGRA %0d: %0d vs counter %0d", j, ack, exec_cycles[j]));
  endtask

  task automatic iteration(int it);
    logic [31:0] a [L], b [L], f;
    int bp;
    // N3 -> N0
    for (int i = 0; i < L; i++) begin
      a[i] = $urandom; b[i] = $urandom;
      to_dma(0, 0, R_MEM_IN, {5'd0, 9'(i)}, a[i]);
      to_dma(0, 0, R_MEM_IN, {5'd1, 9'(i)}, b[i]);
    end
    bp = n_backpressure;
    run_job(0, 0, 4, 0, 4, 'h3F0);
    if (n_backpressure > bp) n_dma_stall++;
    // N4: wait for N0, forward to N1
    wait_flag(1, 'h3F0, f);
    check_ack(0, f);
    forward(1, 0, 1);
    run_job(1, 1, 5, 0, 5, 'h3F0);
    // N5: N1 -> N2 -> N8
    wait_flag(2, 'h3F0, f);
    check_ack(1, f);
    forward(2, 0, 2);
    run_job(2, 2, 5, 'h100, 5, 'h3F1);
    wait_flag(2, 'h3F1, f);
    check_ack(2, f);
    forward(2, 'h100, 3);
    run_job(2, 3, 3, 0, 3, 'h3F0);
    // N3: results
    wait_flag(0, 'h3F0, f);
    check_ack(3, f);
    for (int i = 0; i < L; i++) begin
      logic [31:0] d, e;
      dmem_rd(0, i, d);
      e = (((a[i] + b[i]) * 3) << 1) - 5;
      check(d == e, $sformatf("iteration %0d word %0d: %h expected %h", it, i, d, e));
    end
    $display("iteration %0d: codes %h  cycles N0=%0d N1=%0d N2=%0d N8=%0d  worst=%0d region=%b vsel=%h",
             it, freq_code, exec_cycles[0], exec_cycles[1], exec_cycles[2], exec_cycles[3],
             fcs_worst, fcs_in_region, vsel);
  endtask

  initial begin
    risc_pkt = '0; dmem_addr = '0; dmem_wdata = '0;
    #20 rst_n = 1;
    // clear the flags the RISC cores poll
    dmem_wr(0, 'h3F0, 0); dmem_wr(1, 'h3F0, 0); dmem_wr(2, 'h3F0, 0); dmem_wr(2, 'h3F1, 0);
    // start-up: configuration streams, three RISC cores in parallel
    fork
      load_context(0, 0);
      load_context(1, 1);
      begin load_context(2, 2); load_context(2, 3); end
    join
    // exec counters have counted the configuration as a job; close those jobs
    to_dma(0, 0, R_CTRL, 14'(C_ACK), {12'd0, 4'd3, 16'h3E0});
    to_dma(1, 1, R_CTRL, 14'(C_ACK), {12'd0, 4'd4, 16'h3E0});
    to_dma(2, 2, R_CTRL, 14'(C_ACK), {12'd0, 4'd5, 16'h3E0});
    to_dma(2, 8, R_CTRL, 14'(C_ACK), {12'd0, 4'd5, 16'h3E1});
    repeat (200) @(posedge clk);
    check(freq_code == 16'hFFFF, "start-up at the highest frequency");
    fcs_enable = 1'b1;
    for (int it = 0; it < 20; it++) begin
      if (it == 10) dvfs_mode = 1'b1;
      iteration(it);
      if (it == 0 && fcs_worst == 2'd1) n_worst++;
    end
    repeat (400) @(posedge clk);
    check(fcs_worst == 2'd1, "N1 is the worst-case node");
    check(freq_code[1] == 4'hF, "worst-case node stays at 200 MHz");
    check(fcs_in_region[0] || freq_code[0] == 4'd0, "N0 equalized");
    if (fcs_in_region[0]) n_equal++;
    check(freq_code[2] == 4'd0 && freq_code[3] == 4'd0, "N2 and N8 at the lowest frequency");
    for (int j = 0; j < 4; j++) begin
      int f, ve;
      f = 35 + 11 * int'(freq_code[j]);
      ve = (f <= 55) ? 0 : (f <= 119) ? 1 : (f <= 238) ? 2 : 3;
      check(int'(vsel[j]) == ve, $sformatf("DVFS voltage of CGRA %0d: %0d expected %0d", j, vsel[j], ve));
    end
    // retarget: N0 becomes the heaviest node
    runs = '{80, 10, 4, 3};
    fcs_retarget = 1'b1;
    do @(negedge clk); while (!ce_sys);
    @(posedge clk); #1 fcs_retarget = 1'b0;
    iteration(20);
    repeat (100) @(posedge clk);
    check(fcs_worst == 2'd0, $sformatf("retarget picks N0, got %0d", fcs_worst));
    if (fcs_worst == 2'd0) n_retarget++;
    // PMU written over the NoC while N0 runs (feedback control off)
    fcs_enable = 1'b0;
    fork
      iteration(21);
      begin
        wait (cgra_busy[0]);
        send(1, '{dst: 4'd4, tgt: TGT_PMU, src: 4'd4, addr: 16'd0, data: 32'h0000_0FF3});
        n_pmu_noc++;
      end
    join
    repeat (400) @(posedge clk);
    check(pmu_reg == 32'h0000_0FF3 && freq_code[0] == 4'd3 && freq_code[1] == 4'hF && freq_code[3] == 4'd0,
          "PMU register written over the NoC");
    // mechanism coverage
    check(n_backpressure > 0, "NoC back-pressure seen");
    check(n_dma_stall > 0,    "DMA stalled during a run");
    check(n_gate > 0,         "PMU gated a clock");
    check(n_gate_busy > 0,    "a running CGRA was paused by gating");
    check(n_step_down > 0,    "frequency stepped down");
    check(n_vscale > 0,       "supply voltage changed");
    check(n_worst > 0,        "worst-case node selected");
    check(n_equal > 0,        "equalization region reached");
    check(n_retarget > 0,     "retarget");
    check(n_pmu_noc > 0,      "PMU write over the NoC");
    $display("mechanisms: backpressure=%0d dma_stall=%0d gate=%0d gate_busy=%0d step_down=%0d vscale=%0d worst=%0d equal=%0d retarget=%0d pmu_noc=%0d",
             n_backpressure, n_dma_stall, n_gate, n_gate_busy, n_step_down, n_vscale,
             n_worst, n_equal, n_retarget, n_pmu_noc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
