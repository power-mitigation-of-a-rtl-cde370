// tb_cgra_core: a 3x4 CGRA (8 banks) with the CGRA enable active one clock
// in three and the loading enable one clock in two.  Loads two contexts
// and input data, runs context 1 (adders on row 0 fed through a permuted
// input buffer, multiply by an immediate on row 1 with OUT2 taking the
// up-right neighbour, pass and loop-accumulate on row 2, one bank not
// written) and then context 0 (a copy network) on the same data, reading
// every result back.  Expected values are computed here from the
// configured dataflow; the run length in CGRA clocks is checked against
// len + ROWS + 3.
module tb_cgra_core;
  import harp_pkg::*;
  localparam int R = 3, C = 4, NB = 2 * C, D = 64, L = 40;

  logic clk = 0, rst_n = 0, ce = 0, ce_sys = 0;
  logic dma_we = 0, run_req = 0, run_ack, busy;
  dma_region_e dma_region;
  logic [13:0] dma_addr;
  logic [31:0] dma_wdata, dma_rdata, last_cycles;
  logic [1:0] run_ctx;
  logic [15:0] run_len;
  int checks = 0, failures = 0;
  int unsigned mem_in [NB][L];
  int unsigned expv [NB][L];
  int ce_cnt = 0;

  cgra_core #(.ROWS(R), .COLS(C), .DEPTH(D), .NCTX(2)) dut (.*);

  always #5 clk = ~clk;
  // enables: CGRA 1 in 3, loading side 1 in 2
  always @(posedge clk) begin
    ce_cnt <= ce_cnt + 1;
    ce     <= ((ce_cnt + 1) % 3 == 0);
    ce_sys <= ((ce_cnt + 1) % 2 == 0);
  end
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic dma_write(dma_region_e rg, logic [13:0] a, logic [31:0] d);
    @(posedge clk iff ce_sys); #1;
    dma_we = 1; dma_region = rg; dma_addr = a; dma_wdata = d;
    @(posedge clk iff ce_sys); #1;
    dma_we = 0;
  endtask

  task automatic dma_read(int bank, int word, output logic [31:0] d);
    @(posedge clk iff ce_sys); #1;
    dma_region = R_MEM_OUT; dma_addr = {5'(bank), 9'(word)};
    @(posedge clk iff ce_sys); #1;
    d = dma_rdata;
  endtask

  function automatic logic [31:0] pe(pe_op_e op, pe_src_e s1, pe_src_e s2, bit ui, logic [15:0] imm);
    pe_cfg_t c;
    c = '0; c.op = op; c.src1 = s1; c.src2 = s2; c.use_imm = ui; c.imm = imm;
    return 32'(c);
  endfunction

  task automatic cfg_write(int ctx, int slot, logic [31:0] w);
    dma_write(R_CONFIG, {2'(ctx), 4'd0, 8'(slot)}, w);
  endtask

  task automatic run(int ctx, int len);
    int t0, t1;
    @(posedge clk iff ce_sys); #1;
    run_ctx = 2'(ctx); run_len = 16'(len); run_req = 1;
    wait (run_ack);
    @(posedge clk iff ce_sys); #1;
    run_req = 0;
    wait (!run_ack);
    check(last_cycles == 32'(len + R + 3), $sformatf("run length %0d CGRA clocks, expected %0d",
                                                    last_cycles, len + R + 3));
  endtask

  task automatic compare(string tag);
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < L; i++) begin
        logic [31:0] d;
        dma_read(b, i, d);
        check(d == expv[b][i], $sformatf("%s bank %0d word %0d got %h exp %h", tag, b, i, d, expv[b][i]));
      end
  endtask

  initial begin
    dma_region = R_MEM_IN; dma_addr = 0; dma_wdata = 0; run_ctx = 0; run_len = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    // ---- context 1
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        logic [31:0] w;
        if (r == 0)       w = pe(OP_ADD, S_UP, S_UP2, 0, 0);
        else if (r == 1)  w = pe(OP_MUL, S_UP, S_UPRIGHT, 1, 16'd3);
        else if (c % 2 == 0) w = pe(OP_PASS, S_UP, S_UP2, 0, 0);
        else              w = pe(OP_ADD, S_LOOP, S_UP, 0, 0);
        cfg_write(1, r * C + c, w);
      end
    for (int j = 0; j < NB; j++) cfg_write(1, R * C + j, 32'((j + 1) % NB));
    for (int k = 0; k < NB; k++) cfg_write(1, R * C + NB + k, (k == NB - 1) ? 32'(k) : (32'h100 | 32'(k)));
    // ---- context 0: copy bank 2c (through every row) to banks 2c and 2c+1
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) cfg_write(0, r * C + c, pe(OP_PASS, S_UP, S_UP, 0, 0));
    for (int j = 0; j < NB; j++) cfg_write(0, R * C + j, 32'(j));
    for (int k = 0; k < NB; k++) cfg_write(0, R * C + NB + k, 32'h100 | 32'(2 * (k / 2)));
    // ---- data; the last output bank gets a marker that context 1 must keep
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < L; i++) begin
        mem_in[b][i] = $urandom;
        dma_write(R_MEM_IN, {5'(b), 9'(i)}, mem_in[b][i]);
        if (b == NB - 1) dma_write(R_MEM_OUT, {5'(b), 9'(i)}, 32'hA5A5_0000 + 32'(i));
      end
    // ---- expected results of context 1
    begin
      int unsigned acc [C];
      for (int c = 0; c < C; c++) acc[c] = 0;
      for (int i = 0; i < L; i++) begin
        int unsigned bin [NB], r0 [C];
        for (int j = 0; j < NB; j++) bin[j] = mem_in[(j + 1) % NB][i];
        for (int c = 0; c < C; c++) r0[c] = bin[2*c] + bin[2*c+1];
        for (int c = 0; c < C; c++) begin
          int unsigned up_r;
          up_r = (c + 1 < C) ? r0[c+1] : 0;
          if (c % 2 == 0) begin
            expv[2*c][i]   = r0[c] * 3;
            expv[2*c+1][i] = up_r;
          end else begin
            acc[c] += r0[c] * 3;
            expv[2*c][i]   = acc[c];
            expv[2*c+1][i] = r0[c] * 3;
          end
        end
        expv[NB-1][i] = 32'hA5A5_0000 + i;
      end
    end
    run(1, L);
    compare("ctx1");
    // ---- context 0 on the same data
    for (int i = 0; i < L; i++)
      for (int k = 0; k < NB; k++) expv[k][i] = mem_in[2 * (k / 2)][i];
    run(0, L);
    compare("ctx0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
