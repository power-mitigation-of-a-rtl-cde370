// tb_cgra_dma: the DMA of node N1 in front of a small 2x2 cgra_core
// (CGRA enable one clock in two).  Sends, as packets: a context that
// adds banks 0 and 1 into bank 0 and passes bank 1 to bank 1, input
// data, RUN, XFER_DST, two XFER_GO and ACK.  Checks the stall while the
// CGRA runs, every transferred packet (destination node, target, source,
// address, data) and the acknowledgment carrying the job's cycle count,
// counted here independently, and that the job flag drops after it.
module tb_cgra_dma;
  import harp_pkg::*;
  localparam int L = 24;
  logic clk = 0, rst_n = 0, ce_sys = 1, ce = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready;
  noc_pkt_t in_pkt, out_pkt;
  logic dma_we, run_req, run_ack, job_active, busy;
  dma_region_e dma_region;
  logic [13:0] dma_addr;
  logic [31:0] dma_wdata, dma_rdata, last_cycles, count;
  logic [1:0] run_ctx;
  logic [15:0] run_len;
  int checks = 0, failures = 0, stalls = 0, nout = 0;
  logic [31:0] data0 [L], data1 [L];
  noc_pkt_t got [$];

  cgra_dma #(.NODE_ID(4'd1)) dut (.*);
  cgra_core #(.ROWS(2), .COLS(2), .DEPTH(64), .NCTX(2)) u_core (
    .clk, .rst_n, .ce, .ce_sys, .dma_we, .dma_region, .dma_addr, .dma_wdata, .dma_rdata,
    .run_req, .run_ctx, .run_len, .run_ack, .busy, .last_cycles);

  always #5 clk = ~clk;
  always @(posedge clk) ce <= ~ce;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // independent cycle count of the job
  always @(posedge clk) begin
    if (!rst_n) count <= 0;
    else if (job_active) count <= count + 1;
    else count <= 0;
  end

  // sink with back-pressure
  always @(posedge clk) begin
    out_ready <= ($urandom % 3 != 0);
    if (rst_n && out_valid && out_ready) got.push_back(out_pkt);
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(dma_region_e rg, logic [13:0] a, logic [31:0] d);
    in_pkt = '{dst: 4'd1, tgt: TGT_DMA, src: 4'd4, addr: {rg, a}, data: d};
    in_valid = 1;
    @(posedge clk);
    while (!in_ready) begin stalls++; @(posedge clk); end
    #1 in_valid = 0;
  endtask

  function automatic logic [31:0] pe(pe_op_e op, pe_src_e s1, pe_src_e s2);
    pe_cfg_t c;
    c = '0; c.op = op; c.src1 = s1; c.src2 = s2;
    return 32'(c);
  endfunction

  initial begin
    in_pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // context 1: row 0 col 0 = bank0 + bank1, its OUT2 forwards bank 1
    send(R_CONFIG, {2'd1, 4'd0, 8'd0}, pe(OP_ADD, S_UP, S_UP2));
    send(R_CONFIG, {2'd1, 4'd0, 8'd1}, pe(OP_PASS, S_UP, S_UP));
    send(R_CONFIG, {2'd1, 4'd0, 8'd2}, pe(OP_PASS, S_UP, S_UP2));   // row 1 col 0
    send(R_CONFIG, {2'd1, 4'd0, 8'd3}, pe(OP_PASS, S_UP, S_UP));
    // input buffer: word 0 <- bank 0, word 1 <- bank 1, others 0
    for (int j = 0; j < 4; j++) send(R_CONFIG, {2'd1, 4'd0, 8'(4 + j)}, 32'(j));
    // output buffer: bank 0 <- OUT1 col 0, bank 1 <- OUT2 col 0
    send(R_CONFIG, {2'd1, 4'd0, 8'd8}, 32'h100);
    send(R_CONFIG, {2'd1, 4'd0, 8'd9}, 32'h101);
    send(R_CONFIG, {2'd1, 4'd0, 8'd10}, 32'h0);
    send(R_CONFIG, {2'd1, 4'd0, 8'd11}, 32'h0);
    check(job_active, "job active after first packet");
    for (int i = 0; i < L; i++) begin
      data0[i] = $urandom; data1[i] = $urandom;
      send(R_MEM_IN, {5'd0, 9'(i)}, data0[i]);
      send(R_MEM_IN, {5'd1, 9'(i)}, data1[i]);
    end
    stalls = 0;
    send(R_CTRL, 14'(C_RUN), {14'd0, 2'd1, 16'(L)});
    send(R_CTRL, 14'(C_XFER_DST), {12'd0, 4'd4, 16'h0100});
    check(stalls >= 2 * (L + 2 + 3), $sformatf("stalled %0d clocks while the CGRA ran", stalls));
    send(R_CTRL, 14'(C_XFER_GO), {11'd0, 5'd0, 6'd0, 10'(L)});
    send(R_CTRL, 14'(C_XFER_DST), {12'd0, 4'd5, 16'h0200});
    send(R_CTRL, 14'(C_XFER_GO), {11'd0, 5'd1, 6'd0, 10'(L)});
    send(R_CTRL, 14'(C_ACK), {12'd0, 4'd4, 16'h03F0});
    wait (got.size() == 2 * L + 1);
    repeat (4) @(posedge clk);
    check(got.size() == 2 * L + 1, "packet count");
    for (int i = 0; i < L; i++) begin
      noc_pkt_t p;
      p = got[i];
      check(p.dst == 4'd4 && p.tgt == TGT_DMEM && p.src == 4'd1 && p.addr == 16'h0100 + 16'(i) &&
            p.data == data0[i] + data1[i], $sformatf("bank 0 word %0d: %h", i, p.data));
      p = got[L + i];
      check(p.dst == 4'd5 && p.addr == 16'h0200 + 16'(i) && p.data == data1[i],
            $sformatf("bank 1 word %0d: %h", i, p.data));
    end
    begin
      noc_pkt_t p;
      p = got[2 * L];
      check(p.dst == 4'd4 && p.addr == 16'h03F0 && p.src == 4'd1, "ack header");
      check(p.data > 32'd0 && p.data + 2 >= 32'(count_at_ack) && p.data <= 32'(count_at_ack),
            $sformatf("ack count %0d vs %0d", p.data, count_at_ack));
    end
    check(!job_active, "job ended by the acknowledgment");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int count_at_ack = 0;
  always @(posedge clk) if (job_active) count_at_ack <= count + 1;
endmodule
