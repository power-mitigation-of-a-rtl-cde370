// tb_noc_router: random traffic into all five ports of the switch of node
// N4 (and of N8, a corner node fed only from the north), random back-pressure on the outputs.
// Every packet carries a unique tag; the test checks it leaves exactly once
// on the port the routing rule (row 2 climbs north, then X, then Y) names,
// and that packets from one input to one output keep their order.
module tb_noc_router;
  import harp_pkg::*;
  logic clk = 0, rst_n = 0, ce = 1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // expected output port, written out independently of the package
  function automatic int exp_port(int cur, int dst);
    int cx, cy, dx, dy;
    cx = cur % 3; cy = cur / 3; dx = dst % 3; dy = dst / 3;
    if (cur == dst) return 0;      // local
    if (cy == 2)    return 3;      // north
    if (dx > cx)    return 1;      // east
    if (dx < cx)    return 2;      // west
    if (dy > cy)    return 4;      // south
    return 3;                      // north
  endfunction

  for (genvar R = 0; R < 2; R++) begin : g_r
    localparam int ID = (R == 0) ? 4 : 8;
    logic     [4:0] in_valid, in_ready, out_valid, out_ready;
    noc_pkt_t [4:0] in_pkt, out_pkt;
    int sent = 0, got = 0;
    bit seen [int];
    int last_seq [5][5];

    noc_router #(.NODE_ID(4'(ID))) dut (.*);

    initial begin
      for (int a = 0; a < 5; a++) for (int b = 0; b < 5; b++) last_seq[a][b] = -1;
    end

    // sources: data = {input port, sequence}
    for (genvar p = 0; p < 5; p++) begin : g_src
      int seq = 0;
      always @(posedge clk) begin
        if (!rst_n) begin
          in_valid[p] <= 1'b0;
        end else begin
          if (in_valid[p] && in_ready[p]) begin
            in_valid[p] <= 1'b0;
            sent++;
          end
          if ((!in_valid[p] || in_ready[p]) && seq < 200 && ($urandom % 3 != 0)) begin
            int d;
            do d = $urandom_range(0, 8); while (d == 6 || d == 7);
            in_pkt[p]   <= '{dst: 4'(d), tgt: TGT_DMEM, src: 4'(p), addr: 16'(d),
                             data: {16'(p), 16'(seq)}};
            in_valid[p] <= 1'b1;
            seq++;
          end
        end
      end
    end

    // sinks
    always @(posedge clk) begin
      for (int o = 0; o < 5; o++) out_ready[o] <= ($urandom % 4 != 0);
      if (rst_n) begin
        for (int o = 0; o < 5; o++) begin
          if (out_valid[o] && out_ready[o]) begin
            int src, sq, key;
            src = int'(out_pkt[o].data[31:16]);
            sq  = int'(out_pkt[o].data[15:0]);
            key = src * 65536 + sq;
            got++;
            checks++;
            if (exp_port(ID, int'(out_pkt[o].dst)) != o) begin
              failures++; $display("FAIL node %0d dst %0d left on port %0d", ID, out_pkt[o].dst, o);
            end
            checks++;
            if (seen.exists(key) || sq <= last_seq[src][o]) begin
              failures++; $display("FAIL node %0d duplicate or reordered %0d.%0d", ID, src, sq);
            end
            seen[key] = 1;
            last_seq[src][o] = sq;
          end
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (g_r[0].sent == 1000 && g_r[1].sent == 1000);
    repeat (50) @(posedge clk);
    checks++;
    if (g_r[0].got != 1000 || g_r[1].got != 1000) begin
      failures++; $display("FAIL delivered %0d / %0d", g_r[0].got, g_r[1].got);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
