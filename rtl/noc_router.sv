// noc_router: switch of one NoC node.
//
// Five ports (local, east, west, north, south), each an input and an
// output with a valid/ready handshake carrying one single-flit noc_pkt_t.
// Every input packet is steered by harp_pkg::route(NODE_ID, dst) to one
// output; the local output goes to the node's own devices (data memory,
// DMA slave or PMU, told apart by the packet's target field outside the
// switch).  Each output owns one packet register; when it is empty, a
// round-robin arbiter grants it to one of the inputs that request it and
// the packet is copied in on the next enabled clock.
//
// Timing: one clock per hop.  An output register is refilled only on the
// clock after it has been emptied, so each port carries at most one packet
// every two clocks; in exchange no ready signal passes combinationally
// through a switch, and a ring of switches has no combinational loop.
//
// Following the document: point-to-point links between the nodes of the
// grid and switches that deliver a packet according to its routing field.
// Packet format, routing order, arbitration and buffering are this
// design's choice.
module noc_router
  import harp_pkg::*;
#(
  parameter logic [3:0] NODE_ID = 4'd4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ce,
  input  logic     [NPORTS-1:0]  in_valid,
  input  noc_pkt_t [NPORTS-1:0]  in_pkt,
  output logic     [NPORTS-1:0]  in_ready,
  output logic     [NPORTS-1:0]  out_valid,
  output noc_pkt_t [NPORTS-1:0]  out_pkt,
  input  logic     [NPORTS-1:0]  out_ready
);

  logic [NPORTS-1:0][2:0] want;       // requested output per input
  logic [NPORTS-1:0]      gnt_v;      // output granted this clock
  logic [NPORTS-1:0][2:0] gnt_i;      // winning input per output
  logic [NPORTS-1:0][2:0] rr;         // round-robin start per output

  always_comb begin
    int idx;
    idx = 0;
    for (int i = 0; i < int'(NPORTS); i++) want[i] = 3'(route(NODE_ID, in_pkt[i].dst));
    in_ready = '0;
    gnt_v    = '0;
    gnt_i    = '0;
    for (int o = 0; o < int'(NPORTS); o++) begin
      if (!out_valid[o]) begin
        for (int k = 0; k < int'(NPORTS); k++) begin
          idx = (int'(rr[o]) + k) % int'(NPORTS);
          if (!gnt_v[o] && in_valid[idx] && int'(want[idx]) == o) begin
            gnt_v[o]      = 1'b1;
            gnt_i[o]      = 3'(idx);
            in_ready[idx] = 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_pkt   <= '0;
      rr        <= '0;
    end else if (ce) begin
      for (int o = 0; o < int'(NPORTS); o++) begin
        if (gnt_v[o]) begin
          out_valid[o] <= 1'b1;
          out_pkt[o]   <= in_pkt[gnt_i[o]];
          rr[o]        <= 3'((int'(gnt_i[o]) + 1) % int'(NPORTS));
        end else if (out_valid[o] && out_ready[o]) begin
          out_valid[o] <= 1'b0;
        end
      end
    end
  end

  // An offered packet stays until it is taken.
  for (genvar o = 0; o < int'(NPORTS); o++) begin : g_chk
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      (ce && out_valid[o] && !out_ready[o]) |=> (out_valid[o] && $stable(out_pkt[o])));
  end

endmodule
