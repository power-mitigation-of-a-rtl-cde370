// cgra_dma: DMA device and CGRA control of one CGRA node.
//
// Slave side: accepts NoC packets addressed to this node's DMA.  A packet
// whose address region is the first local memory, the second local memory
// or the context memory is written straight into the cgra_core (the
// configuration words and the data to process).  Region R_CTRL carries
// commands:
//   C_RUN      start a context (data[17:16]) over data[15:0] words; the DMA
//              accepts nothing more until the CGRA has finished
//   C_XFER_DST set the destination node and base address of transfers back
//   C_XFER_GO  send data[9:0] words of second-memory bank data[20:16] back,
//              one write packet per word, to the data memory of the
//              destination node (base address incremented per word)
//   C_ACK      send the acknowledgment: one packet carrying the execution
//              cycle count to node data[19:16], address data[15:0]; this
//              ends the job
// A job starts with the first packet accepted after the previous
// acknowledgment; 'job_active' spans it and drives the execution counter.
// Master side: the packets it generates leave on out_valid/out_pkt with a
// valid/ready handshake.
//
// Timing: all on the system clock enable 'ce_sys'.  Data and context words
// take one clock each; a transferred word takes three clocks plus the wait
// for the network.
//
// Following the document: DMA loading of configuration and data, transfer
// of results back to the host's data memory, and the acknowledgment from
// the DMA master carrying the counted cycles.  The command set and address
// map are this design's own.
module cgra_dma
  import harp_pkg::*;
#(
  parameter logic [3:0] NODE_ID = 4'd0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce_sys,
  // NoC slave (from the switch)
  input  logic          in_valid,
  input  noc_pkt_t      in_pkt,
  output logic          in_ready,
  // NoC master (to the switch)
  output logic          out_valid,
  output noc_pkt_t      out_pkt,
  input  logic          out_ready,
  // cgra_core loading side
  output logic          dma_we,
  output dma_region_e   dma_region,
  output logic [13:0]   dma_addr,
  output logic [DW-1:0] dma_wdata,
  input  logic [DW-1:0] dma_rdata,
  // cgra_core run control
  output logic          run_req,
  output logic [1:0]    run_ctx,
  output logic [15:0]   run_len,
  input  logic          run_ack,
  // execution-time monitoring
  output logic          job_active,
  input  logic [31:0]   count
);

  typedef enum logic [2:0] {
    D_IDLE, D_RUNREQ, D_RUNREL, D_XRD, D_XWAIT, D_XSEND, D_ACK
  } dst_e;
  dst_e st;

  logic [3:0]  x_node, a_node;
  logic [15:0] x_base, a_addr;
  logic [4:0]  x_bank;
  logic [9:0]  x_cnt, x_i;

  wire         accept = ce_sys && in_valid && in_ready;
  dma_region_e in_reg;
  assign in_reg = dma_region_e'(in_pkt.addr[15:14]);

  assign in_ready   = (st == D_IDLE);
  assign dma_we     = in_valid && in_ready && in_reg != R_CTRL;
  assign dma_region = (st == D_XRD || st == D_XWAIT) ? R_MEM_OUT : in_reg;
  assign dma_addr   = (st == D_XRD || st == D_XWAIT) ? {x_bank, 9'(x_i)} : in_pkt.addr[13:0];
  assign dma_wdata  = in_pkt.data;
  assign run_req    = (st == D_RUNREQ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= D_IDLE;
      job_active <= 1'b0;
      run_ctx    <= '0;
      run_len    <= '0;
      x_node     <= '0;
      x_base     <= '0;
      x_bank     <= '0;
      x_cnt      <= '0;
      x_i        <= '0;
      a_node     <= '0;
      a_addr     <= '0;
      out_valid  <= 1'b0;
      out_pkt    <= '0;
    end else if (ce_sys) begin
      unique case (st)
        D_IDLE: if (accept) begin
          job_active <= 1'b1;
          if (in_reg == R_CTRL) begin
            unique case (dma_cmd_e'(in_pkt.addr[1:0]))
              C_RUN: begin
                run_ctx <= in_pkt.data[17:16];
                run_len <= in_pkt.data[15:0];
                st      <= D_RUNREQ;
              end
              C_XFER_DST: begin
                x_node <= in_pkt.data[19:16];
                x_base <= in_pkt.data[15:0];
              end
              C_XFER_GO: begin
                x_bank <= in_pkt.data[20:16];
                x_cnt  <= in_pkt.data[9:0];
                x_i    <= '0;
                if (in_pkt.data[9:0] != 10'd0) st <= D_XRD;
              end
              default: begin   // C_ACK
                a_node <= in_pkt.data[19:16];
                a_addr <= in_pkt.data[15:0];
                st     <= D_ACK;
              end
            endcase
          end
        end
        D_RUNREQ: if (run_ack)  st <= D_RUNREL;
        D_RUNREL: if (!run_ack) st <= D_IDLE;
        D_XRD:    st <= D_XWAIT;
        D_XWAIT: begin
          out_pkt   <= '{dst: x_node, tgt: TGT_DMEM, src: NODE_ID,
                         addr: x_base + 16'(x_i), data: dma_rdata};
          out_valid <= 1'b1;
          st        <= D_XSEND;
        end
        D_XSEND: if (out_ready) begin
          out_valid <= 1'b0;
          x_i       <= x_i + 1'b1;
          st        <= (x_i + 1'b1 == x_cnt) ? D_IDLE : D_XRD;
        end
        default: begin  // D_ACK
          if (!out_valid) begin
            out_pkt   <= '{dst: a_node, tgt: TGT_DMEM, src: NODE_ID,
                           addr: a_addr, data: count};
            out_valid <= 1'b1;
          end else if (out_ready) begin
            out_valid  <= 1'b0;
            job_active <= 1'b0;
            st         <= D_IDLE;
          end
        end
      endcase
    end
  end

  // A packet on the master side is held until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      (ce_sys && out_valid && !out_ready) |=> (out_valid && $stable(out_pkt));
  endproperty
  a_hold: assert property (p_hold);

endmodule
