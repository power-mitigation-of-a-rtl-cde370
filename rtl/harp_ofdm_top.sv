// harp_ofdm_top: heterogeneous multicore platform configured as an OFDM
// receiver, with feedback-controlled frequency/voltage scaling.
//
// Seven nodes of a 3x3 grid are populated (node n at column n%3, row n/3):
//   N0  CGRA 5x16  time synchronization / CP removal
//   N1  CGRA 4x8   frequency offset estimation
//   N2  CGRA 4x16  FFT
//   N8  CGRA 4x16  channel estimation / correction
//   N3, N4, N5     RISC nodes (the processors themselves are outside this
//                  module: each brings out its NoC master port and a port
//                  to its data memory)
// Links: N0-N1, N1-N2, N0-N3, N1-N4, N2-N5, N3-N4, N4-N5, N5-N8, each a
// pair of noc_router ports.  A CGRA node is cgra_dma + cgra_core +
// exec_counter; a RISC node has a data memory (dp_ram) on its switch's
// local output, and N4 also the PMU (packets with target TGT_PMU).
//
// Clocking: one base clock of BASE_MHZ.  clk_en_gen instances derive the
// system (RISC, NoC, DMA) enable at SYS_MHZ and one enable per CGRA from
// its PMU frequency code (F_MIN_MHZ + F_STEP_MHZ * code) and PMU gate.
// Frequency control: exec_counter measures each CGRA job in system
// cycles; fcs_engine picks the worst-case node and steps the other
// nodes' codes once per iteration, writing the PMU register, which gates
// each clock while its frequency/voltage changes.
//
// Following the document: node placement and roles, CGRA sizes, the
// three RISC/four CGRA split, per-node tunable clocks, the 35-200 MHz
// range in 16 steps with the RISC clock fixed at 100 MHz, the PMU register
// and the feedback loop.  The FCS in hardware (the document runs it in
// RISC software), the single base clock with enables, and the memory
// sizes are this design's choice.
module harp_ofdm_top
  import harp_pkg::*;
#(
  parameter int unsigned DEPTH        = 512,    // words per local memory bank
  parameter int unsigned NCTX         = 4,
  parameter int unsigned DMEM_DEPTH   = 1024,   // words per RISC data memory
  parameter int unsigned BASE_MHZ     = 200,
  parameter int unsigned SYS_MHZ      = 100,
  parameter int unsigned F_MIN_MHZ    = 35,
  parameter int unsigned F_STEP_MHZ   = 11,
  parameter int unsigned MARGIN_SHIFT = 3,
  parameter int unsigned F_SETTLE     = 16,
  parameter int unsigned V_SETTLE     = 64,
  localparam int unsigned DAW         = $clog2(DMEM_DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // RISC nodes N3, N4, N5 (index 0, 1, 2): NoC master ports
  input  logic     [2:0]        risc_valid,
  input  noc_pkt_t [2:0]        risc_pkt,
  output logic     [2:0]        risc_ready,
  // RISC nodes: data memory ports (system clock enable, 1-clock read)
  input  logic     [2:0]        dmem_we,
  input  logic     [2:0][DAW-1:0] dmem_addr,
  input  logic     [2:0][31:0]  dmem_wdata,
  output logic     [2:0][31:0]  dmem_rdata,
  // feedback control
  input  logic                  fcs_enable,
  input  logic                  fcs_retarget,
  input  logic                  dvfs_mode,
  // status (CGRA index 0..3 = N0, N1, N2, N8)
  output logic                  ce_sys,
  output logic     [3:0]        cgra_ce,
  output logic     [3:0][3:0]   freq_code,
  output logic     [3:0][2:0]   vsel,
  output logic     [3:0]        clk_gated,
  output logic     [31:0]       pmu_reg,
  output logic     [3:0][31:0]  exec_cycles,
  output logic     [3:0][31:0]  cgra_cycles,
  output logic     [3:0]        cgra_busy,
  output logic     [1:0]        fcs_worst,
  output logic     [31:0]       fcs_target,
  output logic     [15:0]       fcs_iterations,
  output logic     [3:0]        fcs_in_region
);

  // ------------------------------------------------------------ topology
  localparam int unsigned NN = 9;
  function automatic bit present(input int n);
    return (n >= 0 && n <= 5) || n == 8;
  endfunction

  logic     [NN-1:0][NPORTS-1:0] r_in_valid, r_in_ready, r_out_valid, r_out_ready;
  noc_pkt_t [NN-1:0][NPORTS-1:0] r_in_pkt, r_out_pkt;

  for (genvar n = 0; n < int'(NN); n++) begin : g_node
    if (present(n)) begin : g_sw
      noc_router #(.NODE_ID(4'(n))) u_sw (
        .clk(clk), .rst_n(rst_n), .ce(ce_sys),
        .in_valid(r_in_valid[n]), .in_pkt(r_in_pkt[n]), .in_ready(r_in_ready[n]),
        .out_valid(r_out_valid[n]), .out_pkt(r_out_pkt[n]), .out_ready(r_out_ready[n])
      );
    end else begin : g_none
      assign r_in_ready[n]  = '0;
      assign r_out_valid[n] = '0;
      assign r_out_pkt[n]   = '0;
    end

    // neighbour links (port p of n faces port q of m)
    for (genvar p = 1; p < int'(NPORTS); p++) begin : g_link
      localparam int M = (p == int'(P_EAST))  ? ((n % 3 < 2) ? n + 1 : -1) :
                         (p == int'(P_WEST))  ? ((n % 3 > 0) ? n - 1 : -1) :
                         (p == int'(P_NORTH)) ? n - 3 : n + 3;
      localparam int Q = (p == int'(P_EAST))  ? int'(P_WEST)  :
                         (p == int'(P_WEST))  ? int'(P_EAST)  :
                         (p == int'(P_NORTH)) ? int'(P_SOUTH) : int'(P_NORTH);
      if (present(n) && M >= 0 && M < int'(NN) && present(M)) begin : g_on
        assign r_in_valid[n][p]  = r_out_valid[M][Q];
        assign r_in_pkt[n][p]    = r_out_pkt[M][Q];
        assign r_out_ready[n][p] = r_in_ready[M][Q];
      end else begin : g_off
        assign r_in_valid[n][p]  = 1'b0;
        assign r_in_pkt[n][p]    = '0;
        assign r_out_ready[n][p] = 1'b1;
      end
    end
  end

  // ------------------------------------------------------------ clocks
  logic [3:0][3:0] pmu_code;
  logic [3:0]      pmu_gate;

  clk_en_gen #(.BASE_MHZ(BASE_MHZ)) u_sysclk (
    .clk(clk), .rst_n(rst_n), .freq_mhz(8'(SYS_MHZ)), .gate(1'b0), .ce(ce_sys)
  );

  // ------------------------------------------------------------ CGRA nodes
  localparam int CG_ID   [4] = '{0, 1, 2, 8};
  localparam int CG_ROWS [4] = '{5, 4, 4, 4};
  localparam int CG_COLS [4] = '{16, 8, 16, 16};

  logic [3:0]       job_active, job_done;
  logic [3:0][31:0] job_count;

  for (genvar j = 0; j < 4; j++) begin : g_cgra
    localparam int ID = CG_ID[j];

    dma_region_e   dma_region;
    logic          dma_we, run_req, run_ack;
    logic [13:0]   dma_addr;
    logic [31:0]   dma_wdata, dma_rdata;
    logic [1:0]    run_ctx;
    logic [15:0]   run_len;

    clk_en_gen #(.BASE_MHZ(BASE_MHZ)) u_clk (
      .clk(clk), .rst_n(rst_n),
      .freq_mhz(code2mhz(pmu_code[j], F_MIN_MHZ, F_STEP_MHZ)),
      .gate(pmu_gate[j]), .ce(cgra_ce[j])
    );

    cgra_dma #(.NODE_ID(4'(ID))) u_dma (
      .clk(clk), .rst_n(rst_n), .ce_sys(ce_sys),
      .in_valid(r_out_valid[ID][P_LOCAL]), .in_pkt(r_out_pkt[ID][P_LOCAL]),
      .in_ready(r_out_ready[ID][P_LOCAL]),
      .out_valid(r_in_valid[ID][P_LOCAL]), .out_pkt(r_in_pkt[ID][P_LOCAL]),
      .out_ready(r_in_ready[ID][P_LOCAL]),
      .dma_we(dma_we), .dma_region(dma_region), .dma_addr(dma_addr),
      .dma_wdata(dma_wdata), .dma_rdata(dma_rdata),
      .run_req(run_req), .run_ctx(run_ctx), .run_len(run_len), .run_ack(run_ack),
      .job_active(job_active[j]), .count(job_count[j])
    );

    cgra_core #(.ROWS(CG_ROWS[j]), .COLS(CG_COLS[j]), .DEPTH(DEPTH), .NCTX(NCTX)) u_cgra (
      .clk(clk), .rst_n(rst_n), .ce(cgra_ce[j]), .ce_sys(ce_sys),
      .dma_we(dma_we), .dma_region(dma_region), .dma_addr(dma_addr),
      .dma_wdata(dma_wdata), .dma_rdata(dma_rdata),
      .run_req(run_req), .run_ctx(run_ctx), .run_len(run_len), .run_ack(run_ack),
      .busy(cgra_busy[j]), .last_cycles(cgra_cycles[j])
    );

    exec_counter u_cnt (
      .clk(clk), .rst_n(rst_n), .ce(ce_sys), .active(job_active[j]),
      .count(job_count[j]), .last_count(exec_cycles[j]), .done(job_done[j])
    );
  end

  // ------------------------------------------------------------ RISC nodes
  localparam int RS_ID [3] = '{3, 4, 5};

  logic        noc_pmu_we;
  logic [31:0] noc_pmu_data;

  for (genvar k = 0; k < 3; k++) begin : g_risc
    localparam int ID = RS_ID[k];
    noc_pkt_t lp;
    logic     to_pmu;

    assign r_in_valid[ID][P_LOCAL]  = risc_valid[k];
    assign r_in_pkt[ID][P_LOCAL]    = risc_pkt[k];
    assign risc_ready[k]            = r_in_ready[ID][P_LOCAL];
    assign r_out_ready[ID][P_LOCAL] = 1'b1;   // memory and PMU always accept

    assign lp     = r_out_pkt[ID][P_LOCAL];
    assign to_pmu = (ID == 4) && lp.tgt == TGT_PMU;

    dp_ram #(.W(32), .DEPTH(DMEM_DEPTH)) u_dmem (
      .clk(clk), .rst_n(rst_n),
      .ce_a(ce_sys), .we_a(r_out_valid[ID][P_LOCAL] && !to_pmu),
      .addr_a(lp.addr[DAW-1:0]), .wdata_a(lp.data), .rdata_a(),
      .ce_b(ce_sys), .we_b(dmem_we[k]), .addr_b(dmem_addr[k]),
      .wdata_b(dmem_wdata[k]), .rdata_b(dmem_rdata[k])
    );

    if (ID == 4) begin : g_pmu_port
      assign noc_pmu_we   = ce_sys && r_out_valid[ID][P_LOCAL] && to_pmu;
      assign noc_pmu_data = lp.data;
    end
  end

  // ------------------------------------------------------------ power control
  logic        fcs_we;
  logic [31:0] fcs_wdata;

  fcs_engine #(.N(4), .MARGIN_SHIFT(MARGIN_SHIFT)) u_fcs (
    .clk(clk), .rst_n(rst_n), .ce(ce_sys),
    .enable(fcs_enable), .retarget(fcs_retarget), .dvfs(dvfs_mode),
    .done(job_done), .counts(exec_cycles),
    .wr_en(fcs_we), .wr_data(fcs_wdata),
    .worst(fcs_worst), .target(fcs_target), .iterations(fcs_iterations),
    .codes(), .in_region(fcs_in_region)
  );

  pmu #(.N(4), .F_MIN_MHZ(F_MIN_MHZ), .F_STEP_MHZ(F_STEP_MHZ),
        .F_SETTLE(F_SETTLE), .V_SETTLE(V_SETTLE)) u_pmu (
    .clk(clk), .rst_n(rst_n),
    .wr_en((ce_sys && fcs_we) || noc_pmu_we),
    .wr_data((ce_sys && fcs_we) ? fcs_wdata : noc_pmu_data),
    .pmu_reg(pmu_reg), .freq_code(pmu_code), .vsel(vsel), .gate(pmu_gate), .busy()
  );

  assign freq_code = pmu_code;
  assign clk_gated = pmu_gate;

endmodule
