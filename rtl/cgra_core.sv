// cgra_core: template-based coarse-grained reconfigurable array.
//
// Structure (one node): NB = 2*COLS first local memory banks feed an input
// I/O buffer (NB multiplexers of NB inputs plus registers) that drives the
// two operands of every PE of row 0; a ROWS x COLS pe_array; an output I/O
// buffer choosing, for each of the NB second local memory banks, one of the
// 2*COLS last-row outputs; and a context memory holding NCTX contexts.
// A context is ROWS*COLS PE configuration words (slots 0..ROWS*COLS-1,
// row-major), NB input-buffer selects (next NB slots, bits [SW-1:0]) and NB
// output-buffer words (last NB slots, bits [SW-1:0] select, bit 8 write
// enable of that bank).
//
// Execution: a run streams 'len' memory words through the array.  Word i of
// every first bank is read, passes the input buffer and the PE rows, the
// output buffer, and is written to word i of every enabled second bank.
// Row-valid bits travel with the data, so PEs with loops only update on
// valid data.  A run of length L takes L + ROWS + 3 CGRA clock cycles
// (memory read, input buffer, ROWS operand stages, output buffer, write).
//
// Clocking: one clock.  The CGRA side runs on 'ce' (tunable clock
// enable); the loading side (memories, context memory) on 'ce_sys'.  Runs
// are started with a four-phase handshake (run_req/run_ack) so the two
// enables may have any ratio.
//
// Interface to the DMA (ce_sys): dma_we with dma_region (first memory,
// second memory, context memory) and dma_addr (bank in [13:9], word in
// [8:0]; or context in [13:12], slot in [7:0]).  dma_rdata returns the
// second-memory word at dma_addr one ce_sys clock later.
//
// Following the document: the two sets of local memory banks, the I/O
// buffers, the PE array, contexts selected at run time and loaded as
// address + operation words.  The streaming execution model, memory depth,
// context count and slot layout are this design's choice.
module cgra_core
  import harp_pkg::*;
#(
  parameter int unsigned ROWS  = 4,
  parameter int unsigned COLS  = 16,
  parameter int unsigned DEPTH = 512,
  parameter int unsigned NCTX  = 4,
  localparam int unsigned NB    = 2 * COLS,
  localparam int unsigned SW    = $clog2(NB),
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned RC    = ROWS * COLS,
  localparam int unsigned NSLOT = RC + 2 * NB,
  localparam int unsigned CW    = (NCTX > 1) ? $clog2(NCTX) : 1,
  localparam int unsigned SLW   = $clog2(NSLOT)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,       // CGRA clock enable
  input  logic          ce_sys,   // system clock enable (DMA side)
  // loading side
  input  logic          dma_we,
  input  dma_region_e   dma_region,
  input  logic [13:0]   dma_addr,
  input  logic [DW-1:0] dma_wdata,
  output logic [DW-1:0] dma_rdata,
  // run control
  input  logic          run_req,
  input  logic [1:0]    run_ctx,
  input  logic [15:0]   run_len,
  output logic          run_ack,
  output logic          busy,
  output logic [31:0]   last_cycles   // CGRA clock cycles of the last run
);

  // ---------------------------------------------------------- context memory
  logic [DW-1:0] cmem [NCTX][NSLOT];
  logic [CW-1:0] act_ctx;

  wire [1:0] wctx  = dma_addr[13:12];
  wire [7:0] wslot = dma_addr[7:0];

  always_ff @(posedge clk) begin
    if (ce_sys && dma_we && dma_region == R_CONFIG &&
        32'(wctx) < NCTX && 32'(wslot) < NSLOT)
      cmem[wctx[CW-1:0]][wslot[SLW-1:0]] <= dma_wdata;
  end

  pe_cfg_t [ROWS-1:0][COLS-1:0] pe_cfg;
  logic [NB-1:0][SW-1:0]        isel, osel;
  logic [NB-1:0]                owe;

  always_comb begin
    for (int r = 0; r < int'(ROWS); r++)
      for (int c = 0; c < int'(COLS); c++)
        pe_cfg[r][c] = pe_cfg_t'(cmem[act_ctx][r*COLS + c]);
    for (int k = 0; k < int'(NB); k++) begin
      isel[k] = cmem[act_ctx][RC + k][SW-1:0];
      osel[k] = cmem[act_ctx][RC + NB + k][SW-1:0];
      owe[k]  = cmem[act_ctx][RC + NB + k][8];
    end
  end

  // ---------------------------------------------------------- control
  typedef enum logic [1:0] {ST_IDLE, ST_RUN, ST_DONE} st_e;
  st_e st;

  logic [15:0]        len_q;
  logic [AW:0]        rd_ptr, wr_ptr;
  logic [ROWS+2:0]    vpipe;
  logic               clr;
  logic [31:0]        cyc;

  wire issue = (st == ST_RUN) && (32'(rd_ptr) < 32'(len_q));
  wire wr_go = (st == ST_RUN) && vpipe[ROWS+2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= ST_IDLE;
      act_ctx     <= '0;
      len_q       <= '0;
      rd_ptr      <= '0;
      wr_ptr      <= '0;
      vpipe       <= '0;
      clr         <= 1'b0;
      cyc         <= '0;
      last_cycles <= '0;
    end else if (ce) begin
      clr <= 1'b0;
      unique case (st)
        ST_IDLE: begin
          vpipe <= '0;
          if (run_req) begin
            act_ctx <= run_ctx[CW-1:0];
            len_q   <= (32'(run_len) > DEPTH) ? 16'(DEPTH) : run_len;
            rd_ptr  <= '0;
            wr_ptr  <= '0;
            cyc     <= '0;
            clr     <= 1'b1;
            st      <= ST_RUN;
          end
        end
        ST_RUN: begin
          cyc   <= cyc + 1;
          vpipe <= {vpipe[ROWS+1:0], issue};
          if (issue) rd_ptr <= rd_ptr + 1'b1;
          if (wr_go) wr_ptr <= wr_ptr + 1'b1;
          if ((wr_go && 32'(wr_ptr) + 1 == 32'(len_q)) || len_q == 16'd0) begin
            last_cycles <= cyc + 1;
            st          <= ST_DONE;
          end
        end
        default: begin   // ST_DONE: hold ack until the request drops
          if (!run_req) st <= ST_IDLE;
        end
      endcase
    end
  end

  assign run_ack = (st == ST_DONE);
  assign busy    = (st == ST_RUN);

  // ---------------------------------------------------------- memories
  logic [NB-1:0][DW-1:0] mem_rd, ibuf_q, obuf_q, arr_out, out_rd;
  logic [SW-1:0]         rd_bank_q;
  wire  [4:0]            dbank = dma_addr[13:9];
  wire  [AW-1:0]         dword = dma_addr[AW-1:0];

  for (genvar b = 0; b < int'(NB); b++) begin : g_bank
    dp_ram #(.W(DW), .DEPTH(DEPTH)) u_first (
      .clk(clk), .rst_n(rst_n),
      .ce_a(ce_sys), .we_a(dma_we && dma_region == R_MEM_IN && 32'(dbank) == b),
      .addr_a(dword), .wdata_a(dma_wdata), .rdata_a(),
      .ce_b(ce), .we_b(1'b0), .addr_b(rd_ptr[AW-1:0]), .wdata_b('0), .rdata_b(mem_rd[b])
    );
    dp_ram #(.W(DW), .DEPTH(DEPTH)) u_second (
      .clk(clk), .rst_n(rst_n),
      .ce_a(ce_sys), .we_a(dma_we && dma_region == R_MEM_OUT && 32'(dbank) == b),
      .addr_a(dword), .wdata_a(dma_wdata), .rdata_a(out_rd[b]),
      .ce_b(ce), .we_b(wr_go && owe[b]), .addr_b(wr_ptr[AW-1:0]), .wdata_b(obuf_q[b]),
      .rdata_b()
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      rd_bank_q <= '0;
    else if (ce_sys) rd_bank_q <= dbank[SW-1:0];
  end
  assign dma_rdata = out_rd[rd_bank_q];

  // ---------------------------------------------------------- datapath
  io_buffer #(.N_IN(NB), .N_OUT(NB), .W(DW)) u_ibuf (
    .clk(clk), .rst_n(rst_n), .ce(ce), .en(vpipe[0]),
    .din(mem_rd), .sel(isel), .dout(ibuf_q)
  );

  pe_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk(clk), .rst_n(rst_n), .ce(ce), .clr(clr),
    .vld(vpipe[ROWS:1]), .cfg(pe_cfg), .bin(ibuf_q), .bout(arr_out)
  );

  io_buffer #(.N_IN(NB), .N_OUT(NB), .W(DW)) u_obuf (
    .clk(clk), .rst_n(rst_n), .ce(ce), .en(vpipe[ROWS+1]),
    .din(arr_out), .sel(osel), .dout(obuf_q)
  );

endmodule
